// mbist_sig_analyzer: response analyzer of the MBIST.
//
// Compares each read word of the memory under test with the expected word
// from the pattern generator. Any difference sets the sticky fail flag that
// the test controller reads at the end of the test (fault-free memory: fail
// stays 0). It also counts mismatching words (saturating at all ones) and
// ORs the differing bit positions into fail_bits, which tells which data bits
// carry a fault. With a deterministic Zero-One pattern the expected response
// is known word by word, so a direct comparison is used rather than a
// compressed signature; that is this design's choice.
//
// Interface: cmp_en qualifies rdata / exp_data for one cycle. clear (one
// cycle) resets the results at the start of a test. Asynchronous active-low
// reset.
module mbist_sig_analyzer #(
  parameter int unsigned DATA_W = 8,
  parameter int unsigned CNT_W  = 16
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              clear,
  input  logic              cmp_en,
  input  logic [DATA_W-1:0] rdata,
  input  logic [DATA_W-1:0] exp_data,
  output logic              fail,
  output logic [CNT_W-1:0]  err_count,
  output logic [DATA_W-1:0] fail_bits
);

  logic [DATA_W-1:0] diff;
  logic              mismatch;

  assign diff     = rdata ^ exp_data;
  assign mismatch = cmp_en && (diff != '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fail      <= 1'b0;
      err_count <= '0;
      fail_bits <= '0;
    end else if (clear) begin
      fail      <= 1'b0;
      err_count <= '0;
      fail_bits <= '0;
    end else if (mismatch) begin
      fail      <= 1'b1;
      fail_bits <= fail_bits | diff;
      if (err_count != '1) err_count <= err_count + 1'b1;
    end
  end

endmodule
