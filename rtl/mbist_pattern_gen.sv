// mbist_pattern_gen: test pattern generator of the MBIST.
//
// For the Zero-One test the pattern is a solid data background: every bit of
// the written word equals bg (all zeros in the 0 passes, all ones in the 1
// passes). The block also produces what the signature analyzer needs to
// check a read: the expected word and a compare strobe, delayed by READ_LAT
// cycles so that they line up with the memory's read data.
//
// Interface: wdata is combinational from bg. rd_issue marks a read request
// this cycle; cmp_en / exp_data follow READ_LAT clock edges later.
// Asynchronous active-low reset clears the delay line. The read latency and
// the delay line are this design's choices; the memory model used in the
// testbenches has a one-cycle synchronous read.
module mbist_pattern_gen #(
  parameter int unsigned DATA_W   = 8,
  parameter int unsigned READ_LAT = 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              bg,
  input  logic              rd_issue,
  output logic [DATA_W-1:0] wdata,
  output logic              cmp_en,
  output logic [DATA_W-1:0] exp_data
);

  if (READ_LAT < 1) begin : g_bad_lat
    $error("mbist_pattern_gen: READ_LAT must be at least 1");
  end

  logic [READ_LAT-1:0] v_pipe;
  logic [READ_LAT-1:0] bg_pipe;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v_pipe  <= '0;
      bg_pipe <= '0;
    end else begin
      v_pipe[0]  <= rd_issue;
      bg_pipe[0] <= bg;
      for (int unsigned i = 1; i < READ_LAT; i++) begin
        v_pipe[i]  <= v_pipe[i-1];
        bg_pipe[i] <= bg_pipe[i-1];
      end
    end
  end

  assign wdata    = {DATA_W{bg}};
  assign cmp_en   = v_pipe[READ_LAT-1];
  assign exp_data = {DATA_W{bg_pipe[READ_LAT-1]}};

endmodule
