// mbist_top: memory BIST built around the low-switching address generator.
//
// Blocks: mbist_controller sequences the Zero-One test; mbist_addr_gen
// produces the address stream ({modified CLFSR, 2-bit CLFSR} with the dual
// rate split); mbist_pattern_gen drives the write data and the expected read
// data; mbist_sig_analyzer compares the read data and reports pass / fail
// back to the controller. The memory under test is outside this module: its
// port signals (mem_*) are brought out so that any single-port memory with a
// READ_LAT-cycle synchronous read can be attached.
//
// Use: hold rst_n low, release it, present seed and pulse start for one
// cycle. done rises after 4 * (2^N + 1) + READ_LAT + 1 cycles; pass is then 1
// for a fault-free memory. err_count and fail_bits give the number of failing
// reads and the failing data-bit positions. Defaults: 1024-word memory
// (N = 10 address bits), 8-bit words (the word width is this design's
// choice), one-cycle read latency.
module mbist_top #(
  parameter int unsigned N        = 10,
  parameter int unsigned DATA_W   = 8,
  parameter int unsigned READ_LAT = 1,
  parameter int unsigned CNT_W    = 16
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic [N-1:0]      seed,
  // memory under test
  output logic              mem_en,
  output logic              mem_we,
  output logic [N-1:0]      mem_addr,
  output logic [DATA_W-1:0] mem_wdata,
  input  logic [DATA_W-1:0] mem_rdata,
  // status
  output mbist_pkg::phase_e phase,
  output logic              done,
  output logic              pass,
  output logic [CNT_W-1:0]  err_count,
  output logic [DATA_W-1:0] fail_bits
);

  logic              ag_step, ag_load, sa_clear;
  logic              bg, rd_issue;
  logic              cmp_en, fail;
  logic [DATA_W-1:0] exp_data;
  logic [N-1:0]      addr;

  mbist_controller #(.N(N), .READ_LAT(READ_LAT)) u_ctrl (
    .clk     (clk),
    .rst_n   (rst_n),
    .start   (start),
    .seed    (seed),
    .addr    (addr),
    .fail    (fail),
    .ag_step (ag_step),
    .ag_load (ag_load),
    .sa_clear(sa_clear),
    .mem_en  (mem_en),
    .mem_we  (mem_we),
    .bg      (bg),
    .rd_issue(rd_issue),
    .phase   (phase),
    .done    (done),
    .pass    (pass)
  );

  mbist_addr_gen #(.N(N)) u_ag (
    .clk  (clk),
    .rst_n(rst_n),
    .step (ag_step),
    .load (ag_load),
    .seed (seed),
    .addr (addr)
  );

  mbist_pattern_gen #(.DATA_W(DATA_W), .READ_LAT(READ_LAT)) u_pg (
    .clk     (clk),
    .rst_n   (rst_n),
    .bg      (bg),
    .rd_issue(rd_issue),
    .wdata   (mem_wdata),
    .cmp_en  (cmp_en),
    .exp_data(exp_data)
  );

  mbist_sig_analyzer #(.DATA_W(DATA_W), .CNT_W(CNT_W)) u_sa (
    .clk      (clk),
    .rst_n    (rst_n),
    .clear    (sa_clear),
    .cmp_en   (cmp_en),
    .rdata    (mem_rdata),
    .exp_data (exp_data),
    .fail     (fail),
    .err_count(err_count),
    .fail_bits(fail_bits)
  );

  assign mem_addr = addr;

endmodule
