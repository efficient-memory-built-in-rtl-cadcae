// tb_mbist_top_n5: the 32-location (5-bit address) configuration of the
// MBIST, with a two-cycle read latency. Runs the Zero-One test with seed
// 00000 on a fault-free memory (must pass, and the address stream of the
// write-0 pass must start 00000, 00010, 00011, 00001, 10001: three steps of
// the 2-bit part, then one of the upper part), then with every word's bit 0
// stuck at 1 (32 failing reads in the read-0 pass) and with word 5's bit 7
// stuck at 0 (one failing read in the read-1 pass).
module tb_mbist_top_n5;
  import mbist_pkg::*;
  localparam int N = 5, DW = 8, RL = 2;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, start = 0;
  logic [N-1:0] seed = '0;
  logic mem_en, mem_we, done, pass;
  logic [N-1:0] mem_addr;
  logic [DW-1:0] mem_wdata, mem_rdata, fail_bits;
  logic [15:0] err_count;
  phase_e phase;
  logic flt_en = 0, flt_val = 0, all_words = 0;
  logic [N-1:0] flt_addr = '0;
  int unsigned flt_bit = 0;
  logic [DW-1:0] rd_raw;

  always #5 clk = ~clk;

  mbist_top #(.N(N), .DATA_W(DW), .READ_LAT(RL)) dut (
    .clk, .rst_n, .start, .seed, .mem_en, .mem_we, .mem_addr, .mem_wdata,
    .mem_rdata, .phase, .done, .pass, .err_count, .fail_bits);

  // memory with one-cycle read, plus one extra register stage: latency 2
  mem_model #(.AW(N), .DW(DW)) u_mem (
    .clk, .en(mem_en), .we(mem_we), .addr(mem_addr), .wdata(mem_wdata),
    .rdata(rd_raw), .flt_en(flt_en), .flt_addr(all_words ? mem_addr : flt_addr),
    .flt_bit, .flt_val);
  always_ff @(posedge clk) mem_rdata <= rd_raw;

  task automatic chk(input string name, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s got=%0d exp=%0d", name, got, exp);
    end
  endtask

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam logic [4:0] FIRST [5] = '{5'b00000, 5'b00010, 5'b00011, 5'b00001, 5'b10001};

  task automatic run_test(input bit exp_pass, input int exp_errs, input logic [DW-1:0] exp_bits);
    int cycles, k;
    @(negedge clk);
    seed = '0; start = 1;
    @(negedge clk);
    start = 0;
    cycles = 1; k = 0;
    while (!done && cycles < 1000) begin
      if (mem_en && k < 5) begin
        chk("first_addrs", mem_addr, FIRST[k]);
        k++;
      end
      @(negedge clk);
      cycles++;
    end
    chk("cycles", cycles, 4 * (2**N + 1) + RL + 1);
    chk("pass", pass, exp_pass);
    chk("err_count", err_count, exp_errs);
    chk("fail_bits", fail_bits, exp_bits);
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    run_test(1, 0, '0);
    flt_en = 1; all_words = 1; flt_bit = 0; flt_val = 1;
    run_test(0, 32, 8'h01);
    all_words = 0; flt_addr = 5'd5; flt_bit = 7; flt_val = 0;
    run_test(0, 1, 8'h80);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
