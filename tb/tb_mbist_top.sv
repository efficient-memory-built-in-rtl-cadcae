// tb_mbist_top: the complete MBIST at its default size (1024 x 8-bit memory,
// 10-bit address generator) attached to a behavioural memory.
//  1. fault-free memory, seed 0: must pass;
//  2. bit 3 of one word stuck at 0, seed 1..1: must fail with exactly one
//     mismatching read (in the read-1 pass) and fail_bits = 0000_1000;
//  3. bit 6 of another word stuck at 1, seed 010..01: one mismatch in the
//     read-0 pass, fail_bits = 0100_0000.
// Each run checks the test length (4*(2^N+1)+READ_LAT+1 clocks), that every
// address is accessed exactly once per pass, and that
// the switching activity (sum of Hamming distances between consecutive
// addresses) of the write-0 pass matches an independent model of the
// generator: 1791 for seeds 0 and 1..1, 1789 for seed 010..01. It counts
// how often each mechanism happened: fast (2-bit) steps, slow (modified
// CLFSR) steps, pass changes at the seed wrap, the four test passes,
// detected failures and clean passes; a mechanism never seen is a failure.
module tb_mbist_top;
  import mbist_pkg::*;
  localparam int N = 10, DW = 8, RL = 1;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, start = 0;
  logic [N-1:0] seed = '0;
  logic mem_en, mem_we, done, pass;
  logic [N-1:0] mem_addr;
  logic [DW-1:0] mem_wdata, mem_rdata, fail_bits;
  logic [15:0] err_count;
  phase_e phase;
  logic flt_en = 0, flt_val = 0;
  logic [N-1:0] flt_addr = '0;
  int unsigned flt_bit = 0;

  always #5 clk = ~clk;

  mbist_top dut (
    .clk, .rst_n, .start, .seed, .mem_en, .mem_we, .mem_addr, .mem_wdata,
    .mem_rdata, .phase, .done, .pass, .err_count, .fail_bits);

  mem_model #(.AW(N), .DW(DW)) u_mem (
    .clk, .en(mem_en), .we(mem_we), .addr(mem_addr), .wdata(mem_wdata),
    .rdata(mem_rdata), .flt_en, .flt_addr, .flt_bit, .flt_val);

  task automatic chk(input string name, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s got=%0d exp=%0d", name, got, exp);
    end
  endtask

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // mechanism counters
  int n_fast, n_slow, n_wrap, n_fail_detect, n_clean_pass;
  int n_pass [4];
  phase_e last_phase;
  always @(posedge clk) if (rst_n) begin
    if (dut.u_ag.en_hi) n_fast++;
    if (dut.u_ag.en_lo) n_slow++;
    if (phase != last_phase && last_phase inside {PH_W0, PH_R0, PH_W1, PH_R1}) n_wrap++;
    last_phase <= phase;
  end

  int hits [4][2**N];
  int cnt [4];

  task automatic run_test(input logic [N-1:0] s, input bit exp_pass,
                          input int exp_errs, input logic [DW-1:0] exp_bits,
                          input int exp_sw);
    int p, cycles, sw, sw_pass;
    logic [N-1:0] prev;
    foreach (hits[i, j]) hits[i][j] = 0;
    foreach (cnt[i]) cnt[i] = 0;
    @(negedge clk);
    seed = s; start = 1;
    @(negedge clk);
    start = 0;
    cycles = 1;
    sw = 0; sw_pass = 0;
    prev = mem_addr;
    while (!done && cycles < 10000) begin
      if (mem_en) begin
        p = (mem_we ? 0 : 1) + ((phase == PH_W1 || phase == PH_R1) ? 2 : 0);
        if (cnt[p] == 0) n_pass[p]++;
        cnt[p]++;
        hits[p][mem_addr]++;
        if (p == 0) begin
          if (cnt[p] > 1) sw_pass += $countones(mem_addr ^ prev);
          prev = mem_addr;
        end
      end
      @(negedge clk);
      cycles++;
    end
    chk("cycles", cycles, 4 * (2**N + 1) + RL + 1);
    for (int i = 0; i < 4; i++) begin
      chk("pass_len", cnt[i], 2**N);
      for (int j = 0; j < 2**N; j++) chk("addr_once", hits[i][j], 1);
    end
    chk("pass", pass, exp_pass);
    chk("err_count", err_count, exp_errs);
    chk("fail_bits", fail_bits, exp_bits);
    chk("switching", sw_pass, exp_sw);
    if (exp_pass && pass) n_clean_pass++;
    if (!exp_pass && !pass) n_fail_detect++;
    $display("seed %b: pass=%0b errors=%0d address-bus transitions in W0 pass=%0d",
             s, pass, err_count, sw_pass);
  endtask

  initial begin
    last_phase = PH_IDLE;
    n_fast = 0; n_slow = 0; n_wrap = 0; n_fail_detect = 0; n_clean_pass = 0;
    foreach (n_pass[i]) n_pass[i] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    run_test('0, 1, 0, '0, 1791);
    flt_en = 1; flt_addr = 10'd613; flt_bit = 3; flt_val = 0;
    run_test('1, 0, 1, 8'b0000_1000, 1791);
    flt_addr = 10'd77; flt_bit = 6; flt_val = 1;
    run_test(10'b01_0000_0001, 0, 1, 8'b0100_0000, 1789);
    flt_en = 0;
    // every fast/slow split: 3 fast + 1 slow per 4 steps, 4 passes, 3 runs
    chk("fast_steps", n_fast, 3 * 4 * 3 * 2**N / 4);
    chk("slow_steps", n_slow, 3 * 4 * 2**N / 4);
    chk("wraps", n_wrap, 3 * 4);
    for (int i = 0; i < 4; i++) chk("pass_seen", n_pass[i], 3);
    chk("fail_detected", n_fail_detect, 2);
    chk("clean_pass", n_clean_pass, 1);
    $display("mechanisms: fast=%0d slow=%0d wraps=%0d passes=%0d/%0d/%0d/%0d fail=%0d clean=%0d",
             n_fast, n_slow, n_wrap, n_pass[0], n_pass[1], n_pass[2], n_pass[3],
             n_fail_detect, n_clean_pass);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
