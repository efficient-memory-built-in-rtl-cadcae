// tb_mbist_controller: drives the test controller with a simple counting
// address source (any full-period source is acceptable to the controller)
// and checks the Zero-One sequence: W0, R0, W1, R1, each touching every one
// of the 2^N addresses exactly once with the right write enable, background
// and read strobe; done after 4*(2^N+1)+READ_LAT+1 clocks; pass reflecting
// the analyzer's fail input; and a second test started from DONE.
module tb_mbist_controller;
  import mbist_pkg::*;
  localparam int N = 4, RL = 2;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, start = 0, fail = 0;
  logic [N-1:0] seed = '0, addr;
  logic ag_step, ag_load, sa_clear, mem_en, mem_we, bg, rd_issue, done, pass;
  phase_e phase;

  always #5 clk = ~clk;

  mbist_controller #(.N(N), .READ_LAT(RL)) dut (
    .clk, .rst_n, .start, .seed, .addr, .fail, .ag_step, .ag_load, .sa_clear,
    .mem_en, .mem_we, .bg, .rd_issue, .phase, .done, .pass);

  // counting address source
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)       addr <= '0;
    else if (ag_load) addr <= seed;
    else if (ag_step) addr <= addr + 1'b1;

  task automatic chk(input string name, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s got=%0d exp=%0d", name, got, exp);
    end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int cnt [4];
  int hits[4][2**N];
  int cycles;

  // observe the accesses of one test; pass index = 0 W0, 1 R0, 2 W1, 3 R1
  task automatic run_test(input logic [N-1:0] s, input logic inject_fail);
    int p;
    foreach (cnt[i]) cnt[i] = 0;
    foreach (hits[i, j]) hits[i][j] = 0;
    @(negedge clk);
    seed = s; start = 1;
    #1;
    chk("load", ag_load, 1); chk("clear", sa_clear, 1);
    @(negedge clk);
    start = 0;
    cycles = 1;
    while (!done && cycles < 500) begin
      if (mem_en) begin
        p = (mem_we ? 0 : 1) + (bg ? 2 : 0);
        cnt[p]++;
        hits[p][addr]++;
        chk("step_with_access", ag_step, 1);
        chk("rd_issue", rd_issue, !mem_we);
        if (inject_fail && p == 3 && cnt[p] == 5) fail = 1;
      end else begin
        chk("no_step", ag_step, 0);
      end
      @(negedge clk);
      cycles++;
    end
    chk("cycles", cycles, 4 * (2**N + 1) + RL + 1);
    for (int i = 0; i < 4; i++) begin
      chk("pass_len", cnt[i], 2**N);
      for (int j = 0; j < 2**N; j++) chk("each_addr_once", hits[i][j], 1);
    end
    chk("pass_flag", pass, !inject_fail);
    chk("phase_done", phase, PH_DONE);
    fail = 0;
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    chk("idle", phase, PH_IDLE); chk("idle_done", done, 0);
    run_test(4'd0, 0);
    run_test(4'd9, 1);   // restart from DONE, analyzer reports a failure
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
