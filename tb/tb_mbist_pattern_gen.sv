// tb_mbist_pattern_gen: random backgrounds and read requests into pattern
// generators with read latencies 1 and 3; the write word must be the solid
// background and the compare strobe / expected word must reappear exactly
// READ_LAT clocks later (checked with a history kept by the testbench).
module tb_mbist_pattern_gen;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, bg = 0, rd = 0;
  logic [7:0] wd1, ex1, wd3, ex3;
  logic       ce1, ce3;

  always #5 clk = ~clk;

  mbist_pattern_gen #(.DATA_W(8), .READ_LAT(1)) u1 (
    .clk, .rst_n, .bg, .rd_issue(rd), .wdata(wd1), .cmp_en(ce1), .exp_data(ex1));
  mbist_pattern_gen #(.DATA_W(8), .READ_LAT(3)) u3 (
    .clk, .rst_n, .bg, .rd_issue(rd), .wdata(wd3), .cmp_en(ce3), .exp_data(ex3));

  task automatic chk(input string name, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s got=%0h exp=%0h", name, got, exp);
    end
  endtask

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic hbg[$], hrd[$];
  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    chk("reset_ce1", ce1, 0); chk("reset_ce3", ce3, 0);
    for (int k = 0; k < 500; k++) begin
      bg = ($urandom % 5) == 0 ? ~bg : bg;
      rd = $urandom % 2;
      #1;
      chk("wdata1", wd1, {8{bg}}); chk("wdata3", wd3, {8{bg}});
      hbg.push_front(bg); hrd.push_front(rd);
      @(negedge clk);
      // element i of the history was driven i+1 clocks ago
      if (hrd.size() >= 1) begin
        chk("ce1", ce1, hrd[0]);
        if (hrd[0]) chk("ex1", ex1, {8{hbg[0]}});
      end
      if (hrd.size() >= 3) begin
        chk("ce3", ce3, hrd[2]);
        if (hrd[2]) chk("ex3", ex3, {8{hbg[2]}});
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
