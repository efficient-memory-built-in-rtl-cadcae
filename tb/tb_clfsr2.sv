// tb_clfsr2: checks the 2-bit complete LFSR against its data-flow table:
//   Q1Q2 = 11 -> 01 -> 00 -> 10 -> 11 (one bit changes per step),
// plus reset to 00, hold when en = 0 and seed load.
module tb_clfsr2;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, en = 0, load = 0;
  logic [1:0] seed = '0, q;

  always #5 clk = ~clk;

  clfsr2 dut (.clk, .rst_n, .en, .load, .seed, .q);

  // next state of the data-flow table, indexed by {Q1,Q2}
  function automatic logic [1:0] nxt(input logic [1:0] s);
    case (s)
      2'b11: return 2'b01;
      2'b01: return 2'b00;
      2'b00: return 2'b10;
      default: return 2'b11;  // 10
    endcase
  endfunction

  task automatic chk(input string name, input logic [1:0] got, input logic [1:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s got=%b exp=%b", name, got, exp);
    end
  endtask

  initial begin
    repeat (500) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [1:0] exp_q;
  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    chk("reset", q, 2'b00);
    exp_q = 2'b00;
    for (int k = 0; k < 40; k++) begin
      en = ($urandom % 4) != 0;
      @(negedge clk);
      if (en) exp_q = nxt(exp_q);
      chk("step", q, exp_q);
    end
    // each seed, then its successor
    for (int s = 0; s < 4; s++) begin
      seed = 2'(s); load = 1; en = 1;
      @(negedge clk);
      load = 0;
      chk("load", q, 2'(s));
      @(negedge clk);
      chk("succ", q, nxt(2'(s)));
      checks++;
      if ($countones(q ^ 2'(s)) != 1) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
