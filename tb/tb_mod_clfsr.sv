// tb_mod_clfsr: runs the modified complete LFSR for M = 3, 4 and 8 (the
// upper parts of 5-, 6- and 10-bit address generators). From reset (all
// zeros) it checks every step against a reference shift register written in
// the testbench, checks that all 2^M states appear once and that the register
// is back at zero after exactly 2^M steps (complete cycle including 0), and
// checks hold (en = 0) and seed load.
module tb_mod_clfsr;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic en = 0, load = 0;
  logic [2:0] seed3 = '0; logic [3:0] seed4 = '0; logic [7:0] seed8 = '0;
  logic [2:0] q3;         logic [3:0] q4;         logic [7:0] q8;

  always #5 clk = ~clk;

  mod_clfsr #(.M(3)) u3 (.clk, .rst_n, .en, .load, .seed(seed3), .q(q3));
  mod_clfsr #(.M(4)) u4 (.clk, .rst_n, .en, .load, .seed(seed4), .q(q4));
  mod_clfsr #(.M(8)) u8 (.clk, .rst_n, .en, .load, .seed(seed8), .q(q8));

  // Reference: stage 1 = bit M-1. New stage-1 bit = parity of the tapped
  // stages (b_i of the degree-M polynomial, stage M always) XOR (stages
  // 1..M-1 all zero).
  function automatic logic [31:0] ref_next(input logic [31:0] s, input int m);
    logic fb;
    logic [31:0] mask;
    case (m)
      3: mask = (32'd1 << (3-1));            // b1
      4: mask = (32'd1 << (4-1));            // b1
      8: mask = (32'd1 << (8-1)) | (32'd1 << (8-5)) | (32'd1 << (8-6));  // b1 b5 b6
      default: mask = '0;
    endcase
    mask |= 32'd1;                            // stage M
    fb = ^(s & mask);
    if ((s >> 1) == 0) fb = ~fb;              // stages 1..M-1 are zero
    return ((s >> 1) | (32'(fb) << (m - 1))) & ((32'd1 << m) - 1);
  endfunction

  task automatic chk(input string name, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s got=%0h exp=%0h", name, got, exp);
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bit seen3[8], seen4[16], seen8[256];
  logic [31:0] r3, r4, r8;

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    chk("reset3", q3, 0); chk("reset4", q4, 0); chk("reset8", q8, 0);
    r3 = 0; r4 = 0; r8 = 0;
    for (int k = 0; k < 256; k++) begin
      if (k < 8)  begin chk("uniq3", 32'(seen3[q3]), 0); seen3[q3] = 1; end
      if (k < 16) begin chk("uniq4", 32'(seen4[q4]), 0); seen4[q4] = 1; end
      chk("uniq8", 32'(seen8[q8]), 0); seen8[q8] = 1;
      en = 1;
      @(negedge clk);
      r3 = ref_next(r3, 3); r4 = ref_next(r4, 4); r8 = ref_next(r8, 8);
      chk("step3", q3, r3); chk("step4", q4, r4); chk("step8", q8, r8);
      if (k == 7)  chk("period3", q3, 0);
      if (k == 15) chk("period4", q4, 0);
      if (k < 7) chk("nonzero3", 32'(q3 == 0), 0);  // 0 only after a full cycle
    end
    chk("period8", q8, 0);
    // hold
    en = 0;
    r8 = q8;
    repeat (3) @(negedge clk);
    chk("hold8", q8, r8);
    // load has priority over en
    seed3 = 3'b101; seed4 = 4'b0110; seed8 = 8'hA5; load = 1; en = 1;
    @(negedge clk);
    load = 0;
    chk("load3", q3, 3'b101); chk("load4", q4, 4'b0110); chk("load8", q8, 8'hA5);
    @(negedge clk);
    chk("afterload8", q8, ref_next(32'hA5, 8));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
