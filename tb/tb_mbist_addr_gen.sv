// tb_mbist_addr_gen: end-to-end check of the address generator at n = 5 and
// n = 10 (the two sizes evaluated for this design).
//  - From seed 0 the 2-bit part must follow the worked 5-bit example:
//    00,10,11,01 | 01,00,10,11 | 11,01,00,10 | 10,11,01,00 | 00,...
//    with the upper part changing only on every fourth step.
//  - Every address is checked against a reference model written in the
//    testbench (shift register + NOR term + 2-bit Gray cycle + 3:1 split).
//  - All 2^n addresses appear once in 2^n steps (one address per clock), and
//    the generator is back at its seed afterwards.
//  - Switching activity (sum of Hamming distances between consecutive
//    addresses over one full sweep of 2^n addresses) is compared with values
//    computed by an independent model: n=5: 35 (seed 11111), 33 (seed 01001);
//    n=10: 1791 (seed 1111111111), 1789 (seed 0100000001).
module tb_mbist_addr_gen;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, step = 0, load = 0;
  logic [4:0] seed5 = '0, a5;
  logic [9:0] seed10 = '0, a10;

  always #5 clk = ~clk;

  mbist_addr_gen #(.N(5))  u5  (.clk, .rst_n, .step, .load, .seed(seed5),  .addr(a5));
  mbist_addr_gen #(.N(10)) u10 (.clk, .rst_n, .step, .load, .seed(seed10), .addr(a10));

  task automatic chk(input string name, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s got=%0d exp=%0d", name, got, exp);
    end
  endtask

  // reference model of one step; ph = steps since load, mod 4
  function automatic logic [31:0] ref_step(input logic [31:0] a, input int n, input int ph);
    logic [31:0] hi, mask;
    logic [1:0]  lo;
    logic        fb;
    int          m;
    m  = n - 2;
    hi = a >> 2;
    lo = a[1:0];
    if (ph != 3) begin
      lo = {~lo[0], lo[1]};                    // Q1 <= ~Q2, Q2 <= Q1
    end else begin
      case (m)
        3: mask = 32'd1 << (3-1);                                        // b1
        8: mask = (32'd1 << (8-1)) | (32'd1 << (8-5)) | (32'd1 << (8-6)); // b1 b5 b6
        default: mask = '0;
      endcase
      mask |= 1;
      fb = ^(hi & mask) ^ ((hi >> 1) == 0);
      hi = ((hi >> 1) | (32'(fb) << (m-1)));
    end
    return (hi << 2) | 32'(lo);
  endfunction

  localparam logic [1:0] EX_LO [24] = '{
    2'b00, 2'b10, 2'b11, 2'b01, 2'b01, 2'b00, 2'b10, 2'b11,
    2'b11, 2'b01, 2'b00, 2'b10, 2'b10, 2'b11, 2'b01, 2'b00,
    2'b00, 2'b10, 2'b11, 2'b01, 2'b01, 2'b00, 2'b10, 2'b11};

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bit seen5[32], seen10[1024];
  logic [31:0] r5, r10, prev5, prev10;
  int sa5, sa10;

  task automatic sweep(input logic [4:0] s5, input logic [9:0] s10,
                       output int sw5, output int sw10, input bit table_check);
    seed5 = s5; seed10 = s10; load = 1; step = 0;
    @(negedge clk);
    load = 0;
    chk("seed5", a5, s5); chk("seed10", a10, s10);
    r5 = s5; r10 = s10;
    sw5 = 0; sw10 = 0;
    foreach (seen5[i])  seen5[i]  = 0;
    foreach (seen10[i]) seen10[i] = 0;
    for (int k = 0; k < 1024; k++) begin
      if (k < 32) begin
        chk("uniq5", 32'(seen5[a5]), 0);
        seen5[a5] = 1;
        if (table_check && k < 24) chk("table_lo", a5[1:0], EX_LO[k]);
        if (table_check && k < 24 && k % 4 != 0 && k > 0) chk("hi_held", a5[4:2], prev5[4:2]);
      end
      chk("uniq10", 32'(seen10[a10]), 0);
      seen10[a10] = 1;
      prev5 = a5; prev10 = a10;
      step = 1;
      @(negedge clk);
      r10 = ref_step(r10, 10, k % 4);
      chk("model10", a10, r10);
      if (k < 1023) sw10 += $countones(a10 ^ prev10[9:0]);
      if (k < 32) begin
        r5 = ref_step(r5, 5, k % 4);
        chk("model5", a5, r5);
        if (k < 31) sw5 += $countones(a5 ^ prev5[4:0]);
      end
      if (k == 31) chk("wrap5", a5, s5);
      if (k < 31 && (k % 4) != 3) chk("fast_1bit5", $countones(a5 ^ prev5[4:0]), 1);
    end
    step = 0;
    chk("wrap10", a10, s10);
  endtask

  int sw5, sw10;
  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    chk("reset5", a5, 0); chk("reset10", a10, 0);
    sweep(5'b00000, 10'b0, sw5, sw10, 1);
    sweep(5'b11111, 10'b11_1111_1111, sw5, sw10, 0);
    chk("SA5_ones", sw5, 35); chk("SA10_ones", sw10, 1791);
    $display("switching activity seed 1..1: n=5 %0d, n=10 %0d", sw5, sw10);
    sweep(5'b01001, 10'b01_0000_0001, sw5, sw10, 0);
    chk("SA5_010", sw5, 33); chk("SA10_010", sw10, 1789);
    $display("switching activity seed 010..01: n=5 %0d, n=10 %0d", sw5, sw10);
    // step held low: address must not move
    prev10 = a10;
    repeat (5) @(negedge clk);
    chk("hold10", a10, prev10);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
