// tb_clfsr_feedback: checks the feedback network for several register
// lengths against a direct parity of the tapped stages. Stage i (1-based) is
// q[M-i]. The tap lists below are written out independently of the package:
//   M=3: x^3+x+1      M=4: x^4+x+1      M=5: x^5+x^2+1
//   M=8: x^8+x^6+x^5+x+1                M=12: x^12+x^7+x^4+x^3+1
module tb_clfsr_feedback;
  int checks = 0, failures = 0;

  logic [2:0]  q3;  logic z3,  d3;
  logic [3:0]  q4;  logic z4,  d4;
  logic [4:0]  q5;  logic z5,  d5;
  logic [7:0]  q8;  logic z8,  d8;
  logic [11:0] q12; logic z12, d12;

  clfsr_feedback #(.M(3))  u3  (.q(q3),  .zero_term(z3),  .d1(d3));
  clfsr_feedback #(.M(4))  u4  (.q(q4),  .zero_term(z4),  .d1(d4));
  clfsr_feedback #(.M(5))  u5  (.q(q5),  .zero_term(z5),  .d1(d5));
  clfsr_feedback #(.M(8))  u8  (.q(q8),  .zero_term(z8),  .d1(d8));
  clfsr_feedback #(.M(12)) u12 (.q(q12), .zero_term(z12), .d1(d12));

  task automatic chk(input string name, input logic got, input logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s got=%0b exp=%0b", name, got, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 400; k++) begin
      if (k < 16) begin
        {z3, q3} = 4'(k); {z4, q4} = 5'(k);
      end else begin
        {z3, q3} = 4'($urandom); {z4, q4} = 5'($urandom);
      end
      {z5, q5}   = 6'($urandom);
      {z8, q8}   = 9'($urandom);
      {z12, q12} = 13'($urandom);
      #1;
      // stage s of an M-bit register is q[M-s]
      chk("M3",  d3,  z3  ^ q3[3-1]  ^ q3[3-3]);
      chk("M4",  d4,  z4  ^ q4[4-1]  ^ q4[4-4]);
      chk("M5",  d5,  z5  ^ q5[5-2]  ^ q5[5-5]);
      chk("M8",  d8,  z8  ^ q8[8-1]  ^ q8[8-5] ^ q8[8-6] ^ q8[8-8]);
      chk("M12", d12, z12 ^ q12[12-3] ^ q12[12-4] ^ q12[12-7] ^ q12[12-12]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
