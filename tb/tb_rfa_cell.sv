// tb_rfa_cell: exhaustive check of the reconfigured full adder cell against
// the full-adder sum column (sum row order 000..111 = 0,1,1,0,1,0,0,1).
module tb_rfa_cell;
  logic a, b, cin, sum;
  int checks = 0, failures = 0;
  localparam logic [7:0] SUM_COL = 8'b1001_0110;  // bit k = sum for {a,b,cin} = k

  rfa_cell dut (.a(a), .b(b), .cin(cin), .sum(sum));

  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 8; k++) begin
      {a, b, cin} = 3'(k);
      #1;
      checks++;
      if (sum !== SUM_COL[k]) begin
        failures++;
        $display("FAIL a=%0b b=%0b cin=%0b sum=%0b", a, b, cin, sum);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
