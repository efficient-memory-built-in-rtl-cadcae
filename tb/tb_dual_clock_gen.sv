// tb_dual_clock_gen: random step requests; of every four steps after a load
// (or reset) the first three must raise en_hi and the fourth en_lo, exactly
// one of them per step and neither without a step.
module tb_dual_clock_gen;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, step = 0, load = 0, en_hi, en_lo;
  int nstep = 0;

  always #5 clk = ~clk;

  dual_clock_gen dut (.clk, .rst_n, .step, .load, .en_hi, .en_lo);

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 600; k++) begin
      @(negedge clk);
      step = ($urandom % 3) != 0;
      load = ($urandom % 50) == 0;
      #1;
      checks++;
      if (load || !step) begin
        if (en_hi || en_lo) begin failures++; $display("FAIL enable without step"); end
      end else if ((nstep % 4) == 3) begin
        if (!en_lo || en_hi) begin failures++; $display("FAIL step %0d want lo", nstep); end
      end else begin
        if (!en_hi || en_lo) begin failures++; $display("FAIL step %0d want hi", nstep); end
      end
      if (load) nstep = 0;
      else if (step) nstep++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
