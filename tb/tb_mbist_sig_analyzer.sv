// tb_mbist_sig_analyzer: random compares with occasional injected bit errors;
// a testbench model tracks the sticky fail flag, the mismatch count and the
// OR of failing bit positions. Also checks clear and counter saturation.
module tb_mbist_sig_analyzer;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, clear = 0, cmp_en = 0;
  logic [7:0] rdata = '0, exp_data = '0, fail_bits;
  logic [3:0] err_count;
  logic fail;

  always #5 clk = ~clk;

  mbist_sig_analyzer #(.DATA_W(8), .CNT_W(4)) dut (
    .clk, .rst_n, .clear, .cmp_en, .rdata, .exp_data, .fail, .err_count, .fail_bits);

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

  logic m_fail;
  int   m_cnt;
  logic [7:0] m_bits, e;
  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    m_fail = 0; m_cnt = 0; m_bits = 0;
    for (int k = 0; k < 600; k++) begin
      @(negedge clk);
      clear    = (k % 150) == 0;
      cmp_en   = $urandom % 2;
      exp_data = ($urandom % 2) ? 8'hFF : 8'h00;
      e        = (($urandom % 12) == 0) ? 8'(1 << ($urandom % 8)) : 8'h00;
      rdata    = exp_data ^ e;
      @(posedge clk);
      if (clear) begin
        m_fail = 0; m_cnt = 0; m_bits = 0;
      end else if (cmp_en && e != 0) begin
        m_fail = 1; m_bits |= e;
        if (m_cnt < 15) m_cnt++;
      end
      #1;
      chk("fail", fail, m_fail);
      chk("count", err_count, m_cnt);
      chk("bits", fail_bits, m_bits);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
