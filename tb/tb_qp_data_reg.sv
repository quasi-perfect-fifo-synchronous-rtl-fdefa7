// tb_qp_data_reg: self-checking test of the loadable data register. Random
// data and load enables; the register must take d exactly on loads and hold
// otherwise, and clear on reset.
module tb_qp_data_reg;
  localparam int W = 16;
  logic         clk = 1'b0, rst_n = 1'b0, ld;
  logic [W-1:0] d, q, exp_q;
  int           checks = 0, failures = 0;

  qp_data_reg #(.WIDTH(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (500) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ld = 0; d = '0;
    repeat (2) @(negedge clk);
    checks++; if (q !== '0) begin failures++; $display("FAIL: reset"); end
    rst_n = 1'b1;
    exp_q = '0;
    for (int i = 0; i < 200; i++) begin
      @(negedge clk);
      ld = 1'($urandom);
      d  = W'($urandom);
      if (ld) exp_q = d;
      @(posedge clk); #1;
      checks++;
      if (q !== exp_q) begin failures++; $display("FAIL: i=%0d q=%h exp=%h", i, q, exp_q); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
