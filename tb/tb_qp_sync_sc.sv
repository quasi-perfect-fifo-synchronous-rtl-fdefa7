// tb_qp_sync_sc: self-checking test of one synchronous FIFO sequential
// circuit. Drives J and ~Q(i+1) with every combination from both states and
// compares Q and LOAD(i+1) with the JK rules: set by J, cleared when its word
// moves on (Q & ~Q(i+1)), held otherwise.
module tb_qp_sync_sc;
  logic clk = 1'b0, rst_n = 1'b0;
  logic j, next_empty, q, q_n, load_next;
  int   checks = 0, failures = 0;

  qp_sync_sc dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (200) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic exp_q;
    j = 0; next_empty = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    check(q == 1'b0 && q_n == 1'b1, "reset state empty");
    for (int r = 0; r < 40; r++) begin
      @(negedge clk);
      j          = 1'($urandom);
      next_empty = 1'($urandom);
      #1;
      check(load_next == (q & next_empty), "LOAD(i+1) = Q & ~Q(i+1)");
      check(q_n == ~q, "q_n is ~q");
      // Expected next state: set by J when empty, cleared by its own load.
      exp_q = q ? ~(q & next_empty) : j;
      @(posedge clk); #1;
      check(q == exp_q, $sformatf("JK next state r=%0d", r));
    end
    // J has no effect while full and the word cannot move.
    @(negedge clk); j = 1; next_empty = 0;
    if (!q) begin @(posedge clk); #1; end
    @(negedge clk); j = 1; next_empty = 0;
    @(posedge clk); #1;
    check(q == 1'b1, "full location holds while below is full");
    @(negedge clk); j = 0; next_empty = 1;
    @(posedge clk); #1;
    check(q == 1'b0, "word moves on when below is empty");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
