// tb_qp_async_sc: self-checking test of the asynchronous sequential circuit.
// The status flip-flop must toggle at the end (rising edge) of either
// active-low strobe, and the trigger must be Q & ~Q(i+1).
module tb_qp_async_sc;
  logic rst_n, sin_n, sout_n, next_empty, q, q_n, trig;
  int   checks = 0, failures = 0;

  qp_async_sc dut (.rst_n(rst_n), .strobe_in_n(sin_n), .strobe_out_n(sout_n),
                   .next_empty(next_empty), .q(q), .q_n(q_n), .trig(trig));

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  initial begin
    #100us;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic exp;
    rst_n = 0; sin_n = 1; sout_n = 1; next_empty = 0;
    #10ns rst_n = 1;
    #1ns check(q == 0 && q_n == 1, "cleared");
    exp = 0;
    for (int r = 0; r < 40; r++) begin
      next_empty = 1'($urandom);
      #1ns check(trig == (exp & next_empty), "trig = Q & ~Q(i+1)");
      // a low-going strobe on one of the two inputs
      if ($urandom % 2 == 1) begin
        sin_n = 0; #5ns check(q == exp, "no change while the strobe is low");
        sin_n = 1;
      end else begin
        sout_n = 0; #5ns check(q == exp, "no change while the strobe is low");
        sout_n = 1;
      end
      exp = ~exp;
      #1ns check(q == exp, "toggle at the end of the strobe");
    end
    // Overlapping strobes give a single toggle, at the end of the later one.
    sin_n = 0; #3ns sout_n = 0; #3ns sin_n = 1;
    #1ns check(q == exp, "no toggle while the other strobe is low");
    sout_n = 1; exp = ~exp;
    #1ns check(q == exp, "one toggle for overlapping strobes");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
