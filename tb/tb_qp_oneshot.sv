// tb_qp_oneshot: self-checking test of the one-shot model. Checks the pulse
// width at the default (70 ns) and at 20 ns, that a trigger during a pulse
// does not stretch it, and that triggers during reset are ignored.
module tb_qp_oneshot;
  logic rst_n, trig, q, q_n, trig2, q2, q2_n;
  int   checks = 0, failures = 0;
  realtime t_rise, t_fall;

  qp_oneshot dut (.rst_n(rst_n), .trig(trig), .q(q), .q_n(q_n));
  qp_oneshot #(.PULSE_NS(20)) dut20 (.rst_n(rst_n), .trig(trig2), .q(q2), .q_n(q2_n));

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
    rst_n = 1'b0; trig = 1'b0; trig2 = 1'b0;
    #10ns trig = 1'b1; #5ns trig = 1'b0;
    #1ns check(q == 1'b0, "trigger ignored in reset");
    #10ns rst_n = 1'b1;
    for (int r = 0; r < 5; r++) begin
      #13ns trig = 1'b1; t_rise = $realtime;
      #1ps check(q == 1'b1 && q_n == 1'b0, "pulse starts on the trigger edge");
      #9ns trig = 1'b0;
      if (r == 2) begin #20ns trig = 1'b1; #5ns trig = 1'b0; end   // retrigger attempt
      @(negedge q); t_fall = $realtime;
      check(t_fall - t_rise == 70ns, $sformatf("pulse width %0t", t_fall - t_rise));
      check(q_n == 1'b1, "q_n back high");
    end
    #10ns trig2 = 1'b1; t_rise = $realtime;
    @(negedge q2); t_fall = $realtime;
    check(t_fall - t_rise == 20ns, "20 ns pulse");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
