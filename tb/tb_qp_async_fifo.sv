// tb_qp_async_fifo: self-checking test of the asynchronous quasi-perfect FIFO
// (three locations, 6 bits, 70 ns one-shots). The testbench plays the writing
// device and the stage below the FIFO (a fourth location with its own status
// flip-flop, which takes data_out at the end of ~STROBE3).
//  1. Fall-through time: a word written into the empty FIFO reaches the stage
//     below after DEPTH one-shot pulses, one location per pulse.
//  2. Write cycle: the top is empty again one pulse after a write.
//  3. Fill: with the stage below held full, the FIFO takes DEPTH words.
//  4. Random writes and reads: every word arrives once and in order.
module tb_qp_async_fifo;
  localparam int W = 6, D = 3, P = 70;
  logic         rst_n, wr_n, top_empty, strobe_out_n, next_empty, busy;
  logic [W-1:0] data_in, data_out;
  logic [D-1:0] q;
  int           checks = 0, failures = 0;
  logic         q3;                   // status of the stage below the FIFO
  logic [W-1:0] reg3;
  logic [W-1:0] sb[$];
  int           n_wr = 0, n_rd = 0;
  realtime      t_wr, t_arrive;

  qp_async_fifo #(.WIDTH(W), .DEPTH(D), .PULSE_NS(P)) dut (
    .rst_n(rst_n), .wr_fifo_n(wr_n), .data_in(data_in), .top_empty(top_empty),
    .data_out(data_out), .strobe_out_n(strobe_out_n), .next_empty(next_empty),
    .q(q), .busy(busy));

  assign next_empty = ~q3;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; if (failures < 20) $display("FAIL @%0t: %s", $time, what); end
  endtask

  // Stage below: takes the word at the end of ~STROBE3.
  always @(posedge strobe_out_n) if (rst_n) begin
    reg3     <= data_out;
    q3       <= 1'b1;
    t_arrive  = $realtime;
  end

  task automatic write_word(input logic [W-1:0] v);
    wait (top_empty);
    #2ns data_in = v;
    #5ns wr_n = 1'b0;
    #10ns wr_n = 1'b1; t_wr = $realtime;
    sb.push_back(v); n_wr++;
    #1ns;
  endtask

  task automatic take_word();
    logic [W-1:0] exp;
    wait (q3);
    #3ns;
    exp = sb.pop_front();
    check(reg3 == exp, $sformatf("word order: got %h expected %h", reg3, exp));
    q3 = 1'b0; n_rd++;
  endtask

  initial begin
    #2ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0; wr_n = 1'b1; data_in = '0; q3 = 1'b0; reg3 = '0;
    #50ns rst_n = 1'b1;
    #10ns check(q == '0 && top_empty && !busy, "empty after reset");

    // 1 and 2
    write_word(6'h2A);
    #1ns check(q[0] && !top_empty, "Q0 set at the end of the write strobe");
    #(P * 1ns) check(top_empty && q[1], "top empty again one pulse after the write");
    wait (q3);
    check(t_arrive - t_wr == D * P * 1ns,
          $sformatf("fall-through %0t for %0d locations", t_arrive - t_wr, D));
    take_word();
    #1ns check(q == '0, "FIFO empty");

    // 3. fill with the stage below full
    write_word(6'h01);
    wait (q3);
    for (int i = 0; i < D; i++) write_word(6'(6'h10 + i));
    #(D * P * 2ns);
    check(q == '1 && !top_empty, "all locations full");
    check(!busy, "nothing moves while full");
    // empty it
    for (int i = 0; i < D + 1; i++) take_word();
    #(D * P * 2ns);
    check(q == '0, "empty after draining");

    // 4. random traffic
    fork
      for (int i = 0; i < 200; i++) begin
        #($urandom_range(0, 150) * 1ns);
        write_word(6'($urandom));
      end
      for (int i = 0; i < 200; i++) begin
        #($urandom_range(0, 150) * 1ns);
        take_word();
      end
    join
    check(n_wr == n_rd && sb.size() == 0, "all words delivered");
    $display("writes=%0d reads=%0d", n_wr, n_rd);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
