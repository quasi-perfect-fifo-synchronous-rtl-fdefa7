// tb_qp_sync_fifo: self-checking test of the synchronous quasi-perfect FIFO at
// its default size (16 words x 16 bits, with holding register).
//  1. Write timing: one word written into an empty FIFO sets Q0 at the write
//     edge and moves one location per clock, reaching the bottom after
//     DEPTH clock edges.
//  2. Maximum rate: writing whenever the top is empty gives one write every
//     second cycle (half the clock rate).
//  3. Fill: the FIFO takes exactly DEPTH words, 3/4-full is on.
//  4. Read timing: reading a full FIFO empties the bottom location at the read
//     edge and the hole climbs one location per clock to the top.
//  5. Random concurrent writes and reads with a scoreboard of the data, and
//     a cycle model of the location flags built from the transfer rules.
//  6. The four-location example: the write and read flag sequences
//     Q0..Q3 clock by clock, and 3/4-full = Q3.Q2.Q1, 3/4-empty = ~Q2.~Q1.~Q0.
module tb_qp_sync_fifo;
  localparam int W = 16, D = 16;
  logic         clk, rst_n;
  logic         wr_fifo, rd_fifo, top_empty, bottom_full, three_q_full, three_q_empty;
  logic [W-1:0] data_in, data_out;
  logic [D-1:0] q, mq;
  int           checks = 0, failures = 0;
  logic [W-1:0] sb[$];
  int           n_wr = 0, n_rd = 0;

  qp_sync_fifo #(.WIDTH(W), .DEPTH(D)) dut (.*);

  // four-location example, 8 bits wide
  logic       wr4, rd4, te4, bf4, f4, e4;
  logic [7:0] din4, dout4;
  logic [3:0] q4;
  qp_sync_fifo #(.WIDTH(8), .DEPTH(4)) dut4 (
    .clk, .rst_n, .wr_fifo(wr4), .data_in(din4), .top_empty(te4), .rd_fifo(rd4),
    .data_out(dout4), .bottom_full(bf4), .three_q_full(f4), .three_q_empty(e4), .q(q4));

  initial clk = 1'b0;
  always #5 clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; if (failures < 20) $display("FAIL @%0t: %s", $time, what); end
  endtask

  // Cycle model of the location flags: the document's write/read/transfer
  // rules, evaluated on the values before the edge.
  function automatic logic [D-1:0] model_next(input logic [D-1:0] cur, input logic wr, input logic rd);
    logic [D-1:0] nx = cur;
    for (int i = 0; i < D; i++) begin
      logic below_empty = (i == D - 1) ? rd : ~cur[i+1];
      logic above_moves = (i == 0) ? (wr & ~cur[0]) : (cur[i-1] & ~cur[i]);
      if (cur[i] && below_empty) nx[i] = 1'b0;
      if (!cur[i] && above_moves) nx[i] = 1'b1;
    end
    return nx;
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Status outputs always agree with the flags.
  always @(negedge clk) if (rst_n) begin
    check(top_empty == ~q[0], "top_empty is ~Q0");
    check(bottom_full == q[D-1], "bottom_full is Q(D-1)");
    check(three_q_full == &q[D-1:D/4], "3/4-full");
    check(three_q_empty == ~|q[3*D/4-1:0], "3/4-empty");
  end

  initial begin
    int t0, gap, last_wr;
    logic [W-1:0] exp;
    rst_n = 1'b0; wr_fifo = 0; rd_fifo = 0; data_in = '0; wr4 = 0; rd4 = 0; din4 = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    check(q == '0, "empty after reset");

    // 1. write timing
    @(negedge clk); wr_fifo = 1; data_in = 16'hA5C3;
    @(negedge clk); wr_fifo = 0;
    check(q == 16'h0001, "Q0 set at the write edge");
    for (int i = 1; i < D; i++) begin
      @(negedge clk);
      check(q == (16'h1 << i), $sformatf("word in location %0d after %0d clocks", i, i));
    end
    check(bottom_full, "word at the bottom after DEPTH edges");
    // read it into HR
    rd_fifo = 1;
    @(negedge clk); rd_fifo = 0;
    check(data_out == 16'hA5C3 && q == '0, "read into HR");

    // 2 and 3. write as fast as the top allows until the FIFO is full
    t0 = 0; last_wr = -10; gap = 0;
    for (int cyc = 0; cyc < 200 && q != '1; cyc++) begin
      if (top_empty) begin
        if (last_wr >= 0 && n_wr < 4) check(cyc - last_wr == 2, "write every second cycle");
        wr_fifo = 1; data_in = 16'(16'h100 + n_wr); sb.push_back(data_in); n_wr++; last_wr = cyc;
      end else wr_fifo = 0;
      @(negedge clk);
    end
    wr_fifo = 0;
    @(negedge clk);
    check(q == '1, "FIFO full");
    check(n_wr == D, $sformatf("FIFO holds DEPTH words (%0d)", n_wr));
    check(three_q_full && !three_q_empty, "3/4-full when full");
    check(!top_empty, "top not empty when full");

    // 4. read timing: the hole climbs one location per clock
    rd_fifo = 1; exp = sb.pop_front();
    @(negedge clk); rd_fifo = 0;
    check(data_out == exp, "first word out in order");
    check(q == 16'h7FFF, "bottom location freed at the read edge");
    for (int i = 1; i < D; i++) begin
      @(negedge clk);
      check(q == ~(16'h8000 >> i), $sformatf("hole at location %0d", D-1-i));
    end
    // drain, reading whenever the bottom is full
    while (sb.size() > 0) begin
      if (bottom_full) begin
        rd_fifo = 1; exp = sb.pop_front();
        @(negedge clk); rd_fifo = 0;
        check(data_out == exp, "drain order");
      end else @(negedge clk);
    end
    repeat (D+2) @(negedge clk);
    check(q == '0 && three_q_empty, "empty and 3/4-empty after drain");

    // 5. random concurrent traffic
    mq = q;
    for (int cyc = 0; cyc < 3000; cyc++) begin
      wr_fifo = top_empty && ($urandom % 3 != 0);
      rd_fifo = bottom_full && ($urandom % (cyc < 1500 ? 4 : 2) == 0);
      data_in = 16'($urandom);
      if (wr_fifo) begin sb.push_back(data_in); n_wr++; end
      if (rd_fifo) exp = sb.pop_front();
      mq = model_next(mq, wr_fifo, rd_fifo);
      @(negedge clk);
      check(q == mq, "flags follow the transfer rules");
      if (rd_fifo) begin n_rd++; check(data_out == exp, "random traffic order"); end
    end
    wr_fifo = 0; rd_fifo = 0;

    // 6. four-location example
    repeat (D + 2) @(negedge clk);
    check(q4 == 4'b0000 && te4 && e4 && !f4, "4-location FIFO empty");
    wr4 = 1; din4 = 8'h3C;
    @(negedge clk); wr4 = 0;
    for (int i = 0; i < 4; i++) begin
      check(q4 == (4'b0001 << i), $sformatf("4-location write: Q%0d", i));
      @(negedge clk);
    end
    for (int k = 1; k < 4; k++) begin            // three more words
      while (!te4) @(negedge clk);
      wr4 = 1; din4 = 8'(8'h3C + k);
      @(negedge clk); wr4 = 0;
    end
    repeat (6) @(negedge clk);
    check(q4 == 4'b1111 && f4 && !e4 && !te4 && bf4, "4-location FIFO full");
    rd4 = 1;
    @(negedge clk); rd4 = 0;
    check(dout4 == 8'h3C, "4-location read into HR");
    check(q4 == 4'b0111 && !f4, "read: Q3 cleared at the read edge");
    @(negedge clk); check(q4 == 4'b1011, "read: FIFO2 -> FIFO3");
    @(negedge clk); check(q4 == 4'b1101, "read: FIFO1 -> FIFO2");
    @(negedge clk); check(q4 == 4'b1110 && te4 && f4, "read: FIFO0 -> FIFO1, top empty");
    $display("writes=%0d reads=%0d", n_wr, n_rd);
    check(n_rd > 500, "enough reads in random traffic");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
