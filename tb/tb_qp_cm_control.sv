// tb_qp_cm_control: self-checking test of CM-CONTROL with a short page
// (8 CM words), driving the real MDR, a 4-word FIFO, the checksum and the
// MISR. The testbench plays central memory (an array with a random
// acknowledge delay) and the UNICON side of the FIFO.
//  Write page: the FIFO must deliver the high and low half of every CM word
//  in order, then the eight checksum words (XOR of every eighth half word);
//  the MISR counts 8 words; a word stored with bad parity sets the parity
//  error. CM-CONTROL never writes a full FIFO top (the FIFO asserts it).
//  Read page: the testbench pushes 16 half words and their checksum; CM must
//  receive the assembled words with odd parity; a corrupted page sets the
//  checksum error and an intact one does not.
module tb_qp_cm_control;
  import qp_pkg::*;
  localparam int PG = 8;
  logic clk, rst_n, start, cancel, done;
  op_e  op;
  logic cm_req, cm_we, cm_ack;
  logic [9:0] cm_addr;
  logic mdr_load_cm, mdr_sel_lo, mdr_load_hi, mdr_load_lo, parity_ok;
  logic top_empty, fifo_wr, g0_cksum, bottom_full, fifo_rd;
  logic ck_clear, ck_en, ck_zero;
  logic [2:0] ck_sel;
  logic [9:0] word_count;
  logic misr_inc, set_parity, set_cksum;
  logic [MDR_BITS-1:0] cm_rdata, cm_wdata;
  logic [BUS_BITS-1:0] half, fifo_din, fifo_dout, ck_word, ck_in;
  logic [CHECKSUM_BITS-1:0] ck_sum;
  misr_status_t status;
  logic [15:0] status_word;
  logic [3:0]  fq;
  logic        tq_full, tq_empty;
  // testbench side of the FIFO
  logic tb_wr, tb_rd;
  logic [BUS_BITS-1:0] tb_din;

  logic [MDR_BITS-1:0] cm_mem[PG];
  logic [BUS_BITS-1:0] exp_q[$];
  int checks = 0, failures = 0;

  qp_cm_control #(.PAGE(PG)) dut (.*);

  qp_mdr u_mdr (.clk, .rst_n, .load_cm(mdr_load_cm), .cm_rdata, .cm_wdata, .parity_ok,
                .sel_lo(mdr_sel_lo), .half_out(half), .load_hi(mdr_load_hi),
                .load_lo(mdr_load_lo), .half_in(fifo_dout));
  assign fifo_din = tb_wr ? tb_din : (g0_cksum ? ck_word : half);
  qp_sync_fifo #(.WIDTH(16), .DEPTH(4), .USE_HR(1'b0)) u_fifo (
    .clk, .rst_n, .wr_fifo(fifo_wr | tb_wr), .data_in(fifo_din), .top_empty,
    .rd_fifo(fifo_rd | tb_rd), .data_out(fifo_dout), .bottom_full,
    .three_q_full(tq_full), .three_q_empty(tq_empty), .q(fq));
  assign ck_in = fifo_wr ? half : fifo_dout;
  qp_checksum u_ck (.clk, .rst_n, .clear(ck_clear), .en(ck_en), .word_in(ck_in),
                    .sel(ck_sel), .word_out(ck_word), .sum(ck_sum), .is_zero(ck_zero));
  qp_misr u_misr (.clk, .rst_n, .clear(start), .inc(misr_inc), .set_dre(1'b0),
                  .set_parity, .set_cksum, .set_done(done), .count(word_count),
                  .status, .status_word);

  initial clk = 1'b0;
  always #5 clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; if (failures < 20) $display("FAIL @%0t: %s", $time, what); end
  endtask

  // Central memory: acknowledges a request after 1..4 cycles.
  int  ack_wait = 0;
  logic [MDR_BITS-1:0] cm_written[PG];
  always @(negedge clk) begin
    cm_ack = 1'b0;
    if (cm_req) begin
      if (ack_wait == 0) ack_wait = 1 + int'($urandom % 4);
      ack_wait--;
      if (ack_wait == 0) cm_ack = 1'b1;
    end
    cm_rdata = cm_mem[cm_addr[2:0]];
  end
  always @(posedge clk) if (cm_ack && cm_we) cm_written[cm_addr[2:0]] <= cm_wdata;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [MDR_BITS-1:0] with_parity(input logic [35:0] d, input bit bad);
    return {(($countones(d) % 2) == 0) ^ bad, d};
  endfunction

  initial begin
    logic [15:0] lanes[8];
    logic [15:0] got, hw[2*PG];
    int n;
    rst_n = 0; start = 0; cancel = 0; op = OP_WRITE; tb_wr = 0; tb_rd = 0; tb_din = '0;
    cm_ack = 0; cm_rdata = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;

    // ---------------- write page ----------------
    for (int pass = 0; pass < 2; pass++) begin
      foreach (lanes[l]) lanes[l] = '0;
      for (int w = 0; w < PG; w++) begin
        automatic logic [35:0] d = {4'($urandom), 32'($urandom)};
        cm_mem[w] = with_parity(d, pass == 1 && w == 5);
        exp_q.push_back(d[31:16]); exp_q.push_back(d[15:0]);
        lanes[(2*w) % 8]   ^= d[31:16];
        lanes[(2*w+1) % 8] ^= d[15:0];
      end
      foreach (lanes[l]) exp_q.push_back(lanes[l]);
      op = OP_WRITE; start = 1; @(negedge clk); start = 0;
      n = 0;
      while (exp_q.size() > 0) begin
        tb_rd = bottom_full && ($urandom % 3 == 0);
        if (tb_rd) begin
          got = fifo_dout;
          check(got == exp_q.pop_front(), $sformatf("write page word %0d", n));
          n++;
        end
        @(negedge clk);
        tb_rd = 0;
      end
      repeat (3) @(negedge clk);
      check(done, "write page done");
      check(word_count == 10'(PG), "MISR counted the page");
      check(status.parity_err == (pass == 1), "parity error only for the bad word");
      check(n == 2*PG + 8, "page plus eight checksum words");
    end

    // ---------------- read page ----------------
    for (int pass = 0; pass < 2; pass++) begin
      foreach (lanes[l]) lanes[l] = '0;
      for (int k = 0; k < 2*PG; k++) begin
        hw[k] = 16'($urandom);
        lanes[k % 8] ^= hw[k];
      end
      op = OP_READ; start = 1; @(negedge clk); start = 0;
      for (int k = 0; k < 2*PG + 8; k++) begin
        tb_din = (k < 2*PG) ? hw[k] : lanes[k - 2*PG];
        if (pass == 1 && k == 3) tb_din ^= 16'h0100;
        while (!top_empty) @(negedge clk);
        tb_wr = 1; @(negedge clk); tb_wr = 0;
        repeat ($urandom % 3) @(negedge clk);
      end
      repeat (60) @(negedge clk);
      check(done, "read page done");
      check(word_count == 10'(PG), "MISR counted the read page");
      for (int w = 0; w < PG; w++) begin
        automatic logic [15:0] h = (pass == 1 && w == 1) ? hw[2*w+1] ^ 16'h0100 : hw[2*w+1];
        check(cm_written[w][35:0] == {4'b0, hw[2*w], h}, $sformatf("CM word %0d", w));
        check(^cm_written[w] == 1'b1, "odd parity to CM");
      end
      check(status.cksum_err == (pass == 1), "checksum error only for the corrupted page");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
