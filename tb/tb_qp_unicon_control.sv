// tb_qp_unicon_control: self-checking test of UNICON-CONTROL with a 4-word
// FIFO and the holding register. The testbench plays the minicomputer (header
// words), the CM side (filling or draining the FIFO) and the UNICON (a demand
// or a word every few cycles).
//  Write: header words, then data, must reach the bus in order, one cycle
//  after each demand, with G2 enabled exactly then; a demand while the FIFO
//  bottom is empty sets DRE and is not counted; done after xfer_words words.
//  Read: every word the UNICON delivers while the top is empty enters the
//  FIFO in order; one delivered while the top is full sets DRE.
module tb_qp_unicon_control;
  import qp_pkg::*;
  logic clk, rst_n, start, cancel, done;
  op_e  op;
  logic [15:0] xfer_words;
  logic uc_demand, uc_out_valid, uc_in_valid, ump_wr;
  logic bottom_full, fifo_rd, top_empty, g1_wr, g2_en, set_dre;
  logic [15:0] bus_in, fifo_dout, hr;
  logic tb_wr, tb_rd, tq_full, tq_empty, dre;
  logic [3:0] fq;
  logic [15:0] exp_q[$];
  int checks = 0, failures = 0, n_out = 0, n_dre = 0;

  qp_unicon_control dut (.*);

  qp_sync_fifo #(.WIDTH(16), .DEPTH(4), .USE_HR(1'b0)) u_fifo (
    .clk, .rst_n, .wr_fifo(g1_wr | tb_wr), .data_in(bus_in), .top_empty,
    .rd_fifo(fifo_rd | tb_rd), .data_out(fifo_dout), .bottom_full,
    .three_q_full(tq_full), .three_q_empty(tq_empty), .q(fq));
  qp_data_reg #(.WIDTH(16)) u_hr (.clk, .rst_n, .ld(fifo_rd), .d(fifo_dout), .q(hr));

  initial clk = 1'b0;
  always #5 clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; if (failures < 20) $display("FAIL @%0t: %s", $time, what); end
  endtask

  always @(posedge clk) if (rst_n) begin
    if (set_dre) n_dre++;
    dre <= start ? 1'b0 : (dre | set_dre);
  end

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int k, dem;
    rst_n = 0; start = 0; cancel = 0; op = OP_WRITE; xfer_words = 16'd40;
    uc_demand = 0; uc_in_valid = 0; ump_wr = 0; bus_in = '0; tb_wr = 0; tb_rd = 0; dre = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;

    // ---------------- write ----------------
    // two header words from the minicomputer
    for (int h = 0; h < 2; h++) begin
      while (!top_empty) @(negedge clk);
      bus_in = 16'(16'hAB00 + h); ump_wr = 1; exp_q.push_back(bus_in);
      @(negedge clk); ump_wr = 0;
    end
    op = OP_WRITE; start = 1; @(negedge clk); start = 0;
    k = 0; dem = 0;
    for (int cyc = 0; cyc < 3000 && !done; cyc++) begin
      // CM side fills the FIFO, with a pause to provoke a DRE
      tb_wr = top_empty && (k < 38) && !(cyc > 60 && cyc < 120);
      if (tb_wr) begin bus_in = 16'(16'h1000 + k); exp_q.push_back(bus_in); k++; end
      // UNICON demands a word every 6 cycles
      uc_demand = (cyc % 6 == 5);
      if (uc_demand) dem++;
      @(negedge clk);
      tb_wr = 0;
      if (uc_demand) begin
        if (uc_out_valid) begin
          check(g2_en, "G2 on with the word");
          check(hr == exp_q.pop_front(), $sformatf("word %0d to UNICON", n_out));
          n_out++;
        end
      end else check(!uc_out_valid && !g2_en, "no word without a demand");
      uc_demand = 0;
    end
    repeat (2) @(negedge clk);
    check(done, "write done");
    check(n_out == 40, $sformatf("40 words delivered (%0d)", n_out));
    check(dre && n_dre > 0, "DRE when the bottom was empty on a demand");
    check(dem == n_out + n_dre, "each demand gave a word or a DRE");

    // ---------------- read ----------------
    op = OP_READ; xfer_words = 16'd30; start = 1; @(negedge clk); start = 0;
    check(!dre, "DRE cleared by start (testbench copy)");
    n_out = 0; n_dre = 0;
    for (int w = 0; w < 30; w++) begin
      repeat (3) @(negedge clk);
      // the CM side drains the FIFO, except for a while
      bus_in = 16'(16'h7000 + w); uc_in_valid = 1;
      if (top_empty) exp_q.push_back(bus_in);
      @(negedge clk); uc_in_valid = 0;
      if (w < 10 || w > 20) begin
        while (bottom_full) begin
          tb_rd = 1;
          check(fifo_dout == exp_q.pop_front(), "word from UNICON into the FIFO");
          n_out++;
          @(negedge clk); tb_rd = 0;
          @(negedge clk);
        end
      end
    end
    repeat (10) @(negedge clk);
    while (bottom_full) begin
      tb_rd = 1; check(fifo_dout == exp_q.pop_front(), "word from UNICON (tail)"); n_out++;
      @(negedge clk); tb_rd = 0; @(negedge clk);
    end
    check(done, "read done");
    check(dre && n_dre > 0, "DRE when the top was full");
    check(n_out + n_dre == 30, "each word entered or raised DRE");
    check(exp_q.size() == 0, "no word missing");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
