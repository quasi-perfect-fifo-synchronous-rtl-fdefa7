// tb_qp_unicon_controller: end-to-end test of the UNICON channel controller
// with a short page (16 CM words) and the default 16-word FIFO.
// The testbench plays central memory (a word array that acknowledges after
// CM_LAT cycles), the UNICON (one word every UC_PERIOD cycles, in real time)
// and the minicomputer (header words, start, cancel, status).
//  1. Write page: header, page halves and checksum reach the UNICON in order.
//  2. Read page: the stream recorded in 1 (without the header) is played back
//     and central memory receives the page again, with odd parity and no
//     checksum error.
//  3. Write page with one bad-parity CM word and a long CM stall: parity
//     error and data rate error are reported.
//  4. Read page with one corrupted word: checksum error.
//  5. Read page with a CM stall: the FIFO top fills, data rate error, and
//     the transfer is cancelled.
// Mechanisms counted and required at least once: G0 writes, G1 writes
// (header and UNICON), LOAD HR, MDR reads of the FIFO, 3/4-full, 3/4-empty,
// two words falling at once, both kinds of DRE, parity error, checksum error,
// cancel.
module tb_qp_unicon_controller;
  import qp_pkg::*;
  localparam int PG = 16, HDR = 4, CM_LAT = 14, UC_PERIOD = 32;
  localparam int XW = 2*PG + CHECKSUM_WORDS;

  logic clk, rst_n;
  logic ump_start, ump_cancel, ump_wr;
  op_e  ump_op;
  logic [15:0] ump_xfer_words, misr_word;
  misr_status_t misr_status;
  logic [9:0] misr_count;
  logic [CM_ADDR_BITS-1:0] cm_addr;
  logic [PAGE_BITS-1:0] ump_page;
  logic cm_req, cm_we, cm_ack;
  logic [MDR_BITS-1:0] cm_wdata, cm_rdata;
  logic uc_demand, uc_out_valid, uc_in_valid, bus_out_en;
  logic [15:0] bus_in, bus_out;
  logic fifo_top_empty, fifo_bottom_full, fifo_three_q_full, fifo_three_q_empty;
  logic [FIFO_WORDS-1:0] fifo_q;
  logic cm_priority;

  qp_unicon_controller #(.PAGE(PG)) dut (.*);

  // internal strobes observed for the mechanism counts
  wire dut_fifo_wr    = dut.fifo_wr;
  wire dut_g1         = dut.g1_wr;
  wire dut_hr_rd      = dut.hr_rd;
  wire dut_cm_rd      = dut.cm_rd;
  wire dut_set_dre    = dut.set_dre;
  wire dut_set_parity = dut.set_parity;
  wire dut_set_cksum  = dut.set_cksum;
  wire dut_set_done   = dut.set_done;
  wire dut_cm_idle    = (4'(dut.u_cmc.state) == 4'd0);

  int checks = 0, failures = 0;
  // mechanism counters
  int n_g0 = 0, n_g1_hdr = 0, n_g1_uc = 0, n_ldhr = 0, n_mdr_rd = 0, n_3qf = 0, n_3qe = 0;
  int n_multi = 0, n_dre_w = 0, n_dre_r = 0, n_par = 0, n_ck = 0, n_cancel = 0;
  int n_prio_w = 0, n_prio_r = 0;

  initial clk = 1'b0;
  always #50 clk = ~clk;          // 10 MHz system clock

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; if (failures < 20) $display("FAIL @%0t: %s", $time, what); end
  endtask

  // ---------------------------------------------------------------- CM model
  logic [MDR_BITS-1:0] cm_mem[PG];
  int  cm_wait = 0;
  int  cm_stall_at = -1, cm_stall_len = 0;   // stall before serving word cm_stall_at
  always @(negedge clk) begin
    cm_ack = 1'b0;
    if (cm_req) begin
      checks++;
      if (cm_addr[CM_ADDR_BITS-1:WORD_BITS] != ump_page) begin
        failures++; $display("FAIL @%0t: CM page address %h", $time, cm_addr);
      end
      if (cm_wait == 0) cm_wait = (int'(cm_addr[WORD_BITS-1:0]) == cm_stall_at) ? CM_LAT + cm_stall_len : CM_LAT;
      cm_wait--;
      if (cm_wait == 0) cm_ack = 1'b1;
    end
    cm_rdata = cm_mem[cm_addr[$clog2(PG)-1:0]];
  end
  always @(posedge clk) if (cm_ack && cm_we) cm_mem[cm_addr[$clog2(PG)-1:0]] <= cm_wdata;

  // ----------------------------------------------------- mechanism monitor
  // A page is in progress from start to done or cancel (testbench view).
  bit prio_active = 0;
  always @(posedge clk) begin
    if (ump_start) prio_active <= 1;
    else if (ump_cancel || (dut_set_done)) prio_active <= 0;
  end
  always @(posedge clk) if (rst_n) begin
    automatic int moving = 0;
    if (dut_fifo_wr && !dut_g1)                n_g0++;
    if (dut_g1 && ump_wr)                      n_g1_hdr++;
    if (dut_g1 && uc_in_valid)                 n_g1_uc++;
    if (dut_hr_rd)                             n_ldhr++;
    if (dut_cm_rd)                             n_mdr_rd++;
    if (fifo_three_q_full)                     n_3qf++;
    if (fifo_three_q_empty)                    n_3qe++;
    for (int i = 0; i < FIFO_WORDS - 1; i++) if (fifo_q[i] && !fifo_q[i+1]) moving++;
    if (moving >= 2)                           n_multi++;
    if (dut_set_dre && ump_op == OP_WRITE)     n_dre_w++;
    if (dut_set_dre && ump_op == OP_READ)      n_dre_r++;
    if (dut_set_parity)                        n_par++;
    if (dut_set_cksum)                         n_ck++;
    if (ump_cancel)                            n_cancel++;
    if (cm_priority && ump_op == OP_WRITE)     n_prio_w++;
    if (cm_priority && ump_op == OP_READ)      n_prio_r++;
    if (cm_priority != (prio_active && (ump_op == OP_WRITE ? fifo_three_q_empty : fifo_three_q_full))) begin
      failures++; checks++;
      $display("FAIL @%0t: CM priority request", $time);
    end
  end

  // ------------------------------------------------------------ UNICON model
  logic [15:0] uc_rec[$];      // words taken by the UNICON in a write page
  logic [15:0] uc_play[$];     // words the UNICON delivers in a read page
  bit          uc_run_w = 0, uc_run_r = 0;
  int          uc_phase = 0;
  always @(negedge clk) begin
    uc_demand   = 1'b0;
    uc_in_valid = 1'b0;
    if (uc_out_valid) uc_rec.push_back(bus_out);
    if (uc_run_w || uc_run_r) begin
      uc_phase++;
      if (uc_phase == UC_PERIOD) begin
        uc_phase = 0;
        if (uc_run_w) uc_demand = 1'b1;
        if (uc_run_r && uc_play.size() > 0) begin
          bus_in      = uc_play.pop_front();
          uc_in_valid = 1'b1;
        end
      end
    end
  end

  initial begin
    repeat (40 * (HDR + XW) * UC_PERIOD + 200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [MDR_BITS-1:0] with_parity(input logic [35:0] d, input bit bad);
    return {(($countones(d) % 2) == 0) ^ bad, d};
  endfunction

  task automatic start_op(input op_e op, input int words);
    @(negedge clk);
    ump_op = op; ump_xfer_words = 16'(words); ump_start = 1'b1;
    ump_page = PAGE_BITS'($urandom);
    @(negedge clk); ump_start = 1'b0;
  endtask

  task automatic wait_done(input int max_cycles);
    int c = 0;
    while (!misr_status.done && c < max_cycles) begin @(negedge clk); c++; end
  endtask

  logic [35:0] page[PG];
  logic [15:0] expect_w[$];
  logic [15:0] lanes[CHECKSUM_WORDS];
  int          t_start, t_cycles;

  initial begin
    ump_page = '0;
    rst_n = 0; ump_start = 0; ump_cancel = 0; ump_wr = 0; ump_op = OP_WRITE;
    ump_xfer_words = '0; bus_in = '0; uc_demand = 0; uc_in_valid = 0; cm_ack = 0;
    cm_rdata = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check(fifo_top_empty && fifo_three_q_empty && !fifo_bottom_full, "FIFO empty after reset");

    // ------------------------------------------------ 1. write page
    foreach (lanes[l]) lanes[l] = '0;
    for (int w = 0; w < PG; w++) begin
      page[w]   = {4'($urandom), 32'($urandom)};
      cm_mem[w] = with_parity(page[w], 1'b0);
      lanes[(2*w) % CHECKSUM_WORDS]   ^= page[w][31:16];
      lanes[(2*w+1) % CHECKSUM_WORDS] ^= page[w][15:0];
    end
    for (int h = 0; h < HDR; h++) begin
      while (!fifo_top_empty) @(negedge clk);
      bus_in = 16'(16'hC0DE + h); ump_wr = 1'b1; expect_w.push_back(bus_in);
      @(negedge clk); ump_wr = 1'b0;
    end
    for (int w = 0; w < PG; w++) begin
      expect_w.push_back(page[w][31:16]); expect_w.push_back(page[w][15:0]);
    end
    foreach (lanes[l]) expect_w.push_back(lanes[l]);
    start_op(OP_WRITE, HDR + XW);
    t_start = int'($time / 100);
    uc_rec.delete(); uc_phase = 0; uc_run_w = 1;
    wait_done(4 * (HDR + XW) * UC_PERIOD);
    t_cycles = int'($time / 100) - t_start;
    uc_run_w = 0;
    check(misr_status.done, "write page done");
    check(uc_rec.size() == HDR + XW, $sformatf("UNICON got %0d words", uc_rec.size()));
    for (int k = 0; k < HDR + XW && k < uc_rec.size(); k++)
      check(uc_rec[k] == expect_w[k], $sformatf("write stream word %0d", k));
    check(!misr_status.dre && !misr_status.parity_err, "clean write page");
    check(misr_count == 10'(PG), "MISR word count = page");
    // The UNICON sets the pace: one word per UC_PERIOD cycles.
    check(t_cycles >= (HDR + XW) * UC_PERIOD && t_cycles <= (HDR + XW + 2) * UC_PERIOD,
          $sformatf("write page took %0d cycles", t_cycles));

    // ------------------------------------------------ 2. read page
    for (int w = 0; w < PG; w++) cm_mem[w] = '0;
    uc_play.delete();
    for (int k = HDR; k < HDR + XW; k++) uc_play.push_back(expect_w[k]);
    start_op(OP_READ, XW);
    uc_phase = 0; uc_run_r = 1;
    wait_done(4 * XW * UC_PERIOD);
    uc_run_r = 0;
    check(misr_status.done, "read page done");
    for (int w = 0; w < PG; w++) begin
      check(cm_mem[w][35:0] == {4'b0, page[w][31:0]}, $sformatf("CM word %0d read back", w));
      check(^cm_mem[w] == 1'b1, "odd parity to CM");
    end
    check(!misr_status.cksum_err && !misr_status.dre, "clean read page");

    // ------------------------------------------------ 3. write page with errors
    for (int w = 0; w < PG; w++) cm_mem[w] = with_parity(page[w], w == 2);
    cm_stall_at = PG / 2; cm_stall_len = (FIFO_WORDS + 8) * UC_PERIOD;
    start_op(OP_WRITE, XW);
    uc_rec.delete(); uc_phase = 0; uc_run_w = 1;
    wait_done(8 * XW * UC_PERIOD);
    uc_run_w = 0; cm_stall_at = -1;
    check(misr_status.done, "error write page done");
    check(misr_status.parity_err, "parity error reported");
    check(misr_status.dre, "DRE reported on the empty FIFO bottom");
    check(misr_word[15] && misr_word[14], "status word shows DRE and parity error");

    // ------------------------------------------------ 4. read page, corrupted
    for (int w = 0; w < PG; w++) cm_mem[w] = '0;
    uc_play.delete();
    for (int k = HDR; k < HDR + XW; k++) uc_play.push_back(k == HDR + 5 ? expect_w[k] ^ 16'h0800 : expect_w[k]);
    start_op(OP_READ, XW);
    uc_phase = 0; uc_run_r = 1;
    wait_done(4 * XW * UC_PERIOD);
    uc_run_r = 0;
    check(misr_status.done && misr_status.cksum_err, "checksum error reported");
    check(!misr_status.dre, "no DRE in the corrupted read page");

    // ------------------------------------------------ 5. read page, CM stall
    uc_play.delete();
    for (int k = HDR; k < HDR + XW; k++) uc_play.push_back(expect_w[k]);
    cm_stall_at = 1; cm_stall_len = (FIFO_WORDS + 8) * UC_PERIOD * 2;
    start_op(OP_READ, XW);
    uc_phase = 0; uc_run_r = 1;
    wait_done((XW + 2 * FIFO_WORDS + 20) * UC_PERIOD * 2);
    uc_run_r = 0; cm_stall_at = -1;
    check(misr_status.dre, "DRE reported on the full FIFO top");
    check(!misr_status.done, "page incomplete after lost words");
    @(negedge clk); ump_cancel = 1; @(negedge clk); ump_cancel = 0;
    // drain what is left by a short write page with no CM traffic pending
    repeat (10) @(negedge clk);
    check(dut_cm_idle, "cancel returns CM-CONTROL to idle");

    // ------------------------------------------------ mechanisms
    $display("G0=%0d G1hdr=%0d G1uc=%0d LOADHR=%0d MDRrd=%0d 3/4F=%0d 3/4E=%0d multi=%0d DREw=%0d DREr=%0d par=%0d ck=%0d cancel=%0d prio_w=%0d prio_r=%0d",
             n_g0, n_g1_hdr, n_g1_uc, n_ldhr, n_mdr_rd, n_3qf, n_3qe, n_multi, n_dre_w, n_dre_r, n_par, n_ck, n_cancel, n_prio_w, n_prio_r);
    check(n_g0 > 0,     "mechanism: write through G0");
    check(n_g1_hdr > 0, "mechanism: header through G1");
    check(n_g1_uc > 0,  "mechanism: UNICON word through G1");
    check(n_ldhr > 0,   "mechanism: LOAD HR");
    check(n_mdr_rd > 0, "mechanism: FIFO to MDR");
    check(n_3qf > 0,    "mechanism: 3/4-full");
    check(n_3qe > 0,    "mechanism: 3/4-empty");
    check(n_multi > 0,  "mechanism: several words falling at once");
    check(n_dre_w > 0,  "mechanism: DRE on write");
    check(n_dre_r > 0,  "mechanism: DRE on read");
    check(n_par > 0,    "mechanism: parity error");
    check(n_ck > 0,     "mechanism: checksum error");
    check(n_cancel > 0, "mechanism: cancel");
    check(n_prio_w > 0, "mechanism: CM priority on a 3/4-empty FIFO (write)");
    check(n_prio_r > 0, "mechanism: CM priority on a 3/4-full FIFO (read)");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
