// qp_unicon_controller: channel controller between central memory (CM) and
// the UNICON laser mass memory, built around a synchronous quasi-perfect FIFO
// of 16 words x 16 bits used as an elastic buffer.
//
// Data path: the 37-bit MDR on the CM side; gate G0 (an MDR half or a
// checksum word) and gate G1 (the 16-bit data bus) into the FIFO top; the
// FIFO bottom into the 16-bit holding register HR and into the MDR; gate G2
// from HR onto the data bus, which is shared by the UNICON and the
// supervising minicomputer (UMP). Two control sections, CM-CONTROL and
// UNICON-CONTROL, run the two sides with no control signal in common; the
// MISR holds the word count and the status bits.
//   Write page: the UMP may first put header words into the FIFO through G1;
//   CM-CONTROL then moves the page CM -> MDR -> FIFO, appends the 128-bit
//   checksum, and UNICON-CONTROL delivers FIFO -> HR -> bus on the UNICON's
//   demands, flagging DRE if the FIFO bottom is empty on a demand.
//   Read page: UNICON-CONTROL puts the UNICON's words into the FIFO through
//   G1, flagging DRE if the top is full; CM-CONTROL assembles them in the MDR,
//   writes them to CM and checks the checksum.
// cm_priority asks central memory for higher access priority while a page is
// moving and the FIFO has run 3/4-empty (write page) or 3/4-full (read page).
// The CM address is the page number given with ump_page at start (4096 pages
// of 512 words) followed by the word number in the page.
// ump_start starts both sections in the direction ump_op; ump_xfer_words is
// the number of 16-bit words the UNICON side moves. misr_done is set when both
// sections have finished. The bus is split into bus_in and bus_out with
// bus_out_en (G2) instead of a tri-state bus. Gate and handshake details are
// this design's choices; the block structure follows the document.
module qp_unicon_controller
  import qp_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH = FIFO_WORDS,
  parameter int unsigned PAGE       = PAGE_WORDS
) (
  input  logic                clk,
  input  logic                rst_n,
  // minicomputer (UMP)
  input  logic                ump_start,
  input  op_e                 ump_op,
  input  logic                ump_cancel,
  input  logic [15:0]         ump_xfer_words,
  input  logic                ump_wr,          // header word from bus_in
  input  logic [PAGE_BITS-1:0] ump_page,       // CM page of the transfer
  output logic [15:0]         misr_word,
  output misr_status_t        misr_status,
  output logic [9:0]          misr_count,
  // central memory
  output logic                cm_req,
  output logic                cm_we,
  output logic [CM_ADDR_BITS-1:0] cm_addr,     // {page, word in page}
  output logic [MDR_BITS-1:0] cm_wdata,
  input  logic [MDR_BITS-1:0] cm_rdata,
  input  logic                cm_ack,
  // UNICON and the 16-bit data bus
  input  logic                uc_demand,
  output logic                uc_out_valid,
  input  logic                uc_in_valid,
  input  logic [BUS_BITS-1:0] bus_in,
  output logic [BUS_BITS-1:0] bus_out,
  output logic                bus_out_en,
  // FIFO status, for CM access priority
  output logic                fifo_top_empty,
  output logic                fifo_bottom_full,
  output logic                fifo_three_q_full,
  output logic                fifo_three_q_empty,
  output logic [FIFO_DEPTH-1:0] fifo_q,
  output logic                cm_priority      // ask CM for higher access priority
);

  // MDR
  logic                mdr_load_cm, mdr_sel_lo, mdr_load_hi, mdr_load_lo, parity_ok;
  logic [BUS_BITS-1:0] mdr_half;
  // FIFO
  logic                fifo_wr, fifo_rd;
  logic [BUS_BITS-1:0] fifo_din, fifo_dout;
  // gates
  logic                g0_wr, g0_cksum, g1_wr, cm_rd, hr_rd;
  logic [BUS_BITS-1:0] g0_data;
  // checksum
  logic                ck_clear, ck_en, ck_zero;
  logic [2:0]          ck_sel;
  logic [BUS_BITS-1:0] ck_word, ck_in;
  logic [CHECKSUM_BITS-1:0] ck_sum;
  // MISR
  logic                misr_inc, set_parity, set_cksum, set_dre, set_done;
  logic                cm_done, uc_done, done_q;
  logic                active_q;
  logic [PAGE_BITS-1:0] page_q;
  logic [9:0]          cm_word;
  op_e                 op_q;

  // ---------------------------------------------------------------- MDR
  qp_mdr u_mdr (
    .clk       (clk),
    .rst_n     (rst_n),
    .load_cm   (mdr_load_cm),
    .cm_rdata  (cm_rdata),
    .cm_wdata  (cm_wdata),
    .parity_ok (parity_ok),
    .sel_lo    (mdr_sel_lo),
    .half_out  (mdr_half),
    .load_hi   (mdr_load_hi),
    .load_lo   (mdr_load_lo),
    .half_in   (fifo_dout)
  );

  // ------------------------------------------------- gates G0, G1 and FIFO
  assign g0_data  = g0_cksum ? ck_word : mdr_half;
  assign fifo_wr  = g0_wr | g1_wr;
  assign fifo_din = g1_wr ? bus_in : g0_data;
  assign fifo_rd  = cm_rd | hr_rd;

  qp_sync_fifo #(
    .WIDTH  (BUS_BITS),
    .DEPTH  (FIFO_DEPTH),
    .USE_HR (1'b0)
  ) u_fifo (
    .clk           (clk),
    .rst_n         (rst_n),
    .wr_fifo       (fifo_wr),
    .data_in       (fifo_din),
    .top_empty     (fifo_top_empty),
    .rd_fifo       (fifo_rd),
    .data_out      (fifo_dout),
    .bottom_full   (fifo_bottom_full),
    .three_q_full  (fifo_three_q_full),
    .three_q_empty (fifo_three_q_empty),
    .q             (fifo_q)
  );

  // ------------------------------------------------------ HR and gate G2
  qp_data_reg #(.WIDTH(BUS_BITS)) u_hr (
    .clk   (clk),
    .rst_n (rst_n),
    .ld    (hr_rd),
    .d     (fifo_dout),
    .q     (bus_out)
  );

  // ------------------------------------------------------------ checksum
  // Words are summed on the MDR side of the FIFO, so the FIFO lies inside
  // the checked stream in both directions.
  assign ck_in = g0_wr ? mdr_half : fifo_dout;

  qp_checksum u_ck (
    .clk      (clk),
    .rst_n    (rst_n),
    .clear    (ck_clear),
    .en       (ck_en),
    .word_in  (ck_in),
    .sel      (ck_sel),
    .word_out (ck_word),
    .sum      (ck_sum),
    .is_zero  (ck_zero)
  );

  // ---------------------------------------------------------- CM-CONTROL
  qp_cm_control #(.PAGE(PAGE)) u_cmc (
    .clk         (clk),
    .rst_n       (rst_n),
    .start       (ump_start),
    .op          (ump_op),
    .cancel      (ump_cancel),
    .done        (cm_done),
    .cm_req      (cm_req),
    .cm_we       (cm_we),
    .cm_addr     (cm_word),
    .cm_ack      (cm_ack),
    .mdr_load_cm (mdr_load_cm),
    .mdr_sel_lo  (mdr_sel_lo),
    .mdr_load_hi (mdr_load_hi),
    .mdr_load_lo (mdr_load_lo),
    .parity_ok   (parity_ok),
    .top_empty   (fifo_top_empty),
    .fifo_wr     (g0_wr),
    .g0_cksum    (g0_cksum),
    .bottom_full (fifo_bottom_full),
    .fifo_rd     (cm_rd),
    .ck_clear    (ck_clear),
    .ck_en       (ck_en),
    .ck_sel      (ck_sel),
    .ck_zero     (ck_zero),
    .word_count  (misr_count),
    .misr_inc    (misr_inc),
    .set_parity  (set_parity),
    .set_cksum   (set_cksum)
  );

  // ------------------------------------------------------ UNICON-CONTROL
  qp_unicon_control u_ucc (
    .clk          (clk),
    .rst_n        (rst_n),
    .start        (ump_start),
    .op           (ump_op),
    .cancel       (ump_cancel),
    .xfer_words   (ump_xfer_words),
    .done         (uc_done),
    .uc_demand    (uc_demand),
    .uc_out_valid (uc_out_valid),
    .uc_in_valid  (uc_in_valid),
    .ump_wr       (ump_wr),
    .bottom_full  (fifo_bottom_full),
    .fifo_rd      (hr_rd),
    .top_empty    (fifo_top_empty),
    .g1_wr        (g1_wr),
    .g2_en        (bus_out_en),
    .set_dre      (set_dre)
  );

  // ---------------------------------------------------------------- MISR
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)         done_q <= 1'b0;
    else if (ump_start) done_q <= 1'b0;
    else                done_q <= cm_done & uc_done;
  end
  assign set_done = cm_done & uc_done & ~done_q;

  qp_misr u_misr (
    .clk         (clk),
    .rst_n       (rst_n),
    .clear       (ump_start),
    .inc         (misr_inc),
    .set_dre     (set_dre),
    .set_parity  (set_parity),
    .set_cksum   (set_cksum),
    .set_done    (set_done),
    .count       (misr_count),
    .status      (misr_status),
    .status_word (misr_word)
  );

  // ---------------------------------------------------------- CM address
  // The page number is taken at start; the word number is the MISR count.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)         page_q <= '0;
    else if (ump_start) page_q <= ump_page;
  end
  assign cm_addr = {page_q, cm_word[WORD_BITS-1:0]};

  // ---------------------------------------------------- CM access priority
  // While a page is moving, a FIFO that has run 3/4-empty (write page) or
  // 3/4-full (read page) is the early warning of a coming data rate error:
  // the controller then asks central memory for higher access priority.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active_q <= 1'b0;
      op_q     <= OP_WRITE;
    end else if (ump_start) begin
      active_q <= 1'b1;
      op_q     <= ump_op;
    end else if (set_done || ump_cancel) begin
      active_q <= 1'b0;
    end
  end
  assign cm_priority = active_q &
                       ((op_q == OP_WRITE) ? fifo_three_q_empty : fifo_three_q_full);

  // The two control sections never write the FIFO top or read its bottom in
  // the same cycle.
  a_one_writer : assert property (@(posedge clk) disable iff (!rst_n) !(g0_wr && g1_wr))
    else $error("qp_unicon_controller: G0 and G1 write the FIFO together");
  a_one_reader : assert property (@(posedge clk) disable iff (!rst_n) !(cm_rd && hr_rd))
    else $error("qp_unicon_controller: MDR and HR read the FIFO together");

endmodule
