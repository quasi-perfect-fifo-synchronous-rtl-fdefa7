// qp_top: the two quasi-perfect FIFO designs side by side.
//
//  * u_ctrl: the UNICON channel controller, the synchronous application: a
//    16-word x 16-bit clocked FIFO between central memory and the UNICON
//    laser memory, with its MDR, HR, checksum, MISR and two control sections.
//    Its ports are those of qp_unicon_controller with a ctrl_ prefix dropped
//    where the name is already unique.
//  * u_afifo: the asynchronous (unclocked) FIFO built from toggle
//    flip-flops and one-shots, with its top and bottom ports brought out
//    with an af_ prefix. It is the design used in a magnetic tape controller,
//    whose other logic is not described, so it is not connected to anything
//    else here.
// The two share nothing but the reset.
module qp_top
  import qp_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH  = FIFO_WORDS,
  parameter int unsigned PAGE        = PAGE_WORDS,
  parameter int unsigned AF_WIDTH    = 6,
  parameter int unsigned AF_DEPTH    = 3,
  parameter int unsigned AF_PULSE_NS = 70
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // ---- UNICON channel controller
  input  logic                  ump_start,
  input  op_e                   ump_op,
  input  logic                  ump_cancel,
  input  logic [15:0]           ump_xfer_words,
  input  logic                  ump_wr,
  input  logic [PAGE_BITS-1:0]  ump_page,
  output logic [15:0]           misr_word,
  output misr_status_t          misr_status,
  output logic [9:0]            misr_count,
  output logic                  cm_req,
  output logic                  cm_we,
  output logic [CM_ADDR_BITS-1:0] cm_addr,
  output logic [MDR_BITS-1:0]   cm_wdata,
  input  logic [MDR_BITS-1:0]   cm_rdata,
  input  logic                  cm_ack,
  input  logic                  uc_demand,
  output logic                  uc_out_valid,
  input  logic                  uc_in_valid,
  input  logic [BUS_BITS-1:0]   bus_in,
  output logic [BUS_BITS-1:0]   bus_out,
  output logic                  bus_out_en,
  output logic                  fifo_top_empty,
  output logic                  fifo_bottom_full,
  output logic                  fifo_three_q_full,
  output logic                  fifo_three_q_empty,
  output logic [FIFO_DEPTH-1:0] fifo_q,
  output logic                  cm_priority,
  // ---- asynchronous FIFO
  input  logic                  af_wr_n,
  input  logic [AF_WIDTH-1:0]   af_data_in,
  output logic                  af_top_empty,
  output logic [AF_WIDTH-1:0]   af_data_out,
  output logic                  af_strobe_out_n,
  input  logic                  af_next_empty,
  output logic [AF_DEPTH-1:0]   af_q,
  output logic                  af_busy
);

  qp_unicon_controller #(
    .FIFO_DEPTH (FIFO_DEPTH),
    .PAGE       (PAGE)
  ) u_ctrl (
    .clk                (clk),
    .rst_n              (rst_n),
    .ump_start          (ump_start),
    .ump_op             (ump_op),
    .ump_cancel         (ump_cancel),
    .ump_xfer_words     (ump_xfer_words),
    .ump_wr             (ump_wr),
    .ump_page           (ump_page),
    .misr_word          (misr_word),
    .misr_status        (misr_status),
    .misr_count         (misr_count),
    .cm_req             (cm_req),
    .cm_we              (cm_we),
    .cm_addr            (cm_addr),
    .cm_wdata           (cm_wdata),
    .cm_rdata           (cm_rdata),
    .cm_ack             (cm_ack),
    .uc_demand          (uc_demand),
    .uc_out_valid       (uc_out_valid),
    .uc_in_valid        (uc_in_valid),
    .bus_in             (bus_in),
    .bus_out            (bus_out),
    .bus_out_en         (bus_out_en),
    .fifo_top_empty     (fifo_top_empty),
    .fifo_bottom_full   (fifo_bottom_full),
    .fifo_three_q_full  (fifo_three_q_full),
    .fifo_three_q_empty (fifo_three_q_empty),
    .fifo_q             (fifo_q),
    .cm_priority        (cm_priority)
  );

  qp_async_fifo #(
    .WIDTH    (AF_WIDTH),
    .DEPTH    (AF_DEPTH),
    .PULSE_NS (AF_PULSE_NS)
  ) u_afifo (
    .rst_n        (rst_n),
    .wr_fifo_n    (af_wr_n),
    .data_in      (af_data_in),
    .top_empty    (af_top_empty),
    .data_out     (af_data_out),
    .strobe_out_n (af_strobe_out_n),
    .next_empty   (af_next_empty),
    .q            (af_q),
    .busy         (af_busy)
  );

endmodule
