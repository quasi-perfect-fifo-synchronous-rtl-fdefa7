// qp_mdr: memory data register (MDR) of the UNICON channel controller.
//
// A 37-bit register, 36 data bits plus a parity bit, on the central memory
// (CM) side of the FIFO. It also multiplexes between the 36-bit CM word and
// the 16-bit FIFO word:
//   write operation: load_cm takes a word read from CM; half_out shows its
//                    bits 31:16 when sel_lo = 0 and bits 15:0 when sel_lo = 1,
//                    the two FIFO words made from it; parity_ok checks it.
//   read operation:  load_hi and load_lo take two FIFO words into bits 31:16
//                    and 15:0 and clear bits 35:32; cm_wdata is the word with a
//                    freshly generated parity bit in bit 36.
// The document treats the UNICON as a 32-bit word device fed from 36-bit CM
// words; which 32 bits travel, the half order and odd parity are this
// design's choices. Loads take effect at the clock edge.
module qp_mdr
  import qp_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  // CM side
  input  logic                load_cm,
  input  logic [MDR_BITS-1:0] cm_rdata,   // {parity, data[35:0]}
  output logic [MDR_BITS-1:0] cm_wdata,   // {parity, data[35:0]}
  output logic                parity_ok,
  // FIFO side
  input  logic                sel_lo,
  output logic [BUS_BITS-1:0] half_out,
  input  logic                load_hi,
  input  logic                load_lo,
  input  logic [BUS_BITS-1:0] half_in
);

  logic [MDR_BITS-1:0] mdr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mdr <= '0;
    end else if (load_cm) begin
      mdr <= cm_rdata;
    end else if (load_hi) begin
      mdr[35:32] <= '0;
      mdr[31:16] <= half_in;
    end else if (load_lo) begin
      mdr[15:0]  <= half_in;
    end
  end

  // Odd parity over all 37 bits.
  assign parity_ok = ^mdr;
  assign cm_wdata  = {~^mdr[CM_DATA_BITS-1:0], mdr[CM_DATA_BITS-1:0]};
  assign half_out  = sel_lo ? mdr[15:0] : mdr[31:16];

endmodule
