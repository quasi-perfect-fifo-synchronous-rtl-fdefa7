// qp_pkg: types and constants shared by the quasi-perfect FIFO and the
// UNICON channel controller built around it.
//
// The sizes below are those of the controller: a 16-word x 16-bit FIFO, a
// 37-bit memory data register (36 data bits plus parity) towards central
// memory (CM), pages of 512 CM words and a 128-bit page checksum. The
// encoding of the operation code and the layout of the status word are this
// design's own choices.
package qp_pkg;

  // Controller geometry.
  localparam int unsigned CM_DATA_BITS   = 36;   // CM word, without parity
  localparam int unsigned MDR_BITS       = 37;   // CM word plus parity bit
  localparam int unsigned BUS_BITS       = 16;   // FIFO, HR and data bus width
  localparam int unsigned FIFO_WORDS     = 16;   // FIFO locations
  localparam int unsigned PAGE_WORDS     = 512;  // CM words per page
  localparam int unsigned CM_PAGES       = 4096; // pages the controller can address
  localparam int unsigned PAGE_BITS      = $clog2(CM_PAGES);
  localparam int unsigned WORD_BITS      = $clog2(PAGE_WORDS);
  localparam int unsigned CM_ADDR_BITS   = PAGE_BITS + WORD_BITS;
  localparam int unsigned CHECKSUM_BITS  = 128;  // page checksum width
  localparam int unsigned CHECKSUM_WORDS = CHECKSUM_BITS / BUS_BITS;

  // Direction of a page transfer, seen from the mass memory.
  typedef enum logic [0:0] {
    OP_WRITE = 1'b0,   // CM -> MDR -> FIFO -> HR -> UNICON
    OP_READ  = 1'b1    // UNICON -> FIFO -> MDR -> CM
  } op_e;

  // Status indicators kept in the MISR.
  typedef struct packed {
    logic dre;          // data rate error at the UNICON side
    logic parity_err;   // parity error on a word read from CM
    logic cksum_err;    // page checksum mismatch (read operation)
    logic done;         // page transfer complete
  } misr_status_t;

endpackage
