// qp_cm_control: CM-CONTROL, the central-memory side control section of the
// UNICON channel controller.
//
// It moves one page between central memory (CM), the memory data register
// (MDR) and the FIFO, and shares no control signal with the UNICON side: the
// FIFO is the only coupling. It always keeps the FIFO protocol, so it never
// causes a data rate error: it writes the FIFO top only while top_empty is
// high and reads its bottom only while bottom_full is high.
//
// Write operation (CM -> FIFO): for each of PAGE_WORDS CM words it requests
// the word (cm_req until cm_ack, which also loads the MDR), checks its parity,
// writes its high and then its low 16-bit half into the FIFO through gate G0,
// adding both to the checksum, and counts the word in the MISR. After the
// page it writes the CK_WORDS checksum words.
// Read operation (FIFO -> CM): for each CM word it reads two FIFO words into
// the MDR halves, then writes the MDR to CM (cm_req and cm_we until cm_ack).
// After the page it reads the CK_WORDS checksum words into the checksum and
// flags a checksum error if the total is not zero.
// start begins a page in the direction op; cancel returns to idle; done stays
// high from the end of the page to the next start. The CM handshake
// (request held until acknowledge, address = word number in the page, to
// which the controller adds the page number) is this design's choice; the
// document gives the CM cycle time only.
module qp_cm_control
  import qp_pkg::*;
#(
  parameter int unsigned PAGE = PAGE_WORDS,
  parameter int unsigned CKW  = CHECKSUM_WORDS
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  op_e        op,
  input  logic       cancel,
  output logic       done,
  // CM
  output logic       cm_req,
  output logic       cm_we,
  output logic [9:0] cm_addr,
  input  logic       cm_ack,
  // MDR
  output logic       mdr_load_cm,
  output logic       mdr_sel_lo,
  output logic       mdr_load_hi,
  output logic       mdr_load_lo,
  input  logic       parity_ok,
  // FIFO
  input  logic       top_empty,
  output logic       fifo_wr,      // write through G0
  output logic       g0_cksum,     // G0 carries a checksum word, not an MDR half
  input  logic       bottom_full,
  output logic       fifo_rd,
  // checksum
  output logic       ck_clear,
  output logic       ck_en,
  output logic [2:0] ck_sel,
  input  logic       ck_zero,
  // MISR
  input  logic [9:0] word_count,
  output logic       misr_inc,
  output logic       set_parity,
  output logic       set_cksum
);

  typedef enum logic [3:0] {
    S_IDLE, S_W_REQ, S_W_HI, S_W_LO, S_W_CK,
    S_R_HI, S_R_LO, S_R_REQ, S_R_CK, S_R_END, S_DONE
  } state_e;

  state_e     state, state_nx;
  logic [2:0] ck_idx, ck_idx_nx;
  logic       last_word;

  assign last_word = (word_count == 10'(PAGE - 1));
  assign cm_addr   = word_count;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= S_IDLE;
      ck_idx <= '0;
    end else begin
      state  <= state_nx;
      ck_idx <= ck_idx_nx;
    end
  end

  always_comb begin
    state_nx    = state;
    ck_idx_nx   = ck_idx;
    cm_req      = 1'b0;
    cm_we       = 1'b0;
    mdr_load_cm = 1'b0;
    mdr_sel_lo  = 1'b0;
    mdr_load_hi = 1'b0;
    mdr_load_lo = 1'b0;
    fifo_wr     = 1'b0;
    g0_cksum    = 1'b0;
    fifo_rd     = 1'b0;
    ck_clear    = 1'b0;
    ck_en       = 1'b0;
    ck_sel      = ck_idx;
    misr_inc    = 1'b0;
    set_parity  = 1'b0;
    set_cksum   = 1'b0;
    done        = (state == S_DONE);

    unique case (state)
      S_IDLE, S_DONE: begin
        if (start) begin
          ck_clear  = 1'b1;
          ck_idx_nx = '0;
          state_nx  = (op == OP_WRITE) ? S_W_REQ : S_R_HI;
        end
      end
      // ---------------- write operation: CM -> FIFO ----------------
      S_W_REQ: begin
        cm_req = 1'b1;
        if (cm_ack) begin
          mdr_load_cm = 1'b1;
          state_nx    = S_W_HI;
        end
      end
      S_W_HI: begin
        if (top_empty) begin
          fifo_wr    = 1'b1;
          ck_en      = 1'b1;
          set_parity = ~parity_ok;
          state_nx   = S_W_LO;
        end
      end
      S_W_LO: begin
        mdr_sel_lo = 1'b1;
        if (top_empty) begin
          fifo_wr  = 1'b1;
          ck_en    = 1'b1;
          misr_inc = 1'b1;
          state_nx = last_word ? S_W_CK : S_W_REQ;
        end
      end
      S_W_CK: begin
        g0_cksum = 1'b1;
        if (top_empty) begin
          fifo_wr   = 1'b1;
          ck_idx_nx = ck_idx + 3'd1;
          if (ck_idx == 3'(CKW - 1)) state_nx = S_DONE;
        end
      end
      // ---------------- read operation: FIFO -> CM ----------------
      S_R_HI: begin
        if (bottom_full) begin
          fifo_rd     = 1'b1;
          mdr_load_hi = 1'b1;
          ck_en       = 1'b1;
          state_nx    = S_R_LO;
        end
      end
      S_R_LO: begin
        if (bottom_full) begin
          fifo_rd     = 1'b1;
          mdr_load_lo = 1'b1;
          ck_en       = 1'b1;
          state_nx    = S_R_REQ;
        end
      end
      S_R_REQ: begin
        cm_req = 1'b1;
        cm_we  = 1'b1;
        if (cm_ack) begin
          misr_inc = 1'b1;
          state_nx = last_word ? S_R_CK : S_R_HI;
        end
      end
      S_R_CK: begin
        if (bottom_full) begin
          fifo_rd   = 1'b1;
          ck_en     = 1'b1;
          ck_idx_nx = ck_idx + 3'd1;
          if (ck_idx == 3'(CKW - 1)) state_nx = S_R_END;
        end
      end
      S_R_END: begin
        set_cksum = ~ck_zero;
        state_nx  = S_DONE;
      end
      default: state_nx = S_IDLE;
    endcase

    if (cancel) state_nx = S_IDLE;
  end

endmodule
