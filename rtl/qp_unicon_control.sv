// qp_unicon_control: UNICON-CONTROL, the mass-memory side control section of
// the UNICON channel controller.
//
// The UNICON is a real-time device: it takes or delivers a 16-bit word when
// it must, and cannot wait for the FIFO. This section therefore cannot keep
// the FIFO protocol; it reports a data rate error (DRE) instead.
// Write operation (FIFO -> UNICON): on each uc_demand pulse it reads the FIFO
// bottom into the holding register HR if the bottom is full (LOAD HR), and in
// the next cycle drives HR onto the data bus through gate G2 with
// uc_out_valid. If the bottom is empty it sets DRE and the demand is not
// counted.
// Read operation (UNICON -> FIFO): on each uc_in_valid pulse it writes the
// word on the data bus into the FIFO top through gate G1 if the top is
// empty; otherwise it sets DRE and the word is lost (it is still counted).
// Before a write operation the supervising minicomputer may write header
// words into the FIFO top through G1 (ump_wr), keeping the top-empty rule.
// The section is done after xfer_words words; cancel returns it to idle.
// Pulse-per-word handshakes, the counting rules and the header path are this
// design's choices.
module qp_unicon_control
  import qp_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  op_e         op,
  input  logic        cancel,
  input  logic [15:0] xfer_words,
  output logic        done,
  // UNICON
  input  logic        uc_demand,
  output logic        uc_out_valid,
  input  logic        uc_in_valid,
  // minicomputer header writes
  input  logic        ump_wr,
  // FIFO and HR
  input  logic        bottom_full,
  output logic        fifo_rd,      // LOAD HR
  input  logic        top_empty,
  output logic        g1_wr,        // write the data bus into the FIFO top
  output logic        g2_en,        // HR onto the data bus
  // MISR
  output logic        set_dre
);

  typedef enum logic [1:0] {S_IDLE, S_WRITE, S_READ, S_DONE} state_e;

  state_e      state;
  logic [15:0] count;
  logic        hr_pending;   // HR was loaded last cycle and goes out now
  logic        count_word;
  logic        last;

  always_comb begin
    fifo_rd    = 1'b0;
    g1_wr      = ump_wr;
    set_dre    = 1'b0;
    count_word = 1'b0;
    unique case (state)
      S_WRITE: if (uc_demand) begin
        if (bottom_full) begin
          fifo_rd    = 1'b1;
          count_word = 1'b1;
        end else begin
          set_dre    = 1'b1;
        end
      end
      S_READ: if (uc_in_valid) begin
        count_word = 1'b1;
        if (top_empty) g1_wr   = 1'b1;
        else           set_dre = 1'b1;
      end
      default: ;
    endcase
  end

  assign last         = count_word && (count == xfer_words - 16'd1);
  assign uc_out_valid = hr_pending;
  assign g2_en        = hr_pending;
  assign done         = (state == S_DONE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      count      <= '0;
      hr_pending <= 1'b0;
    end else begin
      hr_pending <= fifo_rd;
      if (cancel) begin
        state <= S_IDLE;
      end else begin
        unique case (state)
          S_IDLE, S_DONE: if (start) begin
            count <= '0;
            state <= (op == OP_WRITE) ? S_WRITE : S_READ;
          end
          S_WRITE, S_READ: begin
            if (count_word) count <= count + 16'd1;
            if (last)       state <= S_DONE;
          end
          default: state <= S_IDLE;
        endcase
      end
    end
  end

endmodule
