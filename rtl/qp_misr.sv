// qp_misr: status register (MISR) of the UNICON channel controller.
//
// Holds the word count of the page transfer and the status indicators: data
// rate error (DRE), parity error, checksum error and transfer done. clear
// (at the start of a page) zeroes everything; inc adds one to the count; the
// set_* inputs set their indicator, which then stays set until the next
// clear. status_word packs it all for the minicomputer that supervises the
// controller: {dre, parity_err, cksum_err, done, 2'b00, count[9:0]}.
// The count width and the word layout are this design's choices.
module qp_misr
  import qp_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clear,
  input  logic         inc,
  input  logic         set_dre,
  input  logic         set_parity,
  input  logic         set_cksum,
  input  logic         set_done,
  output logic [9:0]   count,
  output misr_status_t status,
  output logic [15:0]  status_word
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      count  <= '0;
      status <= '0;
    end else if (clear) begin
      count  <= '0;
      status <= '0;
    end else begin
      if (inc)        count             <= count + 10'd1;
      if (set_dre)    status.dre        <= 1'b1;
      if (set_parity) status.parity_err <= 1'b1;
      if (set_cksum)  status.cksum_err  <= 1'b1;
      if (set_done)   status.done       <= 1'b1;
    end
  end

  assign status_word = {status, 2'b00, count};

endmodule
