// qp_checksum: 128-bit page checksum of the UNICON channel controller.
//
// The checksum is a single parity-check symbol over GF(2^128): the sum
// (bitwise XOR) of all 128-bit symbols of a page. The 16-bit words of the
// page are grouped eight at a time into a symbol, word k of the page going
// to lane k mod 8 (bits 16*lane+15 .. 16*lane). Each en pulse adds word_in to
// the current lane and steps the lane. clear restarts at lane 0 with a zero
// sum.
//   Writing a page: after the data, the eight lanes are sent out as eight
//   more words, lane 0 first, read through sel/word_out.
//   Reading a page: the eight checksum words are accumulated like data, so
//   the sum of an intact page is zero and is_zero flags a good page.
// The lane order is this design's choice; the document gives only the width
// and the code.
module qp_checksum
  import qp_pkg::*;
(
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     clear,
  input  logic                     en,
  input  logic [BUS_BITS-1:0]      word_in,
  input  logic [2:0]               sel,
  output logic [BUS_BITS-1:0]      word_out,
  output logic [CHECKSUM_BITS-1:0] sum,
  output logic                     is_zero
);

  logic [2:0] lane;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sum  <= '0;
      lane <= '0;
    end else if (clear) begin
      sum  <= '0;
      lane <= '0;
    end else if (en) begin
      sum[BUS_BITS*lane +: BUS_BITS] <= sum[BUS_BITS*lane +: BUS_BITS] ^ word_in;
      lane <= lane + 3'd1;
    end
  end

  assign word_out = sum[BUS_BITS*sel +: BUS_BITS];
  assign is_zero  = (sum == '0);

endmodule
