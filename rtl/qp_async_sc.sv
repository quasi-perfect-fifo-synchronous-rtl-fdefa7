// qp_async_sc: the sequential circuit of one location of the asynchronous
// (unclocked) quasi-perfect FIFO, without its one-shot.
//
// A D flip-flop wired as a toggle flip-flop (D = ~Q) holds the location's
// status, Q = 1 meaning full. Its clock is the AND of the two active-low
// strobes that touch the location: strobe_in_n, which loads it from above,
// and strobe_out_n, which moves its word to the location below. The flip-flop
// therefore toggles at the end (rising edge) of either strobe: to full when a
// word arrives, to empty when the word has left. The second AND gate,
// trig = Q & ~Q(i+1), starts the location's one-shot, which produces
// strobe_out_n. Wiring follows the document's three-location schematic; the
// asynchronous clear is this design's addition so that the chain starts
// empty.
module qp_async_sc (
  input  logic rst_n,
  input  logic strobe_in_n,   // ~STROBE(i): end of the load into this location
  input  logic strobe_out_n,  // ~STROBE(i+1): end of the move out of it
  input  logic next_empty,    // ~Q(i+1)
  output logic q,
  output logic q_n,
  output logic trig           // to the one-shot: full and room below
);

  logic ff_clk;

  assign ff_clk = strobe_in_n & strobe_out_n;   // gate G(i)0
  assign trig   = q & next_empty;               // gate G(i)1
  assign q_n    = ~q;

  always_ff @(posedge ff_clk or negedge rst_n) begin
    if (!rst_n) q <= 1'b0;
    else        q <= q_n;                       // D = ~Q: toggle
  end

endmodule
