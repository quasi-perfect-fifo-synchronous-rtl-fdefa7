// qp_sync_sc: the sequential circuit (SC) of one location of the synchronous
// quasi-perfect FIFO.
//
// One JK flip-flop holds the location's status, Q = 1 meaning the location
// holds valid data. One AND gate forms the strobe towards the next location,
// LOAD(i+1) = Q(i) & ~Q(i+1): the location is full and the one below it is
// empty. The flip-flop is set by the strobe from the location above (J = LOAD(i))
// and cleared by its own strobe (K = LOAD(i+1)), so a word moves down one
// location per clock while there is room below it.
//
// Interface: j is LOAD(i) (WR FIFO for location 0); next_empty is ~Q(i+1)
// (the read request for the bottom location); load_next is LOAD(i+1), which
// also strobes the data register of the next location.
// Timing: one clock edge per move. The document's part is a negative-edge
// 74S112; this design uses the rising edge and adds an asynchronous clear,
// which is its own choice.
module qp_sync_sc (
  input  logic clk,
  input  logic rst_n,
  input  logic j,           // LOAD(i): set, a word is strobed into this location
  input  logic next_empty,  // ~Q(i+1)
  output logic q,           // location full
  output logic q_n,         // location empty
  output logic load_next    // LOAD(i+1) = Q(i) & ~Q(i+1)
);

  logic k;

  assign load_next = q & next_empty;   // the SC's AND gate
  assign k         = load_next;        // cleared when its word moves on
  assign q_n       = ~q;

  // JK flip-flop: Q+ = J~Q + ~KQ.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) q <= 1'b0;
    else        q <= (j & ~q) | (~k & q);
  end

endmodule
