// qp_cnet: the two combinational status networks (CNET) of the FIFO.
//
// For four locations, 3/4-FULL = Q3.Q2.Q1 and 3/4-EMPTY = ~Q2.~Q1.~Q0.
// For DEPTH locations this design takes the same rule: 3/4-FULL when the
// lowest three quarters of the locations are all full, 3/4-EMPTY when the top
// three quarters are all empty. Location 0 is the top, DEPTH-1 the bottom.
// Purely combinational; DEPTH must be a multiple of 4.
module qp_cnet #(
  parameter int unsigned DEPTH = 16
) (
  input  logic [DEPTH-1:0] q,             // location status flags, index 0 = top
  output logic             three_q_full,
  output logic             three_q_empty
);

  localparam int unsigned QUARTER = DEPTH / 4;
  localparam int unsigned THREE_Q = DEPTH - QUARTER;

  initial assert (DEPTH % 4 == 0 && DEPTH >= 4)
    else $error("qp_cnet: DEPTH must be a non-zero multiple of 4");

  assign three_q_full  = &q[DEPTH-1:QUARTER];
  assign three_q_empty = ~|q[THREE_Q-1:0];

endmodule
