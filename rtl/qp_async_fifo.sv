// qp_async_fifo: asynchronous quasi-perfect FIFO of DEPTH words x WIDTH bits.
//
// No clock: each location is a toggle status flip-flop with its gates
// (qp_async_sc), a one-shot (qp_oneshot) and an edge-triggered data register
// (qp_data_reg, a 74174 type hex D register). Location i that is full while
// location i+1 is empty fires its one-shot; the end of the pulse, the rising
// edge of ~STROBE(i+1), clocks the word into register i+1 and toggles both
// status flip-flops. The pulse therefore has to outlast the register set-up
// and delay time, and it sets the speed: one location per PULSE_NS.
//
// Interface, active-low strobes as in the document's schematic:
//   wr_fifo_n    write strobe; data_in is taken at its rising edge. Pulse it
//                only while top_empty (~Q0) is high.
//   strobe_out_n ~STROBE(DEPTH): the bottom location's one-shot, to the stage
//                below the FIFO (the next location or a holding register),
//                which takes data_out at its rising edge.
//   next_empty   ~Q of that stage below; it must be high for a word to leave.
// The default is the document's three-location example feeding a fourth
// stage outside. The word width (6 bits, one hex register) and the clear
// input are this design's own choices. The clocks of the flip-flops and
// registers are derived from the strobes: that is the nature of the circuit.
module qp_async_fifo #(
  parameter int unsigned WIDTH    = 6,
  parameter int unsigned DEPTH    = 3,
  parameter int unsigned PULSE_NS = 70
) (
  input  logic             rst_n,
  // top port
  input  logic             wr_fifo_n,
  input  logic [WIDTH-1:0] data_in,
  output logic             top_empty,
  // bottom port
  output logic [WIDTH-1:0] data_out,
  output logic             strobe_out_n,
  input  logic             next_empty,
  // status
  output logic [DEPTH-1:0] q,
  output logic             busy      // a word is moving inside the FIFO
);

  logic [DEPTH:0]            strobe_n;   // strobe_n[i] loads location i
  logic [DEPTH-1:0]          q_n;
  logic [DEPTH-1:0]          trig;
  logic [DEPTH-1:0]          os_busy;    // one-shot pulse running
  logic [DEPTH-1:0]          below_empty;
  logic [DEPTH:0][WIDTH-1:0] reg_d;

  assign strobe_n[0] = wr_fifo_n;
  assign reg_d[0]    = data_in;

  for (genvar i = 0; i < DEPTH; i++) begin : g_loc
    if (i == DEPTH - 1) begin : g_bot
      assign below_empty[i] = next_empty;
    end else begin : g_mid
      assign below_empty[i] = q_n[i+1];
    end

    qp_async_sc u_sc (
      .rst_n        (rst_n),
      .strobe_in_n  (strobe_n[i]),
      .strobe_out_n (strobe_n[i+1]),
      .next_empty   (below_empty[i]),
      .q            (q[i]),
      .q_n          (q_n[i]),
      .trig         (trig[i])
    );

    qp_oneshot #(.PULSE_NS(PULSE_NS)) u_os (
      .rst_n (rst_n),
      .trig  (trig[i]),
      .q     (os_busy[i]),
      .q_n   (strobe_n[i+1])
    );

    qp_data_reg #(.WIDTH(WIDTH)) u_reg (
      .clk   (strobe_n[i]),
      .rst_n (rst_n),
      .ld    (1'b1),
      .d     (reg_d[i]),
      .q     (reg_d[i+1])
    );
  end

  assign busy         = |os_busy;
  assign top_empty    = q_n[0];
  assign data_out     = reg_d[DEPTH];
  assign strobe_out_n = strobe_n[DEPTH];

endmodule
