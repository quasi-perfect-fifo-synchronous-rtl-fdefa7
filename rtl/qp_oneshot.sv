// qp_oneshot: behavioural model of the one-shot (monostable) of an
// asynchronous FIFO location, standing for a Fairchild 9602 type part.
//
// A rising edge on trig (the part's T+ input) starts an output pulse of
// PULSE_NS nanoseconds: q goes high and q_n low for that time. The falling
// edge of q_n (its end, q_n rising) is the strobe that moves a word one
// location down. This is a timing element, not logic, so it is modelled
// with a delay and is not synthesizable; a real design uses a delay part or a
// clocked counter in its place. A trigger while a pulse is running is ignored
// (non-retriggerable); triggers while rst_n is low are ignored too. The
// pulse width default is 70 ns, the part's minimum pulse width; the register
// set-up plus delay it must cover is about 20 ns for Schottky parts.
module qp_oneshot #(
  parameter int unsigned PULSE_NS = 70
) (
  input  logic rst_n,
  input  logic trig,
  output logic q,
  output logic q_n
);
  initial q = 1'b0;

  always begin
    @(posedge trig);
    if (rst_n) begin
      q = 1'b1;
      #(PULSE_NS * 1ns);
      q = 1'b0;
    end
  end

  assign q_n = ~q;

endmodule
