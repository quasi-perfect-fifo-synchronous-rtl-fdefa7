// qp_data_reg: loadable parallel data register, used as the register (REG) of
// each FIFO location and as the holding register (HR) at its bottom.
//
// On a clock edge with ld = 1 the register takes d; otherwise it keeps its
// value. It corresponds to a bank of synchronous load registers (74179 type)
// wired in parallel to the word width. Clearing it on reset is this design's
// choice, so that nothing unknown is ever read.
module qp_data_reg #(
  parameter int unsigned WIDTH = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             ld,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  q <= '0;
    else if (ld) q <= d;
  end

endmodule
