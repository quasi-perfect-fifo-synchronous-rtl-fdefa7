// qp_sync_fifo: synchronous quasi-perfect FIFO of DEPTH words x WIDTH bits.
//
// The FIFO is built without RAM or pointers: it is an iterative chain of
// identical locations, each a status flip-flop (qp_sync_sc) and a data
// register (qp_data_reg). Location 0 is the top, DEPTH-1 the bottom. A word
// written into the top falls one location per clock to the lowest empty
// location; a read from the bottom lets the words above fall in turn. Several
// words can be moving at once, and writes and reads can happen in the same
// cycle.
//
// Rules kept by the chain:
//   write  into location 0 iff ~Q0 (top_empty)
//   read   from location DEPTH-1 iff Q(DEPTH-1) (bottom_full)
//   move   i -> i+1 iff Q(i) & ~Q(i+1), strobe LOAD(i+1)
// With USE_HR = 1 a read copies the bottom word into the holding register HR,
// and data_out shows HR from the next cycle on. With USE_HR = 0 data_out is the
// bottom register itself and a read simply frees the bottom location.
// 3/4-full and 3/4-empty come from qp_cnet.
//
// Timing: a write makes top_empty low for one cycle, so writes and reads can
// each run at most at half the clock rate; a word needs DEPTH cycles to fall
// from the top to the bottom of an empty FIFO. wr_fifo while the top is full,
// or rd_fifo while the bottom is empty, break the protocol: the assertions
// below report it and the request is ignored by the gating.
module qp_sync_fifo #(
  parameter int unsigned WIDTH  = 16,
  parameter int unsigned DEPTH  = 16,
  parameter bit          USE_HR = 1'b1
) (
  input  logic             clk,
  input  logic             rst_n,
  // top port
  input  logic             wr_fifo,
  input  logic [WIDTH-1:0] data_in,
  output logic             top_empty,
  // bottom port
  input  logic             rd_fifo,
  output logic [WIDTH-1:0] data_out,
  output logic             bottom_full,
  // status
  output logic             three_q_full,
  output logic             three_q_empty,
  output logic [DEPTH-1:0] q            // location full flags, index 0 = top
);

  logic [DEPTH-1:0]            q_n;
  logic [DEPTH:0]              load;     // load[i] strobes location i; load[DEPTH] = LOAD HR
  logic [DEPTH-1:0]            next_empty;
  logic [DEPTH:0][WIDTH-1:0]   reg_d;    // reg_d[i] is the input of location i

  // LOAD0 is the write, gated by the top being empty.
  assign load[0]  = wr_fifo & q_n[0];
  assign reg_d[0] = data_in;

  for (genvar i = 0; i < DEPTH; i++) begin : g_loc
    // The bottom location's "next" is the reader.
    if (i == DEPTH - 1) begin : g_bot
      assign next_empty[i] = rd_fifo;
    end else begin : g_mid
      assign next_empty[i] = q_n[i+1];
    end

    qp_sync_sc u_sc (
      .clk        (clk),
      .rst_n      (rst_n),
      .j          (load[i]),
      .next_empty (next_empty[i]),
      .q          (q[i]),
      .q_n        (q_n[i]),
      .load_next  (load[i+1])
    );

    qp_data_reg #(.WIDTH(WIDTH)) u_reg (
      .clk   (clk),
      .rst_n (rst_n),
      .ld    (load[i]),
      .d     (reg_d[i]),
      .q     (reg_d[i+1])
    );
  end

  if (USE_HR) begin : g_hr
    qp_data_reg #(.WIDTH(WIDTH)) u_hr (
      .clk   (clk),
      .rst_n (rst_n),
      .ld    (load[DEPTH]),
      .d     (reg_d[DEPTH]),
      .q     (data_out)
    );
  end else begin : g_no_hr
    assign data_out = reg_d[DEPTH];
  end

  assign top_empty         = q_n[0];
  assign bottom_full       = q[DEPTH-1];

  qp_cnet #(.DEPTH(DEPTH)) u_cnet (
    .q             (q),
    .three_q_full  (three_q_full),
    .three_q_empty (three_q_empty)
  );

  // Protocol rules of the two ports.
  a_write_when_empty : assert property (@(posedge clk) disable iff (!rst_n)
                                        wr_fifo |-> top_empty)
    else $error("qp_sync_fifo: write while the top location is full");
  a_read_when_full   : assert property (@(posedge clk) disable iff (!rst_n)
                                        rd_fifo |-> bottom_full)
    else $error("qp_sync_fifo: read while the bottom location is empty");

endmodule
