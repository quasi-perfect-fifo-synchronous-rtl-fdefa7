// tb_qp_checksum: self-checking test of the 128-bit page checksum. A random
// page is summed; the eight output words must equal the XOR of every eighth
// page word; summing the page and then its checksum words must give zero,
// and a page with one flipped bit must not.
module tb_qp_checksum;
  import qp_pkg::*;
  localparam int N = 1024;
  logic                     clk, rst_n, clear, en, is_zero;
  logic [BUS_BITS-1:0]      word_in, word_out;
  logic [2:0]               sel;
  logic [CHECKSUM_BITS-1:0] sum;
  logic [BUS_BITS-1:0]      page[N];
  logic [BUS_BITS-1:0]      ref_lane[8];
  int                       checks = 0, failures = 0;

  qp_checksum dut (.*);

  initial clk = 1'b0;
  always #5 clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; if (failures < 20) $display("FAIL @%0t: %s", $time, what); end
  endtask

  task automatic feed(input logic [BUS_BITS-1:0] w);
    word_in = w; en = 1;
    @(negedge clk); en = 0;
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int flip;
    rst_n = 0; clear = 0; en = 0; word_in = '0; sel = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int pass = 0; pass < 3; pass++) begin
      for (int l = 0; l < 8; l++) ref_lane[l] = '0;
      for (int k = 0; k < N; k++) begin
        page[k] = 16'($urandom);
        ref_lane[k % 8] ^= page[k];
      end
      @(negedge clk); clear = 1; @(negedge clk); clear = 0;
      check(is_zero, "cleared");
      for (int k = 0; k < N; k++) feed(page[k]);
      for (int l = 0; l < 8; l++) begin
        sel = 3'(l); #1;
        check(word_out == ref_lane[l], $sformatf("lane %0d", l));
        check(sum[16*l +: 16] == ref_lane[l], "sum vector");
      end
      // read side: page followed by its checksum
      flip = (pass == 2) ? int'($urandom % N) : -1;
      @(negedge clk); clear = 1; @(negedge clk); clear = 0;
      for (int k = 0; k < N; k++) feed((k == flip) ? page[k] ^ 16'h0040 : page[k]);
      for (int l = 0; l < 8; l++) feed(ref_lane[l]);
      check(is_zero == (flip < 0), "zero sum exactly for an intact page");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
