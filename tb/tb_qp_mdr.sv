// tb_qp_mdr: self-checking test of the memory data register. Write
// direction: random CM words, some with a wrong parity bit, are loaded and
// split into their two 16-bit halves. Read direction: two 16-bit words are
// assembled into a CM word whose parity bit makes the 37 bits odd.
module tb_qp_mdr;
  import qp_pkg::*;
  logic                clk, rst_n;
  logic                load_cm, parity_ok, sel_lo, load_hi, load_lo;
  logic [MDR_BITS-1:0] cm_rdata, cm_wdata;
  logic [BUS_BITS-1:0] half_out, half_in;
  int                  checks = 0, failures = 0;

  qp_mdr dut (.*);

  initial clk = 1'b0;
  always #5 clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; if (failures < 20) $display("FAIL @%0t: %s", $time, what); end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [35:0] data;
    logic        bad;
    logic [15:0] hi, lo;
    int          ones;
    rst_n = 0; load_cm = 0; load_hi = 0; load_lo = 0; sel_lo = 0; cm_rdata = '0; half_in = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 200; i++) begin
      // write direction
      data = {4'($urandom), 32'($urandom)};
      bad  = ($urandom % 4 == 0);
      ones = $countones(data);
      cm_rdata = {((ones % 2 == 0) ? 1'b1 : 1'b0) ^ bad, data};   // odd parity, maybe broken
      load_cm = 1;
      @(negedge clk); load_cm = 0;
      check(parity_ok == !bad, "parity check");
      sel_lo = 0; #1 check(half_out == data[31:16], "high half first");
      sel_lo = 1; #1 check(half_out == data[15:0], "low half second");
      // read direction
      hi = 16'($urandom); lo = 16'($urandom);
      half_in = hi; load_hi = 1;
      @(negedge clk); load_hi = 0;
      half_in = lo; load_lo = 1;
      @(negedge clk); load_lo = 0;
      ones = $countones({hi, lo});
      check(cm_wdata[35:0] == {4'b0, hi, lo}, "assembled CM word");
      check(cm_wdata[36] == (ones % 2 == 0), "generated odd parity");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
