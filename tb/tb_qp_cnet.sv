// tb_qp_cnet: self-checking test of the 3/4-full and 3/4-empty networks.
// For four locations it checks every input against the printed equations
// Q3.Q2.Q1 and ~Q2.~Q1.~Q0; for sixteen locations it checks random and
// boundary patterns against a count of the full locations from the bottom
// and of the empty locations from the top.
module tb_qp_cnet;
  logic [3:0]  q4;
  logic [15:0] q16;
  logic        f4, e4, f16, e16;
  int          checks = 0, failures = 0;

  qp_cnet #(.DEPTH(4))  dut4  (.q(q4),  .three_q_full(f4),  .three_q_empty(e4));
  qp_cnet #(.DEPTH(16)) dut16 (.q(q16), .three_q_full(f16), .three_q_empty(e16));

  function automatic bit full_ref16(input logic [15:0] v);
    int n = 0;
    for (int i = 15; i >= 0 && v[i]; i--) n++;
    return n >= 12;
  endfunction
  function automatic bit empty_ref16(input logic [15:0] v);
    int n = 0;
    for (int i = 0; i < 16 && !v[i]; i++) n++;
    return n >= 12;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      q4 = 4'(v); #1;
      checks += 2;
      if (f4 !== (q4[3] & q4[2] & q4[1]))    begin failures++; $display("FAIL full4 %b", q4); end
      if (e4 !== (~q4[2] & ~q4[1] & ~q4[0])) begin failures++; $display("FAIL empty4 %b", q4); end
    end
    for (int i = 0; i < 300; i++) begin
      case (i % 4)
        0: q16 = 16'($urandom);
        1: q16 = 16'hFFFF << ($urandom % 17);     // filled from the bottom
        2: q16 = 16'hFFFF >> ($urandom % 17);     // filled from the top
        default: q16 = (16'hFFFF << ($urandom % 17)) ^ (16'h1 << ($urandom % 16));
      endcase
      #1;
      checks += 2;
      if (f16 !== full_ref16(q16))  begin failures++; $display("FAIL full16 %b", q16); end
      if (e16 !== empty_ref16(q16)) begin failures++; $display("FAIL empty16 %b", q16); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
