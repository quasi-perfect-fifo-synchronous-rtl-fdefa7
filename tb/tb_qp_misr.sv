// tb_qp_misr: self-checking test of the status register. Random increments,
// sets and clears are applied; count, status bits and the packed status word
// are compared with a model each cycle.
module tb_qp_misr;
  import qp_pkg::*;
  logic         clk, rst_n, clear, inc, set_dre, set_parity, set_cksum, set_done;
  logic [9:0]   count, m_count;
  misr_status_t status, m_status;
  logic [15:0]  status_word;
  int           checks = 0, failures = 0;

  qp_misr dut (.*);

  initial clk = 1'b0;
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 0; clear = 0; inc = 0; set_dre = 0; set_parity = 0; set_cksum = 0; set_done = 0;
    m_count = '0; m_status = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      clear      = ($urandom % 300 == 0);
      inc        = ($urandom % 2 == 0);
      set_dre    = ($urandom % 97 == 0);
      set_parity = ($urandom % 89 == 0);
      set_cksum  = ($urandom % 83 == 0);
      set_done   = ($urandom % 79 == 0);
      if (clear) begin m_count = '0; m_status = '0; end
      else begin
        if (inc) m_count++;
        m_status.dre        |= set_dre;
        m_status.parity_err |= set_parity;
        m_status.cksum_err  |= set_cksum;
        m_status.done       |= set_done;
      end
      @(negedge clk);
      checks += 3;
      if (count !== m_count)   begin failures++; $display("FAIL count %0d %0d", count, m_count); end
      if (status !== m_status) begin failures++; $display("FAIL status %b %b", status, m_status); end
      if (status_word !== {m_status.dre, m_status.parity_err, m_status.cksum_err, m_status.done, 2'b00, m_count})
        begin failures++; $display("FAIL word"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
