// tb_sfc_intr: self-checking test of the BERR and GINTR interrupt logic.
// Random stimulus against a reference model written here: BERR set/clear,
// sticky mastership flag, GINTR = enable and (SR or flag or selected).
module tb_sfc_intr;
  logic clk = 0, rst_n = 1;
  logic berr_set, berr_clr, sr_i, took_mastership, mast_clr, selected, gint_en;
  logic berr_irq, mast_flag, gintr_irq;
  logic m_berr, m_flag, m_gintr;
  int checks = 0, failures = 0;

  sfc_intr dut (.*);
  always #5 clk = ~clk;

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    {berr_set, berr_clr, sr_i, took_mastership, mast_clr, selected, gint_en} = '0;
    m_berr = 0; m_flag = 0; m_gintr = 0;
    #1 rst_n = 0; repeat (2) @(negedge clk); rst_n = 1;
    for (int i = 0; i < 500; i++) begin
      @(negedge clk);
      berr_set = ($urandom % 8 == 0); berr_clr = ($urandom % 6 == 0);
      sr_i = ($urandom % 5 == 0); took_mastership = ($urandom % 10 == 0);
      mast_clr = ($urandom % 7 == 0); selected = ($urandom % 5 == 0);
      gint_en = ($urandom % 4 != 0);
      // reference model, updated for the coming edge
      m_gintr = gint_en && (sr_i || m_flag || selected);
      if (berr_set) m_berr = 1; else if (berr_clr) m_berr = 0;
      if (took_mastership) m_flag = 1; else if (mast_clr) m_flag = 0;
      @(posedge clk); #1;
      checks += 3;
      if (berr_irq !== m_berr)   begin failures++; $display("FAIL berr at %0d", i); end
      if (mast_flag !== m_flag)  begin failures++; $display("FAIL flag at %0d", i); end
      if (gintr_irq !== m_gintr) begin failures++; $display("FAIL gintr at %0d", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
