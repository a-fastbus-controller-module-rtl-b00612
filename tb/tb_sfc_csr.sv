// tb_sfc_csr: self-checking test of the command decoder and registers.
// Drives MULTIBUS requests as the port would and stands in for the master
// sequencer (answers each start after a random delay, with read data and an
// error code chosen by the test). Checks register access, the launch points
// of the interlocked CYCLE mode for 16-bit and 8-bit MPUs in both word orders,
// COMMAND and OVERLAPPED modes, error latching and clearing, SCRAM, the
// pseudo-DK strobe and the CSRs.
module tb_sfc_csr;
  import sfc_pkg::*;
  logic clk = 0, rst_n = 1, msb_first;
  logic req_valid, core_done;
  mb_req_t req;
  logic [15:0] core_rdata;
  logic m_start, m_busy, m_done, m_rdata_valid, m_scram_drop, m_as, m_ds;
  fb_cmd_t m_cmd;
  fb_err_t m_err;
  logic [31:0] m_wdata, m_rdata, log_addr, s_dout, s_din;
  logic arb_req, arb_host, bus_mine, ar_o;
  logic [5:0] arb_level;
  logic [2:0] ia_code, s_dk_ss;
  logic auto_slave, sd_flag, s_dk_cmd, s_selected, s_cmd_ready, s_addr_pend, s_rd, s_bcast;
  logic [1:0] s_ms;
  logic berr_set, berr_clr, mast_clr, gint_en, berr_irq, mast_flag, gintr_irq;
  logic scram_en, rb_o, sr_o, sr_i, ak_i, dk_i, wt_i, ds_i;
  int checks = 0, failures = 0;

  sfc_csr dut (.*);
  always #5 clk = ~clk;

  // ---- stand-in master
  int starts = 0, m_delay = 5;
  fb_cmd_t last_cmd;
  logic [31:0] last_w, next_rdata;
  fb_err_t next_err;
  initial begin
    m_busy = 0; m_done = 0; m_rdata_valid = 0; m_rdata = 0; m_err = '0; m_scram_drop = 0;
    forever begin
      @(posedge clk);
      if (m_start) begin
        starts++; last_cmd = m_cmd; last_w = m_wdata; m_busy <= 1;
        repeat (m_delay) @(posedge clk);
        if (m_cmd.rd) begin m_rdata <= next_rdata; m_rdata_valid <= 1; end
        @(posedge clk); m_rdata_valid <= 0;
        m_done <= 1; m_err <= next_err; m_scram_drop <= scram_en && next_err.cls != ERR_NONE;
        @(posedge clk); m_done <= 0; m_busy <= 0; m_scram_drop <= 0;
      end
    end
  end
  always @(posedge clk) if (berr_set) berr_irq <= 1; else if (berr_clr) berr_irq <= 0;

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // one transfer; returns read data and the clocks until done
  task automatic xfer(input logic wr, input logic [7:0] a, input logic [1:0] be,
                      input logic [15:0] d, output logic [15:0] rd, output int n);
    @(negedge clk);
    req_valid = 1; req.write = wr; req.hadr = a[7:1]; req.be = be; req.wdata = d;
    @(negedge clk); req_valid = 0; n = 1;
    while (!core_done && n < 2000) begin @(negedge clk); n++; end
    rd = core_rdata;
  endtask

  initial begin
    #5000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] rd;
    logic [31:0] w;
    int n, s0;
    req_valid = 0; req = '0; msb_first = 1; next_err = '0; next_rdata = 0; berr_irq = 0;
    {bus_mine, ar_o, s_selected, s_cmd_ready, s_addr_pend, s_rd, s_bcast} = '0;
    s_ms = 0; s_din = 32'h0102_0304; mast_flag = 0; gintr_irq = 0;
    {sr_i, ak_i, dk_i, wt_i, ds_i, m_as, m_ds} = '0;
    #1 rst_n = 0; @(negedge clk); @(negedge clk); rst_n = 1;
    // ---- control register at offset 7 (odd byte), bit 7 requests mastership
    xfer(1, 8'h07, 2'b10, 16'h8000, rd, n);
    chk(arb_req && !scram_en, "control bit 7 requests mastership");
    bus_mine = 1;
    xfer(0, 8'h04, 2'b01, 0, rd, n);
    chk(rd[5] == 1'b1, "bus mine in master status bit 5");
    // ---- interlocked CYCLE write, 68000 order: address cycle at $E0
    for (int mf = 1; mf >= 0; mf--) begin
      msb_first = mf[0];
      w = $urandom; s0 = starts;
      xfer(1, 8'hE0, 2'b11, mf ? w[31:16] : w[15:0], rd, n);
      chk(starts == s0, "no strobe before the last half");
      xfer(1, 8'hE2, 2'b11, mf ? w[15:0] : w[31:16], rd, n);
      chk(starts == s0 + 1 && last_w == w, "strobe with the whole longword");
      chk(last_cmd.as && !last_cmd.ds && last_cmd.ms == 0 && !last_cmd.rd, "address cycle command");
      chk(n > m_delay, "transfer waits for the acknowledge");
      // ---- interlocked CYCLE read at $F0
      next_rdata = $urandom; s0 = starts;
      xfer(0, 8'hF0, 2'b11, 0, rd, n);
      chk(starts == s0 + 1 && last_cmd.ds && last_cmd.rd, "read strobes on first half");
      chk(rd == (mf ? next_rdata[31:16] : next_rdata[15:0]), "first half of read data");
      xfer(0, 8'hF2, 2'b11, 0, rd, n);
      chk(starts == s0 + 1 && rd == (mf ? next_rdata[15:0] : next_rdata[31:16]), "second half from AD register");
    end
    // ---- 8-bit MPU: four byte writes, strobe on the fourth
    msb_first = 0; w = $urandom; s0 = starts;
    for (int b = 0; b < 4; b++) begin
      xfer(1, 8'hF0 | 8'(b), b[0] ? 2'b10 : 2'b01, b[0] ? {w[8*b +: 8], 8'h00} : {8'h00, w[8*b +: 8]}, rd, n);
      chk(starts == s0 + (b == 3 ? 1 : 0), "byte-wide write strobes on byte 3");
    end
    chk(last_w == w && last_cmd.ds && last_cmd.ms == 0, "byte-wide data word");
    // ---- COMMAND mode: take AS down at $40, waits for the end
    s0 = starts;
    xfer(1, 8'h40, 2'b01, 16'h0, rd, n);
    chk(starts == s0 + 1 && !last_cmd.as && !last_cmd.ds && n > m_delay, "COMMAND AS down waits");
    // ---- COMMAND mode repeated write: DS write reusing the AD register
    xfer(1, 8'h74, 2'b01, 16'h0, rd, n);
    chk(last_cmd.ds && last_cmd.ms == 2'b01 && last_w == w, "COMMAND reuses AD word");
    // ---- OVERLAPPED: the transfer ends before the master does
    m_delay = 40; s0 = starts;
    xfer(1, 8'hB0, 2'b01, 16'h0, rd, n);
    chk(n < 10 && m_busy, "OVERLAPPED returns at once");
    xfer(1, 8'h74, 2'b01, 16'h0, rd, n);
    chk(starts == s0 + 2 && n > 30, "next command waits for the overlapped one");
    m_delay = 5;
    // ---- error: BERR, error register, clear
    next_err = '{cls: ERR_SS, ss: 3'd5};
    xfer(0, 8'hF0, 2'b11, 0, rd, n);
    @(negedge clk);
    chk(berr_irq, "BERR raised with the XACK");
    xfer(0, 8'h04, 2'b10, 0, rd, n);
    chk(rd[15:8] == {1'b1, 2'b00, 3'd5, ERR_SS}, "error register class and SS");
    xfer(1, 8'h04, 2'b10, 16'h0, rd, n);
    @(negedge clk);
    chk(!berr_irq, "write clears BERR");
    // ---- SCRAM clears the request bit
    xfer(1, 8'h06, 2'b10, 16'hA000, rd, n);
    chk(scram_en && arb_req, "SCRAM enabled");
    next_err = '{cls: ERR_TIMEOUT, ss: 3'd0};
    xfer(1, 8'h40, 2'b01, 0, rd, n);
    @(negedge clk);
    chk(!arb_req, "SCRAM drops the request");
    next_err = '0;
    // ---- pseudo-DK strobe with SS
    fork
      xfer(1, 8'h0A, 2'b10, 16'h0600, rd, n);
      begin @(posedge s_dk_cmd); chk(s_dk_ss == 3'd6, "pseudo-DK SS code"); end
    join
    // ---- CSRs: logical address, arbitration level, IA width
    msb_first = 1;
    xfer(1, 8'h0C, 2'b11, 16'hDEAD, rd, n);
    xfer(1, 8'h0E, 2'b11, 16'hBEEF, rd, n);
    chk(log_addr == 32'hDEAD_BEEF, "logical address CSR");
    xfer(1, 8'h08, 2'b11, 16'h0425, rd, n);
    chk(arb_level == 6'h25 && ia_code == 3'd4, "arbitration level and IA width");
    xfer(0, 8'h0C, 2'b11, 0, rd, n);
    chk(rd == 16'hDEAD, "logical address read back");
    xfer(0, 8'h10, 2'b11, 0, rd, n);
    chk(rd == 16'h0102, "slave data in read");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
