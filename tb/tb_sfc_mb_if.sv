// tb_sfc_mb_if: self-checking test of the MULTIBUS I/O slave port.
// Plays the MPU (IORC*/IOWC* cycles with the four byte-lane cases) and a core
// that answers after a random delay. Checks the decoded request, the data
// steering both ways, that XACK* never comes n_before the core has answered,
// and that other I/O bases are ignored.
module tb_sfc_mb_if;
  import sfc_pkg::*;
  logic clk = 0, rst_n = 1;
  logic [7:0] io_base;
  logic [15:0] mb_adr, mb_dat_i, mb_dat_o, core_rdata;
  logic mb_iorc_n, mb_iowc_n, mb_bhen_n, mb_dat_oe, mb_xack_n, req_valid, core_done;
  mb_req_t req;
  int checks = 0, failures = 0;

  sfc_mb_if dut (.*);
  always #5 clk = ~clk;

  // core model: answer each request after 0..20 clocks
  mb_req_t got;
  int nreq = 0;
  logic answered;
  initial begin
    core_done = 0; core_rdata = 0; answered = 0;
    forever begin
      @(posedge clk);
      if (req_valid) begin
        got = req; nreq++; answered = 0;
        repeat ($urandom % 20) @(posedge clk);
        core_rdata <= {req.hadr, 1'b0, 8'h00} ^ 16'h5A3C;
        core_done <= 1; answered = 1;
        @(posedge clk); core_done <= 0;
      end
    end
  end

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // one MULTIBUS cycle; returns read data
  task automatic cyc(input logic wr, input logic [15:0] a, input logic bhen_n,
                     input logic [15:0] d, output logic [15:0] rd, output logic early);
    int n;
    mb_adr = a; mb_bhen_n = bhen_n; mb_dat_i = d; #20;
    if (wr) mb_iowc_n = 0; else mb_iorc_n = 0;
    n = 0; early = 0;
    while (mb_xack_n && n < 1000) begin @(posedge clk); #1 n++; end
    if (!answered) early = 1;
    rd = mb_dat_o;
    #20; mb_iowc_n = 1; mb_iorc_n = 1;
    while (!mb_xack_n) @(posedge clk);
    #20;
  endtask

  initial begin
    #5000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] rd, d, exp;
    logic early, wr, bh;
    int n_before;
    io_base = 8'h1F; mb_adr = 0; mb_iorc_n = 1; mb_iowc_n = 1; mb_bhen_n = 1; mb_dat_i = 0;
    #1 rst_n = 0; #20 rst_n = 1; #20;
    for (int i = 0; i < 200; i++) begin
      logic [7:0] lo;
      wr = $urandom % 2; bh = $urandom % 2; lo = 8'($urandom); d = 16'($urandom);
      cyc(wr, {8'h1F, lo}, bh, d, rd, early);
      chk(!early, "XACK only after the core answered");
      chk(got.write == wr && got.hadr == lo[7:1], "request address and direction");
      if (!lo[0] && !bh) chk(got.be == 2'b11 && (!wr || got.wdata == d), "word transfer");
      else if (!lo[0])   chk(got.be == 2'b01 && (!wr || got.wdata[7:0] == d[7:0]), "even byte");
      else if (!bh)      chk(got.be == 2'b10 && (!wr || got.wdata[15:8] == d[15:8]), "odd byte high lane");
      else               chk(got.be == 2'b10 && (!wr || got.wdata[15:8] == d[7:0]), "odd byte swapped");
      if (!wr) begin
        exp = {lo[7:1], 1'b0, 8'h00} ^ 16'h5A3C;
        if (lo[0] && bh) chk(rd[7:0] == exp[15:8], "read odd byte swapped");
        else             chk(rd == exp, "read data");
      end
    end
    // another base is ignored: no request and no XACK
    n_before = nreq;
    mb_adr = 16'h2040; #20 mb_iowc_n = 0;
    repeat (30) @(posedge clk);
    chk(mb_xack_n && nreq == n_before, "foreign base ignored");
    mb_iowc_n = 1; repeat (5) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
