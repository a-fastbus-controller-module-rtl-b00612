// tb_sfc_fb_master: self-checking test of the FASTBUS master sequencer.
// A behavioural FASTBUS slave in this file answers AS with AK and DS with DK
// after a random delay, returns read data with even parity, and can be told
// to return a non-zero SS code, bad parity, hold WT, or not answer at all.
// Checks address, random and block data cycles, AS/DS removal, the error
// classes, the timeout length, WT holding the timeout, and SCRAM.
module tb_sfc_fb_master;
  import sfc_pkg::*;
  localparam int TO = 40;
  logic clk = 0, rst_n = 1;
  logic start, scram_en, busy, done, rdata_valid, scram_drop;
  fb_cmd_t cmd;
  fb_err_t err;
  logic [31:0] wdata, rdata, ad_o, ad_i;
  logic as_o, ds_o, rd_o, eg_o, ad_oe, pa_o, pe_o;
  logic [1:0] ms_o;
  logic ak_i, dk_i, wt_i, pa_i, pe_i;
  logic [2:0] ss_i;
  int checks = 0, failures = 0;

  sfc_fb_master #(.TIMEOUT(TO)) dut (.*);
  always #5 clk = ~clk;

  // ---- behavioural slave
  logic [2:0]  r_ss;
  logic        r_badpar, r_mute;
  int          r_wt;          // clocks of WT before answering
  logic [31:0] r_data, r_seen_addr, r_seen_w;
  int          r_wcount;
  int          dly;
  initial begin
    ak_i = 0; dk_i = 0; wt_i = 0; ss_i = 0; ad_i = 0; pa_i = 0; pe_i = 0;
    r_ss = 0; r_badpar = 0; r_mute = 0; r_wt = 0; r_data = 0; r_wcount = 0;
    forever begin
      @(posedge clk);
      if (as_o != ak_i && !r_mute) begin
        if (as_o) begin r_seen_addr = ad_oe ? ad_o : 32'hDEAD_DEAD; end
        dly = $urandom % 4; repeat (dly) @(posedge clk);
        ak_i <= as_o; ss_i <= as_o ? r_ss : 3'd0;
      end else if (ds_o != dk_i && !r_mute) begin
        if (r_wt > 0) begin wt_i <= 1; repeat (r_wt) @(posedge clk); wt_i <= 0; end
        dly = $urandom % 4; repeat (dly) @(posedge clk);
        if (!rd_o && ad_oe) begin r_seen_w = ad_o; r_wcount++; end
        if (rd_o) begin ad_i <= r_data; pa_i <= (^r_data) ^ r_badpar; pe_i <= 1; end
        dk_i <= ds_o; ss_i <= r_ss;
      end
    end
  end

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic run(input logic as, ds, input logic [1:0] ms, input logic rd, input logic [31:0] d,
                     output int clocks);
    @(negedge clk);
    cmd = '{as: as, ds: ds, ms: ms, rd: rd, eg: 1'b0}; wdata = d; start = 1;
    @(negedge clk); start = 0;
    clocks = 1;
    while (!done && clocks < 5000) begin @(negedge clk); clocks++; end
  endtask

  initial begin
    #2000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int c;
    logic [31:0] d;
    start = 0; scram_en = 0; cmd = '0; wdata = 0;
    #1 rst_n = 0; repeat (2) @(negedge clk); rst_n = 1;
    // address cycle
    run(1, 0, 2'b00, 0, 32'h0000_0011, c);
    chk(err.cls == ERR_NONE && as_o && ak_i, "address cycle completes");
    chk(r_seen_addr == 32'h11, "address driven on AD");
    // random reads and writes
    for (int i = 0; i < 20; i++) begin
      d = $urandom; r_data = $urandom;
      run(1, 1, 2'b00, 1, d, c);
      chk(err.cls == ERR_NONE && rdata == r_data && !ds_o && !dk_i, "random read");
      run(1, 1, 2'b00, 0, d, c);
      chk(err.cls == ERR_NONE && r_seen_w == d && !ds_o, "random write");
    end
    // block write of three words: DS toggles each time, left up after odd count
    r_wcount = 0;
    for (int i = 0; i < 3; i++) begin
      d = $urandom;
      run(1, 1, 2'b01, 0, d, c);
      chk(ds_o == (i % 2 == 0) && dk_i == ds_o && r_seen_w == d, "block write toggles DS");
    end
    chk(r_wcount == 3, "three block transfers");
    // AS down with DS still up: DS drops first, then AS
    run(0, 0, 2'b00, 0, 0, c);
    chk(!ds_o && !as_o && !ak_i && !dk_i && err.cls == ERR_NONE, "AS down clears DS and AS");
    // address again, non-zero SS on data
    run(1, 0, 2'b00, 0, 32'h5, c);
    r_ss = 3'd2;
    run(1, 1, 2'b00, 1, 0, c);
    chk(err.cls == ERR_SS && err.ss == 3'd2, "SS error reported");
    r_ss = 0;
    // parity error on read
    r_badpar = 1; r_data = 32'h1234_5678;
    run(1, 1, 2'b00, 1, 0, c);
    chk(err.cls == ERR_PARITY, "parity error reported");
    r_badpar = 0;
    // WT longer than the timeout does not time out
    r_wt = 3 * TO;
    run(1, 1, 2'b00, 1, 0, c);
    chk(err.cls == ERR_NONE && c > 3 * TO, "WT holds the timeout");
    r_wt = 0;
    // timeout: slave silent
    r_mute = 1;
    run(1, 1, 2'b00, 1, 0, c);
    chk(err.cls == ERR_TIMEOUT, "timeout reported");
    chk(c >= TO && c <= TO + 4, $sformatf("timeout length %0d", c));
    chk(ds_o, "strobe left in place without SCRAM");
    // SCRAM: error drops AS and DS at once
    scram_en = 1;
    fork
      run(0, 0, 2'b00, 0, 0, c);
      begin @(posedge scram_drop); end
    join
    chk(!as_o && !ds_o && err.cls == ERR_TIMEOUT, "SCRAM drops AS and DS");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
