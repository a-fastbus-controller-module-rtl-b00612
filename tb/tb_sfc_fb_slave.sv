// tb_sfc_fb_slave: self-checking test of the slave handshake support.
// The test drives the FASTBUS master side and plays the slave software
// (pseudo-DK writes). Checks geographic and logical selection, WT on data
// strobes, DK following DS, read data on AD, block-transfer DK toggling,
// automatic slave, broadcast without DK, sparse data scan, pattern select
// and deselection on AS down.
module tb_sfc_fb_slave;
  import sfc_pkg::*;
  logic clk = 0, rst_n = 1;
  logic as_i, ds_i, rd_i, eg_i, auto_slave, sd_flag, sr_flag, dk_cmd;
  logic [1:0] ms_i, ms_q;
  logic [31:0] ad_i, log_addr, dout, ad_o, din;
  logic [4:0] ga;
  logic [2:0] ia_code, dk_ss, ss_o;
  logic ak_o, dk_o, wt_o, ad_oe, pa_o, pe_o, selected, cmd_ready, addr_pend, rd_q, bcast_q;
  int checks = 0, failures = 0;

  sfc_fb_slave dut (.*);
  always #5 clk = ~clk;

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask
  task automatic tick(input int n = 1); repeat (n) @(negedge clk); endtask
  task automatic addr(input logic eg, input logic [1:0] ms, input logic [31:0] a);
    eg_i = eg; ms_i = ms; ad_i = a; tick(); as_i = 1; tick(2);
  endtask
  task automatic sw_dk(input logic [2:0] ss);
    dk_cmd = 1; dk_ss = ss; tick(); dk_cmd = 0; tick();
  endtask
  task automatic release_as(); ds_i = 0; tick(2); as_i = 0; eg_i = 0; tick(2); endtask

  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] w;
    {as_i, ds_i, rd_i, eg_i, auto_slave, sd_flag, sr_flag, dk_cmd} = '0;
    ms_i = 0; ad_i = 0; dk_ss = 0; ga = 5'd17; ia_code = 3'd1;   // IA = 13 bits
    log_addr = 32'h1234_0000; dout = 32'hA5A5_0F0F;
    #1 rst_n = 0; tick(2); rst_n = 1;
    // ---- geographic, random write then read
    addr(1, 2'b00, 32'd17);
    chk(selected && ak_o && !wt_o, "geographic select gives AK");
    w = $urandom; ad_i = w; rd_i = 0; ms_i = 0; ds_i = 1; tick(2);
    chk(wt_o && cmd_ready && !dk_o && din == w, "WT and data latched on DS up");
    sw_dk(3'd0);
    chk(dk_o && !wt_o && !cmd_ready, "pseudo-DK raises DK, drops WT");
    ds_i = 0; tick(2);
    chk(!dk_o && !wt_o, "DK follows DS down by itself");
    rd_i = 1; ds_i = 1; tick(2);
    chk(wt_o && rd_q && !ad_oe, "read waits for software");
    sw_dk(3'd3);
    chk(dk_o && ad_oe && ad_o == dout && ss_o == 3'd3 && pa_o == ^dout, "read data and SS on bus");
    ds_i = 0; tick(2);
    chk(!ad_oe && !dk_o, "read data removed");
    // ---- block read, MS0 = 1: every DS edge waits, DK follows each edge
    ms_i = 2'b01;
    for (int i = 0; i < 5; i++) begin
      ds_i = ~ds_i; tick(2);
      chk(wt_o && dk_o != ds_i, "block edge gives WT");
      sw_dk(0);
      chk(dk_o == ds_i && !wt_o && ad_oe, "block DK toggles to DS");
    end
    release_as();
    chk(!selected && !ak_o && !dk_o, "AS down deselects");
    // ---- logical address in range: WT, AK only after pseudo-DK
    rd_i = 0;
    addr(0, 2'b00, 32'h1234_1ABC);
    chk(selected && wt_o && addr_pend && !ak_o, "logical address gives WT not AK");
    chk(din == 32'h1234_1ABC, "address latched for IA check");
    sw_dk(3'd1);
    chk(ak_o && !wt_o && ss_o == 3'd1, "pseudo-DK lets AK go with SS");
    release_as();
    addr(0, 2'b00, 32'h1236_0000);
    chk(!selected && !wt_o && !ak_o, "logical address out of range ignored");
    release_as();
    // ---- automatic slave
    auto_slave = 1;
    addr(1, 2'b00, 32'd17);
    rd_i = 1; ms_i = 0; ds_i = 1; tick(2);
    chk(dk_o && !wt_o && ad_oe && ad_o == dout, "automatic slave answers at once");
    ds_i = 0; tick(2);
    chk(!dk_o, "automatic slave DK down");
    release_as(); auto_slave = 0;
    // ---- general broadcast: WT on DS, pseudo-DK clears WT but gives no DK
    rd_i = 0;
    addr(0, 2'b10, 32'h0);
    chk(selected && bcast_q && !ak_o, "general broadcast selects without AK");
    ad_i = 32'h55; ds_i = 1; tick(2);
    chk(wt_o && din == 32'h55, "broadcast WT");
    sw_dk(3'd2);
    chk(!wt_o && !dk_o, "broadcast pseudo-DK gives no DK");
    release_as();
    // ---- sparse data scan: AD[slot] pulled when the flag is set
    sd_flag = 1;
    addr(0, 2'b10, 32'h2);
    rd_i = 1; ds_i = 1; tick(2);
    chk(ad_oe && ad_o == (32'd1 << 17) && !wt_o, "sparse data scan answer");
    release_as(); sd_flag = 0;
    addr(0, 2'b10, 32'h2);
    ds_i = 1; tick(2);
    chk(!ad_oe, "no answer without data");
    release_as();
    // ---- pattern select
    rd_i = 0;
    addr(0, 2'b10, 32'h1);
    chk(!selected, "pattern select waits for pattern");
    ms_i = 2'b10; ad_i = 32'd1 << 17; ds_i = 1; tick(2);
    chk(selected, "pattern bit selects");
    release_as();
    addr(0, 2'b10, 32'h1);
    ms_i = 2'b10; ad_i = 32'd1 << 3; ds_i = 1; tick(2);
    chk(!selected, "pattern without our bit leaves us out");
    release_as();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
