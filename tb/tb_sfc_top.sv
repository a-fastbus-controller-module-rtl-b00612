// tb_sfc_top: end-to-end test of the FASTBUS controller at its default
// parameters.
//
// The testbench plays three parties around the module:
//  - the MULTIBUS processor: I/O read and write cycles (IORC*/IOWC*, BHEN*),
//    16-bit and 8-bit, waiting for XACK*;
//  - an external FASTBUS slave in slot $11 with a small data memory that
//    answers random and block transfers, with settable SS code and parity;
//  - the segment's ancillary logic: AG for arbitration, and AK/DK for
//    broadcasts;
//  - a second master that competes for the bus at a lower level, built from
//    the same arbitration block.
// The FASTBUS lines are the OR of everyone's drivers, so the module also sees
// itself and can address its own slave logic.
//
// It runs the 68000 sequence for a random read-modify-write with
// arbitration (get bus, geographic address slot $11, read, double, write back,
// AS down, GK down) and then every other mechanism: block transfer ending on
// an odd count, COMMAND-mode repeated writes, OVERLAPPED commands, byte-wide
// cycles in the other word order, timeout, SS and parity errors with BERR,
// SCRAM, host preemption, self-addressing geographically with the automatic
// slave and logically with WT and software pseudo-DK, a general broadcast,
// GINTR, a sparse data scan, pattern select and contended arbitration. Each
// mechanism is counted and must occur at least once.
module tb_sfc_top;
  import sfc_pkg::*;
  localparam logic [7:0] BASE = 8'h1F;
  localparam logic [4:0] MY_SLOT = 5'd5;
  localparam logic [4:0] EXT_SLOT = 5'h11;

  logic clk = 0, rst_n = 1;
  logic msb_first, ai_jumper;
  logic [15:0] mb_adr, mb_dat_i, mb_dat_o;
  logic mb_iorc_n, mb_iowc_n, mb_bhen_n, mb_dat_oe, mb_xack_n, berr_irq, gintr_irq;
  logic fb_as_o, fb_ds_o, fb_rd_o, fb_eg_o, fb_ad_oe, fb_pa_o, fb_pe_o, fb_ak_o, fb_dk_o, fb_wt_o;
  logic fb_ar_o, fb_gk_o, fb_ai_o, fb_sr_o, fb_rb_o;
  logic [1:0] fb_ms_o;
  logic [31:0] fb_ad_o;
  logic [2:0] fb_ss_o;
  logic [5:0] fb_al_o;
  // bus lines
  logic as, ds, rd, eg, pa, pe, ak, dk, wt, ag, gk, sr;
  logic [1:0] ms;
  logic [31:0] ad;
  logic [2:0] ss;
  logic [5:0] al;

  sfc_top dut (
    .clk, .rst_n, .io_base(BASE), .msb_first, .ai_jumper, .ga(MY_SLOT),
    .mb_adr, .mb_iorc_n, .mb_iowc_n, .mb_bhen_n, .mb_dat_i, .mb_dat_o, .mb_dat_oe,
    .mb_xack_n, .berr_irq, .gintr_irq,
    .fb_as_o, .fb_ds_o, .fb_rd_o, .fb_ms_o, .fb_eg_o, .fb_ad_o, .fb_ad_oe, .fb_pa_o,
    .fb_pe_o, .fb_ak_o, .fb_dk_o, .fb_wt_o, .fb_ss_o, .fb_ar_o, .fb_al_o, .fb_gk_o,
    .fb_ai_o, .fb_sr_o, .fb_rb_o,
    .fb_as_i(as), .fb_ds_i(ds), .fb_rd_i(rd), .fb_ms_i(ms), .fb_eg_i(eg), .fb_ad_i(ad),
    .fb_pa_i(pa), .fb_pe_i(pe), .fb_ak_i(ak), .fb_dk_i(dk), .fb_wt_i(wt), .fb_ss_i(ss),
    .fb_ag_i(ag), .fb_al_i(al), .fb_gk_i(gk), .fb_sr_i(sr)
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // ------------------------------------------------ external slave, slot $11
  logic [31:0] mem [32];
  logic [4:0]  ptr;
  logic        x_sel, x_ak, x_dk, x_oe, x_badpar, x_mute, x_sr;
  logic [2:0]  x_ss_cfg, x_ss;
  logic [31:0] x_ad;
  logic        as_d;
  always @(posedge clk) begin
    as_d <= as;
    if (!as) begin
      x_sel <= 0; x_ak <= 0; x_dk <= 0; x_oe <= 0; x_ss <= 0;
    end else if (as && !as_d && eg && ad[4:0] == EXT_SLOT && !x_mute) begin
      x_sel <= 1; x_ak <= 1; ptr <= ad[9:5]; x_ss <= 0;
    end else if (x_sel && ds != x_dk) begin
      x_dk <= ds; x_ss <= x_ss_cfg;
      if (ds || ms[0]) begin
        if (rd) begin
          x_ad <= mem[ptr]; x_oe <= 1;
        end else begin
          mem[ptr] <= ad; x_oe <= 0;
        end
        if (ms[0]) ptr <= ptr + 1;
      end else x_oe <= 0;
    end
  end

  // ------------------------------------------------ ancillary logic
  logic gk_prev, bc, a_ak, a_dk;
  int   hold;
  always @(posedge clk) begin
    gk_prev <= gk;
    if (gk && !gk_prev) begin ag <= 0; hold <= 2; end
    else if (hold > 0) hold <= hold - 1;
    else ag <= fb_ar_o | o_ar;
    if (!as) begin bc <= 0; a_ak <= 0; a_dk <= 0; end
    else begin
      if (as && !as_d && !eg && ms[1]) bc <= 1;
      a_ak <= bc;
      if (bc && !wt) a_dk <= ds;
    end
  end

  // ------------------------------------------------ a second master competing for the bus
  logic       o_req, o_ar, o_gk, o_ai, o_mine, o_took;
  logic [5:0] o_al;
  sfc_arbiter #(.SETTLE(8)) other (
    .clk, .rst_n, .req(o_req), .host(1'b0), .level(6'h10), .ai_jumper(1'b0), .scram(1'b0),
    .ag_i(ag), .al_i(al), .gk_i(gk), .ar_o(o_ar), .al_o(o_al), .gk_o(o_gk), .ai_o(o_ai),
    .bus_mine(o_mine), .took_mastership(o_took)
  );

  // ------------------------------------------------ wired-OR bus
  assign as = fb_as_o;
  assign ds = fb_ds_o;
  assign rd = fb_rd_o;
  assign ms = fb_ms_o;
  assign eg = fb_eg_o;
  assign ak = fb_ak_o | x_ak | a_ak;
  assign dk = fb_dk_o | x_dk | a_dk;
  assign wt = fb_wt_o;
  assign ss = fb_ss_o | ((x_ak | x_dk) ? x_ss : 3'd0);
  assign ad = (fb_ad_oe ? fb_ad_o : 32'd0) | (x_oe ? x_ad : 32'd0);
  assign pa = (fb_ad_oe & fb_pa_o) | (x_oe & ((^x_ad) ^ x_badpar));
  assign pe = fb_pe_o | x_oe;
  assign al = fb_al_o | o_al;
  assign gk = fb_gk_o | o_gk;
  assign sr = fb_sr_o | x_sr;

  // ------------------------------------------------ MULTIBUS processor
  int last_clocks;
  task automatic io(input logic wr, input logic [7:0] a, input logic word, input logic [15:0] d,
                    output logic [15:0] q);
    int n;
    mb_adr = {BASE, a}; mb_bhen_n = !(word || a[0]); mb_dat_i = d;
    #12;
    if (wr) mb_iowc_n = 0; else mb_iorc_n = 0;
    n = 0;
    while (mb_xack_n && n < 20000) begin @(posedge clk); #1 n++; end
    if (n >= 20000) begin failures++; $display("FAIL no XACK at %h", a); end
    last_clocks = n;
    q = mb_dat_o;
    #7 mb_iowc_n = 1; mb_iorc_n = 1;
    while (!mb_xack_n) @(posedge clk);
    #13;
  endtask
  task automatic wr8(input logic [7:0] a, input logic [7:0] d);
    logic [15:0] q; io(1, a, 0, a[0] ? {d, 8'h00} : {8'h00, d}, q);
  endtask
  task automatic rd8(input logic [7:0] a, output logic [7:0] v);
    logic [15:0] q; io(0, a, 0, 0, q); v = a[0] ? q[15:8] : q[7:0];
  endtask
  // 68000-style longword: two word cycles, lower address first
  task automatic wr32(input logic [7:0] a, input logic [31:0] d);
    logic [15:0] q;
    io(1, a,     1, msb_first ? d[31:16] : d[15:0], q);
    io(1, a + 2, 1, msb_first ? d[15:0] : d[31:16], q);
  endtask
  task automatic rd32(input logic [7:0] a, output logic [31:0] v);
    logic [15:0] h0, h1;
    io(0, a, 1, 0, h0);
    io(0, a + 2, 1, 0, h1);
    v = msb_first ? {h0, h1} : {h1, h0};
  endtask
  task automatic set_ctl(input int bitn, input logic v);
    logic [7:0] c; rd8(R_CTL, c); c[bitn] = v; wr8(R_CTL, c);
  endtask
  task automatic get_bus();
    logic [7:0] s; int n = 0;
    set_ctl(C_ARREQ, 1);
    do begin rd8(R_MSTAT, s); n++; end while (!s[5] && n < 200);
    chk(s[5], "bus mine after arbitration");
  endtask
  task automatic clr_err(output logic [7:0] e);
    rd8(R_ERR, e); wr8(R_ERR, 0);
  endtask

  // FASTBUS command addresses: {space, AS, DS, MS1, MS0, byte}
  function automatic logic [7:0] fa(input space_e sp, input logic a, d, input logic [1:0] m);
    return {sp, a, d, m, 2'b00};
  endfunction

  // ------------------------------------------------ mechanism counters
  int n_arb, n_addr, n_rand, n_block, n_cmd, n_ovl, n_timeout, n_sserr, n_parerr, n_scram;
  int n_host, n_selfgeo, n_logwt, n_pdk, n_bcast, n_gintr, n_byte, n_berr, n_ai;
  int n_contend, n_sparse, n_pattern;
  logic berr_d, gintr_d, wt_d;
  always @(posedge clk) begin
    berr_d <= berr_irq; gintr_d <= gintr_irq; wt_d <= fb_wt_o;
    if (berr_irq && !berr_d) n_berr++;
    if (gintr_irq && !gintr_d) n_gintr++;
    if (fb_ai_o && fb_gk_o && !gk_prev) n_ai++;
  end

  initial begin
    #20000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] v, w, base_w;
    logic [15:0] q;
    logic [7:0] s, e;
    int t0;
    msb_first = 1; ai_jumper = 1;
    mb_adr = 0; mb_dat_i = 0; mb_iorc_n = 1; mb_iowc_n = 1; mb_bhen_n = 1;
    x_badpar = 0; x_mute = 0; x_ss_cfg = 0; x_sr = 0; ag = 0; hold = 0;
    for (int i = 0; i < 32; i++) mem[i] = $urandom;
    {n_arb, n_addr, n_rand, n_block, n_cmd, n_ovl, n_timeout, n_sserr, n_parerr, n_scram} = '0;
    {n_host, n_selfgeo, n_logwt, n_pdk, n_bcast, n_gintr, n_byte, n_berr, n_ai} = '0;
    {n_contend, n_sparse, n_pattern} = '0; o_req = 0;
    #1 rst_n = 0; repeat (3) @(negedge clk); rst_n = 1; repeat (3) @(negedge clk);

    // ============ random read-modify-write with arbitration (68000 listing)
    wr8(R_ARBLVL, 8'h2A);
    set_ctl(C_EG, 1);
    t0 = $time;
    get_bus();                                   // BEG: BSET 7,7(A0) ... BEQ CHEK
    n_arb++;
    chk(fb_gk_o && !fb_ar_o, "GK asserted, AR dropped");
    wr32(fa(SP_CYCLE, 1, 0, 2'b00), {22'd0, 5'd3, EXT_SLOT});  // address slot $11, word 3
    chk(as && ak && last_clocks > 0, "address cycle: AS/AK locked");
    n_addr++;
    base_w = mem[3];
    rd32(fa(SP_CYCLE, 1, 1, 2'b00), v);          // read data word
    chk(v == base_w, "random read returns slave data");
    n_rand++;
    wr32(fa(SP_CYCLE, 1, 1, 2'b00), v + v);      // write it back doubled
    chk(mem[3] == base_w + base_w, "random write doubles the word");
    wr8(fa(SP_COMMAND, 0, 0, 2'b00), 8'h00);     // take AS down
    chk(!as && !ak, "AS down");
    n_cmd++;
    set_ctl(C_ARREQ, 0);                         // END: BCLR 7,7(A0)
    repeat (2) @(negedge clk);
    chk(!fb_gk_o, "GK down");
    $display("read-modify-write with arbitration: %0d clocks", ($time - t0) / 10);
    rd8(R_ERR, e);
    chk(e[1:0] == ERR_NONE && !berr_irq, "no error in the sequence");

    // ============ block write of three words, odd count, DS down by COMMAND
    get_bus();
    wr32(fa(SP_CYCLE, 1, 0, 2'b00), {22'd0, 5'd8, EXT_SLOT});
    for (int i = 0; i < 3; i++) wr32(fa(SP_CYCLE, 1, 1, 2'b01), 32'hB000_0000 + i);
    chk(ds && dk, "DS left up after an odd block");
    wr8(fa(SP_COMMAND, 1, 0, 2'b01), 0);         // DS down, AS stays
    chk(!ds && !dk && as, "COMMAND takes DS down");
    chk(mem[8] == 32'hB000_0000 && mem[9] == 32'hB000_0001 && mem[10] == 32'hB000_0002, "block data");
    n_block++; n_cmd++;
    // ============ block read of two words
    wr8(fa(SP_COMMAND, 0, 0, 2'b00), 0);
    wr32(fa(SP_CYCLE, 1, 0, 2'b00), {22'd0, 5'd8, EXT_SLOT});
    rd32(fa(SP_CYCLE, 1, 1, 2'b01), v); chk(v == 32'hB000_0000, "block read 0");
    rd32(fa(SP_CYCLE, 1, 1, 2'b01), v); chk(v == 32'hB000_0001, "block read 1");
    chk(!ds, "even block leaves DS down");
    // ============ COMMAND mode repeated write: AD register loaded once
    wr8(fa(SP_COMMAND, 0, 0, 2'b00), 0);
    wr32(fa(SP_CYCLE, 1, 0, 2'b00), {22'd0, 5'd20, EXT_SLOT});
    wr32(R_AD0, 32'hFEED_0001);
    for (int i = 0; i < 4; i++) wr8(fa(SP_COMMAND, 1, 1, 2'b01), 0);
    chk(mem[20] == 32'hFEED_0001 && mem[23] == 32'hFEED_0001, "repeated data word");
    n_cmd++;
    // ============ OVERLAPPED: XACK before the slave answers
    wr8(fa(SP_COMMAND, 0, 0, 2'b00), 0);
    wr32(fa(SP_CYCLE, 1, 0, 2'b00), {22'd0, 5'd24, EXT_SLOT});
    wr32(R_AD0, 32'h0BE1_A9ED);
    wr8(fa(SP_OVERLAP, 1, 1, 2'b00), 0);
    rd8(R_MSTAT, s);
    wr8(fa(SP_COMMAND, 0, 0, 2'b00), 0);          // waits for the overlapped one
    chk(mem[24] == 32'h0BE1_A9ED && !as, "overlapped write done");
    n_ovl++;
    // ============ byte-wide MPU in LSB-first order
    msb_first = 0;
    w = $urandom;
    wr32(fa(SP_CYCLE, 1, 0, 2'b00), {22'd0, 5'd12, EXT_SLOT});
    for (int b = 0; b < 4; b++) wr8(fa(SP_CYCLE, 1, 1, 2'b00) | 8'(b), w[8*b +: 8]);
    chk(mem[12] == w, "byte-wide write");
    mem[13] = $urandom;
    wr8(fa(SP_COMMAND, 0, 0, 2'b00), 0);
    wr32(fa(SP_CYCLE, 1, 0, 2'b00), {22'd0, 5'd13, EXT_SLOT});
    for (int b = 0; b < 4; b++) begin logic [7:0] x; rd8(fa(SP_CYCLE, 1, 1, 2'b00) | 8'(b), x); v[8*b +: 8] = x; end
    chk(v == mem[13], "byte-wide read");
    n_byte++;
    wr8(fa(SP_COMMAND, 0, 0, 2'b00), 0);
    msb_first = 1;

    // ============ errors: SS, parity, timeout
    wr32(fa(SP_CYCLE, 1, 0, 2'b00), {22'd0, 5'd1, EXT_SLOT});
    x_ss_cfg = 3'd2;
    rd32(fa(SP_CYCLE, 1, 1, 2'b00), v);
    chk(berr_irq, "BERR with non-zero SS");
    clr_err(e);
    chk(e[1:0] == ERR_SS && e[4:2] == 3'd2 && e[7], "SS error reported");
    n_sserr++;
    x_ss_cfg = 0; x_badpar = 1;
    rd32(fa(SP_CYCLE, 1, 1, 2'b00), v);
    clr_err(e);
    chk(e[1:0] == ERR_PARITY, "parity error reported");
    n_parerr++;
    x_badpar = 0;
    wr8(fa(SP_COMMAND, 0, 0, 2'b00), 0);
    t0 = $time;
    wr32(fa(SP_CYCLE, 1, 0, 2'b00), 32'h1E);      // empty slot
    clr_err(e);
    chk(e[1:0] == ERR_TIMEOUT, "timeout reported");
    n_timeout++;
    chk(!berr_irq, "BERR cleared");
    wr8(fa(SP_COMMAND, 0, 0, 2'b00), 0);
    // ============ SCRAM: an error drops AS and GK
    set_ctl(C_SCRAM, 1);
    wr32(fa(SP_CYCLE, 1, 0, 2'b00), 32'h1D);
    repeat (3) @(negedge clk);
    chk(!as && !fb_gk_o, "SCRAM drops AS and GK");
    rd8(R_CTL, s);
    chk(!s[C_ARREQ], "SCRAM clears the request bit");
    clr_err(e);
    n_scram++;
    set_ctl(C_SCRAM, 0);

    // ============ host preemption and RB
    set_ctl(C_HOST, 1);
    repeat (2) @(negedge clk);
    chk(fb_gk_o && !fb_ar_o, "host takes GK without arbitration");
    set_ctl(C_RB, 1);
    chk(fb_rb_o, "RB driven");
    set_ctl(C_RB, 0);
    n_host++;

    // ============ self test: geographic address of itself, automatic slave
    set_ctl(C_AUTOSL, 1);
    wr32(R_SDOUT0, 32'h5EAF_00D5);
    wr32(fa(SP_CYCLE, 1, 0, 2'b00), {27'd0, MY_SLOT});
    rd8(R_SSTAT, s);
    chk(s[0] && ak, "selected itself geographically");
    w = $urandom;
    wr32(fa(SP_CYCLE, 1, 1, 2'b00), w);
    rd32(R_SDIN0, v);
    chk(v == w, "own slave received the word");
    rd32(fa(SP_CYCLE, 1, 1, 2'b00), v);
    chk(v == 32'h5EAF_00D5, "own slave returned its data");
    wr8(fa(SP_COMMAND, 0, 0, 2'b00), 0);
    n_selfgeo++;
    set_ctl(C_AUTOSL, 0);

    // ============ self test: logical address, WT, software pseudo-DK
    set_ctl(C_EG, 0);
    wr32(R_LA0, 32'h00AB_0000);
    wr8(R_SCFG, 8'd2);                            // IA = 18 bits
    wr32(R_AD0, 32'h00AB_1234);
    wr8(fa(SP_OVERLAP, 1, 0, 2'b00), 0);          // overlapped: no hang on WT
    rd8(R_SSTAT, s);
    chk(s[6] && wt && !ak, "logical address gives WT");
    n_logwt++;
    rd32(R_SDIN0, v);
    chk(v == 32'h00AB_1234, "software sees the internal address");
    wr8(R_SDK, 0);                                // pseudo-DK: AK goes on
    rd8(R_MSTAT, s);
    chk(ak && !wt && !s[4], "AK after pseudo-DK, master done");
    n_pdk++;
    // data write answered by software
    wr32(R_AD0, 32'hC0DE_0001);
    wr8(fa(SP_OVERLAP, 1, 1, 2'b00), 0);
    rd8(R_SSTAT, s);
    chk(s[1] && wt, "data strobe waits for software");
    rd32(R_SDIN0, v);
    chk(v == 32'hC0DE_0001, "software reads the written word");
    wr8(R_SDK, 8'd0);
    wr8(fa(SP_COMMAND, 0, 0, 2'b00), 0);
    rd8(R_ERR, e);
    chk(e[1:0] == ERR_NONE, "software-answered cycle without error");
    n_pdk++;

    // ============ general broadcast with GINTR on selection
    set_ctl(C_GINTEN, 1);
    wr8(R_INT, 8'h02);                            // clear the mastership flag
    wr32(R_AD0, 32'h0);
    wr8(fa(SP_OVERLAP, 1, 0, 2'b10), 0);          // broadcast address, case general
    repeat (4) @(negedge clk);
    chk(gintr_irq, "GINTR on being selected");
    rd8(R_SSTAT, s);
    chk(s[0] && s[5], "selected by broadcast");
    wr32(R_AD0, 32'h77);
    wr8(fa(SP_OVERLAP, 1, 1, 2'b10), 0);
    rd8(R_SSTAT, s);
    chk(s[1], "broadcast data waits");
    wr8(R_SDK, 8'd0);
    wr8(fa(SP_COMMAND, 0, 0, 2'b00), 0);
    rd8(R_ERR, e);
    chk(e[1:0] == ERR_NONE && !dut.fb_dk_o, "broadcast completed by ancillary DK");
    n_bcast++;
    // SR as a GINTR source
    repeat (4) @(negedge clk);
    chk(!gintr_irq, "GINTR idle");
    x_sr = 1; repeat (3) @(negedge clk);
    chk(gintr_irq, "GINTR on SR");
    x_sr = 0;
    set_ctl(C_GINTEN, 0);

    // ============ sparse data scan: own slave answers on AD[slot]
    wr8(R_SCFG, 8'h10);                           // sparse-data flag
    wr32(R_AD0, 32'h2);                           // broadcast case: sparse data scan
    wr8(fa(SP_OVERLAP, 1, 0, 2'b10), 0);
    rd32(fa(SP_CYCLE, 1, 1, 2'b10), v);
    chk(v == (32'd1 << MY_SLOT), "sparse data scan reads AD[slot]");
    wr8(fa(SP_COMMAND, 0, 0, 2'b00), 0);
    wr8(R_SCFG, 8'h00);
    wr32(R_AD0, 32'h2);
    wr8(fa(SP_OVERLAP, 1, 0, 2'b10), 0);
    rd32(fa(SP_CYCLE, 1, 1, 2'b10), v);
    chk(v == 32'd0, "no data, no bit");
    wr8(fa(SP_COMMAND, 0, 0, 2'b00), 0);
    n_sparse++;
    // ============ pattern select: a pattern with our bit selects us
    wr32(R_AD0, 32'h1);
    wr8(fa(SP_OVERLAP, 1, 0, 2'b10), 0);
    rd8(R_SSTAT, s);
    chk(!s[0], "pattern select waits for the pattern");
    wr32(fa(SP_CYCLE, 1, 1, 2'b10), (32'd1 << MY_SLOT) | 32'h3);
    rd8(R_SSTAT, s);
    chk(s[0] && s[5], "pattern selects this slot");
    wr8(fa(SP_COMMAND, 0, 0, 2'b00), 0);
    n_pattern++;
    set_ctl(C_HOST, 0);
    repeat (2) @(negedge clk);

    // ============ two masters: the higher level wins, the other waits for GK
    o_req = 1;
    repeat (60) @(negedge clk);
    chk(o_mine && o_gk, "other master holds the bus");
    set_ctl(C_ARREQ, 1);
    repeat (60) @(negedge clk);
    rd8(R_MSTAT, s);
    chk(!s[5] && fb_ar_o, "our request waits while GK is held");
    o_req = 0;
    begin int n = 0; do begin rd8(R_MSTAT, s); n++; end while (!s[5] && n < 100); end
    chk(s[5] && fb_gk_o && !o_mine, "we take the bus after release");
    o_req = 1;                                    // the other one asks again and must wait
    repeat (60) @(negedge clk);
    chk(fb_gk_o && !o_gk, "lower level waits for us");
    set_ctl(C_ARREQ, 0);
    repeat (80) @(negedge clk);
    chk(o_mine && !fb_gk_o, "other master follows");
    o_req = 0;
    n_contend++;

    // ============ all mechanisms seen
    chk(n_arb > 0, "arbitration");         chk(n_addr > 0, "address cycle");
    chk(n_rand > 0, "random data");        chk(n_block > 0, "block transfer");
    chk(n_cmd > 0, "COMMAND mode");        chk(n_ovl > 0, "OVERLAPPED mode");
    chk(n_timeout > 0, "timeout");         chk(n_sserr > 0, "SS error");
    chk(n_parerr > 0, "parity error");     chk(n_scram > 0, "SCRAM");
    chk(n_host > 0, "host preemption");    chk(n_selfgeo > 0, "self geographic");
    chk(n_logwt > 0, "logical WT");        chk(n_pdk > 0, "pseudo-DK");
    chk(n_bcast > 0, "broadcast");         chk(n_gintr > 0, "GINTR");
    chk(n_byte > 0, "byte-wide cycles");   chk(n_berr >= 4, "BERR interrupts");
    chk(n_ai > 0, "arbitration inhibit");
    chk(n_contend > 0, "contended arbitration"); chk(n_sparse > 0, "sparse data scan");
    chk(n_pattern > 0, "pattern select");
    $display("mechanisms: arb=%0d addr=%0d rand=%0d block=%0d cmd=%0d ovl=%0d to=%0d ss=%0d par=%0d scram=%0d host=%0d selfgeo=%0d logwt=%0d pdk=%0d bcast=%0d gintr=%0d byte=%0d berr=%0d ai=%0d contend=%0d sparse=%0d pattern=%0d",
             n_arb, n_addr, n_rand, n_block, n_cmd, n_ovl, n_timeout, n_sserr, n_parerr, n_scram,
             n_host, n_selfgeo, n_logwt, n_pdk, n_bcast, n_gintr, n_byte, n_berr, n_ai, n_contend, n_sparse, n_pattern);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
