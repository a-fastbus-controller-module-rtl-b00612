// sfc_top: FASTBUS controller module driven by a plug-in MULTIBUS processor.
//
// A MULTIBUS (IEEE 796) single-board computer sees this module as a 256-byte
// I/O slave. Writing or reading an I/O address both moves AD bits and names a
// FASTBUS primitive (AS, DS, MS0, MS1 are coded in the address), so one 32-bit
// move instruction of a 16-bit MPU performs a complete FASTBUS address or data
// cycle: the module issues the strobes, waits for AK/DK, times out, checks SS
// and parity, and only then returns XACK*, raising BERR if anything went wrong.
// The module is also a FASTBUS slave whose behaviour is emulated by software
// with hardware help (address recognition, automatic WT and DK handling),
// a FASTBUS master able to arbitrate or preempt the segment as host, and it
// can address itself for diagnostics.
//
// Blocks: sfc_mb_if (MULTIBUS handshake), sfc_csr (address decoding,
// registers, AD register), sfc_fb_master (master sequencer with sfc_timeout),
// sfc_arbiter (AR/AG/AL/GK), sfc_fb_slave (slave support with sfc_addr_match)
// and sfc_intr (BERR, GINTR).
//
// FASTBUS lines are open-collector on the backplane. Here each line has a
// drive output (*_o, 1 = pull the line to its asserted state) and a receive
// input (*_i, the state of the bus line, which includes this module's own
// drive); the bus itself, the OR of all drivers, is outside. AD is driven only
// where fb_ad_oe is set. All inputs are taken as synchronous to clk except the
// MULTIBUS command strobes, which are synchronised inside. The original module
// is an asynchronous design in PALs, TTL and ECL; this is a clocked
// equivalent, so its timing is counted in clocks of clk.
module sfc_top
  import sfc_pkg::*;
#(
  parameter int unsigned TIMEOUT    = 1000,  // master timeout, clocks
  parameter int unsigned ARB_SETTLE = 8      // AL settling time, clocks
) (
  input  logic        clk,
  input  logic        rst_n,
  // jumpers and slot
  input  logic [7:0]  io_base,
  input  logic        msb_first,
  input  logic        ai_jumper,
  input  logic [4:0]  ga,
  // MULTIBUS I/O slave
  input  logic [15:0] mb_adr,
  input  logic        mb_iorc_n,
  input  logic        mb_iowc_n,
  input  logic        mb_bhen_n,
  input  logic [15:0] mb_dat_i,
  output logic [15:0] mb_dat_o,
  output logic        mb_dat_oe,
  output logic        mb_xack_n,
  output logic        berr_irq,
  output logic        gintr_irq,
  // FASTBUS drive
  output logic        fb_as_o,
  output logic        fb_ds_o,
  output logic        fb_rd_o,
  output logic [1:0]  fb_ms_o,
  output logic        fb_eg_o,
  output logic [31:0] fb_ad_o,
  output logic        fb_ad_oe,
  output logic        fb_pa_o,
  output logic        fb_pe_o,
  output logic        fb_ak_o,
  output logic        fb_dk_o,
  output logic        fb_wt_o,
  output logic [2:0]  fb_ss_o,
  output logic        fb_ar_o,
  output logic [5:0]  fb_al_o,
  output logic        fb_gk_o,
  output logic        fb_ai_o,
  output logic        fb_sr_o,
  output logic        fb_rb_o,
  // FASTBUS receive
  input  logic        fb_as_i,
  input  logic        fb_ds_i,
  input  logic        fb_rd_i,
  input  logic [1:0]  fb_ms_i,
  input  logic        fb_eg_i,
  input  logic [31:0] fb_ad_i,
  input  logic        fb_pa_i,
  input  logic        fb_pe_i,
  input  logic        fb_ak_i,
  input  logic        fb_dk_i,
  input  logic        fb_wt_i,
  input  logic [2:0]  fb_ss_i,
  input  logic        fb_ag_i,
  input  logic [5:0]  fb_al_i,
  input  logic        fb_gk_i,
  input  logic        fb_sr_i
);

  // MULTIBUS port <-> register block
  logic        req_valid, core_done;
  mb_req_t     req;
  logic [15:0] core_rdata;

  // master
  logic        m_start, m_busy, m_done, m_rdata_valid, m_scram_drop;
  fb_cmd_t     m_cmd;
  fb_err_t     m_err;
  logic [31:0] m_wdata, m_rdata, m_ad;
  logic        m_ad_oe, m_pa, m_pe, scram_en;

  // arbitration
  logic        arb_req, arb_host, bus_mine, took_mastership;
  logic [5:0]  arb_level;

  // slave
  logic [31:0] log_addr, s_dout, s_din, s_ad;
  logic [2:0]  ia_code, s_dk_ss;
  logic        auto_slave, sd_flag, s_dk_cmd;
  logic        s_selected, s_cmd_ready, s_addr_pend, s_rd, s_bcast;
  logic [1:0]  s_ms;
  logic        s_ad_oe, s_pa, s_pe;

  // interrupts
  logic        berr_set, berr_clr, mast_clr, gint_en, mast_flag;

  sfc_mb_if u_mb (
    .clk, .rst_n, .io_base, .mb_adr, .mb_iorc_n, .mb_iowc_n, .mb_bhen_n,
    .mb_dat_i, .mb_dat_o, .mb_dat_oe, .mb_xack_n,
    .req_valid, .req, .core_done, .core_rdata
  );

  sfc_csr u_csr (
    .clk, .rst_n, .msb_first,
    .req_valid, .req, .core_done, .core_rdata,
    .m_start, .m_cmd, .m_wdata, .m_busy, .m_done, .m_err, .m_rdata, .m_rdata_valid,
    .m_scram_drop, .m_as(fb_as_o), .m_ds(fb_ds_o),
    .arb_req, .arb_host, .arb_level, .bus_mine, .ar_o(fb_ar_o),
    .log_addr, .ia_code, .auto_slave, .sd_flag, .s_dout, .s_dk_cmd, .s_dk_ss,
    .s_selected, .s_cmd_ready, .s_addr_pend, .s_rd, .s_ms, .s_bcast, .s_din,
    .berr_set, .berr_clr, .mast_clr, .gint_en, .berr_irq, .mast_flag, .gintr_irq,
    .scram_en, .rb_o(fb_rb_o), .sr_o(fb_sr_o), .sr_i(fb_sr_i),
    .ak_i(fb_ak_i), .dk_i(fb_dk_i), .wt_i(fb_wt_i), .ds_i(fb_ds_i)
  );

  sfc_fb_master #(.TIMEOUT(TIMEOUT)) u_master (
    .clk, .rst_n, .start(m_start), .cmd(m_cmd), .wdata(m_wdata), .scram_en,
    .busy(m_busy), .done(m_done), .err(m_err), .rdata(m_rdata),
    .rdata_valid(m_rdata_valid), .scram_drop(m_scram_drop),
    .as_o(fb_as_o), .ds_o(fb_ds_o), .rd_o(fb_rd_o), .ms_o(fb_ms_o), .eg_o(fb_eg_o),
    .ad_o(m_ad), .ad_oe(m_ad_oe), .pa_o(m_pa), .pe_o(m_pe),
    .ak_i(fb_ak_i), .dk_i(fb_dk_i), .wt_i(fb_wt_i), .ss_i(fb_ss_i),
    .ad_i(fb_ad_i), .pa_i(fb_pa_i), .pe_i(fb_pe_i)
  );

  sfc_arbiter #(.SETTLE(ARB_SETTLE)) u_arb (
    .clk, .rst_n, .req(arb_req), .host(arb_host), .level(arb_level), .ai_jumper,
    .scram(m_scram_drop), .ag_i(fb_ag_i), .al_i(fb_al_i), .gk_i(fb_gk_i),
    .ar_o(fb_ar_o), .al_o(fb_al_o), .gk_o(fb_gk_o), .ai_o(fb_ai_o),
    .bus_mine, .took_mastership
  );

  sfc_fb_slave u_slave (
    .clk, .rst_n, .as_i(fb_as_i), .ds_i(fb_ds_i), .rd_i(fb_rd_i), .ms_i(fb_ms_i),
    .eg_i(fb_eg_i), .ad_i(fb_ad_i), .ga, .log_addr, .ia_code, .auto_slave,
    .sd_flag, .sr_flag(fb_sr_o), .dout(s_dout), .dk_cmd(s_dk_cmd), .dk_ss(s_dk_ss),
    .ak_o(fb_ak_o), .dk_o(fb_dk_o), .wt_o(fb_wt_o), .ss_o(fb_ss_o),
    .ad_o(s_ad), .ad_oe(s_ad_oe), .pa_o(s_pa), .pe_o(s_pe),
    .selected(s_selected), .cmd_ready(s_cmd_ready), .addr_pend(s_addr_pend),
    .rd_q(s_rd), .ms_q(s_ms), .bcast_q(s_bcast), .din(s_din)
  );

  sfc_intr u_intr (
    .clk, .rst_n, .berr_set, .berr_clr, .sr_i(fb_sr_i), .took_mastership,
    .mast_clr, .selected(s_selected), .gint_en, .berr_irq, .mast_flag, .gintr_irq
  );

  // Master and slave share the AD and parity drivers (open-collector OR).
  assign fb_ad_oe = m_ad_oe | s_ad_oe;
  assign fb_ad_o  = (m_ad_oe ? m_ad : 32'd0) | (s_ad_oe ? s_ad : 32'd0);
  assign fb_pa_o  = (m_ad_oe & m_pa) | (s_ad_oe & s_pa);
  assign fb_pe_o  = m_pe | s_pe;

endmodule
