// sfc_csr: command decoder and register block of the FASTBUS controller.
//
// Every MULTIBUS transfer from sfc_mb_if arrives here. Address bits [7:6]
// choose what it means (see sfc_pkg):
//   register space   read or write a register; answered in two clocks
//   CYCLE mode       interlocked: the transfer carries AD bits. A write fills
//                    bytes of the AD register and, when it delivers the last
//                    byte of the longword (offset 3), starts the FASTBUS
//                    primitive and is held until it ends. A read that takes
//                    the first byte (offset 0) starts the primitive, waits,
//                    and returns the fresh AD word; later reads of the same
//                    longword come from the AD register. So a 16-bit MPU
//                    needs two transfers and an 8-bit one four
//   COMMAND mode     the primitive is started on any transfer, no data moves,
//                    the AD register is reused (repeated write data, or
//                    clearing AS and DS), and the transfer waits for the end
//   OVERLAPPED mode  as COMMAND but the transfer ends as soon as the primitive
//                    has started, so the MPU can overlap its own work
// A transfer that needs the master while it is still busy with an overlapped
// primitive waits for it. A primitive that ends in error latches the error
// register and raises BERR; with SCRAM set it also clears the request and host
// bits so GK is released.
//
// Registers (offsets in sfc_pkg): AD register, master status (bit 5 bus
// mine), error status (class in [1:0] for an indexed branch, SS in [4:2],
// BERR in [7]; a write clears), interrupt status, control (bit 7 request
// mastership), arbitration-level CSR, logical-address CSR, IA width and
// sparse-data flag, slave status, slave data in and out, slave pseudo-DK.
// The three modes, the launch points of the interlocked mode, the control
// register at offset 7 with request in bit 7 and the master status register
// at offset 4 with "bus mine" in bit 5 follow the document; the rest of the
// map is this design's choice.
module sfc_csr
  import sfc_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        msb_first,
  // MULTIBUS side
  input  logic        req_valid,
  input  mb_req_t     req,
  output logic        core_done,
  output logic [15:0] core_rdata,
  // master sequencer
  output logic        m_start,
  output fb_cmd_t     m_cmd,
  output logic [31:0] m_wdata,
  input  logic        m_busy,
  input  logic        m_done,
  input  fb_err_t     m_err,
  input  logic [31:0] m_rdata,
  input  logic        m_rdata_valid,
  input  logic        m_scram_drop,
  input  logic        m_as,
  input  logic        m_ds,
  // arbitration
  output logic        arb_req,
  output logic        arb_host,
  output logic [5:0]  arb_level,
  input  logic        bus_mine,
  input  logic        ar_o,
  // slave
  output logic [31:0] log_addr,
  output logic [2:0]  ia_code,
  output logic        auto_slave,
  output logic        sd_flag,
  output logic [31:0] s_dout,
  output logic        s_dk_cmd,
  output logic [2:0]  s_dk_ss,
  input  logic        s_selected,
  input  logic        s_cmd_ready,
  input  logic        s_addr_pend,
  input  logic        s_rd,
  input  logic [1:0]  s_ms,
  input  logic        s_bcast,
  input  logic [31:0] s_din,
  // interrupts
  output logic        berr_set,
  output logic        berr_clr,
  output logic        mast_clr,
  output logic        gint_en,
  input  logic        berr_irq,
  input  logic        mast_flag,
  input  logic        gintr_irq,
  // other control lines and bus status
  output logic        scram_en,
  output logic        rb_o,
  output logic        sr_o,
  input  logic        sr_i,
  input  logic        ak_i,
  input  logic        dk_i,
  input  logic        wt_i,
  input  logic        ds_i
);

  typedef enum logic [1:0] {D_IDLE, D_LAUNCH, D_RUN, D_RESP} disp_e;
  disp_e st;

  mb_req_t    rq;
  space_e     sp, rq_sp;
  logic       wait_end;             // transfer waits for the primitive
  logic [7:0] ctl_q;
  logic [7:0] scfg_q;
  logic [5:0] lvl_q;
  fb_err_t    err_q;
  logic [15:0] ad_rd, la_rd, sdo_rd;
  logic [31:0] ad_q;
  logic       reg_wr;
  logic [5:0] widx0, widx1;

  assign sp     = space_e'(req.hadr[7:6]);
  assign rq_sp  = space_e'(rq.hadr[7:6]);
  assign reg_wr = req_valid && req.write && sp == SP_REG;
  assign widx0  = {req.hadr[5:1], 1'b0};
  assign widx1  = {req.hadr[5:1], 1'b1};

  // 32-bit registers: AD, logical address, slave data out.
  logic ad_wr, la_wr, sdo_wr;
  assign ad_wr  = req_valid && req.write &&
                  (sp == SP_CYCLE || (sp == SP_REG && req.hadr[5:2] == R_AD0[5:2]));
  assign la_wr  = reg_wr && req.hadr[5:2] == R_LA0[5:2];
  assign sdo_wr = reg_wr && req.hadr[5:2] == R_SDOUT0[5:2];

  sfc_ad_reg u_ad (
    .clk, .rst_n, .msb_first, .wr(ad_wr), .half(req_valid ? req.hadr[1] : rq.hadr[1]),
    .be(req.be), .wdata(req.wdata), .load(m_rdata_valid), .load_data(m_rdata),
    .rdata(ad_rd), .q(ad_q)
  );
  sfc_ad_reg u_la (
    .clk, .rst_n, .msb_first, .wr(la_wr), .half(req_valid ? req.hadr[1] : rq.hadr[1]),
    .be(req.be), .wdata(req.wdata), .load(1'b0), .load_data(32'd0),
    .rdata(la_rd), .q(log_addr)
  );
  sfc_ad_reg u_sdo (
    .clk, .rst_n, .msb_first, .wr(sdo_wr), .half(req_valid ? req.hadr[1] : rq.hadr[1]),
    .be(req.be), .wdata(req.wdata), .load(1'b0), .load_data(32'd0),
    .rdata(sdo_rd), .q(s_dout)
  );

  assign m_wdata = ad_q;

  // ---------------------------------------------------------------- dispatch
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st       <= D_IDLE;
      rq       <= '0;
      wait_end <= 1'b0;
      m_start  <= 1'b0;
      m_cmd    <= '0;
    end else begin
      m_start <= 1'b0;
      case (st)
        D_IDLE:
          if (req_valid) begin
            rq <= req;
            m_cmd <= '{as: req.hadr[5], ds: req.hadr[4], ms: req.hadr[3:2],
                       rd: !req.write, eg: ctl_q[C_EG]};
            wait_end <= (sp != SP_OVERLAP);
            case (sp)
              SP_REG:     st <= D_RESP;
              SP_CYCLE:   st <= (req.write ? (req.hadr[1] && req.be[1])
                                           : (!req.hadr[1] && req.be[0])) ? D_LAUNCH : D_RESP;
              default:    st <= D_LAUNCH;
            endcase
          end
        D_LAUNCH:
          if (!m_busy && !m_start) begin
            m_start <= 1'b1;
            st      <= wait_end ? D_RUN : D_RESP;
          end
        D_RUN:
          if (m_done) st <= D_RESP;
        D_RESP:
          st <= D_IDLE;
        default: st <= D_IDLE;
      endcase
    end
  end

  // ---------------------------------------------------------------- registers
  function automatic logic [7:0] byte_of(input logic [31:0] w, input logic [1:0] b,
                                         input logic msb);
    logic [1:0] l;
    l = ad_lane(b, msb);
    return w[8*l +: 8];
  endfunction

  logic [7:0] mstat, estat, istat, sstat;
  assign mstat = {ar_o, wt_i, bus_mine, m_busy, dk_i, ak_i, m_ds, m_as};
  assign estat = {berr_irq, 2'b00, err_q.ss, err_q.cls};
  assign istat = {3'b000, gintr_irq, berr_irq, s_selected, mast_flag, sr_i};
  assign sstat = {ds_i, s_addr_pend, s_bcast, s_ms, s_rd, s_cmd_ready, s_selected};

  function automatic logic [7:0] reg_byte(input logic [5:0] idx);
    case (idx)
      R_MSTAT:  return mstat;
      R_ERR:    return estat;
      R_INT:    return istat;
      R_CTL:    return ctl_q;
      R_ARBLVL: return {2'b00, lvl_q};
      R_SCFG:   return scfg_q;
      R_SSTAT:  return sstat;
      default:  return (idx[5:2] == R_SDIN0[5:2]) ? byte_of(s_din, idx[1:0], msb_first) : 8'h00;
    endcase
  endfunction

  logic wr_hit0, wr_hit1;
  always_comb begin
    wr_hit0 = reg_wr && req.be[0];
    wr_hit1 = reg_wr && req.be[1];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ctl_q  <= '0;
      scfg_q <= '0;
      lvl_q  <= '0;
      err_q  <= '{cls: ERR_NONE, ss: 3'd0};
    end else begin
      if (wr_hit0) begin
        case (widx0)
          R_CTL:    ctl_q  <= req.wdata[7:0];
          R_ARBLVL: lvl_q  <= req.wdata[5:0];
          R_SCFG:   scfg_q <= req.wdata[7:0];
          default: ;
        endcase
      end
      if (wr_hit1) begin
        case (widx1)
          R_CTL:    ctl_q  <= req.wdata[15:8];
          R_ARBLVL: lvl_q  <= req.wdata[13:8];
          R_SCFG:   scfg_q <= req.wdata[15:8];
          default: ;
        endcase
      end
      if (berr_clr) err_q <= '{cls: ERR_NONE, ss: 3'd0};
      if (berr_set) err_q <= m_err;
      if (m_scram_drop) begin
        ctl_q[C_ARREQ] <= 1'b0;
        ctl_q[C_HOST]  <= 1'b0;
      end
    end
  end

  // Write strobes with side effects.
  always_comb begin
    berr_clr = (wr_hit0 && widx0 == R_ERR) || (wr_hit1 && widx1 == R_ERR);
    mast_clr = (wr_hit0 && widx0 == R_INT && req.wdata[1]) ||
               (wr_hit1 && widx1 == R_INT && req.wdata[9]);
    s_dk_cmd = (wr_hit0 && widx0 == R_SDK) || (wr_hit1 && widx1 == R_SDK);
    s_dk_ss  = (wr_hit1 && widx1 == R_SDK) ? req.wdata[10:8] : req.wdata[2:0];
  end

  assign berr_set = m_done && m_err.cls != ERR_NONE;

  // ---------------------------------------------------------------- response
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      core_done  <= 1'b0;
      core_rdata <= '0;
    end else begin
      core_done <= (st == D_RESP);
      if (st == D_RESP) begin
        if (rq_sp == SP_CYCLE || (rq_sp == SP_REG && rq.hadr[5:2] == R_AD0[5:2]))
          core_rdata <= ad_rd;
        else if (rq_sp == SP_REG && rq.hadr[5:2] == R_LA0[5:2])
          core_rdata <= la_rd;
        else if (rq_sp == SP_REG && rq.hadr[5:2] == R_SDOUT0[5:2])
          core_rdata <= sdo_rd;
        else if (rq_sp == SP_REG)
          core_rdata <= {reg_byte({rq.hadr[5:1], 1'b1}), reg_byte({rq.hadr[5:1], 1'b0})};
        else
          core_rdata <= {8'h00, mstat};   // COMMAND/OVERLAPPED read: master status
      end
    end
  end

  assign arb_req    = ctl_q[C_ARREQ];
  assign arb_host   = ctl_q[C_HOST];
  assign arb_level  = lvl_q;
  assign gint_en    = ctl_q[C_GINTEN];
  assign scram_en   = ctl_q[C_SCRAM];
  assign auto_slave = ctl_q[C_AUTOSL];
  assign rb_o       = ctl_q[C_RB];
  assign sr_o       = ctl_q[C_SR];
  assign ia_code    = scfg_q[2:0];
  assign sd_flag    = scfg_q[4];

endmodule
