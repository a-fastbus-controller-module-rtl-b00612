// sfc_fb_master: FASTBUS master handshake sequencer.
//
// The MPU only supplies a command (requested AS level, data-cycle flag,
// MS1/MS0, direction) and the AD word; this block performs the FASTBUS
// primitive and reports how it ended, so the MPU needs no strobe/test/branch
// code. One start pulse runs one primitive:
//
//   AS=1, DS=0, AS low      address cycle: drive AD and MS, raise AS, wait AK up
//   AS=1, DS=0, DS high     take DS down (end of an odd-length block), wait DK down
//   AS=1, DS=0, otherwise   nothing to do
//   AS=0                    take DS down if it is up, then AS down, wait AK down
//   DS=1, MS0=0             random data cycle: DS up, wait DK up, DS down, wait DK down
//   DS=1, MS0=1             block data cycle: toggle DS, wait for DK to follow
//
// On each acknowledge the slave's SS code is checked (non-zero is an error) and,
// on reads with PE asserted by the slave, the even parity of AD and PA. Every
// wait runs the timeout counter, held while WT is asserted. done pulses when
// the primitive ends, with err holding the class (timeout before parity
// before SS) and the SS code; for reads rdata_valid pulses with the AD word
// latched on the DK edge. With SCRAM enabled any error drops AS and DS at once
// and pulses scram_drop so the arbitration logic releases GK.
//
// Follows the document: the command set (AS, DS, MS0, MS1), waiting on AK/DK,
// the timeout, parity and SS checks, random versus block DS behaviour
// (MS0), SCRAM. This design's own: the clocked (rather than asynchronous)
// implementation, the leaving of strobes in place after a timeout, the
// parity convention. FASTBUS inputs are taken as synchronous to clk.
module sfc_fb_master
  import sfc_pkg::*;
#(
  parameter int unsigned TIMEOUT = 1000   // clocks
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  fb_cmd_t     cmd,
  input  logic [31:0] wdata,
  input  logic        scram_en,
  output logic        busy,
  output logic        done,
  output fb_err_t     err,
  output logic [31:0] rdata,
  output logic        rdata_valid,
  output logic        scram_drop,
  // FASTBUS lines driven
  output logic        as_o,
  output logic        ds_o,
  output logic        rd_o,
  output logic [1:0]  ms_o,
  output logic        eg_o,
  output logic [31:0] ad_o,
  output logic        ad_oe,
  output logic        pa_o,
  output logic        pe_o,
  // FASTBUS lines received
  input  logic        ak_i,
  input  logic        dk_i,
  input  logic        wt_i,
  input  logic [2:0]  ss_i,
  input  logic [31:0] ad_i,
  input  logic        pa_i,
  input  logic        pe_i
);

  typedef enum logic [2:0] {
    M_IDLE, M_AK_UP, M_AK_DN, M_DK_UP, M_DK_DN, M_DK_EQ, M_FIN
  } mst_e;
  mst_e st;

  logic [31:0] ad_q;
  logic        rd_q, then_as_dn, is_addr;
  logic        to_clear, to_run, to_exp;
  logic        e_par, e_ss;
  logic [2:0]  ss_q;

  sfc_timeout #(.LIMIT(TIMEOUT)) u_to (
    .clk, .rst_n, .clear(to_clear), .run(to_run), .wt(wt_i), .expired(to_exp)
  );

  assign to_run   = (st != M_IDLE) && (st != M_FIN);
  assign to_clear = (st == M_IDLE) || (st == M_FIN);

  function automatic logic parity_bad(input logic [31:0] d, input logic p);
    return ^{d, p};   // even parity over AD and PA
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st          <= M_IDLE;
      as_o        <= 1'b0;
      ds_o        <= 1'b0;
      rd_q        <= 1'b0;
      ms_o        <= '0;
      eg_o        <= 1'b0;
      ad_q        <= '0;
      then_as_dn  <= 1'b0;
      is_addr     <= 1'b0;
      e_par       <= 1'b0;
      e_ss        <= 1'b0;
      ss_q        <= '0;
      done        <= 1'b0;
      err         <= '{cls: ERR_NONE, ss: 3'd0};
      rdata       <= '0;
      rdata_valid <= 1'b0;
      scram_drop  <= 1'b0;
    end else begin
      done        <= 1'b0;
      rdata_valid <= 1'b0;
      scram_drop  <= 1'b0;
      case (st)
        M_IDLE:
          if (start) begin
            ad_q       <= wdata;
            ms_o       <= cmd.ms;
            rd_q       <= cmd.rd && cmd.ds;
            e_par      <= 1'b0;
            e_ss       <= 1'b0;
            ss_q       <= '0;
            then_as_dn <= 1'b0;
            is_addr    <= 1'b0;
            if (!cmd.as) begin
              if (ds_o) begin
                ds_o       <= 1'b0;
                then_as_dn <= 1'b1;
                st         <= M_DK_DN;
              end else begin
                as_o <= 1'b0;
                st   <= M_AK_DN;
              end
            end else if (cmd.ds) begin
              if (cmd.ms[0]) begin
                ds_o <= ~ds_o;
                st   <= M_DK_EQ;
              end else begin
                ds_o <= 1'b1;
                st   <= M_DK_UP;
              end
            end else if (ds_o) begin
              ds_o <= 1'b0;
              st   <= M_DK_DN;
            end else if (!as_o) begin
              as_o    <= 1'b1;
              eg_o    <= cmd.eg;
              is_addr <= 1'b1;
              st      <= M_AK_UP;
            end else begin
              st <= M_FIN;
            end
          end
        M_AK_UP:
          if (to_exp) st <= M_FIN;
          else if (ak_i) begin
            if (ss_i != 3'd0) begin e_ss <= 1'b1; ss_q <= ss_i; end
            is_addr <= 1'b0;
            st      <= M_FIN;
          end
        M_AK_DN:
          if (to_exp || !ak_i) begin
            eg_o <= 1'b0;
            st   <= M_FIN;
          end
        M_DK_UP, M_DK_EQ:
          if (to_exp) st <= M_FIN;
          else if (dk_i == ds_o) begin
            if (ss_i != 3'd0) begin e_ss <= 1'b1; ss_q <= ss_i; end
            if (rd_q) begin
              rdata       <= ad_i;
              rdata_valid <= 1'b1;
              if (pe_i && parity_bad(ad_i, pa_i)) e_par <= 1'b1;
            end
            if (st == M_DK_UP) begin
              ds_o <= 1'b0;
              st   <= M_DK_DN;
            end else st <= M_FIN;
          end
        M_DK_DN:
          if (to_exp) st <= M_FIN;
          else if (!dk_i) begin
            if (then_as_dn) begin
              then_as_dn <= 1'b0;
              as_o       <= 1'b0;
              st         <= M_AK_DN;
            end else st <= M_FIN;
          end
        M_FIN: begin
          // to_exp is still visible here: the counter clears in this state.
          done <= 1'b1;
          if (to_exp)     err <= '{cls: ERR_TIMEOUT, ss: ss_q};
          else if (e_par) err <= '{cls: ERR_PARITY,  ss: ss_q};
          else if (e_ss)  err <= '{cls: ERR_SS,      ss: ss_q};
          else            err <= '{cls: ERR_NONE,    ss: 3'd0};
          if (scram_en && (to_exp || e_par || e_ss)) begin
            as_o       <= 1'b0;
            ds_o       <= 1'b0;
            eg_o       <= 1'b0;
            scram_drop <= 1'b1;
          end
          rd_q    <= 1'b0;
          is_addr <= 1'b0;
          st      <= M_IDLE;
        end
        default: st <= M_IDLE;
      endcase
    end
  end

  assign busy  = (st != M_IDLE);
  assign rd_o  = rd_q;
  // AD is driven with the address during an address cycle and with write
  // data while a write data strobe waits for its acknowledge.
  assign ad_oe = (st == M_AK_UP && is_addr) || ((st == M_DK_UP || st == M_DK_EQ) && !rd_q);
  assign ad_o  = ad_q;
  assign pa_o  = ^ad_q;
  assign pe_o  = ad_oe;

  a_no_start_busy: assert property (@(posedge clk) disable iff (!rst_n)
    start |-> st == M_IDLE);

endmodule
