// sfc_fb_slave: FASTBUS slave handshake support of the controller.
//
// The controller emulates a slave in software; this block does the parts that
// must be fast. On the rising edge of AS it recognises its address
// (sfc_addr_match):
//   geographic     AK at once, SS = 0
//   logical        WT at once; AK is held back until software, having checked
//                  the internal address, issues a pseudo-DK command, which
//                  drops WT, sets SS and lets AK go up
//   broadcast      selected without AK or DK of its own (the segment's
//                  ancillary logic acknowledges broadcasts)
// Once selected, each data strobe (DS rising for random cycles, MS0 = 0; each
// DS edge for block transfers, MS0 = 1) latches AD and RD, asserts WT and sets
// "command ready" for software. The software pseudo-DK command clears WT, puts
// its SS code on the bus and brings DK to the level of DS, so software never
// has to track DK through a block transfer; on a random cycle DK follows DS
// down by itself. In a broadcast the command clears WT and sets SS but gives
// no DK. Reads put the data-out register on AD while DK answers the strobe.
// With auto_slave set, data strobes get DK at once with SS = 0 and no WT
// (logical-address WT is still produced). Sparse data scan and SR scan
// broadcast reads are answered in hardware by pulling AD[slot] when the
// sparse-data or SR flag is set. After a pattern-select broadcast the first
// data write selects this slave if its AD[slot] bit is set. AS falling
// deselects and clears everything.
//
// Follows the document: WT on logical address, WT on DS up / each DS edge,
// DK toggling, software pseudo-DK with SS, broadcast DK suppression,
// automatic slave, supported address kinds. This design's own: the bit-per-slot
// form of the scans and of pattern select, hardware answers to scans, and
// the synchronous (clocked) edge detection of AS and DS.
module sfc_fb_slave
  import sfc_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // FASTBUS lines received
  input  logic        as_i,
  input  logic        ds_i,
  input  logic        rd_i,
  input  logic [1:0]  ms_i,
  input  logic        eg_i,
  input  logic [31:0] ad_i,
  input  logic [4:0]  ga,           // geographic (slot) address pins
  // configuration
  input  logic [31:0] log_addr,
  input  logic [2:0]  ia_code,
  input  logic        auto_slave,
  input  logic        sd_flag,
  input  logic        sr_flag,
  input  logic [31:0] dout,
  // software pseudo-DK
  input  logic        dk_cmd,
  input  logic [2:0]  dk_ss,
  // FASTBUS lines driven
  output logic        ak_o,
  output logic        dk_o,
  output logic        wt_o,
  output logic [2:0]  ss_o,
  output logic [31:0] ad_o,
  output logic        ad_oe,
  output logic        pa_o,
  output logic        pe_o,
  // status for software
  output logic        selected,
  output logic        cmd_ready,
  output logic        addr_pend,
  output logic        rd_q,
  output logic [1:0]  ms_q,
  output logic        bcast_q,
  output logic [31:0] din
);

  logic        geo_hit, log_hit, bcast;
  bcast_e      bcase, bcase_q;
  logic [31:0] ia_mask;
  logic        as_prev, ds_prev, pat_pend, resp, scan_drv;
  logic [2:0]  ss_q;
  logic        as_rise, ds_rise, ds_fall, ds_event;

  sfc_addr_match u_match (
    .ad(ad_i), .ms(ms_i), .eg(eg_i), .ga, .log_addr, .ia_code,
    .geo_hit, .log_hit, .bcast, .bcase, .ia_mask
  );

  assign as_rise  = as_i && !as_prev;
  assign ds_rise  = ds_i && !ds_prev;
  assign ds_fall  = !ds_i && ds_prev;
  assign ds_event = ms_i[0] ? (ds_rise || ds_fall) : ds_rise;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      as_prev   <= 1'b0;
      ds_prev   <= 1'b0;
      selected  <= 1'b0;
      bcast_q   <= 1'b0;
      bcase_q   <= BC_GENERAL;
      pat_pend  <= 1'b0;
      ak_o      <= 1'b0;
      dk_o      <= 1'b0;
      wt_o      <= 1'b0;
      ss_q      <= '0;
      cmd_ready <= 1'b0;
      addr_pend <= 1'b0;
      resp      <= 1'b0;
      scan_drv  <= 1'b0;
      rd_q      <= 1'b0;
      ms_q      <= '0;
      din       <= '0;
    end else begin
      as_prev <= as_i;
      ds_prev <= ds_i;
      if (!as_i) begin
        selected  <= 1'b0;
        bcast_q   <= 1'b0;
        pat_pend  <= 1'b0;
        ak_o      <= 1'b0;
        dk_o      <= 1'b0;
        wt_o      <= 1'b0;
        cmd_ready <= 1'b0;
        addr_pend <= 1'b0;
        resp      <= 1'b0;
        scan_drv  <= 1'b0;
      end else if (as_rise) begin
        ss_q <= '0;
        ms_q <= ms_i;
        if (geo_hit) begin
          selected <= 1'b1;
          ak_o     <= 1'b1;
          din      <= ad_i;
        end else if (log_hit) begin
          selected  <= 1'b1;
          wt_o      <= 1'b1;
          addr_pend <= 1'b1;
          cmd_ready <= 1'b1;
          din       <= ad_i;
        end else if (bcast) begin
          bcast_q  <= 1'b1;
          bcase_q  <= bcase;
          din      <= ad_i;
          if (bcase == BC_PATTERN) pat_pend <= 1'b1;
          else                     selected <= 1'b1;
        end
      end else begin
        if (ds_event) begin
          resp     <= 1'b0;
          scan_drv <= 1'b0;
          if (pat_pend && !rd_i) begin
            pat_pend <= 1'b0;
            selected <= ad_i[ga];
          end else if (selected && bcast_q &&
                       (bcase_q == BC_SPARSE || bcase_q == BC_SRSCAN)) begin
            rd_q     <= rd_i;
            scan_drv <= rd_i && ((bcase_q == BC_SPARSE) ? sd_flag : sr_flag);
          end else if (selected && !addr_pend) begin
            rd_q <= rd_i;
            ms_q <= ms_i;
            if (!rd_i) din <= ad_i;
            if (auto_slave) begin
              ss_q <= '0;
              if (!bcast_q) begin
                dk_o <= ds_i;
                resp <= rd_i;
              end
            end else begin
              wt_o      <= 1'b1;
              cmd_ready <= 1'b1;
            end
          end
        end else if (ds_fall && !ms_i[0]) begin
          // end of a random data cycle: DK follows DS down by itself
          dk_o     <= 1'b0;
          resp     <= 1'b0;
          scan_drv <= 1'b0;
        end
        if (dk_cmd && cmd_ready) begin
          wt_o      <= 1'b0;
          cmd_ready <= 1'b0;
          ss_q      <= dk_ss;
          if (addr_pend) begin
            addr_pend <= 1'b0;
            ak_o      <= 1'b1;
          end else if (!bcast_q) begin
            dk_o <= ds_i;
            resp <= rd_q;
          end
        end
      end
    end
  end

  assign ss_o  = (ak_o || dk_o) ? ss_q : 3'd0;
  assign ad_oe = (resp && !bcast_q) || scan_drv;
  assign ad_o  = scan_drv ? (32'd1 << ga) : dout;
  assign pa_o  = ^ad_o;
  assign pe_o  = ad_oe;

  // A software pseudo-DK only makes sense while a command waits for it.
  a_dk_when_ready: assert property (@(posedge clk) disable iff (!rst_n)
    (dk_cmd && selected) |-> cmd_ready);

endmodule
