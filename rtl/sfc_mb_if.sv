// sfc_mb_if: IEEE 796 (MULTIBUS) I/O slave port of the FASTBUS controller.
//
// The controller answers I/O reads (IORC*) and writes (IOWC*) whose address
// bits [15:8] equal the jumpered base, giving it a 256-byte window. The
// MULTIBUS is asynchronous: the command strobes are brought into the clock
// domain through two flip-flops, and address, data and BHEN* are sampled once
// the synchronised strobe is seen (MULTIBUS holds them stable while the strobe
// is active). The transfer is handed to the core as one mb_req_t with a
// one-clock req_valid; the core answers with a one-clock core_done, possibly
// many cycles later (the MPU waits for a FASTBUS acknowledge). XACK* is then
// asserted, with read data on the bus, until the MPU removes its strobe.
//
// Byte lanes follow IEEE 796: A0=0 with BHEN* asserted is a 16-bit transfer;
// A0=0 alone is the even byte on D7-D0; A0=1 with BHEN* is the odd byte on
// D15-D8; A0=1 without BHEN* is the odd byte swapped onto D7-D0 for 8-bit
// masters. The core always sees the even byte in [7:0] and the odd in [15:8].
//
// The document asks only that the controller be a standard 796 I/O slave
// (D16, I16) that holds XACK* until the FASTBUS cycle ends; the synchroniser,
// the base-compare and the handshake state machine are this design's own.
// Latency: request two to three clocks after the strobe falls, XACK* one clock
// after core_done, released one clock after the strobe rises (synchronised).
module sfc_mb_if
  import sfc_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic [7:0]  io_base,      // jumpers: I/O address bits [15:8]
  input  logic [15:0] mb_adr,
  input  logic        mb_iorc_n,
  input  logic        mb_iowc_n,
  input  logic        mb_bhen_n,
  input  logic [15:0] mb_dat_i,
  output logic [15:0] mb_dat_o,
  output logic        mb_dat_oe,
  output logic        mb_xack_n,
  output logic        req_valid,
  output mb_req_t     req,
  input  logic        core_done,
  input  logic [15:0] core_rdata
);

  typedef enum logic [1:0] {S_IDLE, S_WAIT, S_ACK} st_e;
  st_e st;

  logic [1:0] rc_sync, wc_sync;
  logic       rd_act, wr_act;
  logic       swap_q;                 // odd byte on D7-D0 (8-bit master)
  logic       is_read_q;
  logic [15:0] rdata_q;

  assign rd_act = ~rc_sync[1];
  assign wr_act = ~wc_sync[1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rc_sync <= 2'b11;
      wc_sync <= 2'b11;
    end else begin
      rc_sync <= {rc_sync[0], mb_iorc_n};
      wc_sync <= {wc_sync[0], mb_iowc_n};
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st        <= S_IDLE;
      req_valid <= 1'b0;
      req       <= '0;
      swap_q    <= 1'b0;
      is_read_q <= 1'b0;
      rdata_q   <= '0;
    end else begin
      req_valid <= 1'b0;
      case (st)
        S_IDLE:
          if ((rd_act ^ wr_act) && mb_adr[15:8] == io_base) begin
            req.write <= wr_act;
            req.hadr  <= mb_adr[7:1];
            is_read_q <= rd_act;
            swap_q    <= mb_adr[0] & mb_bhen_n;
            if (!mb_adr[0] && !mb_bhen_n) begin
              req.be    <= 2'b11;
              req.wdata <= mb_dat_i;
            end else if (!mb_adr[0]) begin
              req.be    <= 2'b01;
              req.wdata <= {8'h00, mb_dat_i[7:0]};
            end else if (!mb_bhen_n) begin
              req.be    <= 2'b10;
              req.wdata <= {mb_dat_i[15:8], 8'h00};
            end else begin
              req.be    <= 2'b10;
              req.wdata <= {mb_dat_i[7:0], 8'h00};
            end
            req_valid <= 1'b1;
            st        <= S_WAIT;
          end
        S_WAIT:
          if (core_done) begin
            rdata_q <= swap_q ? {8'h00, core_rdata[15:8]} : core_rdata;
            st      <= S_ACK;
          end
        S_ACK:
          if (!rd_act && !wr_act) st <= S_IDLE;
        default: st <= S_IDLE;
      endcase
    end
  end

  assign mb_xack_n = (st != S_ACK);
  assign mb_dat_oe = (st == S_ACK) && is_read_q;
  assign mb_dat_o  = rdata_q;

  // The core may only answer a request that is outstanding.
  a_done_in_wait: assert property (@(posedge clk) disable iff (!rst_n)
    core_done |-> st == S_WAIT);

endmodule
