// sfc_ad_reg: 32-bit register filled and read 8 or 16 bits at a time from
// MULTIBUS, with a jumper for the order of the two 16-bit halves.
//
// The controller's AD register holds the 32 FASTBUS AD lines: a 16-bit MPU
// moves them in two MULTIBUS cycles, an 8-bit MPU in four. The msb_first
// jumper chooses whether the half-word at the lower I/O address is AD[31:16]
// (68000 order) or AD[15:0] (16032/8086 order); inside a half-word the even
// address is the low byte. A parallel load port writes all 32 bits at once
// (FASTBUS read data) and has priority over a MULTIBUS write in the same clock.
// The same block serves for the other 32-bit registers reached over MULTIBUS
// (logical address, slave data out).
//
// Interface: wr with half/be/wdata writes bytes at the next clock edge;
// rdata is the addressed half-word, combinational from half. q is the whole
// register. The word-order jumper follows the document; the half/byte mapping
// inside a half-word is this design's choice.
module sfc_ad_reg
  import sfc_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        msb_first,   // jumper: lower address carries AD[31:16]
  input  logic        wr,
  input  logic        half,        // longword byte offset bit 1
  input  logic [1:0]  be,
  input  logic [15:0] wdata,
  input  logic        load,
  input  logic [31:0] load_data,
  output logic [15:0] rdata,
  output logic [31:0] q
);

  logic hi;   // addressed half is AD[31:16]
  assign hi = half ^ msb_first;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) q <= '0;
    else if (load) q <= load_data;
    else if (wr) begin
      if (be[0]) begin
        if (hi) q[23:16] <= wdata[7:0];
        else    q[7:0]   <= wdata[7:0];
      end
      if (be[1]) begin
        if (hi) q[31:24] <= wdata[15:8];
        else    q[15:8]  <= wdata[15:8];
      end
    end
  end

  assign rdata = hi ? q[31:16] : q[15:0];

endmodule
