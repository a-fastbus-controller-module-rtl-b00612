// sfc_addr_match: FASTBUS slave address recognition of the controller.
//
// Looks at the AD, MS and EG lines of an address cycle and says whether and how
// this module is addressed. It is purely combinational; the slave samples its
// outputs on the rising edge of AS.
//
//   geographic  EG asserted and AD[4:0] equal to the slot's geographic address
//   logical     EG clear, MS1 clear, and the AD bits above the internal address
//               equal the same bits of the logical-address CSR. The internal
//               address (IA) is the low 8, 13, 18, 23, 28 or 32 bits (ia_code
//               0..5); with 32 the whole address is internal and every logical
//               address is in range
//   broadcast   EG clear and MS1 set; the case (general, pattern select, sparse
//               data scan, SR scan) is read from AD[1:0]
//
// The three address modes, the broadcast cases and the IA widths come from the
// document; the placement of the broadcast case in AD[1:0] and of the
// geographic address in AD[4:0] are this design's choices.
module sfc_addr_match
  import sfc_pkg::*;
(
  input  logic [31:0] ad,
  input  logic [1:0]  ms,
  input  logic        eg,
  input  logic [4:0]  ga,
  input  logic [31:0] log_addr,
  input  logic [2:0]  ia_code,
  output logic        geo_hit,
  output logic        log_hit,
  output logic        bcast,
  output bcast_e      bcase,
  output logic [31:0] ia_mask    // ones over the internal-address bits
);

  always_comb begin
    int unsigned n;
    n = ia_bits(ia_code);
    ia_mask = (n >= 32) ? 32'hFFFF_FFFF : ((32'd1 << n) - 32'd1);
  end

  assign geo_hit = eg && (ad[4:0] == ga);
  assign log_hit = !eg && !ms[1] && (((ad ^ log_addr) & ~ia_mask) == 32'd0);
  assign bcast   = !eg && ms[1];
  assign bcase   = bcast_e'(ad[1:0]);

endmodule
