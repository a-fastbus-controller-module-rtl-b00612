// sfc_intr: interrupt logic of the FASTBUS controller.
//
// Two interrupt outputs go to the MPU over MULTIBUS:
//   BERR   raised when a master primitive ends in error (non-zero SS, parity
//          error, timeout); it is set together with the cycle's XACK* and held
//          until software clears it (any write to the error register).
//   GINTR  the OR of an incoming service request (SR), having taken
//          mastership, and being selected as a slave, all enabled together by
//          one control bit. SR and "selected" are levels; "took mastership" is
//          an event, kept in a sticky flag until software writes a 1 to its
//          bit of the interrupt register.
// Outputs are registered (one clock after the source). The sources, the OR and
// the single enable follow the document; the sticky flag, the clearing method
// and active-high outputs are this design's choices (MULTIBUS interrupt lines
// are active low and open collector on the board).
module sfc_intr (
  input  logic clk,
  input  logic rst_n,
  input  logic berr_set,
  input  logic berr_clr,
  input  logic sr_i,
  input  logic took_mastership,
  input  logic mast_clr,
  input  logic selected,
  input  logic gint_en,
  output logic berr_irq,
  output logic mast_flag,
  output logic gintr_irq
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      berr_irq  <= 1'b0;
      mast_flag <= 1'b0;
      gintr_irq <= 1'b0;
    end else begin
      if (berr_set)      berr_irq <= 1'b1;
      else if (berr_clr) berr_irq <= 1'b0;
      if (took_mastership) mast_flag <= 1'b1;
      else if (mast_clr)   mast_flag <= 1'b0;
      gintr_irq <= gint_en && (sr_i || mast_flag || selected);
    end
  end

endmodule
