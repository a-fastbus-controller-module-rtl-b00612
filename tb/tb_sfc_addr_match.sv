// tb_sfc_addr_match: self-checking test of slave address recognition.
// Random addresses against an independent model: geographic match on
// EG and AD[4:0], logical match of the bits above the IA width for each of
// the six widths, broadcast on MS1 with the case in AD[1:0].
module tb_sfc_addr_match;
  import sfc_pkg::*;
  logic [31:0] ad, log_addr, ia_mask;
  logic [1:0] ms;
  logic eg, geo_hit, log_hit, bcast;
  logic [4:0] ga;
  logic [2:0] ia_code;
  bcast_e bcase;
  int checks = 0, failures = 0;
  int widths[6] = '{8, 13, 18, 23, 28, 32};

  sfc_addr_match dut (.*);

  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic e_geo, e_log, e_bc;
    logic [31:0] hi;
    for (int i = 0; i < 3000; i++) begin
      ia_code = 3'($urandom % 6);
      log_addr = $urandom; ga = 5'($urandom);
      eg = ($urandom % 3 == 0); ms = 2'($urandom);
      case ($urandom % 3)
        0: ad = $urandom;
        1: ad = log_addr ^ (32'($urandom) & ((widths[ia_code] == 32) ? 32'hFFFF_FFFF : ((32'd1 << widths[ia_code]) - 1)));
        default: ad = {27'($urandom), ga};
      endcase
      if ($urandom % 4 == 0) ad = log_addr ^ (32'd1 << ($urandom % 32));
      #1;
      hi = (widths[ia_code] == 32) ? 32'h0 : ~((32'd1 << widths[ia_code]) - 1);
      e_geo = eg && ad[4:0] == ga;
      e_log = !eg && !ms[1] && ((ad & hi) == (log_addr & hi));
      e_bc  = !eg && ms[1];
      checks += 3;
      if (geo_hit !== e_geo) begin failures++; $display("FAIL geo %h", ad); end
      if (log_hit !== e_log) begin failures++; $display("FAIL log ad=%h la=%h code=%0d", ad, log_addr, ia_code); end
      if (bcast !== e_bc)    begin failures++; $display("FAIL bcast"); end
      if (e_bc) begin
        checks++;
        if (bcase !== bcast_e'(ad[1:0])) begin failures++; $display("FAIL bcase"); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
