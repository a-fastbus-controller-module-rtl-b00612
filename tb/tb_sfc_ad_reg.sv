// tb_sfc_ad_reg: self-checking test of the 32-bit AD register.
// Writes random words as two 16-bit halves and as four bytes in both word
// orders, checks the assembled register and the half-word read-back against
// a model computed here, and checks that the parallel load wins over a write.
module tb_sfc_ad_reg;
  logic clk = 0, rst_n = 1;
  logic msb_first, wr, half, load;
  logic [1:0] be;
  logic [15:0] wdata, rdata;
  logic [31:0] load_data, q;
  int checks = 0, failures = 0;

  sfc_ad_reg dut (.*);

  always #5 clk = ~clk;

  task automatic check(input logic [31:0] got, input logic [31:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  task automatic wr16(input logic h, input logic [1:0] b, input logic [15:0] d);
    @(negedge clk); wr = 1; half = h; be = b; wdata = d;
    @(negedge clk); wr = 0;
  endtask

  initial begin
    #200000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] w;
    wr = 0; load = 0; half = 0; be = 0; wdata = 0; load_data = 0; msb_first = 0;
    #1 rst_n = 0; repeat (2) @(negedge clk); rst_n = 1;
    for (int i = 0; i < 40; i++) begin
      w = $urandom; msb_first = i[0];
      // 16-bit MPU: half 0 then half 1
      wr16(0, 2'b11, msb_first ? w[31:16] : w[15:0]);
      wr16(1, 2'b11, msb_first ? w[15:0]  : w[31:16]);
      check(q, w, "word writes");
      half = 0; #1 check({16'h0, rdata}, {16'h0, msb_first ? w[31:16] : w[15:0]}, "read half 0");
      half = 1; #1 check({16'h0, rdata}, {16'h0, msb_first ? w[15:0] : w[31:16]}, "read half 1");
      // 8-bit MPU: four bytes, even byte on [7:0], odd byte on [15:8]
      w = $urandom;
      for (int b = 0; b < 4; b++) begin
        logic [1:0] lane;
        lane = {b[1] ^ msb_first, b[0]};
        wr16(b[1], b[0] ? 2'b10 : 2'b01, b[0] ? {w[8*lane +: 8], 8'h00} : {8'h00, w[8*lane +: 8]});
      end
      check(q, w, "byte writes");
    end
    // load has priority over a simultaneous write
    @(negedge clk); load = 1; load_data = 32'hCAFE_F00D; wr = 1; be = 2'b11; wdata = 16'h1234;
    @(negedge clk); load = 0; wr = 0;
    check(q, 32'hCAFE_F00D, "load priority");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
