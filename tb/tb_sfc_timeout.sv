// tb_sfc_timeout: self-checking test of the master timeout counter.
// Checks that expiry comes exactly LIMIT counting clocks after run rises,
// that WT holds the count, and that clear restarts it.
module tb_sfc_timeout;
  localparam int LIMIT = 20;
  logic clk = 0, rst_n = 1, clear, run, wt, expired;
  int checks = 0, failures = 0;

  sfc_timeout #(.LIMIT(LIMIT)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %0b expected %0b", what, got, exp); end
  endtask

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n, holds;
    clear = 1; run = 0; wt = 0;
    #1 rst_n = 0; repeat (2) @(negedge clk); rst_n = 1;
    for (int trial = 0; trial < 6; trial++) begin
      @(negedge clk); clear = 0; run = 1;
      n = 0; holds = 0;
      while (!expired && n < 200) begin
        wt = (trial >= 3) && ($urandom % 3 == 0);
        if (wt) holds++;
        @(negedge clk); n++;
      end
      // expiry after LIMIT counting clocks plus the clocks WT held it
      checks++;
      if (n != LIMIT + holds) begin failures++; $display("FAIL trial %0d: expired after %0d clocks, expected %0d", trial, n, LIMIT + holds); end
      wt = 0;
      repeat (3) @(negedge clk);
      check(expired, 1'b1, "stays expired");
      clear = 1; @(negedge clk);
      check(expired, 1'b0, "clear");
      run = 0;
    end
    // no counting without run
    clear = 0; repeat (LIMIT + 5) @(negedge clk);
    check(expired, 1'b0, "idle without run");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
