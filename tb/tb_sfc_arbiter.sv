// tb_sfc_arbiter: self-checking test of the mastership logic.
// Two arbiters share wired-OR AL and GK lines; a small model of the segment's
// ancillary logic raises AG while any AR is asserted and drops it when a new
// GK appears. Random distinct levels: the higher level must win first, the
// other only after the first releases GK, and never both at once. Also checks
// host preemption, SCRAM release and the arbitration-inhibit output.
module tb_sfc_arbiter;
  logic clk = 0, rst_n = 1;
  logic [1:0] req, host, scram, ar, gk, ai, mine, took;
  logic [5:0] level [2];
  logic [5:0] al [2];
  logic ai_jumper, ag;
  logic [5:0] al_bus;
  logic gk_bus, gk_prev;
  int checks = 0, failures = 0, takes = 0;

  for (genvar k = 0; k < 2; k++) begin : g_arb
    sfc_arbiter #(.SETTLE(8)) dut (
      .clk, .rst_n, .req(req[k]), .host(host[k]), .level(level[k]), .ai_jumper,
      .scram(scram[k]), .ag_i(ag), .al_i(al_bus), .gk_i(gk_bus),
      .ar_o(ar[k]), .al_o(al[k]), .gk_o(gk[k]), .ai_o(ai[k]),
      .bus_mine(mine[k]), .took_mastership(took[k])
    );
  end

  assign al_bus = al[0] | al[1];
  assign gk_bus = |gk;
  always #5 clk = ~clk;

  // ancillary logic: AG while AR, dropped for two clocks on each new GK
  int hold;
  always @(posedge clk) begin
    gk_prev <= gk_bus;
    if (gk_bus && !gk_prev) begin ag <= 0; hold <= 2; end
    else if (hold > 0) hold <= hold - 1;
    else ag <= |ar;
    takes += took[0] + took[1];
    if (mine[0] && mine[1]) begin failures++; $display("FAIL two masters"); end
  end

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic wait_mine(input int k, output int n);
    n = 0;
    while (!mine[k] && n < 500) begin @(negedge clk); n++; end
  endtask

  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n, w, l, t0;
    req = 0; host = 0; scram = 0; ai_jumper = 1; ag = 0; hold = 0;
    level[0] = 0; level[1] = 0;
    #1 rst_n = 0; repeat (2) @(negedge clk); rst_n = 1;
    for (int trial = 0; trial < 20; trial++) begin
      level[0] = 6'($urandom);
      do level[1] = 6'($urandom); while (level[1] == level[0]);
      w = (level[0] > level[1]) ? 0 : 1; l = 1 - w;
      @(negedge clk); req = 2'b11;
      wait_mine(w, n);
      chk(mine[w] && !mine[l], $sformatf("level %h beats %h", level[w], level[l]));
      chk(ai[w] && !ai[l], "AI follows mastership with jumper");
      repeat (30) @(negedge clk);
      chk(mine[w] && !mine[l], "loser waits while GK held");
      req[w] = 0;
      wait_mine(l, n);
      chk(mine[l] && !mine[w], "loser takes bus after release");
      req[l] = 0;
      repeat (3) @(negedge clk);
      chk(!gk_bus && ar == 0, "all released");
    end
    t0 = takes;
    chk(t0 == 40, $sformatf("mastership taken %0d times", t0));
    // host preemption: GK at once, no arbitration
    @(negedge clk); host[0] = 1;
    @(negedge clk); @(negedge clk);
    chk(mine[0] && gk[0] && !ar[0], "host preempts with GK");
    // SCRAM drops GK
    scram[0] = 1; @(negedge clk); scram[0] = 0; host[0] = 0; @(negedge clk);
    chk(!gk[0] && !mine[0], "SCRAM releases GK");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
