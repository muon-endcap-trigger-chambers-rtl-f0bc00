// tb_ttc_sim: checks the internal TTC simulator at a short orbit. A
// cycle-counting monitor checks the BCR spacing (one orbit), the L1A
// spacing at several periods (including one below the shortest allowed),
// that each trigger-type strobe follows its L1A after TT_DELAY clocks with
// a value one above the last, that no L1A is sent while BUSY is high (after
// its two synchroniser clocks) and that nothing comes out while disabled
// or with a period of 0.
module tb_ttc_sim;
  import rod_pkg::*;
  localparam int ORBIT = 50, TTD = 3;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic enable, busy, bcr, l1a, tt_strobe; logic [15:0] l1a_period; logic [7:0] tt;
  ttc_sim #(.ORBIT(ORBIT), .TT_DELAY(TTD)) dut (.*);
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  // monitor
  int cyc = 0, last_bcr = -1, last_l1a = -1, n_l1a = 0, n_bcr = 0, n_tt = 0, busy_since = -1;
  int exp_gap = 0;        // expected L1A spacing, 0 = not checked
  bit quiet = 0;          // nothing may come out
  logic [7:0] last_tt; bit have_tt = 0;
  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (quiet) check(!bcr && !l1a && !tt_strobe, "quiet while disabled or period 0");
    if (bcr) begin
      if (last_bcr >= 0) check(cyc - last_bcr == ORBIT, $sformatf("BCR spacing %0d", cyc - last_bcr));
      last_bcr = cyc; n_bcr++;
    end
    if (l1a) begin
      if (exp_gap > 0 && last_l1a >= 0) check(cyc - last_l1a == exp_gap, $sformatf("L1A spacing %0d exp %0d", cyc - last_l1a, exp_gap));
      if (busy_since >= 0) check(cyc - busy_since <= 3, "no L1A while BUSY");
      last_l1a = cyc; n_l1a++;
    end
    if (tt_strobe) begin
      check(cyc - last_l1a == TTD, $sformatf("trigger type %0d clocks after L1A", cyc - last_l1a));
      if (have_tt) check(tt == last_tt + 8'd1, "trigger type counts up");
      last_tt = tt; have_tt = 1; n_tt++;
    end
  end
  initial begin
    int n0;
    enable = 0; busy = 0; l1a_period = 0;
    repeat (3) @(negedge clk); rst_n = 1;
    quiet = 1; repeat (200) @(negedge clk); quiet = 0;
    // steady triggers
    l1a_period = 17; exp_gap = 17; enable = 1;
    repeat (400) @(negedge clk);
    check(n_bcr >= 7 && n_l1a >= 20, $sformatf("BCRs %0d, L1As %0d", n_bcr, n_l1a));
    // BUSY holds triggers back
    exp_gap = 0; busy = 1; busy_since = cyc; n0 = n_l1a;
    repeat (100) @(negedge clk);
    check(n_l1a - n0 <= 1, "at most one L1A in flight when BUSY rose");
    busy = 0; busy_since = -1; n0 = n_l1a;
    repeat (60) @(negedge clk);
    check(n_l1a > n0, "L1As resume after BUSY");
    // a period below the shortest spacing
    l1a_period = 2; repeat (30) @(negedge clk); exp_gap = TTD + 1;
    repeat (200) @(negedge clk);
    // period 0 stops triggers, disabling stops everything
    exp_gap = 0; l1a_period = 0; repeat (10) @(negedge clk); n0 = n_l1a;
    repeat (100) @(negedge clk); check(n_l1a == n0, "period 0 stops L1A");
    enable = 0; repeat (2) @(negedge clk); quiet = 1; repeat (100) @(negedge clk); quiet = 0;
    check(n_tt == n_l1a, "one trigger type per L1A");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
