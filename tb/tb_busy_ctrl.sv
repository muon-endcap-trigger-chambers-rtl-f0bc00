// tb_busy_ctrl: moves occupancies up and down and checks BUSY against a
// hysteresis model (set at any high mark, clear when all at low marks),
// including force_busy and the busy cycle count.
module tb_busy_ctrl;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [9:0] level [3], hi [3], lo [3];
  logic force_busy, busy;
  logic [31:0] busy_cycles;
  busy_ctrl #(.N(3), .W(10)) dut (.*);
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  bit st, exp_busy, prev = 0;
  int nb, rises;
  initial begin
    for (int i = 0; i < 3; i++) begin level[i] = 0; hi[i] = 10'(100 + 50 * i); lo[i] = 10'(20 + 10 * i); end
    force_busy = 0; st = 0; nb = 0; rises = 0; exp_busy = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    @(negedge clk);
    for (int n = 0; n < 5000; n++) begin
      bit any_hi, all_lo;
      for (int i = 0; i < 3; i++) begin
        int v;
        v = int'(level[i]) + int'($urandom_range(0, 8)) - ((n % 1000) < 500 ? 2 : 6);
        level[i] = 10'((v < 0) ? 0 : (v > 300 ? 300 : v));
      end
      force_busy = (n > 4000 && n < 4050);
      any_hi = 0; all_lo = 1;
      for (int i = 0; i < 3; i++) begin
        if (level[i] >= hi[i]) any_hi = 1;
        if (level[i] > lo[i]) all_lo = 0;
      end
      @(negedge clk);
      if (exp_busy) nb++;
      exp_busy = force_busy || any_hi || (st && !all_lo);
      if (any_hi) st = 1; else if (all_lo) st = 0;
      if (busy && !prev) rises++;
      prev = busy;
      check(busy == exp_busy, $sformatf("busy at %0d", n));
    end
    check(busy_cycles == 32'(nb + (exp_busy ? 0 : 0)) || busy_cycles == 32'(nb), "busy cycles");
    check(rises > 0, "BUSY was raised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
