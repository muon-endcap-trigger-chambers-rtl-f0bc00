// tb_slink_control: words from a queue-modelled output FIFO must reach the
// S-link pins in order, with nothing written while LFF is set or between
// an XOFF and the next XON.
module tb_slink_control;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [32:0] fifo_data;
  logic fifo_empty, fifo_rd, lff, xon, xoff, uwen, uctrl, stopped;
  logic [31:0] ud, words;
  logic [15:0] xoffs;
  logic [32:0] q[$], exp_q[$];
  slink_control dut (.*);
  assign fifo_empty = q.size() == 0;
  assign fifo_data  = fifo_empty ? '0 : q[0];
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask
  initial begin
    repeat (50000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  bit lff_d, stop_m, allowed = 0, st_r = 0;
  int nx;
  always @(posedge clk) if (rst_n && fifo_rd) void'(q.pop_front());
  always @(posedge clk) if (rst_n) begin
    if (uwen) begin
      check(exp_q.size() > 0 && {uctrl, ud} == exp_q[0], "word order");
      check(allowed, "no write while full or stopped");
      if (exp_q.size() > 0) void'(exp_q.pop_front());
    end
    allowed <= !lff && !st_r;
    if (xoff) st_r <= 1; else if (xon) st_r <= 0;
  end
  initial begin
    lff = 0; xon = 0; xoff = 0; stop_m = 0; nx = 0; lff_d = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      logic [32:0] w;
      w = {1'($urandom_range(0, 9) == 0), 32'($urandom)};
      q.push_back(w); exp_q.push_back(w);
    end
    while (exp_q.size() > 0) begin
      @(negedge clk);
      lff  = $urandom_range(0, 4) == 0;
      xoff = $urandom_range(0, 49) == 0;
      xon  = !xoff && $urandom_range(0, 9) == 0;
      @(posedge clk);
      #1;
      if (xoff && !stop_m) nx++;
      // model of the stop state seen by the word issued in the next cycle
      if (xoff) stop_m = 1; else if (xon) stop_m = 0;
    end
    check(words == 32'd3000, "word count");
    check(int'(xoffs) == nx && nx > 0, "xoff count");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
