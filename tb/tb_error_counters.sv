// tb_error_counters: random increment pulses, a clear, and saturation of a
// narrow counter, checked against a model.
module tb_error_counters;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [3:0] inc;
  logic clear;
  logic [3:0] cnt [4];
  int m [4];
  error_counters #(.N(4), .W(4)) dut (.*);
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask
  initial begin
    repeat (10000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    inc = 0; clear = 0;
    for (int i = 0; i < 4; i++) m[i] = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    @(negedge clk);
    for (int n = 0; n < 2000; n++) begin
      // counter 0 is hit often and must saturate at 15
      inc = {1'($urandom_range(0, 3) == 0), 1'($urandom_range(0, 5) == 0),
             1'($urandom_range(0, 1)), 1'($urandom_range(0, 1))};
      clear = $urandom_range(0, 199) == 0;
      @(negedge clk);
      for (int i = 0; i < 4; i++) begin
        if (clear) m[i] = 0;
        else if (inc[i] && m[i] < 15) m[i]++;
        check(int'(cnt[i]) == m[i], $sformatf("counter %0d: %0d exp %0d", i, cnt[i], m[i]));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
