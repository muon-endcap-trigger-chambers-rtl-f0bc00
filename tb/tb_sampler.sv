// tb_sampler: checks that sampler copies exactly every (prescale+1)-th
// transfer, skips samples while the monitor FIFO is full and counts them.
module tb_sampler;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic enable, in_fire, mon_wr, mon_full;
  logic [15:0] prescale, missed;
  logic [31:0] in_data, mon_data;
  sampler #(.W(32)) dut (.*);
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  int k, nmiss;
  initial begin
    enable = 0; in_fire = 0; mon_full = 0; prescale = 0; in_data = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    for (int p = 0; p < 4; p++) begin
      prescale = 16'(p); enable = 1; k = 0;
      rst_n = 0; @(negedge clk); rst_n = 1; nmiss = 0;
      for (int n = 0; n < 1000; n++) begin
        in_fire = $urandom_range(0, 1);
        in_data = 32'($urandom);
        mon_full = $urandom_range(0, 9) == 0;
        #1;
        if (in_fire) begin
          check(mon_wr == (k == p && !mon_full), $sformatf("sample p=%0d k=%0d", p, k));
          if (mon_wr) check(mon_data == in_data, "sample data");
          if (k == p && mon_full) nmiss++;
          k = (k == p) ? 0 : k + 1;
        end else check(!mon_wr, "no sample without transfer");
        @(negedge clk);
      end
      check(int'(missed) == nmiss, "missed count");
    end
    enable = 0; in_fire = 1; mon_full = 0; #1;
    check(!mon_wr, "disabled");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
