// tb_lb_bridge: a local-bus master on a slow clock writes and reads random
// addresses through lb_bridge into a model register file on the core
// clock. Checks read-back data in the Data reg, exactly one ILB cycle per
// access, the 16-bit data and 6-bit address mapping, and round-trip time.
module tb_lb_bridge;
  int checks = 0, failures = 0;
  logic lb_clk = 0, clk = 0, lb_rst_n = 0, rst_n = 0;
  always #13 lb_clk = ~lb_clk;
  always #5 clk = ~clk;
  logic lb_cs, lb_wr, lb_ack, ilb_wr, ilb_rd;
  logic [20:0] lb_addr; logic [31:0] lb_wdata, lb_rdata;
  logic [5:0] ilb_addr; logic [15:0] ilb_wdata, ilb_rdata;
  lb_bridge dut (.*);
  logic [15:0] regs [64];
  logic [15:0] model [64];
  int ncyc = 0;
  assign ilb_rdata = regs[ilb_addr];
  always @(posedge clk) begin
    if (rst_n && ilb_wr) regs[ilb_addr] <= ilb_wdata;
    if (rst_n && (ilb_wr || ilb_rd)) ncyc++;
  end
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask
  initial begin
    repeat (100000) @(posedge lb_clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  task automatic access(input bit w, input logic [5:0] a, input logic [31:0] d, output logic [31:0] q);
    int t;
    @(negedge lb_clk);
    lb_cs = 1; lb_wr = w; lb_addr = {15'($urandom), a}; lb_wdata = d;
    t = 0;
    do begin @(posedge lb_clk); t++; end while (!lb_ack);
    check(t <= 10, $sformatf("round trip %0d cycles", t));
    #1 q = lb_rdata;
    @(negedge lb_clk); lb_cs = 0;
  endtask
  initial begin
    logic [31:0] q; int n;
    for (int i = 0; i < 64; i++) begin regs[i] = 16'(i); model[i] = 16'(i); end
    lb_cs = 0; lb_wr = 0; lb_addr = 0; lb_wdata = 0;
    repeat (3) @(posedge lb_clk); lb_rst_n = 1; rst_n = 1;
    n = 0;
    for (int k = 0; k < 400; k++) begin
      logic [5:0] a; logic [31:0] d;
      a = 6'($urandom); d = $urandom;
      if ($urandom_range(0, 1)) begin
        access(1, a, d, q); model[a] = d[15:0];
      end else begin
        access(0, a, d, q);
        check(q == {16'h0, model[a]}, $sformatf("read %0d: %h exp %h", a, q, model[a]));
      end
      n++;
      check(ncyc == n, "one ILB cycle per access");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
