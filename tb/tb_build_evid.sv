// tb_build_evid: feeds EVID and trigger-type queues that fill at different
// times into build_evid with a randomly stalling consumer, and checks that
// each event ID comes out once, in order, paired with its trigger type.
module tb_build_evid;
  import rod_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [43:0] evid_fifo_data;
  logic evid_fifo_empty, evid_fifo_rd, tt_fifo_empty, tt_fifo_rd, evid_valid, evid_ready;
  logic [7:0] tt_fifo_data;
  evid_t evid;
  logic [43:0] eq[$];
  logic [7:0]  tq[$];
  build_evid dut (.*);
  assign evid_fifo_empty = eq.size() == 0;
  assign tt_fifo_empty   = tq.size() == 0;
  assign evid_fifo_data  = evid_fifo_empty ? '0 : eq[0];
  assign tt_fifo_data    = tt_fifo_empty ? '0 : tq[0];

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  int got = 0;
  bit pop_e = 0, pop_t = 0;
  always @(posedge clk) if (rst_n) begin
    if (evid_valid && evid_ready) begin
      check(evid.l1id == 32'(got * 3) && evid.bcid == 12'(got * 5) && evid.ttype == 8'(got + 1),
            $sformatf("event %0d", got));
      got++;
    end
    pop_e <= evid_fifo_rd;
    pop_t <= tt_fifo_rd;
    if (evid_fifo_rd != tt_fifo_rd) check(0, "pops together");
  end
  // the model FIFOs are popped away from the clock edge the DUT samples
  always @(negedge clk) begin
    if (pop_e) void'(eq.pop_front());
    if (pop_t) void'(tq.pop_front());
    pop_e <= 0; pop_t <= 0;
  end

  initial begin
    evid_ready = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    fork
      for (int i = 0; i < 500; i++) begin
        @(negedge clk); eq.push_back({32'(i * 3), 12'(i * 5)});
        repeat ($urandom_range(0, 3)) @(negedge clk);
      end
      for (int i = 0; i < 500; i++) begin
        repeat ($urandom_range(0, 4)) @(negedge clk);
        @(negedge clk); tq.push_back(8'(i + 1));
      end
      while (got < 500) begin
        @(negedge clk); evid_ready = $urandom_range(0, 2) != 0;
      end
    join
    check(got == 500, "all events delivered");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
