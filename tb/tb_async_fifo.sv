// tb_async_fifo: streams random words through async_fifo between two
// unrelated clocks with random push/pop gaps, and checks order, no loss,
// no duplication and that full/empty stop the ends.
module tb_async_fifo;
  int checks = 0, failures = 0;
  logic wclk = 0, rclk = 0, wrst_n = 0, rrst_n = 0;
  always #5 wclk = ~wclk;
  always #7 rclk = ~rclk;
  logic wr_en, rd_en, full, empty;
  logic [15:0] wr_data, rd_data;
  logic [3:0] wlevel, rlevel;
  logic [15:0] model[$];
  int sent = 0, got = 0;

  async_fifo #(.WIDTH(16), .AW(3)) dut (.*);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (50000) @(posedge wclk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    wr_en = 0; wr_data = 0;
    repeat (3) @(posedge wclk); wrst_n = 1; rrst_n = 1;
    @(negedge wclk);
    while (sent < 2000) begin
      wr_en = ($urandom_range(0, 3) != 0) && !full;
      wr_data = 16'($urandom);
      @(posedge wclk);
      if (wr_en) begin model.push_back(wr_data); sent++; end
      @(negedge wclk);
      wr_en = 0;
      check(int'(wlevel) <= 8, "wlevel in range");
    end
  end

  bit saw_full = 0;
  always @(posedge wclk) if (full) saw_full = 1;

  initial begin
    rd_en = 0;
    @(posedge rrst_n);
    @(negedge rclk);
    while (got < 2000) begin
      // slow reader in the first half lets the FIFO fill
      rd_en = !empty && ($urandom_range(0, (got < 1000) ? 4 : 1) == 0);
      if (rd_en) check(model.size() > 0 && rd_data == model[0],
                       $sformatf("word %0d: %h", got, rd_data));
      @(posedge rclk);
      if (rd_en) begin void'(model.pop_front()); got++; end
      @(negedge rclk);
      rd_en = 0;
    end
    repeat (10) @(posedge rclk);
    check(empty && model.size() == 0, "all words delivered");
    check(saw_full, "full was reached");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
