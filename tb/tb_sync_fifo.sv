// tb_sync_fifo: checks order, full/empty, count and simultaneous
// push/pop of sync_fifo against a queue model, with random traffic.
module tb_sync_fifo;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic wr_en, rd_en, full, empty;
  logic [15:0] wr_data, rd_data;
  logic [4:0] count;
  logic [15:0] model[$];

  sync_fifo #(.WIDTH(16), .DEPTH(16)) dut (.*);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    wr_en = 0; rd_en = 0; wr_data = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check(empty && !full && count == 0, "empty after reset");
    // fill completely
    for (int i = 0; i < 16; i++) begin
      wr_en = 1; wr_data = 16'(i * 7 + 1);
      @(posedge clk); model.push_back(wr_data); @(negedge clk);
    end
    wr_en = 0;
    check(full && count == 16, "full after 16 pushes");
    for (int n = 0; n < 3000; n++) begin
      logic w, r;
      w = ($urandom_range(0, 2) != 0) && !full;
      r = ($urandom_range(0, 2) != 0) && !empty;
      if (r) check(rd_data == model[0], $sformatf("data %h exp %h", rd_data, model[0]));
      wr_en = w; rd_en = r; wr_data = 16'($urandom);
      @(posedge clk);
      if (r) void'(model.pop_front());
      if (w) model.push_back(wr_data);
      @(negedge clk);
      wr_en = 0; rd_en = 0;
      check(int'(count) == model.size(), "count");
      check(empty == (model.size() == 0) && full == (model.size() == 16), "flags");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
