// tb_gate_keeper: sends framed records (from rod_tb_pkg) into gate_keeper
// with a small model FIFO pair behind it, and checks the data half-words,
// end marks and CWs; then a record longer than the data FIFO (truncation),
// records arriving while the CW FIFO is full (drop), a bad error field, a
// re-sync in mid-record and test data through the input mux.
module tb_gate_keeper;
  import rod_pkg::*;
  import rod_tb_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic fe_valid, test_mode, test_valid, test_ready, resync_tgl, data_wr, cw_wr, ena;
  link_word_t fe_word, test_word;
  logic [16:0] data_wdata;
  logic [6:0] data_level;   // DATA_AW = 6: 64 places
  logic [2:0] cw_level;     // CW_AW = 2: 4 places
  ev_cw_t cw_wdata;
  logic [15:0] dropped;
  gate_keeper #(.DATA_AW(6), .CW_AW(2)) dut (.*);

  logic [16:0] dq[$];
  ev_cw_t      cq[$];
  assign data_level = 7'(dq.size());
  assign cw_level   = 3'(cq.size());
  always @(posedge clk) begin
    if (rst_n && data_wr) begin check(dq.size() < 64, "data FIFO overflow"); dq.push_back(data_wdata); end
    if (rst_n && cw_wr)   begin check(cq.size() < 4, "CW FIFO overflow");    cq.push_back(cw_wdata); end
  end

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask
  initial begin
    repeat (50000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic send(input lw_q_t q, input bit use_test = 0);
    foreach (q[i]) begin
      @(negedge clk);
      if (use_test) begin test_valid = 1; test_word = q[i]; end
      else begin fe_valid = 1; fe_word = q[i]; end
      @(negedge clk);
      fe_valid = 0; test_valid = 0;
    end
  endtask

  // drain and compare one event: n data half-words, then end mark, then CW
  task automatic expect_event(input lw_q_t q, input int n, input bit trunc, input bit lerr);
    repeat (4) @(negedge clk);
    for (int i = 0; i < n; i++) begin
      check(dq.size() > 0 && dq[0] == {1'b0, q[i + 2].data}, $sformatf("halfword %0d", i));
      if (dq.size() > 0) void'(dq.pop_front());
    end
    check(dq.size() > 0 && dq[0] == {1'b1, 16'h0}, $sformatf("end mark n=%0d left=%0d %h", n, dq.size(), dq.size() ? dq[0] : 0));
    if (dq.size() > 0) void'(dq.pop_front());
    check(cq.size() > 0 && cq[0].words == 12'(n) && cq[0].trunc == trunc && cq[0].linkerr == lerr,
          "event CW");
    if (cq.size() > 0) void'(cq.pop_front());
  endtask

  initial begin
    byte_q_t b; cell_q_t c; lw_q_t q;
    fe_valid = 0; test_mode = 0; test_valid = 0; resync_tgl = 0;
    fe_word = '0; test_word = '0;
    repeat (3) @(posedge clk); rst_n = 1;
    // normal records of both types
    for (int k = 0; k < 6; k++) begin
      make_record(1 + k % 2, 3, 12'h123, 4'h5, 24'hFFFFFF, 0, 2, 3, b, c);
      q = to_halfwords(b);
      send(q);
      expect_event(q, q.size() - 4, 0, 0);
    end
    // longer than the data FIFO: truncated to 63 half-words + end mark
    make_record(1, 3, 12'h123, 4'h5, 24'hFFFFFF, 0, 12, 6, b, c);
    q = to_halfwords(b);
    check(q.size() - 4 > 63, "long record");
    send(q);
    expect_event(q, 63, 1, 0);
    // four short records fill the CW FIFO; the fifth is dropped
    make_record(2, 1, 12'h001, 4'h1, 24'hFFFFFF, 0, 1, 0, b, c);
    q = to_halfwords(b);
    for (int k = 0; k < 5; k++) send(q);
    repeat (4) @(negedge clk);
    check(cq.size() == 4 && dropped == 16'd1, "fifth record dropped");
    for (int k = 0; k < 4; k++) expect_event(q, q.size() - 4, 0, 0);
    // non-zero error field in the end word
    q[q.size() - 1].data = 16'h0002;
    send(q);
    expect_event(q, q.size() - 4, 0, 1);
    // re-sync in mid-record closes the event as faulty
    q = to_halfwords(b);
    for (int i = 0; i < 5; i++) begin
      @(negedge clk); fe_valid = 1; fe_word = q[i]; @(negedge clk); fe_valid = 0;
    end
    resync_tgl = 1;
    repeat (6) @(negedge clk);
    expect_event(q, 3, 0, 1);
    for (int i = 5; i < q.size(); i++) begin       // rest of it is ignored
      @(negedge clk); fe_valid = 1; fe_word = q[i]; @(negedge clk); fe_valid = 0;
    end
    repeat (4) @(negedge clk);
    check(dq.size() == 0 && cq.size() == 0, "ignored after re-sync");
    // test data through the mux, while the link carries garbage
    test_mode = 1;
    check(test_ready, "test ready");
    fork
      send(q, 1);
      repeat (20) begin @(negedge clk); fe_valid = 1; fe_word = '{ctrl: 1'b1, data: BOF_HI}; end
    join
    fe_valid = 0;
    expect_event(q, q.size() - 4, 0, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
