// tb_format_rob: fills model Hit, Tracklet and Raw CW/data FIFOs with
// random events (with and without raw data, odd and even raw counts) and
// checks every output word of format_rob against an independently built
// expected event, under random output back-pressure. Also checks ev_start.
module tb_format_rob;
  import rod_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic raw_en;
  cw_t hit_cw, tl_cw, raw_cw;
  logic hit_cw_empty, hit_cw_rd, hit_data_empty, hit_data_rd, tl_cw_empty, tl_cw_rd;
  logic tl_data_empty, tl_data_rd, raw_cw_empty, raw_cw_rd, raw_data_empty, raw_data_rd;
  logic [32:0] hit_data, tl_data, out_word;
  logic [16:0] raw_data;
  logic out_valid, out_ready, ev_start;
  evid_t ev_evid;
  format_rob dut (.*);
  cw_t hcq[$], tcq[$], rcq[$];
  logic [32:0] hdq[$], tdq[$];
  logic [16:0] rdq[$];
  logic [32:0] exp_w[$];
  evid_t exp_ev[$];
  assign hit_cw_empty = hcq.size() == 0;  assign hit_cw = hit_cw_empty ? '0 : hcq[0];
  assign tl_cw_empty  = tcq.size() == 0;  assign tl_cw  = tl_cw_empty  ? '0 : tcq[0];
  assign raw_cw_empty = rcq.size() == 0;  assign raw_cw = raw_cw_empty ? '0 : rcq[0];
  assign hit_data_empty = hdq.size() == 0; assign hit_data = hit_data_empty ? '0 : hdq[0];
  assign tl_data_empty  = tdq.size() == 0; assign tl_data  = tl_data_empty  ? '0 : tdq[0];
  assign raw_data_empty = rdq.size() == 0; assign raw_data = raw_data_empty ? '0 : rdq[0];
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask
  initial begin
    repeat (300000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  logic [5:0] pops;
  always @(posedge clk) if (rst_n) begin
    pops <= {hit_cw_rd, hit_data_rd, tl_cw_rd, tl_data_rd, raw_cw_rd, raw_data_rd};
    if (out_valid && out_ready) begin
      check(exp_w.size() > 0 && out_word == exp_w[0],
            $sformatf("word %h exp %h", out_word, exp_w.size() ? exp_w[0] : 0));
      if (exp_w.size() > 0) void'(exp_w.pop_front());
    end
    if (ev_start) begin
      check(exp_ev.size() > 0 && ev_evid == exp_ev[0], "ev_start event ID");
      if (exp_ev.size() > 0) void'(exp_ev.pop_front());
    end
  end
  always @(negedge clk) begin
    if (rst_n) begin
      if (pops[5]) void'(hcq.pop_front());
      if (pops[4]) void'(hdq.pop_front());
      if (pops[3]) void'(tcq.pop_front());
      if (pops[2]) void'(tdq.pop_front());
      if (pops[1]) void'(rcq.pop_front());
      if (pops[0]) void'(rdq.pop_front());
      pops = 0;
    end
    out_ready = $urandom_range(0, 3) != 0;
  end
  initial begin
    out_ready = 1; pops = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    for (int pass = 0; pass < 2; pass++) begin
      raw_en = pass == 1;
      for (int e = 0; e < 150; e++) begin
        cw_t hc, tc, rc; int nh, nt, nr;
        logic [7:0] err;
        hc = cw_t'({$urandom, $urandom, $urandom});
        nh = int'($urandom_range(0, 6)); nt = int'($urandom_range(0, 3));
        nr = raw_en ? int'($urandom_range(0, 7)) : 0;
        hc.count = 12'(nh);
        tc = hc; tc.count = 12'(nt); tc.err = 8'($urandom);
        rc = hc; rc.count = 12'(nr); rc.err = 8'($urandom);
        err = hc.err | tc.err | (raw_en ? rc.err : 8'h0);
        hcq.push_back(hc); tcq.push_back(tc); if (raw_en) rcq.push_back(rc);
        exp_ev.push_back(hc.evid);
        exp_w.push_back({1'b1, 32'hB0F0_0000});
        exp_w.push_back({1'b0, hc.evid.l1id});
        exp_w.push_back({1'b0, hc.evid.bcid, hc.evid.ttype, err, 4'h0});
        exp_w.push_back({1'b0, 16'(nh), 16'(nt)});
        exp_w.push_back({1'b0, 16'(nr), 16'h0});
        for (int i = 0; i < nh; i++) begin
          logic [31:0] w; w = $urandom;
          hdq.push_back({1'b0, w}); exp_w.push_back({1'b0, w});
        end
        hdq.push_back({1'b1, 32'h0});
        for (int i = 0; i < nt; i++) begin
          logic [31:0] w; w = $urandom;
          tdq.push_back({1'b0, w}); exp_w.push_back({1'b0, w});
        end
        tdq.push_back({1'b1, 32'h0});
        if (raw_en) begin
          logic [15:0] h [$];
          for (int i = 0; i < nr; i++) begin
            h.push_back(16'($urandom)); rdq.push_back({1'b0, h[i]});
          end
          rdq.push_back({1'b1, 16'h0});
          for (int i = 0; i < nr; i += 2)
            exp_w.push_back({1'b0, h[i], (i + 1 < nr) ? h[i + 1] : 16'h0});
        end
        exp_w.push_back({1'b1, 16'hE0F0, 8'h0, err});
        while (exp_ev.size() > 3) @(negedge clk);
      end
      while (exp_w.size() > 0) @(negedge clk);
      repeat (5) @(negedge clk);
    end
    check(hcq.size() == 0 && hdq.size() == 0 && rdq.size() == 0 && rcq.size() == 0,
          "all FIFOs drained");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
