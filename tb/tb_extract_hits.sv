// tb_extract_hits: random cells of both record types and events of random
// size go through extract_hits with a randomly stalling consumer. Every
// hit channel is compared with the set bits of central | previous |
// following (type 1) or central (type 2), lowest bit first; each event
// closes with an end item carrying its CW. Also checks the rate: a cell
// with k set bits takes k cycles when the consumer never stalls.
module tb_extract_hits;
  import rod_pkg::*;
  import rod_tb_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  cell_t cell_in; cw_t cw_in, hit_cw;
  logic cell_empty, cell_rd, cw_empty, cw_rd, hit_valid, hit_last, hit_ready;
  logic [14:0] hit_chan;
  extract_hits dut (.*);
  cell_t cq[$]; cw_t wq[$];
  logic [14:0] exp_h[$];
  cw_t exp_cw[$];
  int nhits = 0, nev = 0;
  bit stall_en = 1;
  assign cell_empty = cq.size() == 0;
  assign cell_in    = cell_empty ? '0 : cq[0];
  assign cw_empty   = wq.size() == 0;
  assign cw_in      = cw_empty ? '0 : wq[0];
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask
  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  bit pc = 0, pw = 0;
  always @(posedge clk) if (rst_n) begin
    pc <= cell_rd; pw <= cw_rd;
    if (hit_valid && hit_ready) begin
      if (hit_last) begin
        check(exp_h.size() == 0 || exp_h[0] === 15'h7FFF, "end item after all hits");
        check(exp_cw.size() > 0 && hit_cw == exp_cw[0], "CW passed on");
        if (exp_cw.size() > 0) void'(exp_cw.pop_front());
        if (exp_h.size() > 0) void'(exp_h.pop_front());
        nev++;
      end else begin
        check(exp_h.size() > 0 && hit_chan == exp_h[0], $sformatf("hit %h", hit_chan));
        if (exp_h.size() > 0) void'(exp_h.pop_front());
        nhits++;
      end
    end
  end
  always @(negedge clk) begin
    if (pc) void'(cq.pop_front());
    if (pw) void'(wq.pop_front());
    pc = 0; pw = 0;
    hit_ready = !stall_en || $urandom_range(0, 3) != 0;
  end
  initial begin
    hit_ready = 1;
    repeat (3) @(posedge clk); rst_n = 1;
    for (int e = 0; e < 300; e++) begin
      cw_t cw;
      int n;
      n = int'($urandom_range(0, 6));
      for (int i = 0; i < n; i++) begin
        cell_t c;
        c = cell_t'({$urandom, $urandom});
        c.last = 0;
        cq.push_back(c);
        cell_hits(c, exp_h);
      end
      exp_h.push_back(15'h7FFF);     // marks where the end item belongs
      cq.push_back('{last: 1'b1, default: '0});
      cw = cw_t'({$urandom, $urandom, $urandom});
      wq.push_back(cw); exp_cw.push_back(cw);
      while (cq.size() > 20) @(negedge clk);
    end
    while (cq.size() > 0 || exp_cw.size() > 0) @(negedge clk);
    check(nev == 300 && exp_h.size() == 0, "all events out");
    // rate: one hit per cycle without stalls
    stall_en = 0;
    repeat (3) @(negedge clk);
    begin
      cell_t c; int t0, t1;
      c = '{last: 1'b0, link: 2'd1, sb: 5'd3, caddr: 5'd4, bc3: 1'b0, bm_c: 8'hFF,
            bm_p: 8'h0, bm_n: 8'h0};
      cq.push_back(c); cell_hits(c, exp_h);
      exp_h.push_back(15'h7FFF);
      cq.push_back('{last: 1'b1, default: '0});
      wq.push_back('0); exp_cw.push_back('0);
      t0 = nhits;
      repeat (10) @(negedge clk);
      check(nhits - t0 == 8, "eight hits");
      check(exp_cw.size() == 0, "end item within 10 cycles: one hit per cycle");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
