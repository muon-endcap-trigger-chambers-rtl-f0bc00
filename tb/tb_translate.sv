// tb_translate: hit streams go through translate, which reads the LUT
// SRAM model through lut_arb (a second requester competes for the bus).
// Each connected channel must give the LUT word of its address, in order;
// unconnected channels (LUT bit 35 clear) are dropped; each event ends
// with an end mark and a CW whose count is the number of words written.
// The Hit data FIFO randomly reports full. The hit limit is lowered to
// MAXH: later connected hits of an event are dropped and its CW gets the
// truncation bit.
module tb_translate;
  import rod_pkg::*;
  int checks = 0, failures = 0, n_trunc = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic hit_valid, hit_last, hit_ready;
  logic [14:0] hit_chan;
  cw_t hit_cw, cw_wdata;
  logic lut_req, lut_gnt, lut_rvalid, data_wr, data_full, cw_wr, cw_full;
  logic [18:0] lut_addr;
  logic [35:0] lut_rdata;
  logic [32:0] data_wdata;
  localparam int MAXH = 8;   // small hit limit so that some events are cut
  translate #(.MAX_HITS(MAXH)) dut (.*);

  // LUT bus: translate on port 0, a random competitor on port 1
  logic [1:0] req, we, gnt, rvalid;
  logic [18:0] addr [2];
  logic [35:0] wdata [2];
  logic cs, swe; logic [18:0] saddr; logic [35:0] swdata, srdata;
  assign req = {$urandom_range(0, 1) == 1'b1, lut_req};
  assign we = 2'b00;
  assign addr[0] = lut_addr; assign addr[1] = 19'h7_0000;
  assign wdata[0] = '0; assign wdata[1] = '0;
  assign lut_gnt = gnt[0]; assign lut_rvalid = rvalid[0];
  lut_arb #(.N(2), .AW(19), .DW(36)) arb (.clk, .rst_n, .req, .we, .addr, .wdata, .gnt,
    .rvalid, .rdata(lut_rdata), .lut_cs(cs), .lut_we(swe), .lut_addr(saddr),
    .lut_wdata(swdata), .lut_rdata(srdata));
  lut_sram_model #(.AW(19), .DW(36)) sram (.clk, .cs, .we(swe), .addr(saddr),
    .wdata(swdata), .rdata(srdata));

  typedef struct { bit last; logic [14:0] ch; cw_t cw; } item_t;
  item_t in_q[$];
  logic [32:0] exp_d[$];
  cw_t exp_cw[$];
  assign hit_valid = in_q.size() > 0;
  assign hit_last  = hit_valid && in_q[0].last;
  assign hit_chan  = hit_valid ? in_q[0].ch : '0;
  assign hit_cw    = hit_valid ? in_q[0].cw : '0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask
  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  bit pop = 0;
  always @(posedge clk) if (rst_n) begin
    pop <= hit_valid && hit_ready;
    if (data_wr) begin
      check(!data_full, "write while full");
      check(exp_d.size() > 0 && data_wdata == exp_d[0], $sformatf("hit word %h", data_wdata));
      if (exp_d.size() > 0) void'(exp_d.pop_front());
    end
    if (cw_wr) begin
      check(exp_cw.size() > 0 && cw_wdata == exp_cw[0], "hit CW");
      if (exp_cw.size() > 0) void'(exp_cw.pop_front());
    end
  end
  always @(negedge clk) begin
    if (pop) void'(in_q.pop_front());
    pop = 0;
    data_full = $urandom_range(0, 4) == 0;
    cw_full   = $urandom_range(0, 9) == 0;
  end
  initial begin
    data_full = 0; cw_full = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    for (int e = 0; e < 200; e++) begin
      cw_t cw; int n, k; bit tr;
      n = int'($urandom_range(0, 12)); k = 0; tr = 0;
      for (int i = 0; i < n; i++) begin
        logic [14:0] ch; logic [35:0] w;
        ch = 15'($urandom);
        in_q.push_back('{last: 0, ch: ch, cw: '0});
        w = sram.fill_word(19'(ch));
        if (w[35] && k < MAXH) begin exp_d.push_back({1'b0, w[31:0]}); k++; end
        else if (w[35]) tr = 1;
      end
      cw = cw_t'({$urandom, $urandom, $urandom});
      in_q.push_back('{last: 1, ch: '0, cw: cw});
      exp_d.push_back({1'b1, 32'h0});
      cw.count = 12'(k);
      if (tr) begin cw.err[E_TRUNC] = 1'b1; n_trunc++; end
      exp_cw.push_back(cw);
      while (in_q.size() > 10) @(negedge clk);
    end
    while (exp_cw.size() > 0) @(negedge clk);
    check(exp_d.size() == 0, "all words written");
    check(n_trunc > 0, "some events reached the hit limit");
    $display("events cut at the hit limit: %0d", n_trunc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
