// tb_extract_tracklets: loads a small cell-to-road table into the LUT SRAM
// model (Slave Board s is layer s, cell address r is road r, odd roads are
// doublet pairs needing 3 of 4 layers, even roads triplets needing 2 of 3,
// road 7 unused), sends random events and checks the tracklet words, the
// end marks, the CW counts and the monitor copy against a model of the
// coincidence rule. Also checks that roads are cleared between events.
module tb_extract_tracklets;
  import rod_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  cell_t cell_in; cw_t cw_in, cw_wdata;
  logic cell_empty, cell_rd, cw_empty, cw_rd, lut_req, lut_gnt, lut_rvalid;
  logic data_wr, data_full, cw_wr, cw_full, tlet_fire;
  logic [18:0] lut_addr; logic [35:0] lut_rdata; logic [32:0] data_wdata; logic [31:0] tlet_word;
  extract_tracklets #(.ROADS(16)) dut (.*);

  logic [1:0] req, we, gnt, rvalid;
  logic [18:0] addr [2]; logic [35:0] wdata [2];
  logic cs, swe; logic [18:0] saddr; logic [35:0] swdata, srdata;
  logic ld_req; logic [18:0] ld_addr; logic [35:0] ld_data;
  assign req = {ld_req, lut_req}; assign we = 2'b10;
  assign addr[0] = lut_addr; assign addr[1] = ld_addr;
  assign wdata[0] = '0; assign wdata[1] = ld_data;
  assign lut_gnt = gnt[0]; assign lut_rvalid = rvalid[0];
  lut_arb #(.N(2), .AW(19), .DW(36)) arb (.clk, .rst_n, .req, .we, .addr, .wdata, .gnt,
    .rvalid, .rdata(lut_rdata), .lut_cs(cs), .lut_we(swe), .lut_addr(saddr),
    .lut_wdata(swdata), .lut_rdata(srdata));
  lut_sram_model #(.AW(19), .DW(36)) sram (.clk, .cs, .we(swe), .addr(saddr),
    .wdata(swdata), .rdata(srdata));

  cell_t cq[$]; cw_t wq[$];
  logic [32:0] exp_d[$]; cw_t exp_cw[$];
  int ntl = 0;
  assign cell_empty = cq.size() == 0;
  assign cell_in    = cell_empty ? '0 : cq[0];
  assign cw_empty   = wq.size() == 0;
  assign cw_in      = cw_empty ? '0 : wq[0];
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask
  initial begin
    repeat (300000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  bit pc = 0, pw = 0;
  always @(posedge clk) if (rst_n) begin
    pc <= cell_rd; pw <= cw_rd;
    if (data_wr) begin
      check(exp_d.size() > 0 && data_wdata == exp_d[0],
            $sformatf("tracklet %h exp %h", data_wdata, exp_d.size() ? exp_d[0] : 0));
      if (exp_d.size() > 0) void'(exp_d.pop_front());
      if (!data_wdata[32]) begin
        check(tlet_fire && tlet_word == data_wdata[31:0], "monitor copy");
        ntl++;
      end
    end else check(!tlet_fire, "no monitor copy without write");
    if (cw_wr) begin
      check(exp_cw.size() > 0 && cw_wdata == exp_cw[0], "tracklet CW");
      if (exp_cw.size() > 0) void'(exp_cw.pop_front());
    end
  end
  always @(negedge clk) begin
    if (pc) void'(cq.pop_front());
    if (pw) void'(wq.pop_front());
    pc = 0; pw = 0;
    data_full = $urandom_range(0, 4) == 0;
    cw_full   = $urandom_range(0, 9) == 0;
  end
  initial begin
    ld_req = 0; ld_addr = 0; ld_data = 0; data_full = 0; cw_full = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    // load the table while no cells flow
    for (int s = 0; s < 4; s++)
      for (int r = 0; r < 8; r++) begin
        @(negedge clk);
        ld_req = 1;
        ld_addr = 19'({1'b1, 6'b0, 2'b00, 5'(s), 5'(r)});
        ld_data = {r != 7, 1'(r % 2), 2'(s), 24'h0, 8'(r)};
        do @(posedge clk); while (!gnt[1]);
        @(negedge clk); ld_req = 0;
      end
    for (int e = 0; e < 300; e++) begin
      logic [3:0] mask [8];
      cw_t cw; int k;
      for (int r = 0; r < 8; r++) mask[r] = 0;
      for (int i = 0; i < int'($urandom_range(0, 14)); i++) begin
        cell_t c;
        c = '0;
        c.sb = 5'($urandom_range(0, 3)); c.caddr = 5'($urandom_range(0, 7));
        c.bm_c = 8'h1;
        cq.push_back(c);
        if (c.caddr != 7) mask[c.caddr][c.sb[1:0]] = 1;
      end
      cq.push_back('{last: 1'b1, default: '0});
      k = 0;
      for (int r = 0; r < 8; r++) begin
        int n;
        n = $countones(mask[r]);
        if ((r % 2 == 1) ? n >= 3 : n >= 2) begin
          exp_d.push_back({1'b0, 19'b0, 1'(r % 2), mask[r], 8'(r)});
          k++;
        end
      end
      exp_d.push_back({1'b1, 32'h0});
      cw = cw_t'({$urandom, $urandom, $urandom});
      wq.push_back(cw);
      cw.count = 12'(k);
      exp_cw.push_back(cw);
      while (exp_cw.size() > 2) @(negedge clk);
    end
    while (exp_cw.size() > 0) @(negedge clk);
    check(exp_d.size() == 0 && ntl > 50, $sformatf("all tracklets out (%0d)", ntl));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
