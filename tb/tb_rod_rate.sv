// tb_rod_rate: the ROD FPGA at its default sizes under the event rate of
// the TGC readout, to show it keeps up.
//
// Workload: L1As at 100 kHz (one every 400 bunch clocks at 40 MHz). For
// every L1A each of the four links sends a type-2 record of two Slave
// Boards with up to one cell each: about 20 bytes and under one hit per
// link, the size of the busiest front-end link type of an octant. Raw data
// go to the output as well. A second phase sends the same records at four
// times the rate (400 kHz), with triggers held while BUSY is high.
// Clocks: bunch clock 40 MHz, links 50 MHz, core 100 MHz, S-link 62.5 MHz,
// local bus 33 MHz. The link senders leave one slot in four empty.
// Checked: one output event per L1A, in order (L1ID in the header), with no
// error bit in its trailer; no BUSY at 100 kHz; no dropped event; all error
// counters 0. Reported: output words, BUSY cycles and the longest time from
// L1A to the event's trailer on the S-link.
module tb_rod_rate;
  import rod_pkg::*;
  import rod_tb_pkg::*;
  int checks = 0, failures = 0;
  logic rst_n = 0, clk_ttc = 0, clk_link = 0, clk = 0, clk_slink = 0, clk_lb = 0;
  always #12.5 clk_ttc = ~clk_ttc;
  always #10   clk_link = ~clk_link;
  always #5    clk = ~clk;
  always #8    clk_slink = ~clk_slink;
  always #15   clk_lb = ~clk_lb;

  logic bcr, ecr, ocr, l1a, tt_strobe, busy;
  logic [7:0] tt;
  logic [N_LINKS-1:0] fe_valid;
  link_word_t fe_word [N_LINKS];
  logic lut_cs, lut_we; logic [18:0] lut_addr; logic [35:0] lut_wdata, lut_rdata;
  logic lff, xon, xoff, uwen, uctrl; logic [31:0] ud;
  logic lb_cs, lb_wr, lb_ack; logic [20:0] lb_addr; logic [31:0] lb_wdata, lb_rdata;
  logic [15:0] la_out;

  rod_top dut (.*);
  lut_sram_model #(.AW(19), .DW(36)) sram (.clk, .cs(lut_cs), .we(lut_we), .addr(lut_addr),
    .wdata(lut_wdata), .rdata(lut_rdata));

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask
  initial begin
    repeat (3000000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic lb(input bit w, input int a, input logic [15:0] d, output logic [15:0] q);
    @(negedge clk_lb);
    lb_cs = 1; lb_wr = w; lb_addr = 21'(a); lb_wdata = 32'(d);
    do @(posedge clk_lb); while (!lb_ack);
    #1 q = lb_rdata[15:0];
    @(negedge clk_lb); lb_cs = 0;
  endtask
  task automatic lbw(input int a, input logic [15:0] d);
    logic [15:0] q; lb(1, a, d, q);
  endtask
  task automatic lbr(input int a, output logic [15:0] q);
    lb(0, a, 16'h0, q);
  endtask

  // link senders
  lw_q_t lq [N_LINKS];
  for (genvar l = 0; l < N_LINKS; l++) begin : g_send
    always @(negedge clk_link) begin
      if (lq[l].size() > 0 && $urandom_range(0, 3) != 0) begin
        fe_valid[l] <= 1; fe_word[l] <= lq[l].pop_front();
      end else fe_valid[l] <= 0;
    end
  end

  // bunch counter as the ROD counts it
  int tb_bc = 0;
  always @(posedge clk_ttc) if (rst_n) tb_bc = bcr ? 0 : (tb_bc + 1) % 4096;

  // S-link receiver: events in order, no errors, latency from the L1A
  realtime l1a_time[$];
  int n_ev = 0, n_words = 0, wi = 0, n_bytes = 0;
  realtime max_lat = 0;
  always @(posedge clk_slink) if (rst_n && uwen) begin
    n_words++;
    if (uctrl && ud[31:16] == 16'hB0F0) wi = 0; else wi++;
    if (wi == 1) check(ud[23:0] == 24'(n_ev), $sformatf("event %0d in order (L1ID %0d)", n_ev, ud[23:0]));
    if (uctrl && ud[31:16] == 16'hE0F0) begin
      check(ud[7:0] == 8'h0, $sformatf("event %0d trailer without errors: %h", n_ev, ud[7:0]));
      if (l1a_time.size() > 0) begin
        realtime lat; lat = $realtime - l1a_time.pop_front();
        if (lat > max_lat) max_lat = lat;
      end
      n_ev++;
    end
  end
  int n_busy_cyc = 0;
  always @(posedge clk) if (rst_n && busy) n_busy_cyc++;

  // one L1A with its records, period in bunch clocks; triggers held while BUSY
  int n_l1a = 0, n_held = 0;
  task automatic trigger(input int period);
    logic [11:0] bc; logic [3:0] l1;
    repeat (period - 6) @(negedge clk_ttc);
    while (busy) begin n_held++; @(negedge clk_ttc); end
    bc = 12'(tb_bc); l1 = 4'(n_l1a);
    l1a = 1; l1a_time.push_back($realtime); @(negedge clk_ttc); l1a = 0;
    repeat (3) @(negedge clk_ttc);
    tt = 8'(n_l1a); tt_strobe = 1; @(negedge clk_ttc); tt_strobe = 0;
    for (int l = 0; l < N_LINKS; l++) begin
      byte_q_t b; cell_q_t c; lw_q_t h;
      make_record(2, 5, bc, l1, 24'hFFFFFF, l, 2, 1, b, c);
      n_bytes += b.size();
      h = to_halfwords(b);
      foreach (h[i]) lq[l].push_back(h[i]);
    end
    n_l1a++;
  endtask

  initial begin
    logic [15:0] q;
    int busy1;
    {bcr, ecr, ocr, l1a, tt_strobe} = '0; tt = 0;
    fe_valid = '0;
    for (int l = 0; l < N_LINKS; l++) fe_word[l] = '0;
    lff = 0; xon = 0; xoff = 0; lb_cs = 0; lb_wr = 0; lb_addr = 0; lb_wdata = 0;
    #100 rst_n = 1;
    repeat (5) @(posedge clk_lb);
    lbw(1, 16'h001F);                 // four links, raw data in the output
    @(negedge clk_ttc); bcr = 1; @(negedge clk_ttc); bcr = 0;
    // 100 kHz
    for (int e = 0; e < 400; e++) trigger(400);
    while (n_ev < n_l1a) @(posedge clk_slink);
    busy1 = n_busy_cyc;
    check(busy1 == 0, $sformatf("no BUSY at 100 kHz (%0d cycles)", busy1));
    $display("100 kHz: %0d events, %0d bytes per link and event, %0d S-link words, longest L1A-to-trailer %0.1f us",
             n_ev, n_bytes / (n_l1a * N_LINKS), n_words, max_lat / 1000.0);
    // 400 kHz
    for (int e = 0; e < 400; e++) trigger(100);
    while (n_ev < n_l1a) @(posedge clk_slink);
    $display("400 kHz: %0d events in all, BUSY cycles %0d, triggers held %0d bunch clocks, longest L1A-to-trailer %0.1f us",
             n_ev, n_busy_cyc - busy1, n_held, max_lat / 1000.0);
    repeat (50) @(posedge clk);
    check(n_ev == n_l1a, $sformatf("events out %0d of %0d", n_ev, n_l1a));
    for (int k = 0; k < N_ERR; k++) begin lbr(32 + k, q); check(q == 16'd0, $sformatf("error counter %0d = %0d", k, q)); end
    for (int l = 0; l < N_LINKS; l++) begin lbr(60 + l, q); check(q == 16'd0, "no dropped event"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
