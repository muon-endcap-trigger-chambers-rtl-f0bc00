// tb_rod_top: end-to-end test of the ROD FPGA at its default (full-size)
// parameters; the top is instantiated without overrides.
//
// Five unrelated clocks drive the five domains. Software's part is played
// over the board local bus: it enables raw data, hit, tracklet and event
// sampling, loads a cell-to-road table into the LUT (the rest of the LUT
// reads as the model SRAM's formula) and lowers the BUSY marks. A TTC model
// sends BCRs, one ECR, L1As (held while BUSY is high, as the trigger system
// does) and trigger types; for every L1A each of the four links sends a
// random record (rod_tb_pkg) with the BCID and L1ID the ROD should have
// counted. Every S-link word is compared with an event built independently
// from the records: header, translated hits, tracklets by the coincidence
// rule, raw data, trailer with the expected error bits.
// Mechanisms made to happen, and counted in the closing report:
//   BUSY and held triggers; XOFF and LFF stalls; ECR; record types 1 and 2;
//   tracklets; raw data; a BCID, an L1ID, a missing-board and a link-flag
//   error; a link time-out (link 3 silent); one event sent as local-bus test
//   data; a broken record closed by a re-sync; sampling by prescale, by
//   BCID and by trigger type (event monitor drained over the bus); hit and
//   tracklet monitors; output test words; an event built from a test event
//   ID and link test data alone; events from the internal TTC simulator
//   (links disabled, so the events are empty); the logic-analyser pins;
//   error counters read and cleared;
//   an 800-halfword record that overfills its link FIFO while the output is
//   stopped (that event is checked only for its truncation flag, because
//   where it is cut depends on timing).
module tb_rod_top;
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
    repeat (2000000) @(posedge clk);
    failures++; $display("watchdog expired: exp %0d lq %0d %0d %0d %0d ev %0d stopped %0d busy %0d", exp_w.size(), lq[0].size(), lq[1].size(), lq[2].size(), lq[3].size(), n_ev, dut.sl_stopped, busy); $display("gk0 st %0d trunc %0d drop %0d; parse st %0d ps %0d link %0d; dlev %0d %0d %0d %0d cwlev %0d %0d %0d %0d", dut.g_link[0].u_gk.st, dut.g_link[0].u_gk.trunc, dut.dropped[0], dut.u_parse.st, dut.u_parse.ps, dut.u_parse.link, dut.data_rlevel[0], dut.data_rlevel[1], dut.data_rlevel[2], dut.data_rlevel[3], dut.cw_rlevel[0], dut.cw_rlevel[1], dut.cw_rlevel[2], dut.cw_rlevel[3]); $display("fmt %0d tr %0d tl %0d hcell %0d tcell %0d hcw %0d tcw %0d out_empty %0d", dut.u_format.st, dut.u_translate.st, dut.u_tlets.st, dut.u_hcell.count, dut.u_tcell.count, dut.u_hcw.count, dut.u_tcw.count, dut.out_empty);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // ---------------- local bus master
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

  // wait until the link senders are empty and the link receivers have caught up
  task automatic wait_idle();
    do @(negedge clk_link); while (lq[0].size() + lq[1].size() + lq[2].size() + lq[3].size() > 0);
    repeat (200) @(negedge clk_link);
  endtask

  // read the event monitor until empty; count events, and those with the selected BCID / type
  task automatic mon_drain(output int nev, output int nb, output int nt);
    logic [15:0] lo, hi, c, em;
    int wi;
    nev = 0; nb = 0; nt = 0; wi = 0;
    forever begin
      lbr(31, em);
      if (em[2]) break;
      lbr(28, lo); lbr(29, hi); lbr(30, c);
      if (c[0] && hi == 16'hB0F0) begin nev++; wi = 0; end
      else wi++;
      if (wi == 2) begin
        if (hi[15:4] == SEL_BCID) nb++;
        if ({hi[3:0], lo[15:12]} == SEL_TT) nt++;
      end
    end
  endtask

  // a record from all 18 Slave Boards with all 21 cells hit, three bitmaps each
  function automatic void long_record(input logic [11:0] bcid, input logic [3:0] l1id, output byte_q_t b);
    b = {};
    b.push_back({3'd1, 5'd1}); b.push_back(8'h05);
    b.push_back(8'hFF); b.push_back(8'hFF); b.push_back(8'hFF);
    for (int sb = 0; sb <= MAX_SB; sb++) begin
      b.push_back(8'(sb)); b.push_back(bcid[11:4]); b.push_back({bcid[3:0], l1id});
      for (int ca = 0; ca <= MAX_CELL; ca++) begin
        b.push_back(8'(ca)); b.push_back(8'($urandom_range(1, 255)));
        b.push_back(8'($urandom)); b.push_back(8'($urandom));
      end
      b.push_back(EOSB);
    end
    while (b.size() % 4 != 0) b.push_back(PAD);
    b.push_back(EOE[31:24]); b.push_back(EOE[23:16]); b.push_back(EOE[15:8]); b.push_back(EOE[7:0]);
  endfunction

  // ---------------- LUT reference: loaded table or the SRAM formula
  logic [35:0] lut_ref [logic [18:0]];
  function automatic logic [35:0] lut_word(input logic [18:0] a);
    return lut_ref.exists(a) ? lut_ref[a] : sram.fill_word(a);
  endfunction

  // ---------------- expected S-link words
  logic [33:0] exp_w[$];   // [33]: skip a truncated event up to its trailer
  int n_ev = 0, n_words = 0, n_tlets = 0, n_type1 = 0, n_type2 = 0, n_raw = 0;
  int n_lff_stall = 0, n_xoff_stall = 0, n_busy = 0, n_held = 0;
  int n_ecr = 0, n_timeout = 0, n_test_hw = 0, n_resync = 0, n_out_test = 0, n_long_hw = 0, n_evid_test = 0, nev_mon, n_sel_bcid, n_sel_tt;
  logic [15:0] ctrl = 16'h039F;
  localparam logic [11:0] SEL_BCID = 12'h123;
  localparam logic [7:0]  SEL_TT   = 8'h5A;   // random trigger types never have bit 3 set

  function automatic void expect_event(input evid_t ev, input logic [7:0] err,
                                       input cell_q_t cells, input byte_q_t raw);
    logic [31:0] hits[$], tls[$];
    logic [3:0] mask [64];
    bit k34 [64];
    logic [14:0] ch[$];
    for (int r = 0; r < 64; r++) begin mask[r] = 0; k34[r] = 0; end
    foreach (cells[i]) begin
      logic [35:0] w;
      ch = {};
      cell_hits(cells[i], ch);
      foreach (ch[j]) begin
        w = lut_word(19'(ch[j]));
        if (w[35]) hits.push_back(w[31:0]);
      end
      w = lut_word(19'({1'b1, 6'b0, cells[i].link, cells[i].sb, cells[i].caddr}));
      if (w[35] && w[7:0] < 64) begin
        mask[w[5:0]][w[33:32]] = 1;
        k34[w[5:0]] = w[34];
      end
    end
    for (int r = 0; r < 64; r++)
      if ($countones(mask[r]) >= (k34[r] ? 3 : 2)) tls.push_back({19'b0, k34[r], mask[r], 8'(r)});
    n_tlets += tls.size();
    exp_w.push_back({2'b01, 32'hB0F0_0000});
    exp_w.push_back({2'b00, ev.l1id});
    exp_w.push_back({2'b00, ev.bcid, ev.ttype, err, 4'h0});
    exp_w.push_back({2'b00, 16'(hits.size()), 16'(tls.size())});
    exp_w.push_back({2'b00, 16'(raw.size() / 2), 16'h0});
    foreach (hits[i]) exp_w.push_back({2'b00, hits[i]});
    foreach (tls[i])  exp_w.push_back({2'b00, tls[i]});
    for (int i = 0; i < raw.size(); i += 4)
      exp_w.push_back({2'b00, raw[i], raw[i+1], (i + 2 < raw.size()) ? {raw[i+2], raw[i+3]} : 16'h0});
    exp_w.push_back({2'b01, 16'hE0F0, 8'h0, err});
  endfunction

  // ---------------- front-end link senders
  lw_q_t lq [N_LINKS];
  for (genvar l = 0; l < N_LINKS; l++) begin : g_send
    always @(negedge clk_link) begin
      if (lq[l].size() > 0 && $urandom_range(0, 3) != 0) begin
        fe_valid[l] <= 1; fe_word[l] <= lq[l].pop_front();
      end else fe_valid[l] <= 0;
    end
  end

  // ---------------- TTC model: BCID as the ROD should count it
  int tb_bc = 0;
  logic [11:0] l1a_bcid;
  always @(posedge clk_ttc) if (rst_n) begin
    if (l1a || (rst_n && dut.s_l1a)) l1a_bcid = 12'(tb_bc);
    tb_bc = (bcr || (rst_n && dut.s_bcr)) ? 0 : (tb_bc + 1) % 4096;
  end
  // events from the internal TTC simulator: the expected ID is taken from
  // its L1A and trigger-type outputs (its timing has its own testbench)
  logic [31:0] sim_l1id;
  int n_sim_l1a = 0, n_sim_bcr = 0;
  always @(posedge clk_ttc) if (rst_n) begin
    if (dut.s_bcr) n_sim_bcr++;
    if (dut.s_tt_strobe) begin
      evid_t ev; cell_q_t no_cells; byte_q_t no_raw;
      no_cells = {}; no_raw = {};
      ev.l1id = sim_l1id; ev.bcid = l1a_bcid; ev.ttype = dut.s_tt;
      expect_event(ev, 8'h0, no_cells, no_raw);
      sim_l1id++; n_sim_l1a++;
    end
  end

  // ---------------- S-link receiver
  int xoff_left = 0;
  always @(posedge clk_slink) if (rst_n) begin
    if (uwen && exp_w.size() > 0 && exp_w[0][33]) begin
      // truncated event: its length depends on timing; the trailer must say so
      n_words++;
      if (uctrl && ud[31:16] == 16'hE0F0) begin
        check(ud[E_TRUNC] == 1'b1, "truncated event flagged in the trailer");
        void'(exp_w.pop_front());
        n_ev++;
      end
    end else if (uwen) begin
      check(exp_w.size() > 0 && {uctrl, ud} == exp_w[0][32:0],
            $sformatf("S-link word %0d (event %0d): %h exp %h", n_words, n_ev, {uctrl, ud}, (exp_w.size() > 0) ? exp_w[0] : 34'h0));
      if (exp_w.size() > 0) void'(exp_w.pop_front());
      n_words++;
      if (uctrl && ud[31:16] == 16'hE0F0) n_ev++;
    end
    if (lff && !dut.out_empty) n_lff_stall++;
    if (dut.sl_stopped && !dut.out_empty) n_xoff_stall++;
  end
  always @(posedge clk) if (busy) n_busy++;

  initial begin
    logic [15:0] q;
    int nevents;
    nevents = 60;
    {bcr, ecr, ocr, l1a, tt_strobe} = '0; tt = 0;
    fe_valid = '0;
    for (int l = 0; l < N_LINKS; l++) fe_word[l] = '0;
    lff = 0; xon = 0; xoff = 0; lb_cs = 0; lb_wr = 0; lb_addr = 0; lb_wdata = 0;
    #100 rst_n = 1;
    repeat (5) @(posedge clk_lb);
    // configuration: raw data on, all sampling on, event sampling every 4th
    lbw(1, ctrl);
    lbw(6, 16'd3);
    lbw(4, 16'h0003);          // Slave Boards 0 and 1 must answer
    lbw(20, 16'd24); lbw(21, 16'd4);   // low BUSY marks so BUSY is seen
    lbr(1, q); check(q == 16'h039F, "control register");
    // cell-to-road table for link 0: Slave Board s is layer s, cell r is road r
    lbw(11, 16'h0000); lbw(12, 16'h0004);
    for (int s = 0; s < 4; s++)
      for (int r = 0; r < 8; r++) begin
        logic [18:0] a; logic [35:0] w;
        a = 19'({1'b1, 6'b0, 2'b00, 5'(s), 5'(r)});
        w = {1'b1, 1'(r % 2), 2'(s), 24'h0, 8'(r + 8)};
        lbw(11, a[15:0]); lbw(12, 16'(a[18:16]));
        lbw(13, w[15:0]); lbw(14, w[31:16]); lbw(15, 16'(w[35:32]));
        lut_ref[a] = w;
      end
    // TTC: first BCR
    @(negedge clk_ttc); bcr = 1; @(negedge clk_ttc); bcr = 0;
    fork
      // S-link receiver behaviour
      begin
        repeat (3000) begin @(negedge clk_slink); lff = $urandom_range(0, 5) == 0; end
        lff = 0;
        @(negedge clk_slink); xoff = 1; @(negedge clk_slink); xoff = 0;
        repeat (6000) @(negedge clk_slink);
        xon = 1; @(negedge clk_slink); xon = 0;
      end
      // events
      for (int e = 0; e < nevents; e++) begin
        evid_t ev; logic [7:0] err; cell_q_t all_cells; byte_q_t all_raw; lw_q_t hs [N_LINKS];
        repeat ($urandom_range(20, 120)) @(negedge clk_ttc);
        if (e == 30) begin
          // event counter reset: L1ID restarts, the ECR count moves on
          ecr = 1; @(negedge clk_ttc); ecr = 0; n_ecr++;
        end
        if (e == 41) repeat (3000) @(negedge clk_ttc);   // let link 3 time out first
        if (e == 51) begin
          // drain the event monitor, then select by BCID and trigger type only
          lbw(1, ctrl & ~16'h0200);
          wait_idle();
          mon_drain(nev_mon, n_sel_bcid, n_sel_tt);
          check(nev_mon > 0, "event monitor drained");
          lbw(6, 16'hFFFF); lbw(9, SEL_BCID); lbw(10, 16'(SEL_TT));
          ctrl = ctrl | 16'h0E00; lbw(1, ctrl);
        end
        // the trigger system holds L1A while the ROD signals BUSY
        @(negedge clk_ttc);
        while (busy) begin n_held++; @(negedge clk_ttc); end
        if (e == 55) while (tb_bc != SEL_BCID) @(negedge clk_ttc);
        l1a = 1; @(negedge clk_ttc); l1a = 0;
        ev.l1id = (e >= 30) ? {8'd1, 24'(e - 30)} : 32'(e);
        ev.bcid = l1a_bcid;
        ev.ttype = (e == 56) ? SEL_TT : 8'($urandom_range(0, 255) & 8'hF7);
        repeat (3) @(negedge clk_ttc);
        tt = ev.ttype; tt_strobe = 1; @(negedge clk_ttc); tt_strobe = 0;
        err = 0;
        all_cells = {}; all_raw = {};
        if (e == 45) begin
          // this event arrives as test data loaded over the local bus
          wait_idle();
          lbw(1, ctrl | 16'h0020);
        end
        for (int l = 0; l < N_LINKS; l++) begin
          byte_q_t b; cell_q_t c; lw_q_t h; int rt; logic [11:0] bc; logic [3:0] l1; logic [23:0] map;
          rt = 1 + (e + l) % 2;
          if (rt == 1) n_type1++; else n_type2++;
          bc  = ev.bcid;  l1 = ev.l1id[3:0];  map = 24'hFFFFFF;
          if (e == 20 && l == 2) begin bc = bc ^ 12'h010; err[E_BCID] = 1; end
          if (e == 25 && l == 1) begin l1 = l1 ^ 4'h8;   err[E_L1ID] = 1; end
          if (e == 28 && l == 0) begin map[1] = 1'b0;    err[E_SBMAP] = 1; end
          make_record(rt, 5, bc, l1, map, l, int'($urandom_range(2, 5)), 5, b, c);
          h = to_halfwords(b);
          if (e == 35 && l == 3) begin h[1].data = 16'h0005; err[E_LINK] = 1; end
          if (e == 40 && l == 3) begin
            err[E_TIMEOUT] = 1; n_timeout++;   // link 3 never answers
            hs[l] = {};
            continue;
          end
          if (e == 50 && l == 0) begin
            // a broken record: the end never comes, a re-sync closes it
            h = h[0:4]; b = b[0:5]; c = {};
            err[E_LINK] = 1; err[E_FORMAT] = 1;
          end
          foreach (c[i]) all_cells.push_back(c[i]);
          foreach (b[i]) all_raw.push_back(b[i]);
          hs[l] = h;
        end
        n_raw += all_raw.size() / 2;
        expect_event(ev, err, all_cells, all_raw);
        for (int l = 0; l < N_LINKS; l++)
          if (e == 45) begin
            foreach (hs[l][i]) begin
              lbw(17, {13'h0, hs[l][i].ctrl, 2'(l)});
              lbw(16, hs[l][i].data);
              n_test_hw++;
            end
          end else foreach (hs[l][i]) lq[l].push_back(hs[l][i]);
        if (e == 45) begin
          wait_idle();
          lbw(1, ctrl);
        end
        if (e == 50) begin
          wait_idle();
          lbw(2, 16'h0001); n_resync++;
        end
        if (e % 10 == 9) begin
          // a periodic BCR keeps the counter in step
          @(negedge clk_ttc); bcr = 1; @(negedge clk_ttc); bcr = 0;
        end
      end
    join
    // drain
    while (exp_w.size() > 0) @(posedge clk_slink);
    repeat (50) @(posedge clk);
    // truncation: the output is stopped, so link 0's long record overfills its FIFO
    @(negedge clk_slink); xoff = 1; @(negedge clk_slink); xoff = 0;
    begin
      byte_q_t b; cell_q_t c; lw_q_t h;
      do @(negedge clk_ttc); while (busy || tb_bc == SEL_BCID);
      l1a = 1; @(negedge clk_ttc); l1a = 0;
      repeat (3) @(negedge clk_ttc);
      tt = 8'h01; tt_strobe = 1; @(negedge clk_ttc); tt_strobe = 0;
      long_record(l1a_bcid, 4'(nevents - 30), b);
      h = to_halfwords(b);
      n_long_hw = h.size();
      foreach (h[i]) lq[0].push_back(h[i]);
      for (int l = 1; l < N_LINKS; l++) begin
        make_record(1, 5, l1a_bcid, 4'(nevents - 30), 24'hFFFFFF, l, 3, 5, b, c);
        h = to_halfwords(b);
        foreach (h[i]) lq[l].push_back(h[i]);
      end
      exp_w.push_back({1'b1, 33'h0});
    end
    wait_idle();
    @(negedge clk_slink); xon = 1; @(negedge clk_slink); xon = 0;
    while (exp_w.size() > 0) @(posedge clk_slink);
    repeat (50) @(posedge clk);
    check(n_ev == nevents + 1, $sformatf("events out %0d", n_ev));
    // selected samples: the events with the chosen BCID and trigger type
    lbw(1, ctrl & ~16'h0200);
    mon_drain(nev_mon, n_sel_bcid, n_sel_tt);
    check(nev_mon >= 2 && nev_mon <= 3, $sformatf("selected samples %0d", nev_mon));
    check(n_sel_bcid >= 1, "sample selected by BCID");
    check(n_sel_tt >= 1, "sample selected by trigger type");
    // output test data
    lbw(1, ctrl | 16'h0040);
    lbw(17, 16'h0004); lbw(18, 16'h5678);
    exp_w.push_back({2'b01, 32'h1234_5678});
    lbw(19, 16'h1234);
    lbw(17, 16'h0000); lbw(18, 16'h0BAD);
    exp_w.push_back({2'b00, 32'hCAFE_0BAD});
    lbw(19, 16'hCAFE);
    while (exp_w.size() > 0) @(posedge clk_slink);
    lbw(1, ctrl);
    n_out_test = 2;
    // an event built from test data only: the event ID and the link records
    // are loaded over the local bus, with no L1A
    begin
      evid_t ev; cell_q_t all_cells; byte_q_t all_raw; int n0;
      ev.l1id = 32'h0ABC_1237; ev.bcid = 12'h5A5; ev.ttype = 8'h3C;
      all_cells = {}; all_raw = {};
      lbw(1, ctrl | 16'h2020);
      lbw(22, ev.l1id[15:0]); lbw(23, ev.l1id[31:16]); lbw(24, 16'(ev.bcid));
      for (int l = 0; l < N_LINKS; l++) begin
        byte_q_t b; cell_q_t c; lw_q_t h;
        make_record(2, 5, ev.bcid, ev.l1id[3:0], 24'hFFFFFF, l, 2, 5, b, c);
        foreach (c[i]) all_cells.push_back(c[i]);
        foreach (b[i]) all_raw.push_back(b[i]);
        h = to_halfwords(b);
        foreach (h[i]) begin
          lbw(17, {13'h0, h[i].ctrl, 2'(l)});
          lbw(16, h[i].data);
          n_test_hw++;
        end
      end
      n0 = n_ev;
      expect_event(ev, 8'h0, all_cells, all_raw);
      lbw(25, 16'(ev.ttype)); n_evid_test++;
      while (exp_w.size() > 0) @(posedge clk_slink);
      check(n_ev == n0 + 1, "test event out");
      wait_idle();
      lbw(1, ctrl);
    end
    // the internal TTC simulator drives the TTC path, links disabled: one
    // empty event per simulated L1A, with BCRs every orbit
    begin
      int n0;
      n0 = n_ev;
      sim_l1id = {8'd1, 24'(nevents - 30 + 1)};
      lbw(26, 16'd1500);
      lbw(1, (ctrl & ~16'h000F) | 16'h4000);
      while (n_sim_l1a < 6) @(posedge clk);
      lbw(26, 16'd0);
      repeat (20) @(posedge clk_ttc);
      lbw(1, ctrl);
      while (exp_w.size() > 0) @(posedge clk_slink);
      check(n_ev == n0 + n_sim_l1a, $sformatf("simulated-TTC events out %0d", n_ev - n0));
      check(n_sim_bcr >= 2, "simulated BCRs");
    end
    // what software sees
    // each error injected once (the resync also leaves a format error)
    for (int k = 0; k < N_ERR; k++) begin
      lbr(32 + k, q);
      check(q == ((k == E_TYPE) ? 16'd0 : (k == E_LINK) ? 16'd2 : 16'd1), $sformatf("error counter %0d = %0d", k, q));
    end
    lbw(32, 16'h0); lbr(32 + E_BCID, q); check(q == 16'd0, "error counters cleared");
    for (int l = 0; l < N_LINKS; l++) begin lbr(60 + l, q); check(q == 16'd0, "no dropped event"); end
    lbr(59, q); check(q == 16'd2, "two XOFFs counted");
    lbw(27, 16'd19); repeat (2) @(posedge clk); check(la_out == 16'd2, "logic-analyser pins show the XOFF count");
    lbw(27, 16'd0);  repeat (2) @(posedge clk); check(la_out == 16'd0, "logic-analyser pins show link 0's FIFO level");
    lbr(50, q); check(q > 0, "hit monitor has samples");
    lbr(51, q); check(q > 0 || n_tlets == 0, "tracklet monitor has samples");
    // mechanisms
    $display("mechanisms: busy=%0d held=%0d xoff_stall=%0d lff_stall=%0d tracklets=%0d type1=%0d type2=%0d raw=%0d",
             n_busy, n_held, n_xoff_stall, n_lff_stall, n_tlets, n_type1, n_type2, n_raw);
    $display("mechanisms: ecr=%0d timeout=%0d test_halfwords=%0d resync=%0d out_test=%0d evid_test=%0d sim_l1a=%0d sel_bcid=%0d sel_tt=%0d truncated_record_halfwords=%0d bcid_err=1 l1id_err=1 sbmap_err=1 link_err=1",
             n_ecr, n_timeout, n_test_hw, n_resync, n_out_test, n_evid_test, n_sim_l1a, n_sel_bcid, n_sel_tt, n_long_hw);
    check(n_busy > 0 && n_held > 0, "BUSY asserted and held triggers");
    check(n_xoff_stall > 0, "XOFF stalled output");
    check(n_lff_stall > 0, "LFF stalled output");
    check(n_tlets > 0, "tracklets found");
    check(n_type1 > 0 && n_type2 > 0, "both record types");
    check(n_raw > 0, "raw data path");
    check(n_evid_test > 0, "event built from a test event ID");
    check(n_sim_l1a > 0, "events from the internal TTC simulator");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
