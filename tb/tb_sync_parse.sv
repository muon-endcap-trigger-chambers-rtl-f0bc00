// tb_sync_parse: builds random event records for four links (rod_tb_pkg),
// some with injected faults, loads them into model link FIFOs and checks
// what sync_parse writes: every cell, in link order, the end marks, the
// per-event CWs with cell count and error flags, the raw half-words, and
// the error pulses. Faults: wrong BCID, wrong L1ID, a missing Slave Board
// in the map, a bad LDB nibble (format), an unsupported record type,
// a truncated fragment flag, and a link that sends nothing (timeout).
// The output FIFOs randomly report full to exercise the stalls.
module tb_sync_parse;
  import rod_pkg::*;
  import rod_tb_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  localparam int NL = 4;
  logic [NL-1:0] link_en;
  logic [23:0] sb_mask;
  logic raw_en;
  evid_t evid;
  logic evid_valid, evid_ready;
  ev_cw_t ev_cw [NL];
  logic [NL-1:0] ev_cw_empty, ev_cw_rd, ev_data_empty, ev_data_rd;
  logic [16:0] ev_data [NL];
  logic raw_wr, raw_full, raw_cw_wr, raw_cw_full, cell_wr, cell_full, cell_cw_wr, cell_cw_full;
  logic [16:0] raw_wdata;
  cw_t raw_cw, cell_cw;
  cell_t cell_data;
  logic [N_ERR-1:0] err_pulse;

  sync_parse #(.LINKS(NL), .TIMEOUT(200)) dut (.*);

  // model link FIFOs
  ev_cw_t      cwq [NL][$];
  logic [16:0] dq  [NL][$];
  evid_t       eq[$];
  // the model FIFO outputs change only at the falling edge
  task automatic refresh();
    for (int l = 0; l < NL; l++) begin
      ev_cw_empty[l]   = cwq[l].size() == 0;
      ev_cw[l]         = ev_cw_empty[l] ? '0 : cwq[l][0];
      ev_data_empty[l] = dq[l].size() == 0;
      ev_data[l]       = ev_data_empty[l] ? '0 : dq[l][0];
    end
    evid_valid = eq.size() > 0;
    evid       = evid_valid ? eq[0] : '0;
  endtask

  // expected output
  cell_t       exp_cells[$];
  cw_t         exp_cw[$];
  logic [16:0] exp_raw[$];
  int          err_seen [N_ERR];
  int          err_exp  [N_ERR];
  bit pc [NL], pd [NL], pe;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask
  initial begin
    repeat (400000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  always @(posedge clk) if (rst_n) begin
    for (int l = 0; l < NL; l++) begin pc[l] <= ev_cw_rd[l]; pd[l] <= ev_data_rd[l]; end
    pe <= evid_valid && evid_ready;
    if (cell_wr) begin
      check(!cell_full, "cell write while full");
      check(exp_cells.size() > 0 && cell_data == exp_cells[0],
            $sformatf("cell %h exp %h", cell_data, exp_cells.size() ? exp_cells[0] : '0));
      if (exp_cells.size() > 0) void'(exp_cells.pop_front());
    end
    if (cell_cw_wr) begin
      check(exp_cw.size() > 0 && cell_cw == exp_cw[0],
            $sformatf("cell CW err %h count %0d exp err %h count %0d", cell_cw.err, cell_cw.count,
                      exp_cw.size() ? exp_cw[0].err : 0, exp_cw.size() ? exp_cw[0].count : 0));
      check(raw_cw_wr && raw_cw.evid == cell_cw.evid && raw_cw.err == cell_cw.err, "raw CW");
      if (exp_cw.size() > 0) void'(exp_cw.pop_front());
    end
    if (raw_wr) begin
      check(exp_raw.size() > 0 && raw_wdata == exp_raw[0], $sformatf("raw %h exp %h t=%0t", raw_wdata, exp_raw.size() ? exp_raw[0] : 0, $time));
      if (exp_raw.size() > 0) void'(exp_raw.pop_front());
    end
    for (int k = 0; k < N_ERR; k++) if (err_pulse[k]) err_seen[k]++;
  end
  always @(negedge clk) begin
    for (int l = 0; l < NL; l++) begin
      if (pc[l]) void'(cwq[l].pop_front());
      if (pd[l]) void'(dq[l].pop_front());
      pc[l] = 0; pd[l] = 0;
    end
    if (pe) void'(eq.pop_front());
    pe = 0;
    refresh();
    cell_full    = $urandom_range(0, 5) == 0;
    cell_cw_full = $urandom_range(0, 5) == 0;
    raw_full     = $urandom_range(0, 5) == 0;
    raw_cw_full  = $urandom_range(0, 5) == 0;
  end

  initial begin
    int nev;
    nev = 300;
    link_en = '1; sb_mask = 24'h00000F; raw_en = 1;
    for (int k = 0; k < N_ERR; k++) begin err_seen[k] = 0; err_exp[k] = 0; end
    repeat (3) @(posedge clk); rst_n = 1;
    for (int e = 0; e < nev; e++) begin
      evid_t ev;
      cw_t   cw;
      int    fault, fl;
      ev = '{l1id: 32'(e * 7 + 3), bcid: 12'($urandom), ttype: 8'($urandom)};
      cw = '{evid: ev, err: '0, count: '0};
      fault = (e % 3 == 0) ? int'($urandom_range(1, 7)) : 0;   // one event in three
      fl    = int'($urandom_range(0, NL - 1));                   // faulty link
      if (fault == 7) while (eq.size() > 0) @(negedge clk);
      for (int l = 0; l < NL; l++) begin
        byte_q_t b; cell_q_t c;
        logic [11:0] bc; logic [3:0] l1; logic [23:0] map; int rt;
        ev_cw_t lcw;
        bit fe;
        fe = fault != 0 && l == fl;
        bc = (fe && fault == 1) ? ev.bcid + 12'd1 : ev.bcid;
        l1 = (fe && fault == 2) ? ev.l1id[3:0] + 4'd1 : ev.l1id[3:0];
        map = (fe && fault == 3) ? 24'hFFFFFD : 24'hFFFFFF;
        rt  = 1 + int'($urandom_range(0, 1));
        if (fe && fault == 7) begin     // nothing from this link: timeout
          cw.err[E_TIMEOUT] = 1; err_exp[E_TIMEOUT]++;
          continue;
        end
        make_record(rt, l, bc, l1, map, l, int'($urandom_range(0, 4)), 4, b, c);
        if (fe && fault == 1) begin cw.err[E_BCID] = 1; err_exp[E_BCID]++; end
        if (fe && fault == 2) begin cw.err[E_L1ID] = 1; err_exp[E_L1ID]++; end
        if (fe && fault == 3) begin cw.err[E_SBMAP] = 1; err_exp[E_SBMAP]++; end
        // a record without Slave Boards has no BCID to compare
        if (fe && (fault == 1 || fault == 2) && b.size() == 12) begin
          if (fault == 1) begin err_exp[E_BCID]--; end else err_exp[E_L1ID]--;
          cw.err = '0; cw.err[E_TIMEOUT] = 0;
        end
        if (fe && fault == 4) begin b[1] = 8'h13; c = {}; cw.err[E_FORMAT] = 1; err_exp[E_FORMAT]++; end
        if (fe && fault == 5) begin b[0] = 8'hA1; c = {}; cw.err[E_TYPE] = 1; err_exp[E_TYPE]++; end
        lcw = '{words: 12'(b.size() / 2), trunc: 1'b0, linkerr: 1'b0};
        if (fe && fault == 6) begin lcw.trunc = 1; cw.err[E_TRUNC] = 1; err_exp[E_TRUNC]++; end
        foreach (c[i]) exp_cells.push_back(c[i]);
        for (int i = 0; i < b.size(); i += 2) begin
          dq[l].push_back({1'b0, b[i], b[i+1]});
          exp_raw.push_back({1'b0, b[i], b[i+1]});
          if (fe && fault == 6) cw.count = cw.count;    // data is intact; only flagged
        end
        dq[l].push_back({1'b1, 16'h0});
        cwq[l].push_back(lcw);
        cw.count += 12'(c.size());
      end
      exp_cells.push_back('{last: 1'b1, default: '0});
      exp_raw.push_back({1'b1, 16'h0});
      exp_cw.push_back(cw);
      eq.push_back(ev);
      // a missing fragment is only missing if nothing newer is queued behind it
      if (fault == 7) while (eq.size() > 0) @(negedge clk);
      while (eq.size() > 2) @(negedge clk);
    end
    while (eq.size() > 0) @(negedge clk);
    repeat (20) @(negedge clk);
    check(exp_cells.size() == 0 && exp_cw.size() == 0 && exp_raw.size() == 0, "all output seen");
    for (int k = 0; k < N_ERR; k++)
      if (k != E_LINK) check(err_seen[k] == err_exp[k] && (err_exp[k] > 0),
                             $sformatf("error %0d pulses %0d exp %0d", k, err_seen[k], err_exp[k]));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
