// tb_ilb_regs: exercises the internal local bus register map: read-back of
// every configuration register, the A=0 no-operation, the re-sync toggle,
// LUT loading with address auto-increment, link, output and event-ID
// test-data pushes, monitor FIFO reads that pop on the last half-word, error counter
// and status windows, the error-counter clear, and the TTC-simulator and
// logic-analyser settings.
module tb_ilb_regs;
  import rod_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic ilb_wr, ilb_rd; logic [5:0] ilb_addr; logic [15:0] ilb_wdata, ilb_rdata;
  logic [3:0] link_en;
  logic raw_en, link_test, out_test, hit_smp_en, tl_smp_en, ev_smp_en, bcid_en, tt_en;
  logic force_busy, resync_tgl, err_clear, lut_req, lut_gnt, tlink_wr, tlink_full, tout_wr, tout_full;
  logic evid_test, ttc_sim_en, tevid_wr, tevid_full; logic [15:0] l1a_period; logic [4:0] la_sel; logic [51:0] tevid_data;
  logic [11:0] bc_offset, bcid_sel; logic [23:0] sb_mask;
  logic [15:0] ev_prescale, hit_prescale, tl_prescale; logic [7:0] tt_sel;
  logic [9:0] busy_hi, busy_lo; logic [18:0] lut_addr; logic [35:0] lut_wdata;
  logic [18:0] tlink_data; logic [32:0] tout_data;
  logic [31:0] hit_mon, tl_mon; logic [32:0] ev_mon;
  logic hit_mon_empty, hit_mon_rd, tl_mon_empty, tl_mon_rd, ev_mon_empty, ev_mon_rd;
  logic [15:0] err_cnt [N_ERR]; logic [15:0] stat [24];
  ilb_regs dut (.*);
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  task automatic wr(input int a, input logic [15:0] d);
    @(negedge clk); ilb_wr = 1; ilb_addr = 6'(a); ilb_wdata = d;
    @(negedge clk); ilb_wr = 0;
  endtask
  task automatic rd(input int a, output logic [15:0] d, output bit popped);
    @(negedge clk); ilb_rd = 1; ilb_addr = 6'(a); #1; d = ilb_rdata;
    popped = hit_mon_rd || tl_mon_rd || ev_mon_rd;
    @(negedge clk); ilb_rd = 0;
  endtask
  int ntl, nto, nlut, nte;
  always @(posedge clk) begin
    if (tlink_wr) begin ntl++; check(tlink_data == {2'd2, 1'b1, 16'hBEEF}, "link test word"); end
    if (tevid_wr) begin nte++; check(tevid_data == {32'h1234_5678, 12'hABC, 8'hC3}, "test event ID"); end
    if (tout_wr)  begin nto++; check(tout_data == {1'b1, 16'h1234, 16'h5678}, "output test word"); end
    if (lut_req && lut_gnt) begin
      check(lut_addr == 19'(19'h4_0010 + nlut) && lut_wdata == {4'hA, 16'h0000 + 16'(nlut), 16'hCAFE},
            $sformatf("LUT write %0d", nlut));
      nlut++;
    end
  end
  initial begin
    logic [15:0] d; bit p; logic tg;
    ilb_wr = 0; ilb_rd = 0; ilb_addr = 0; ilb_wdata = 0; lut_gnt = 0; tlink_full = 0; tout_full = 0; tevid_full = 0;
    hit_mon = 32'h1111_2222; tl_mon = 32'h3333_4444; ev_mon = {1'b1, 32'h5555_6666};
    hit_mon_empty = 0; tl_mon_empty = 0; ev_mon_empty = 0;
    for (int i = 0; i < N_ERR; i++) err_cnt[i] = 16'(100 + i);
    for (int i = 0; i < 24; i++) stat[i] = 16'(200 + i);
    ntl = 0; nto = 0; nlut = 0; nte = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    rd(1, d, p); check(d == 16'h000F && link_en == 4'hF, "control reset value");
    // plain registers read back
    begin
      int a [14] = '{1, 3, 4, 5, 6, 7, 8, 9, 10, 17, 18, 20, 21, 13};
      logic [15:0] m [14] = '{16'h7FFF, 16'h0FFF, 16'hFFFF, 16'h00FF, 16'hFFFF, 16'hFFFF, 16'hFFFF,
                              16'h0FFF, 16'h00FF, 16'hFFFF, 16'hFFFF, 16'h03FF, 16'h03FF, 16'hFFFF};
      for (int i = 0; i < 14; i++) begin
        logic [15:0] v; v = 16'($urandom);
        if (a[i] == 1) v = 16'h0A5F;
        wr(a[i], v); rd(a[i], d, p);
        check((d & m[i]) == (v & m[i]), $sformatf("register %0d", a[i]));
      end
    end
    check(raw_en == 1 && link_test == 0 && out_test == 1 && hit_smp_en == 0 && tl_smp_en == 0 &&
          ev_smp_en == 1 && bcid_en == 0 && tt_en == 1 && force_busy == 0 && evid_test == 0 && ttc_sim_en == 0 && link_en == 4'hF,
          "control bits");
    // address 0 does nothing
    wr(0, 16'hFFFF); rd(1, d, p); check(d == 16'h0A5F, "A=0 is a no-op");
    tg = resync_tgl; wr(2, 0); check(resync_tgl != tg, "re-sync toggles");
    // LUT loading: three words with auto-increment, grant delayed
    wr(11, 16'h0010); wr(12, 16'h0004);
    for (int k = 0; k < 3; k++) begin
      wr(13, 16'hCAFE); wr(14, 16'(k)); wr(15, 16'h000A);
      check(lut_req, "LUT request raised");
      repeat (2) @(negedge clk);
      lut_gnt = 1; @(negedge clk); lut_gnt = 0;
      check(!lut_req, "LUT request dropped after grant");
    end
    rd(11, d, p); check(d == 16'h0013 && nlut == 3, "LUT address advanced");
    // test data
    wr(17, 16'h0006); wr(16, 16'hBEEF);
    wr(18, 16'h5678); wr(19, 16'h1234);
    tlink_full = 1; tout_full = 1; wr(16, 16'hBEEF); wr(19, 16'h1234);
    check(ntl == 1 && nto == 1, "test pushes, none while full");
    // test event IDs
    wr(1, 16'h2A5F); check(evid_test, "event-ID test mode");
    wr(22, 16'h5678); wr(23, 16'h1234); wr(24, 16'h0ABC);
    rd(22, d, p); check(d == 16'h5678, "test L1ID low");
    rd(23, d, p); check(d == 16'h1234, "test L1ID high");
    wr(25, 16'h00C3);
    tevid_full = 1; wr(25, 16'h00C3);
    check(nte == 1, "test event ID pushed once, not while full");
    wr(1, 16'h4A5F); check(ttc_sim_en && !evid_test, "TTC simulator enable");
    wr(26, 16'd1234); check(l1a_period == 16'd1234, "simulated L1A period");
    wr(27, 16'd19); check(la_sel == 5'd19, "logic-analyser select");
    wr(1, 16'h0A5F);
    // monitor FIFOs
    rd(24, d, p); check(d == 16'h2222 && !p, "hit monitor low, no pop");
    rd(25, d, p); check(d == 16'h1111 && p, "hit monitor high pops");
    rd(26, d, p); check(d == 16'h4444 && !p, "tracklet monitor low");
    rd(27, d, p); check(d == 16'h3333 && p, "tracklet monitor high pops");
    rd(28, d, p); check(d == 16'h6666 && !p, "event monitor low");
    rd(29, d, p); check(d == 16'h5555 && !p, "event monitor high");
    rd(30, d, p); check(d == 16'h0001 && p, "event monitor control bit pops");
    hit_mon_empty = 1; rd(25, d, p); check(!p, "no pop when empty");
    rd(31, d, p); check(d == 16'h0001, "empty flags");
    for (int i = 0; i < N_ERR; i++) begin rd(32 + i, d, p); check(d == 16'(100 + i), "error counter"); end
    for (int i = 0; i < 24; i++) begin rd(40 + i, d, p); check(d == 16'(200 + i), "status"); end
    @(negedge clk); ilb_wr = 1; ilb_addr = 6'd32; #1; check(err_clear, "error clear"); @(negedge clk); ilb_wr = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
