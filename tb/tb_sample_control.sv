// tb_sample_control: events of random length pass by; checks which are
// copied (prescale, BCID match, trigger-type match), that a selected event
// is copied whole, that no event starts while the monitor FIFO is almost
// full, and that an event cut short by a full FIFO is counted.
module tb_sample_control;
  import rod_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic enable, bcid_en, tt_en, ev_start, in_fire, mon_wr, mon_full;
  logic [15:0] prescale, sampled, truncated;
  logic [11:0] bcid_sel; logic [7:0] tt_sel;
  evid_t ev_evid;
  logic [32:0] in_word, mon_data;
  logic [5:0] mon_level;
  sample_control #(.LEVEL_W(6), .DEPTH(32), .MARGIN(8)) dut (.*);
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask
  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  int mlev, cnt, nsel, ntrunc;
  initial begin
    enable = 1; bcid_en = 1; tt_en = 1; prescale = 16'd4; bcid_sel = 12'h55; tt_sel = 8'h0C;
    ev_start = 0; in_fire = 0; in_word = 0; ev_evid = '0; mon_level = 0; mon_full = 0;
    mlev = 0; cnt = 0; nsel = 0; ntrunc = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    for (int e = 0; e < 400; e++) begin
      bit pick, cut; int len;
      @(negedge clk);
      ev_evid = '{l1id: 32'(e), bcid: ($urandom_range(0, 7) == 0) ? 12'h55 : 12'($urandom),
                  ttype: ($urandom_range(0, 7) == 0) ? 8'h0C : 8'($urandom)};
      // the reader drains the monitor FIFO at random times
      if ($urandom_range(0, 2) == 0) mlev = 0;
      pick = (cnt == 4 || ev_evid.bcid == 12'h55 || ev_evid.ttype == 8'h0C) && mlev <= 24;
      cnt = (cnt >= 4) ? 0 : cnt + 1;
      if (pick) nsel++;
      len = int'($urandom_range(6, 14));
      cut = 0;
      for (int i = 0; i < len; i++) begin
        ev_start = i == 0; in_fire = 1; in_word = {1'(i == 0), 32'(e * 100 + i)};
        mon_level = 6'(mlev); mon_full = mlev >= 32;
        #1;
        if (pick && !cut && mlev < 32) begin
          check(mon_wr && mon_data == in_word, $sformatf("copy event %0d word %0d", e, i));
          mlev++;
        end else begin
          check(!mon_wr, $sformatf("no copy event %0d word %0d", e, i));
          if (pick && !cut && mlev >= 32) begin cut = 1; ntrunc++; end
        end
        @(negedge clk);
        ev_start = 0; in_fire = $urandom_range(0, 1);   // idle cycles inside the event
        if (in_fire == 0) begin #1; check(!mon_wr, "no copy without transfer"); @(negedge clk); end
      end
      in_fire = 0;
    end
    check(int'(sampled) == nsel && nsel > 50, $sformatf("sampled %0d exp %0d", sampled, nsel));
    check(int'(truncated) == ntrunc && ntrunc > 0, "truncated count");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
