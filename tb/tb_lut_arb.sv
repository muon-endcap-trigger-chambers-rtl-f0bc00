// tb_lut_arb: three requesters with random reads and writes share the LUT
// SRAM model through lut_arb. Checks one grant at a time, that every
// requester is served within N cycles of asking (round robin), that each
// read returns, two cycles after its grant, the value last written.
module tb_lut_arb;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [2:0] req, we, gnt, rvalid;
  logic [7:0] addr [3];
  logic [35:0] wdata [3];
  logic [35:0] rdata, lut_wdata, lut_rdata;
  logic lut_cs, lut_we;
  logic [7:0] lut_addr;
  lut_arb #(.N(3), .AW(8), .DW(36)) dut (.*);
  lut_sram_model #(.AW(8), .DW(36)) sram (.clk, .cs(lut_cs), .we(lut_we), .addr(lut_addr),
                                          .wdata(lut_wdata), .rdata(lut_rdata));
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask
  initial begin
    repeat (50000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  logic [35:0] ref_mem [256];
  int wait_c [3];
  logic [35:0] exp1 [3], exp2 [3];
  bit pend1 [3], pend2 [3];
  int served = 0;
  always @(posedge clk) if (rst_n) begin
    check($onehot0(gnt), "one grant");
    for (int i = 0; i < 3; i++) begin
      if (req[i] && !gnt[i]) begin
        wait_c[i]++;
        check(wait_c[i] < 3, "round robin wait");
      end
      if (rvalid[i]) begin
        check(pend2[i] && rdata == exp2[i], $sformatf("read data %0d", i));
        served++;
      end else check(!pend2[i], "read answered in two cycles");
      pend2[i] <= pend1[i]; exp2[i] <= exp1[i];
      pend1[i] <= gnt[i] && !we[i];
      exp1[i]  <= ref_mem[addr[i]];
      if (gnt[i]) begin
        wait_c[i] = 0;
        if (we[i]) ref_mem[addr[i]] = wdata[i];
      end
    end
  end
  initial begin
    for (int a = 0; a < 256; a++) ref_mem[a] = sram.fill_word(8'(a));
    for (int i = 0; i < 3; i++) begin
      wait_c[i] = 0; pend1[i] = 0; pend2[i] = 0; addr[i] = 0; wdata[i] = 0;
    end
    req = 0; we = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    for (int n = 0; n < 4000; n++) begin
      @(negedge clk);
      for (int i = 0; i < 3; i++) begin
        // a requester holds its request until granted
        if (!req[i] || gnt_seen[i]) begin
          req[i] = $urandom_range(0, 1);
          we[i]  = $urandom_range(0, 3) == 0;
          addr[i] = 8'($urandom_range(0, 15));
          wdata[i] = {4'($urandom), 32'($urandom)};
        end
      end
    end
    check(served > 1000, "reads served");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  bit gnt_seen [3];
  always @(posedge clk) for (int i = 0; i < 3; i++) gnt_seen[i] <= gnt[i];
endmodule
