// lut_arb: arbiter and pipeline for the shared LUT bus.
//
// The external look-up-table SRAM (19 address bits, 36 data bits) is shared
// by the tracklet extractor, the wire/strip translator and the local bus,
// which loads it. Each requester holds req (with we, addr, wdata) until it
// sees gnt; a round-robin pointer picks one requester per cycle. The granted
// access is registered onto the SRAM pins (lut_cs, lut_we, lut_addr,
// lut_wdata). The SRAM is assumed synchronous: read data appears on
// lut_rdata one cycle after the address, so the owner of a read sees
// rvalid[i] two cycles after its grant, with the data on rdata. One access
// per cycle. The round-robin policy and the SRAM timing are assumptions.
module lut_arb #(
  parameter int N  = 3,
  parameter int AW = 19,
  parameter int DW = 36
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [N-1:0]  req,
  input  logic [N-1:0]  we,
  input  logic [AW-1:0] addr  [N],
  input  logic [DW-1:0] wdata [N],
  output logic [N-1:0]  gnt,
  output logic [N-1:0]  rvalid,
  output logic [DW-1:0] rdata,
  // SRAM pins
  output logic          lut_cs,
  output logic          lut_we,
  output logic [AW-1:0] lut_addr,
  output logic [DW-1:0] lut_wdata,
  input  logic [DW-1:0] lut_rdata
);
  localparam int IW = (N > 1) ? $clog2(N) : 1;
  logic [IW-1:0] ptr, sel;
  logic          any;
  logic [N-1:0]  rd1, rd2;

  always_comb begin
    any = 1'b0;
    sel = '0;
    for (int k = 0; k < N; k++) begin
      int j;
      j = (int'(ptr) + k) % N;
      if (!any && req[j]) begin
        any = 1'b1;
        sel = IW'(j);
      end
    end
    gnt = '0;
    if (any) gnt[sel] = 1'b1;
  end

  assign rvalid = rd2;
  assign rdata  = lut_rdata;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ptr <= '0; lut_cs <= 1'b0; lut_we <= 1'b0; lut_addr <= '0; lut_wdata <= '0;
      rd1 <= '0; rd2 <= '0;
    end else begin
      lut_cs <= any;
      lut_we <= any && we[sel];
      if (any) begin
        lut_addr  <= addr[sel];
        lut_wdata <= wdata[sel];
        ptr       <= (int'(sel) == N-1) ? '0 : sel + 1'b1;
      end
      rd1 <= gnt & ~we;
      rd2 <= rd1;
    end
  end

  a_onehot_gnt: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(gnt));
endmodule
