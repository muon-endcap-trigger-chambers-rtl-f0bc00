// busy_ctrl: raise RODBUSY to the central trigger when buffers fill.
//
// The front end sends exactly one record per L1A and has no other flow
// control, so the only way to stop data before buffers overflow is to ask
// the central trigger to hold L1As with BUSY. BUSY should be asserted as
// rarely as possible, so it uses hysteresis: it rises when any watched
// occupancy reaches its high mark and falls only when all are at or below
// their low marks. force_busy (a control register bit) holds it high.
// busy_cycles counts the cycles BUSY was high. The marks are
// programmable; the hysteresis scheme is this design's choice.
module busy_ctrl #(
  parameter int N = 5,
  parameter int W = 10
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] level [N],
  input  logic [W-1:0] hi    [N],
  input  logic [W-1:0] lo    [N],
  input  logic         force_busy,
  output logic         busy,
  output logic [31:0]  busy_cycles
);
  logic any_hi, all_lo, state;
  always_comb begin
    any_hi = 1'b0;
    all_lo = 1'b1;
    for (int i = 0; i < N; i++) begin
      if (level[i] >= hi[i]) any_hi = 1'b1;
      if (level[i] >  lo[i]) all_lo = 1'b0;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= 1'b0; busy <= 1'b0; busy_cycles <= '0;
    end else begin
      if (any_hi)      state <= 1'b1;
      else if (all_lo) state <= 1'b0;
      busy <= force_busy || (any_hi || (state && !all_lo));
      if (busy) busy_cycles <= busy_cycles + 1'b1;
    end
  end
endmodule
