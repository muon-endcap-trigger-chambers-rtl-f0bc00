// sync_fifo: single-clock first-in first-out buffer.
//
// Every pipeline process of the ROD talks to the next one through FIFOs,
// because each process has a data-dependent latency; this is the one-clock
// version used inside the core clock domain (CW and data FIFO pairs, monitor
// FIFOs). Storage is a plain array that maps to block RAM; the read side is
// first-word-fall-through: rd_data shows the oldest entry while !empty, and
// rd_en pops it. A push while full and a pop while empty are ignored (and
// flagged by assertions). count is the occupancy, readable at any time.
// Depth is a power of two. Sizes and the read style are this design's choice.
module sync_fifo #(
  parameter int WIDTH = 32,
  parameter int DEPTH = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             wr_en,
  input  logic [WIDTH-1:0] wr_data,
  output logic             full,
  input  logic             rd_en,
  output logic [WIDTH-1:0] rd_data,
  output logic             empty,
  output logic [$clog2(DEPTH):0] count
);
  localparam int AW = $clog2(DEPTH);
  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW:0] wp, rp;

  assign count   = wp - rp;
  assign full    = count == (AW+1)'(DEPTH);
  assign empty   = wp == rp;
  assign rd_data = mem[rp[AW-1:0]];

  always_ff @(posedge clk) begin
    if (wr_en && !full) mem[wp[AW-1:0]] <= wr_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp <= '0;
      rp <= '0;
    end else begin
      if (wr_en && !full) wp <= wp + 1'b1;
      if (rd_en && !empty) rp <= rp + 1'b1;
    end
  end

  a_no_overflow:  assert property (@(posedge clk) disable iff (!rst_n) !(wr_en && full));
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) !(rd_en && empty));
endmodule
