// async_fifo: dual-clock FIFO joining two clock domains.
//
// The ROD FPGA has separate clock domains (TTC, front-end links, core
// processing, S-link output, board local bus) joined only by FIFOs. This
// FIFO keeps binary pointers in each domain and passes them across as Gray
// code through two flip-flop synchronisers, so full and empty are
// conservative but never wrong. The read side is first-word-fall-through
// (rd_data valid while !empty). wlevel is the occupancy seen from the write
// side and rlevel from the read side; both can lag by two cycles of the
// other clock. The Gray-code scheme and the sizes are this design's choice.
module async_fifo #(
  parameter int WIDTH = 32,
  parameter int AW    = 4          // depth = 2**AW
) (
  input  logic             wclk,
  input  logic             wrst_n,
  input  logic             wr_en,
  input  logic [WIDTH-1:0] wr_data,
  output logic             full,
  output logic [AW:0]      wlevel,
  input  logic             rclk,
  input  logic             rrst_n,
  input  logic             rd_en,
  output logic [WIDTH-1:0] rd_data,
  output logic             empty,
  output logic [AW:0]      rlevel
);
  logic [WIDTH-1:0] mem [2**AW];
  logic [AW:0] wbin, wgray, rbin, rgray;
  logic [AW:0] rgray_w1, rgray_w2, wgray_r1, wgray_r2;
  logic [AW:0] rbin_w, wbin_r;

  function automatic logic [AW:0] g2b(input logic [AW:0] g);
    logic [AW:0] b;
    b[AW] = g[AW];
    for (int i = AW-1; i >= 0; i--) b[i] = b[i+1] ^ g[i];
    return b;
  endfunction

  // write domain
  assign rbin_w = g2b(rgray_w2);
  assign wlevel = wbin - rbin_w;
  assign full   = wlevel == (AW+1)'(2**AW);

  always_ff @(posedge wclk) begin
    if (wr_en && !full) mem[wbin[AW-1:0]] <= wr_data;
  end

  always_ff @(posedge wclk or negedge wrst_n) begin
    if (!wrst_n) begin
      wbin <= '0; wgray <= '0; rgray_w1 <= '0; rgray_w2 <= '0;
    end else begin
      rgray_w1 <= rgray;
      rgray_w2 <= rgray_w1;
      if (wr_en && !full) begin
        wbin  <= wbin + 1'b1;
        wgray <= (wbin + 1'b1) ^ ((wbin + 1'b1) >> 1);
      end
    end
  end

  // read domain
  assign wbin_r  = g2b(wgray_r2);
  assign rlevel  = wbin_r - rbin;
  assign empty   = wbin_r == rbin;
  assign rd_data = mem[rbin[AW-1:0]];

  always_ff @(posedge rclk or negedge rrst_n) begin
    if (!rrst_n) begin
      rbin <= '0; rgray <= '0; wgray_r1 <= '0; wgray_r2 <= '0;
    end else begin
      wgray_r1 <= wgray;
      wgray_r2 <= wgray_r1;
      if (rd_en && !empty) begin
        rbin  <= rbin + 1'b1;
        rgray <= (rbin + 1'b1) ^ ((rbin + 1'b1) >> 1);
      end
    end
  end

  a_no_overflow:  assert property (@(posedge wclk) disable iff (!wrst_n) !(wr_en && full));
  a_no_underflow: assert property (@(posedge rclk) disable iff (!rrst_n) !(rd_en && empty));
endmodule
