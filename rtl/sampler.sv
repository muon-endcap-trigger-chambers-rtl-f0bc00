// sampler: prescaled copy of a data stream into a monitor FIFO.
//
// Monitoring needs only a sample of the data, so this block watches the
// words passing on a stream (in_fire marks a transfer) and copies one of
// every prescale+1 words into the monitor FIFO when the FIFO has room. It
// never stalls the stream it watches: when the monitor FIFO is full the
// sample is lost and counted in missed. prescale = 0 copies every word;
// enable = 0 copies none. Used for the hit and tracklet monitor FIFOs. The
// prescale scheme is this design's choice.
module sampler #(
  parameter int W = 32
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         enable,
  input  logic [15:0]  prescale,
  input  logic         in_fire,
  input  logic [W-1:0] in_data,
  output logic         mon_wr,
  output logic [W-1:0] mon_data,
  input  logic         mon_full,
  output logic [15:0]  missed
);
  logic [15:0] cnt;
  logic take;
  assign take     = enable && in_fire && cnt == prescale;
  assign mon_wr   = take && !mon_full;
  assign mon_data = in_data;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt <= '0; missed <= '0;
    end else begin
      if (enable && in_fire) cnt <= (cnt >= prescale) ? '0 : cnt + 1'b1;
      if (take && mon_full && missed != '1) missed <= missed + 1'b1;
    end
  end
endmodule
