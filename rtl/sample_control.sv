// sample_control: choose which output events are copied for monitoring.
//
// Software can watch complete formatted events through the Event Monitor
// FIFO. At the start of every event (ev_start, with its event ID) this
// block decides whether to copy it: sampling must be enabled, and the event
// must be selected by the prescale counter (one of every prescale+1
// events), or have the chosen BCID (bcid_en) or trigger type (tt_en). It
// also must not start while the monitor FIFO is almost full (fewer than
// MARGIN free places), which is the "almost full" path from the monitor
// FIFO. A selected event's words are copied as they pass (in_fire); if the
// FIFO fills anyway, the rest of the event is dropped and truncated
// counts it. The main data path is never stalled. The selection criteria
// are the document's; the prescale, the margin and truncation are this
// design's choices.
module sample_control
  import rod_pkg::*;
#(
  parameter int LEVEL_W = 10,
  parameter int DEPTH   = 512,
  parameter int MARGIN  = 64
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         enable,
  input  logic [15:0]  prescale,
  input  logic         bcid_en,
  input  logic [BCID_W-1:0] bcid_sel,
  input  logic         tt_en,
  input  logic [TT_W-1:0] tt_sel,
  input  logic         ev_start,
  input  evid_t        ev_evid,
  input  logic         in_fire,
  input  logic [32:0]  in_word,
  output logic         mon_wr,
  output logic [32:0]  mon_data,
  input  logic [LEVEL_W-1:0] mon_level,
  input  logic         mon_full,
  output logic [15:0]  sampled,
  output logic [15:0]  truncated
);
  logic [15:0] cnt;
  logic        active, cut;
  logic        pick, room;

  assign room = int'(mon_level) <= DEPTH - MARGIN;
  assign pick = enable && room &&
                (cnt == prescale || (bcid_en && ev_evid.bcid == bcid_sel) ||
                 (tt_en && ev_evid.ttype == tt_sel));

  logic now;    // copy the current word
  assign now      = in_fire && ((ev_start && pick) || (!ev_start && active && !cut));
  assign mon_wr   = now && !mon_full;
  assign mon_data = in_word;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt <= '0; active <= 1'b0; cut <= 1'b0; sampled <= '0; truncated <= '0;
    end else begin
      if (ev_start) begin
        if (enable) cnt <= (cnt >= prescale) ? '0 : cnt + 1'b1;
        active <= pick;
        cut    <= 1'b0;
        if (pick) sampled <= sampled + 1'b1;
      end
      if (now && mon_full && !cut) begin
        cut <= 1'b1;
        truncated <= truncated + 1'b1;
      end
    end
  end
endmodule
