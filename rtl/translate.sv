// translate: convert hit channel numbers to wire/strip words via the LUT.
//
// Takes the hit stream from extract_hits. For each hit it reads the LUT at
// address {0, channel} (the low half of the LUT, LUT_AW-1 bits, holds this
// table) and waits for the word. Bit 35 of the word marks a connected
// channel; for those, bits 31:0 (the wire or strip identifier, encoded as
// software loads it) go to the Hit data FIFO as {end=0, word}. Hits on
// unconnected channels are dropped. At the event's end item it writes the
// end mark {1, 0} and the Hit CW: the event's CW with count = hits written.
// An event keeps at most MAX_HITS hits: the formatter needs the Hit CW (it
// carries the count for the header) before it reads any hit, so one event's
// hits must fit in the Hit data FIFO with its end mark. MAX_HITS is set to
// the FIFO depth less one; further hits are dropped and the CW carries the
// truncation error bit.
// One hit every five cycles at most (request, grant, two-cycle LUT read,
// write);
// it stalls while the Hit FIFOs are full. The LUT word layout is this
// design's choice; the document names only the conversion and the LUT.
module translate
  import rod_pkg::*;
#(
  parameter int LUT_AW = 19,
  parameter int LUT_DW = 36,
  parameter int MAX_HITS = 511         // Hit data FIFO depth - 1
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  hit_valid,
  input  logic  hit_last,
  input  logic  [CHAN_W-1:0] hit_chan,
  input  cw_t   hit_cw,
  output logic  hit_ready,
  // LUT bus (through lut_arb)
  output logic  lut_req,
  output logic  [LUT_AW-1:0] lut_addr,
  input  logic  lut_gnt,
  input  logic  lut_rvalid,
  input  logic  [LUT_DW-1:0] lut_rdata,
  // Hit CW/data FIFO pair
  output logic  data_wr,
  output logic  [32:0] data_wdata,
  input  logic  data_full,
  output logic  cw_wr,
  output cw_t   cw_wdata,
  input  logic  cw_full
);
  typedef enum logic [1:0] {IDLE, REQ, WAIT, WR} st_t;
  logic [LUT_DW-1:0] ans;
  st_t st;
  logic [11:0] nhits;
  logic        trunc;                  // hits of this event were dropped

  assign lut_req  = st == REQ;
  assign lut_addr = LUT_AW'(hit_chan);

  // end item: write end mark and CW together
  logic end_go;
  assign end_go = st == IDLE && hit_valid && hit_last && !data_full && !cw_full;
  // LUT answer (held in ans): write the word if the channel is connected
  logic ans_go;
  assign ans_go = st == WR && !data_full;

  assign hit_ready  = end_go || ans_go;
  logic keep;
  assign keep       = ans[35] && int'(nhits) < MAX_HITS;
  assign data_wr    = end_go || (ans_go && keep);
  assign data_wdata = end_go ? {1'b1, 32'h0} : {1'b0, ans[31:0]};
  assign cw_wr      = end_go;
  always_comb begin
    cw_wdata       = hit_cw;
    cw_wdata.count = nhits;
    cw_wdata.err[E_TRUNC] = hit_cw.err[E_TRUNC] | trunc;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= IDLE; nhits <= '0; ans <= '0; trunc <= 1'b0;
    end else begin
      unique case (st)
        IDLE: if (end_go) begin nhits <= '0; trunc <= 1'b0; end
              else if (hit_valid && !hit_last) st <= REQ;
        REQ:  if (lut_gnt) st <= WAIT;
        WAIT: if (lut_rvalid) begin
                ans <= lut_rdata;
                st  <= WR;
              end
        WR:   if (ans_go) begin
                st <= IDLE;
                if (keep) nhits <= nhits + 1'b1;
                else if (ans[35]) trunc <= 1'b1;
              end
        default: st <= IDLE;
      endcase
    end
  end
endmodule
