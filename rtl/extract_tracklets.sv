// extract_tracklets: find tracklets as layer coincidences within roads.
//
// A tracklet is a coincidence of hits in 2 of the 3 layers of a triplet or
// in 3 of the 4 layers of a doublet pair. This block reads the tracklet-path
// cell data FIFO and looks each cell up in the LUT at address
// {1, link, Slave Board, cell} (upper half of the LUT). The LUT word says
// whether the cell takes part (bit 35), whether its road needs 3 of 4
// (bit 34) rather than 2 of 3 layers, its layer (bits 33:32) and its road
// number (bits 7:0). The block ORs the layer bit into a per-road layer mask.
// At the event's end mark it scans all ROADS roads, one per cycle; every
// road whose mask has enough layers gives one tracklet word
//   {19'b0, needs_3of4, layer mask[3:0], road[7:0]}
// written to the Tracklet data FIFO, and the road is cleared. Then it writes
// the end mark and the Tracklet CW (count = tracklets). Each tracklet word
// also appears on tlet_fire/tlet_word for the tracklet monitor sampler.
// The coincidence levels are the document's; the cell-to-road mapping
// through the LUT, the road scan and the word layout are this design's.
module extract_tracklets
  import rod_pkg::*;
#(
  parameter int ROADS  = 64,
  parameter int LUT_AW = 19,
  parameter int LUT_DW = 36
) (
  input  logic  clk,
  input  logic  rst_n,
  input  cell_t cell_in,
  input  logic  cell_empty,
  output logic  cell_rd,
  input  cw_t   cw_in,
  input  logic  cw_empty,
  output logic  cw_rd,
  output logic  lut_req,
  output logic  [LUT_AW-1:0] lut_addr,
  input  logic  lut_gnt,
  input  logic  lut_rvalid,
  input  logic  [LUT_DW-1:0] lut_rdata,
  output logic  data_wr,
  output logic  [32:0] data_wdata,
  input  logic  data_full,
  output logic  cw_wr,
  output cw_t   cw_wdata,
  input  logic  cw_full,
  output logic  tlet_fire,
  output logic  [31:0] tlet_word
);
  localparam int RW = $clog2(ROADS);
  typedef enum logic [2:0] {IDLE, REQ, WAIT, SCAN, FIN} st_t;
  st_t st;
  logic [3:0]  mask [ROADS];
  logic        k34  [ROADS];
  logic [RW-1:0] r;
  logic [11:0] ntl;

  assign lut_req  = st == REQ;
  assign lut_addr = LUT_AW'({1'b1, {(LUT_AW-13){1'b0}}, cell_in.link, cell_in.sb, cell_in.caddr});

  logic [2:0] nl;
  logic       hit_road;
  always_comb begin
    nl = '0;
    for (int i = 0; i < 4; i++) nl += 3'(mask[r][i]);
    hit_road = k34[r] ? (nl >= 3'd3) : (nl >= 3'd2);
  end

  logic scan_go;
  assign scan_go   = st == SCAN && !(hit_road && data_full);
  assign tlet_word = {19'b0, k34[r], mask[r], 8'(r)};
  assign tlet_fire = scan_go && hit_road;

  logic fin_go;
  assign fin_go = st == FIN && !data_full && !cw_full && !cw_empty;

  assign data_wr    = tlet_fire || fin_go;
  assign data_wdata = fin_go ? {1'b1, 32'h0} : {1'b0, tlet_word};
  assign cw_wr      = fin_go;
  assign cw_rd      = fin_go;
  assign cell_rd    = (st == WAIT && lut_rvalid) || fin_go;
  always_comb begin
    cw_wdata       = cw_in;
    cw_wdata.count = ntl;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= IDLE; r <= '0; ntl <= '0;
      for (int i = 0; i < ROADS; i++) begin mask[i] <= '0; k34[i] <= 1'b0; end
    end else begin
      unique case (st)
        IDLE: if (!cell_empty) st <= cell_in.last ? SCAN : REQ;
        REQ:  if (lut_gnt) st <= WAIT;
        WAIT: if (lut_rvalid) begin
                if (lut_rdata[35] && int'(lut_rdata[7:0]) < ROADS) begin
                  mask[RW'(lut_rdata[7:0])][lut_rdata[33:32]] <= 1'b1;
                  k34[RW'(lut_rdata[7:0])] <= lut_rdata[34];
                end
                st <= IDLE;
              end
        SCAN: if (scan_go) begin
                mask[r] <= '0;
                k34[r]  <= 1'b0;
                if (hit_road) ntl <= ntl + 1'b1;
                r <= r + 1'b1;
                if (int'(r) == ROADS-1) st <= FIN;
              end
        FIN:  if (fin_go) begin
                ntl <= '0;
                r   <= '0;
                st  <= IDLE;
              end
        default: st <= IDLE;
      endcase
    end
  end
endmodule
