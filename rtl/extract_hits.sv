// extract_hits: turn 8-bit cell slices into individual hit channels.
//
// Reads the hit-path cell data FIFO. For each cell it forms the hit bitmap
// as the OR of the central bitmap and, for record type 1, the previous and
// following bunch-crossing bitmaps, so a hit in any of the three crossings
// counts. It then emits one hit per set bit, lowest bit first, one per
// cycle, as channel number {link, Slave Board, cell address, bit}. When it
// reaches the event's end mark it pops the matching cell CW and passes it
// on with an end item (last=1). Output is a valid/ready stream; a cell is
// popped only when its last hit has been accepted. The OR of the three
// bitmaps is the document's; the channel numbering is this design's.
module extract_hits
  import rod_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  cell_t cell_in,
  input  logic  cell_empty,
  output logic  cell_rd,
  input  cw_t   cw_in,
  input  logic  cw_empty,
  output logic  cw_rd,
  output logic  hit_valid,
  output logic  hit_last,
  output logic [CHAN_W-1:0] hit_chan,
  output cw_t   hit_cw,
  input  logic  hit_ready
);
  logic [7:0] bm, rest;
  logic [2:0] bitn;
  logic       have;     // a cell is being split (bm holds remaining bits)
  logic [11:0] key;     // {link, sb, cell}

  always_comb begin
    bitn = '0;
    for (int i = 7; i >= 0; i--) if (bm[i]) bitn = 3'(i);
  end
  assign rest = bm & ~(8'(1) << bitn);

  logic [7:0] in_bm;
  assign in_bm = cell_in.bm_c | (cell_in.bc3 ? (cell_in.bm_p | cell_in.bm_n) : 8'h0);

  // end item: needs the CW; ordinary cells are loaded into bm
  assign hit_valid = have || (!cell_empty && cell_in.last && !cw_empty);
  assign hit_last  = !have;
  assign hit_chan  = {key, bitn};
  assign hit_cw    = cw_in;
  assign cw_rd     = !have && !cell_empty && cell_in.last && !cw_empty && hit_ready;
  assign cell_rd   = !have && !cell_empty && (cell_in.last ? (!cw_empty && hit_ready) : 1'b1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      have <= 1'b0; bm <= '0; key <= '0;
    end else if (have) begin
      if (hit_ready) begin
        bm <= rest;
        if (rest == 8'h0) have <= 1'b0;
      end
    end else if (!cell_empty && !cell_in.last) begin
      bm   <= in_bm;
      key  <= {cell_in.link, cell_in.sb, cell_in.caddr};
      have <= in_bm != 8'h0;
    end
  end
endmodule
