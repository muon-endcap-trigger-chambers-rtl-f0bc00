// sync_parse: synchronise event ID, parse and verify the front-end records.
//
// For every current event ID (from build_evid) this process visits the
// enabled links in order over the FE bus. For each link it pops one event
// CW and then the fragment's halfwords from the event data FIFO up to the
// end mark, parsing the record one byte per cycle:
//   type/version, b'0000'+LDB ID, 24-bit map of Slave Boards not responding,
//   then per Slave Board: b'000'+SB ID, BCID high 8 bits, BCID low 4 bits +
//   4-bit L1ID, and cells (b'000'+cell address, central bitmap, and for
//   record type 1 previous and following bitmaps) until x'DF';
//   then 0..3 padding bytes x'B3' and the end-of-event marker x'FCFCA55A'.
// Checks (flag bits in rod_pkg): record type 1 or 2 only; LDB nibble, SB ID
// 0..17 and cell address 0..20; each Slave Board's BCID and low 4 L1ID bits
// against the TTC event ID; a zero map bit where sb_mask expects a board;
// fragment truncated or link framing error (from the gate keeper CW);
// fragment missing after TIMEOUT cycles. After a format error the rest of
// the fragment is skipped.
// Outputs, each written only when the target FIFO has room (else the
// parser stalls): every raw halfword (when raw_en) plus an end mark and a
// raw CW; every 8-bit cell as a cell_t to the cell data FIFOs of the hit and
// tracklet paths (the same write goes to both), then an end mark and one
// cw_t with the cell count and the OR of the event's error flags.
// An event keeps at most RAW_MAX raw halfwords (the raw data FIFO depth
// less one: the formatter needs the raw CW, written at the event's end,
// before it reads any raw data). Later halfwords are parsed but not kept,
// and the event gets the truncation error bit.
// err_pulse gives one pulse per error kind per link fragment.
// The parse follows the record format; byte-serial parsing, the link order,
// the timeout and the FIFO item layouts are this design's choices.
module sync_parse
  import rod_pkg::*;
#(
  parameter int LINKS   = rod_pkg::N_LINKS,
  parameter int TIMEOUT = 4096,
  parameter int RAW_MAX = 1023          // raw halfwords kept per event: raw data FIFO depth - 1
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  [LINKS-1:0] link_en,
  input  logic  [23:0] sb_mask,
  input  logic  raw_en,
  // current event ID
  input  evid_t evid,
  input  logic  evid_valid,
  output logic  evid_ready,
  // FE bus: event CW and data FIFOs of every link
  input  ev_cw_t       ev_cw   [LINKS],
  input  logic [LINKS-1:0] ev_cw_empty,
  output logic [LINKS-1:0] ev_cw_rd,
  input  logic [16:0]  ev_data [LINKS],
  input  logic [LINKS-1:0] ev_data_empty,
  output logic [LINKS-1:0] ev_data_rd,
  // raw data path
  output logic  raw_wr,
  output logic  [16:0] raw_wdata,     // {end, halfword}
  input  logic  raw_full,
  output logic  raw_cw_wr,
  output cw_t   raw_cw,
  input  logic  raw_cw_full,
  // cell path (hit and tracklet cell FIFO pairs)
  output logic  cell_wr,
  output cell_t cell_data,
  input  logic  cell_full,
  output logic  cell_cw_wr,
  output cw_t   cell_cw,
  input  logic  cell_cw_full,
  // error counters
  output logic  [N_ERR-1:0] err_pulse
);
  localparam int LW = (LINKS > 1) ? $clog2(LINKS) : 1;
  typedef enum logic [2:0] {S_EVID, S_LINK, S_FETCH, S_BYTE, S_END} st_t;
  typedef enum logic [4:0] {P_TYPE, P_LDB, P_MAP0, P_MAP1, P_MAP2, P_SB, P_BCH,
                            P_BCL, P_CELL, P_BMC, P_BMP, P_BMN, P_PAD, P_E1,
                            P_E2, P_E3, P_DONE, P_SKIP} pst_t;
  st_t   st;
  pst_t  ps;
  evid_t cur;
  logic [LW:0]   link;
  logic [15:0]   hw;
  logic          bsel;
  logic [7:0]    byt;
  logic [N_ERR-1:0] ev_err, frag_err;
  logic [11:0]   ncell, nraw;
  logic [23:0]   map;
  logic [7:0]    bch;
  logic          bc3;
  cell_t         cc;          // cell being assembled
  logic [$clog2(TIMEOUT+1)-1:0] tmo;
  logic [LW-1:0] li;

  assign li  = link[LW-1:0];
  assign byt = bsel ? hw[7:0] : hw[15:8];

  // Combinational FIFO handshakes
  logic cur_cw_empty, cur_data_empty, cur_end;
  logic [15:0] cur_hw;
  assign cur_cw_empty   = ev_cw_empty[li];
  assign cur_data_empty = ev_data_empty[li];
  assign cur_end        = ev_data[li][16];
  assign cur_hw         = ev_data[li][15:0];

  // cell emitted by the current byte
  logic emit;
  always_comb begin
    emit = 1'b0;
    if (st == S_BYTE)
      emit = (ps == P_BMC && !bc3) || ps == P_BMN;
  end

  logic byte_go;     // the current byte can be consumed this cycle
  assign byte_go = st == S_BYTE && !(emit && cell_full);

  logic fetch_go;
  // raw halfwords are kept while the event has fewer than RAW_MAX
  logic raw_keep;
  assign raw_keep = raw_en && int'(nraw) < RAW_MAX;
  assign fetch_go = st == S_FETCH && !cur_data_empty &&
                    (cur_end || !raw_keep || !raw_full);

  logic end_go;
  assign end_go = st == S_END && !cell_full && !cell_cw_full &&
                  (!raw_en || (!raw_full && !raw_cw_full));

  always_comb begin
    ev_cw_rd   = '0;
    ev_data_rd = '0;
    if (st == S_LINK && link < (LW+1)'(LINKS) && link_en[li] && !cur_cw_empty)
      ev_cw_rd[li] = 1'b1;
    if (fetch_go) ev_data_rd[li] = 1'b1;
  end

  assign evid_ready = end_go;
  assign raw_wr     = (fetch_go && !cur_end && raw_keep) || (end_go && raw_en);
  assign raw_wdata  = end_go ? {1'b1, 16'h0} : {1'b0, cur_hw};
  assign raw_cw_wr  = end_go && raw_en;
  assign raw_cw     = '{evid: cur, err: ev_err, count: nraw};
  assign cell_wr    = (byte_go && emit) || end_go;
  always_comb begin
    cell_data = cc;
    if (end_go) cell_data = '{last: 1'b1, default: '0};
    else if (ps == P_BMC) cell_data.bm_c = byt;
    else cell_data.bm_n = byt;
  end
  assign cell_cw_wr = end_go;
  assign cell_cw    = '{evid: cur, err: ev_err, count: ncell};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_EVID; ps <= P_TYPE; cur <= '0; link <= '0; hw <= '0; bsel <= 1'b0;
      ev_err <= '0; frag_err <= '0; ncell <= '0; nraw <= '0; map <= '0;
      bch <= '0; bc3 <= 1'b0; cc <= '0; tmo <= '0; err_pulse <= '0;
    end else begin
      err_pulse <= '0;
      unique case (st)
        S_EVID: if (evid_valid) begin
                  cur <= evid; link <= '0; ev_err <= '0; ncell <= '0; nraw <= '0;
                  tmo <= '0; st <= S_LINK;
                end
        S_LINK: begin
                  if (link >= (LW+1)'(LINKS)) st <= S_END;
                  else if (!link_en[li]) link <= link + 1'b1;
                  else if (!cur_cw_empty) begin
                    frag_err <= '0;
                    frag_err[E_TRUNC] <= ev_cw[li].trunc;
                    frag_err[E_LINK]  <= ev_cw[li].linkerr;
                    ps <= P_TYPE; tmo <= '0;
                    st <= S_FETCH;
                  end else if (int'(tmo) == TIMEOUT) begin
                    err_pulse[E_TIMEOUT] <= 1'b1;
                    ev_err[E_TIMEOUT]    <= 1'b1;
                    tmo <= '0;
                    link <= link + 1'b1;
                  end else tmo <= tmo + 1'b1;
                end
        S_FETCH: if (fetch_go) begin
                  if (cur_end) begin
                    // fragment complete: anything but a clean finish is a format error
                    if (ps != P_DONE && ps != P_SKIP && !frag_err[E_TRUNC])
                      frag_err[E_FORMAT] <= 1'b1;
                    err_pulse <= frag_err | ((ps != P_DONE && ps != P_SKIP && !frag_err[E_TRUNC])
                                             ? N_ERR'(1 << E_FORMAT) : '0);
                    ev_err <= ev_err | frag_err | ((ps != P_DONE && ps != P_SKIP && !frag_err[E_TRUNC])
                                                   ? N_ERR'(1 << E_FORMAT) : '0);
                    link <= link + 1'b1;
                    st <= S_LINK;
                  end else begin
                    hw <= cur_hw; bsel <= 1'b0; st <= S_BYTE;
                    if (raw_keep) nraw <= nraw + 1'b1;
                    else if (raw_en && !ev_err[E_TRUNC]) begin
                      // the event's raw data no longer fit: drop the rest
                      ev_err[E_TRUNC]    <= 1'b1;
                      err_pulse[E_TRUNC] <= 1'b1;
                    end
                  end
                end
        S_BYTE: if (byte_go) begin
                  bsel <= 1'b1;
                  if (bsel) st <= S_FETCH;
                  unique case (ps)
                    P_TYPE: begin
                      if (byt[7:5] == RT_BC3 || byt[7:5] == RT_BC1) begin
                        bc3 <= byt[7:5] == RT_BC3; ps <= P_LDB;
                      end else begin
                        frag_err[E_TYPE] <= 1'b1; ps <= P_SKIP;
                      end
                    end
                    P_LDB:  if (byt[7:4] != 4'h0) begin
                              frag_err[E_FORMAT] <= 1'b1; ps <= P_SKIP;
                            end else ps <= P_MAP0;
                    P_MAP0: begin map[23:16] <= byt; ps <= P_MAP1; end
                    P_MAP1: begin map[15:8]  <= byt; ps <= P_MAP2; end
                    P_MAP2: begin
                      if (({map[23:8], byt} & sb_mask) != sb_mask) frag_err[E_SBMAP] <= 1'b1;
                      ps <= P_SB;
                    end
                    P_SB, P_PAD: begin
                      if (byt == PAD) ps <= P_PAD;
                      else if (byt == EOE[31:24]) ps <= P_E1;
                      else if (ps == P_SB && byt[7:5] == 3'b000 && byt[4:0] <= 5'(MAX_SB)) begin
                        cc.sb <= byt[4:0]; ps <= P_BCH;
                      end else begin
                        frag_err[E_FORMAT] <= 1'b1; ps <= P_SKIP;
                      end
                    end
                    P_BCH: begin bch <= byt; ps <= P_BCL; end
                    P_BCL: begin
                      if ({bch, byt[7:4]} != cur.bcid)      frag_err[E_BCID] <= 1'b1;
                      if (byt[3:0] != cur.l1id[3:0])        frag_err[E_L1ID] <= 1'b1;
                      ps <= P_CELL;
                    end
                    P_CELL: begin
                      if (byt == EOSB) ps <= P_SB;
                      else if (byt[7:5] == 3'b000 && byt[4:0] <= 5'(MAX_CELL)) begin
                        cc.last <= 1'b0; cc.link <= 2'(li); cc.caddr <= byt[4:0];
                        cc.bc3 <= bc3; cc.bm_p <= '0; cc.bm_n <= '0;
                        ps <= P_BMC;
                      end else begin
                        frag_err[E_FORMAT] <= 1'b1; ps <= P_SKIP;
                      end
                    end
                    P_BMC: begin
                      cc.bm_c <= byt;
                      ps <= bc3 ? P_BMP : P_CELL;
                      if (!bc3) ncell <= ncell + 1'b1;
                    end
                    P_BMP: begin cc.bm_p <= byt; ps <= P_BMN; end
                    P_BMN: begin cc.bm_n <= byt; ps <= P_CELL; ncell <= ncell + 1'b1; end
                    P_E1: if (byt == EOE[23:16]) ps <= P_E2;
                          else begin frag_err[E_FORMAT] <= 1'b1; ps <= P_SKIP; end
                    P_E2: if (byt == EOE[15:8]) ps <= P_E3;
                          else begin frag_err[E_FORMAT] <= 1'b1; ps <= P_SKIP; end
                    P_E3: if (byt == EOE[7:0]) ps <= P_DONE;
                          else begin frag_err[E_FORMAT] <= 1'b1; ps <= P_SKIP; end
                    P_DONE: begin frag_err[E_FORMAT] <= 1'b1; ps <= P_SKIP; end
                    P_SKIP: ;
                    default: ;
                  endcase
                end
        S_END: if (end_go) st <= S_EVID;
        default: st <= S_EVID;
      endcase
    end
  end
endmodule
