// rod_tb_pkg: stimulus and reference helpers shared by the ROD testbenches.
//
// make_record builds a front-end event record byte by byte, in the record
// format the ROD parses (type/version, LDB ID, 24-bit Slave Board map, per
// board: ID, BCID, L1ID, cells with one or three bitmaps, x'DF'; padding
// x'B3' to a 4-byte boundary; x'FCFCA55A'), and returns the cells it put in
// as the reference for the parser. Contents come from $urandom, so a seed
// set with $urandom(seed) makes a run repeatable. to_halfwords frames the
// bytes as link half-words with the begin and end control words.
package rod_tb_pkg;
  import rod_pkg::*;

  typedef logic [7:0] byte_q_t[$];
  typedef cell_t      cell_q_t[$];
  typedef link_word_t lw_q_t[$];

  // nsb Slave Boards with 0..maxcells cells each, IDs ascending from 0
  function automatic void make_record(input int rtype, input int ldb,
      input logic [11:0] bcid, input logic [3:0] l1id, input logic [23:0] map,
      input int link, input int nsb, input int maxcells,
      output byte_q_t b, output cell_q_t cells);
    b = {};
    cells = {};
    b.push_back({3'(rtype), 5'd1});
    b.push_back({4'h0, 4'(ldb)});
    b.push_back(map[23:16]); b.push_back(map[15:8]); b.push_back(map[7:0]);
    for (int s = 0; s < nsb; s++) begin
      int nc;
      int ca;
      b.push_back({3'b000, 5'(s)});
      b.push_back(bcid[11:4]);
      b.push_back({bcid[3:0], l1id});
      nc = (maxcells == 0) ? 0 : int'($urandom_range(0, maxcells));
      ca = 0;
      for (int c = 0; c < nc && ca <= MAX_CELL; c++) begin
        cell_t x;
        x = '0;
        x.link = 2'(link); x.sb = 5'(s); x.caddr = 5'(ca);
        x.bc3  = rtype == 1;
        x.bm_c = 8'($urandom_range(1, 255));
        if (rtype == 1) begin
          x.bm_p = 8'($urandom); x.bm_n = 8'($urandom);
        end
        b.push_back({3'b000, 5'(ca)});
        b.push_back(x.bm_c);
        if (rtype == 1) begin b.push_back(x.bm_p); b.push_back(x.bm_n); end
        cells.push_back(x);
        ca += int'($urandom_range(1, 3));
      end
      b.push_back(EOSB);
    end
    while (b.size() % 4 != 0) b.push_back(PAD);
    b.push_back(EOE[31:24]); b.push_back(EOE[23:16]);
    b.push_back(EOE[15:8]);  b.push_back(EOE[7:0]);
  endfunction

  function automatic lw_q_t to_halfwords(input byte_q_t b);
    lw_q_t q;
    q = {};
    q.push_back('{ctrl: 1'b1, data: BOF_HI});
    q.push_back('{ctrl: 1'b1, data: 16'h0000});
    for (int i = 0; i < b.size(); i += 2) q.push_back('{ctrl: 1'b0, data: {b[i], b[i+1]}});
    q.push_back('{ctrl: 1'b1, data: EOF_HI});
    q.push_back('{ctrl: 1'b1, data: 16'h0000});
    return q;
  endfunction

  // hit channels of one cell, lowest bit first
  function automatic void cell_hits(input cell_t c, ref logic [14:0] h[$]);
    logic [7:0] bm;
    bm = c.bm_c | (c.bc3 ? (c.bm_p | c.bm_n) : 8'h0);
    for (int i = 0; i < 8; i++) if (bm[i]) h.push_back({c.link, c.sb, c.caddr, 3'(i)});
  endfunction
endpackage
