// rod_pkg: constants and types shared by the TGC Read Out Driver (ROD) FPGA.
//
// The front-end event record is a byte stream framed by S-link control
// words. The framing words, the end-of-Slave-Board marker, the padding byte
// and the end-of-event marker are the values the record format defines.
// The record travels over a G-link as 16-bit halfwords with a control flag;
// a 32-bit control word is sent as two flagged halfwords, high half first
// (this split is this design's choice).
//
// Inside the FPGA, every pipeline stage passes a control word (CW) per event
// next to its variable-length data stream. The CW layout below is this
// design's own: event ID, bunch ID, trigger type, error flags, item count.
package rod_pkg;

  localparam int N_LINKS   = 4;    // front-end links per prototype ROD
  localparam int BCID_W    = 12;
  localparam int L1ID_W    = 24;
  localparam int ECRC_W    = 8;
  localparam int TT_W      = 8;
  localparam int EVID_W    = ECRC_W + L1ID_W;  // extended L1ID, 32 bits

  // Framing and markers of the front-end event record
  localparam logic [15:0] BOF_HI   = 16'hB0F0;  // begin control word, high half
  localparam logic [15:0] EOF_HI   = 16'hE0F0;  // end control word, high half
  localparam logic [7:0]  EOSB     = 8'hDF;     // end of Slave Board
  localparam logic [7:0]  PAD      = 8'hB3;     // padding byte
  localparam logic [31:0] EOE      = 32'hFCFCA55A; // end of event
  localparam int          MAX_CELL = 20;        // cell address 0..20
  localparam int          MAX_SB   = 17;        // Slave Board ID 0..17

  // Record types
  localparam logic [2:0] RT_BC3 = 3'd1;  // central, previous and following BC
  localparam logic [2:0] RT_BC1 = 3'd2;  // central BC only

  // Error flag bits carried in CWs and counted by the error counters
  localparam int E_TIMEOUT = 0;  // link fragment missing
  localparam int E_FORMAT  = 1;  // record does not follow the format
  localparam int E_BCID    = 2;  // Slave Board BCID differs from TTC
  localparam int E_L1ID    = 3;  // Slave Board L1ID differs from TTC
  localparam int E_SBMAP   = 4;  // a Slave Board did not provide data
  localparam int E_LINK    = 5;  // link framing error field non-zero / protocol
  localparam int E_TRUNC   = 6;  // record cut at the link FIFO, or hits/raw data over the event limit
  localparam int E_TYPE    = 7;  // unsupported record type
  localparam int N_ERR     = 8;

  typedef struct packed {
    logic [EVID_W-1:0] l1id;   // {ECR count, L1ID}
    logic [BCID_W-1:0] bcid;
    logic [TT_W-1:0]   ttype;
  } evid_t;                    // 52 bits

  typedef struct packed {
    evid_t       evid;
    logic [7:0]  err;
    logic [11:0] count;
  } cw_t;                      // 72 bits

  // Link halfword with control flag
  typedef struct packed {
    logic        ctrl;
    logic [15:0] data;
  } link_word_t;

  // Gate keeper's per-event CW: halfword count and link errors
  typedef struct packed {
    logic [11:0] words;
    logic        trunc;
    logic        linkerr;
  } ev_cw_t;

  // One 8-bit cell slice as it leaves the synchroniser
  typedef struct packed {
    logic       last;        // end mark: no cell, closes the event
    logic [1:0] link;
    logic [4:0] sb;
    logic [4:0] caddr;
    logic       bc3;         // previous/following bitmaps valid
    logic [7:0] bm_c;
    logic [7:0] bm_p;
    logic [7:0] bm_n;
  } cell_t;                  // 38 bits

  // Hit channel number: link, Slave Board, cell, bit
  localparam int CHAN_W = 15;

endpackage
