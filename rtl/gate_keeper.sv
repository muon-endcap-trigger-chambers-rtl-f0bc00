// gate_keeper: per-link receiver in the front-end link clock domain.
//
// A mux in front selects the front-end link or test data loaded from the
// local bus (test_mode). The gate keeper recognises the S-link framing
// control words around each event record (two control-flagged halfwords
// each: 0xB0F0,rrrr to begin and 0xE0F0,rrrr to end) and writes:
// - the record's data halfwords into the event data FIFO, each as
//   {end=0, halfword}, followed by one end mark {end=1, 0};
// - one control word per event into the event CW FIFO: halfword count,
//   truncation flag and link-error flag (non-zero error field rrrr, or a
//   framing violation).
// The link has no flow control, so the gate keeper only opens the gate
// (ENA) for a new event when the CW FIFO has room and the data FIFO has at
// least two free places; otherwise the whole event is dropped and counted
// in dropped. If the data FIFO fills during an event, further halfwords are
// discarded and the CW says "truncated"; one place is always kept for the
// end mark. A begin word in the middle of an event closes the open event
// with the link-error flag. A re-sync request (toggle from the core domain,
// synchronised here) closes an open event the same way and waits for the
// next begin word. The framing values follow the record format; the FIFO
// item layout and the drop/truncate policy are this design's choices.
module gate_keeper
  import rod_pkg::*;
#(
  parameter int DATA_AW = 9,           // event data FIFO depth 2**DATA_AW
  parameter int CW_AW   = 4            // event CW FIFO depth 2**CW_AW
) (
  input  logic       clk,              // link clock
  input  logic       rst_n,
  input  logic       fe_valid,
  input  link_word_t fe_word,
  input  logic       test_mode,
  input  logic       test_valid,
  input  link_word_t test_word,
  output logic       test_ready,
  input  logic       resync_tgl,       // toggles once per re-sync request
  // event data FIFO write side
  output logic       data_wr,
  output logic [16:0] data_wdata,      // {end, halfword}
  input  logic [DATA_AW:0] data_level,
  // event CW FIFO write side
  output logic       cw_wr,
  output ev_cw_t     cw_wdata,
  input  logic [CW_AW:0] cw_level,
  output logic [15:0] dropped,
  output logic       ena
);
  typedef enum logic [1:0] {IDLE, BOF2, DATA, EOF2} st_t;
  st_t st;
  logic        in_v;
  link_word_t  in_w;
  logic [11:0] words;
  logic        trunc, linkerr, skip;
  logic [2:0]  rs_sync;
  logic        resync;
  localparam int DEPTH = 2**DATA_AW;

  assign in_v       = test_mode ? test_valid : fe_valid;
  assign in_w       = test_mode ? test_word  : fe_word;
  assign test_ready = test_mode;
  assign resync     = rs_sync[2] ^ rs_sync[1];
  // The FIFO levels do not yet include a write issued in the last cycle.
  assign ena        = int'(cw_level) + int'(cw_wr) < 2**CW_AW &&
                      int'(data_level) + int'(data_wr) <= DEPTH - 2;

  logic room;   // room for one more data halfword, keeping one for the end mark
  assign room = int'(data_level) + int'(data_wr) < DEPTH - 1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= IDLE; words <= '0; trunc <= 1'b0; linkerr <= 1'b0; skip <= 1'b0;
      data_wr <= 1'b0; data_wdata <= '0; cw_wr <= 1'b0; cw_wdata <= '0;
      dropped <= '0; rs_sync <= '0;
    end else begin
      rs_sync <= {rs_sync[1:0], resync_tgl};
      data_wr <= 1'b0;
      cw_wr   <= 1'b0;
      if (resync) begin
        if (st != IDLE && !skip) begin
          data_wr    <= 1'b1;
          data_wdata <= {1'b1, 16'h0};
          cw_wr      <= 1'b1;
          cw_wdata   <= '{words: words, trunc: trunc, linkerr: 1'b1};
        end
        st <= IDLE;
      end else if (in_v) begin
        unique case (st)
          IDLE: if (in_w.ctrl && in_w.data == BOF_HI) begin
                  st <= BOF2; words <= '0; trunc <= 1'b0; linkerr <= 1'b0;
                  skip <= !ena;
                  if (!ena) dropped <= dropped + 1'b1;
                end
          BOF2: begin
                  st <= DATA;
                  linkerr <= !in_w.ctrl || in_w.data != 16'h0;
                end
          DATA: if (in_w.ctrl) begin
                  if (in_w.data == EOF_HI) st <= EOF2;
                  else begin
                    // unexpected control word: close the event as faulty
                    if (!skip) begin
                      data_wr <= 1'b1; data_wdata <= {1'b1, 16'h0};
                      cw_wr <= 1'b1;
                      cw_wdata <= '{words: words, trunc: trunc, linkerr: 1'b1};
                    end
                    if (in_w.data == BOF_HI) begin
                      st <= BOF2; words <= '0; trunc <= 1'b0; linkerr <= 1'b0;
                      skip <= !ena;
                      if (!ena) dropped <= dropped + 1'b1;
                    end else st <= IDLE;
                  end
                end else if (!skip) begin
                  if (room && words != '1) begin
                    data_wr    <= 1'b1;
                    data_wdata <= {1'b0, in_w.data};
                    words      <= words + 1'b1;
                  end else trunc <= 1'b1;
                end
          EOF2: begin
                  st <= IDLE;
                  if (!skip) begin
                    data_wr    <= 1'b1;
                    data_wdata <= {1'b1, 16'h0};
                    cw_wr      <= 1'b1;
                    cw_wdata   <= '{words: words, trunc: trunc,
                                    linkerr: linkerr || !in_w.ctrl || in_w.data != 16'h0};
                  end
                end
        endcase
      end
    end
  end
endmodule
