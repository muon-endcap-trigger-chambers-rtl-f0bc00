// format_rob: assemble one output event from the Hit, Tracklet and Raw FIFOs.
//
// Waits until the Hit CW and the Tracklet CW of the next event are present
// (and the Raw CW when raw_en), then sends a framed event as 33-bit words
// {ctrl, data} towards the output FIFO:
//   ctrl  0xB0F00000                       begin of event
//         extended L1ID
//         {BCID[11:0], trigger type[7:0], error flags[7:0], 4'b0}
//         {hit count[15:0], tracklet count[15:0]}
//         {raw halfword count[15:0], 16'b0}
//         hit words ..., tracklet words ..., raw halfwords two per word
//         (high half first, a lone last halfword padded with zero)
//   ctrl  0xE0F0 00 err                    end of event, error field
// Then it pops the CWs and the data end marks. The output is a valid/ready
// stream; ev_start pulses with the event ID when the first word goes out,
// for sample control. The document asks for ATLAS standard ROB format but
// does not give it; the framing words repeat the front-end ones and the
// header layout is this design's own.
module format_rob
  import rod_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  raw_en,
  input  cw_t   hit_cw,
  input  logic  hit_cw_empty,
  output logic  hit_cw_rd,
  input  logic  [32:0] hit_data,
  input  logic  hit_data_empty,
  output logic  hit_data_rd,
  input  cw_t   tl_cw,
  input  logic  tl_cw_empty,
  output logic  tl_cw_rd,
  input  logic  [32:0] tl_data,
  input  logic  tl_data_empty,
  output logic  tl_data_rd,
  input  cw_t   raw_cw,
  input  logic  raw_cw_empty,
  output logic  raw_cw_rd,
  input  logic  [16:0] raw_data,
  input  logic  raw_data_empty,
  output logic  raw_data_rd,
  output logic  out_valid,
  output logic  [32:0] out_word,     // {ctrl, data}
  input  logic  out_ready,
  output logic  ev_start,
  output evid_t ev_evid
);
  typedef enum logic [3:0] {IDLE, BOF, H1, H2, H3, H4, HITS, TLETS, RAW0, RAW1,
                            EOFW, DONE} st_t;
  st_t st;
  logic [15:0] rhi;
  logic [7:0]  err;

  logic cws_ready;
  assign cws_ready = !hit_cw_empty && !tl_cw_empty && (!raw_en || !raw_cw_empty);
  assign err = hit_cw.err | tl_cw.err | (raw_en ? raw_cw.err : 8'h0);
  assign ev_evid = hit_cw.evid;

  logic fire;
  assign fire = out_valid && out_ready;

  always_comb begin
    out_valid   = 1'b0;
    out_word    = '0;
    hit_data_rd = 1'b0;
    tl_data_rd  = 1'b0;
    raw_data_rd = 1'b0;
    unique case (st)
      BOF:  begin out_valid = 1'b1; out_word = {1'b1, BOF_HI, 16'h0}; end
      H1:   begin out_valid = 1'b1; out_word = {1'b0, hit_cw.evid.l1id}; end
      H2:   begin out_valid = 1'b1;
                  out_word = {1'b0, hit_cw.evid.bcid, hit_cw.evid.ttype, err, 4'h0}; end
      H3:   begin out_valid = 1'b1;
                  out_word = {1'b0, 4'h0, hit_cw.count, 4'h0, tl_cw.count}; end
      H4:   begin out_valid = 1'b1;
                  out_word = {1'b0, raw_en ? {4'h0, raw_cw.count} : 16'h0, 16'h0}; end
      HITS: if (!hit_data_empty) begin
              if (hit_data[32]) hit_data_rd = 1'b1;          // end mark
              else begin
                out_valid = 1'b1; out_word = {1'b0, hit_data[31:0]};
                hit_data_rd = out_ready;
              end
            end
      TLETS: if (!tl_data_empty) begin
              if (tl_data[32]) tl_data_rd = 1'b1;
              else begin
                out_valid = 1'b1; out_word = {1'b0, tl_data[31:0]};
                tl_data_rd = out_ready;
              end
            end
      RAW0: if (!raw_data_empty) raw_data_rd = 1'b1;
      RAW1: if (!raw_data_empty) begin
              out_valid = 1'b1;
              out_word  = {1'b0, rhi, raw_data[16] ? 16'h0 : raw_data[15:0]};
              raw_data_rd = out_ready;   // a padded word also pops the end mark
            end
      EOFW: begin out_valid = 1'b1; out_word = {1'b1, EOF_HI, 8'h0, err}; end
      default: ;
    endcase
  end

  assign ev_start  = st == BOF && fire;
  assign hit_cw_rd = st == DONE;
  assign tl_cw_rd  = st == DONE;
  assign raw_cw_rd = st == DONE && raw_en;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= IDLE; rhi <= '0;
    end else begin
      unique case (st)
        IDLE:  if (cws_ready) st <= BOF;
        BOF:   if (fire) st <= H1;
        H1:    if (fire) st <= H2;
        H2:    if (fire) st <= H3;
        H3:    if (fire) st <= H4;
        H4:    if (fire) st <= HITS;
        HITS:  if (!hit_data_empty && hit_data[32]) st <= TLETS;
        TLETS: if (!tl_data_empty && tl_data[32]) st <= raw_en ? RAW0 : EOFW;
        RAW0:  if (!raw_data_empty) begin
                 if (raw_data[16]) st <= EOFW;     // end mark consumed
                 else begin rhi <= raw_data[15:0]; st <= RAW1; end
               end
        RAW1:  if (fire) st <= raw_data[16] ? EOFW : RAW0;
        EOFW:  if (fire) st <= DONE;
        DONE:  st <= IDLE;
        default: st <= IDLE;
      endcase
    end
  end
endmodule
