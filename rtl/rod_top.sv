// rod_top: the ROD FPGA of the TGC muon endcap readout.
//
// One ROD reads N_LINKS front-end links, each carrying exactly one event
// record per Level-1 Accept from a Star Switch, checks them against the
// event IDs it builds itself from the TTC signals, extracts hits and
// tracklets, formats one output event per L1A and sends it to the ROB over
// S-link. It runs in five clock domains joined only by FIFOs:
//   clk_ttc   bunch clock: ttc_evid -> EVID and TrigType FIFOs
//   clk_link  link receive clock: one gate_keeper per link -> event CW/data FIFOs
//   clk       core: build_evid, sync_parse, extract_hits, translate,
//             extract_tracklets, format_rob, sample_control, busy_ctrl,
//             ilb_regs and all single-clock FIFO pairs
//   clk_slink S-link clock: output FIFO -> slink_control
//   clk_lb    board local bus: lb_bridge
// The processes have data-dependent latencies, so each pair of neighbours is
// joined by a CW FIFO (one fixed-size control word per event) and a data
// FIFO (a variable number of items closed by an end mark). A full FIFO
// blocks its writer, and the back-pressure ends at the link FIFOs, whose
// occupancy drives BUSY. The external LUT SRAM is reached through lut_arb on
// the LUT bus pins; the S-link source and the local bus are plain ports.
// For tests, software can load halfwords into any link receiver, words into
// the output FIFO and event IDs into a core-domain test event-ID FIFO that
// replaces the TTC FIFOs while control bit 13 is set, so that a whole event
// can be built with no TTC or link input, as the document describes.
// Control bit 14 replaces the TTC inputs by ttc_sim, which makes BCRs, L1As
// at a programmed period (held while BUSY) and trigger types. The la_out
// pins carry one status word, chosen over the ILB, to a logic analyser.
// Configuration registers are quasi-static: software changes them only
// while the pipeline is idle, so they reach other domains directly.
// Status words on the ILB (address 40 + n): 0-3 link data FIFO levels, 4-7
// link CW FIFO levels, 8 EVID FIFO level, 9 output FIFO level, 10-12 hit,
// tracklet and event monitor levels, 13 {XOFF stop, EVID valid, BUSY},
// 14 events sampled, 15 BUSY cycles, 16 event samples truncated, 17/18 hit
// and tracklet samples missed, 19 XOFFs received, 20-23 events dropped per
// link. The counters from the S-link and link domains (19-23) are read as
// they are, unsynchronised: software reads twice and keeps a repeated value.
// The block structure follows the document's structural diagram; FIFO
// depths and the internal formats are this design's choices.
module rod_top
  import rod_pkg::*;
#(
  parameter int LINK_AW  = 9,     // event data FIFO per link: 512 half-words
  parameter int EVCW_AW  = 4,     // event CW FIFO per link: 16 events
  parameter int EVID_AW  = 4,     // EVID and TrigType FIFOs: 16 events
  parameter int OUT_AW   = 9,     // output FIFO: 512 words
  parameter int ROADS    = 64,
  parameter int TIMEOUT  = 4096
) (
  input  logic       rst_n,
  input  logic       clk_ttc,
  input  logic       clk_link,
  input  logic       clk,
  input  logic       clk_slink,
  input  logic       clk_lb,
  // TTC
  input  logic       bcr,
  input  logic       ecr,
  input  logic       ocr,
  input  logic       l1a,
  input  logic       tt_strobe,
  input  logic [TT_W-1:0] tt,
  output logic       busy,
  // front-end links (deserialised G-link words)
  input  logic [N_LINKS-1:0] fe_valid,
  input  link_word_t fe_word [N_LINKS],
  // LUT SRAM
  output logic       lut_cs,
  output logic       lut_we,
  output logic [18:0] lut_addr,
  output logic [35:0] lut_wdata,
  input  logic [35:0] lut_rdata,
  // S-link source
  input  logic       lff,
  input  logic       xon,
  input  logic       xoff,
  output logic       uwen,
  output logic       uctrl,
  output logic [31:0] ud,
  // board local bus
  input  logic       lb_cs,
  input  logic       lb_wr,
  input  logic [20:0] lb_addr,
  input  logic [31:0] lb_wdata,
  output logic [31:0] lb_rdata,
  output logic       lb_ack,
  // logic-analyser pins: the status word chosen by ILB register 27, registered
  output logic [15:0] la_out
);
  // ---------------- resets
  logic rst_ttc_n, rst_link_n, rst_core_n, rst_slink_n, rst_lb_n;
  rst_sync u_rs_ttc  (.clk(clk_ttc),   .rst_n_in(rst_n), .rst_n(rst_ttc_n));
  rst_sync u_rs_link (.clk(clk_link),  .rst_n_in(rst_n), .rst_n(rst_link_n));
  rst_sync u_rs_core (.clk(clk),       .rst_n_in(rst_n), .rst_n(rst_core_n));
  rst_sync u_rs_sl   (.clk(clk_slink), .rst_n_in(rst_n), .rst_n(rst_slink_n));
  rst_sync u_rs_lb   (.clk(clk_lb),    .rst_n_in(rst_n), .rst_n(rst_lb_n));

  // ---------------- configuration from the ILB
  logic [3:0]  link_en_r;
  logic        raw_en, link_test, out_test, hit_smp_en, tl_smp_en, ev_smp_en;
  logic        bcid_en, tt_en, force_busy, resync_tgl, err_clear;
  logic [BCID_W-1:0] bc_offset, bcid_sel;
  logic [TT_W-1:0]   tt_sel;
  logic [23:0] sb_mask;
  logic [15:0] ev_prescale, hit_prescale, tl_prescale;
  logic [9:0]  busy_hi, busy_lo;

  // ---------------- TTC domain
  logic evid_wr, tt_wr;
  logic [EVID_W+BCID_W-1:0] evid_wdata, evid_rdata;
  logic [TT_W-1:0] tt_wdata, tt_rdata;
  logic [31:0] orbit;
  logic [BCID_W-1:0] bcid_now;
  logic evid_full, tt_full, evid_empty, tt_empty, evid_rd, tt_rd;
  logic [EVID_AW:0] evid_wlevel, evid_rlevel, tt_wlevel, tt_rlevel;

  // the internal TTC simulator replaces the TTC inputs while ttc_sim_en is set
  logic        ttc_sim_en;
  logic [15:0] l1a_period;
  logic        s_bcr, s_l1a, s_tt_strobe;
  logic [TT_W-1:0] s_tt;
  ttc_sim u_tsim (
    .clk(clk_ttc), .rst_n(rst_ttc_n), .enable(ttc_sim_en), .l1a_period, .busy,
    .bcr(s_bcr), .l1a(s_l1a), .tt_strobe(s_tt_strobe), .tt(s_tt));

  ttc_evid u_ttc (
    .clk(clk_ttc), .rst_n(rst_ttc_n),
    .bcr(ttc_sim_en ? s_bcr : bcr), .ecr(!ttc_sim_en && ecr), .ocr(!ttc_sim_en && ocr),
    .l1a(ttc_sim_en ? s_l1a : l1a), .tt_strobe(ttc_sim_en ? s_tt_strobe : tt_strobe),
    .tt(ttc_sim_en ? s_tt : tt),
    .bc_offset, .evid_wr, .evid_data(evid_wdata), .tt_wr, .tt_data(tt_wdata),
    .orbit, .bcid(bcid_now));

  async_fifo #(.WIDTH(EVID_W+BCID_W), .AW(EVID_AW)) u_evid_fifo (
    .wclk(clk_ttc), .wrst_n(rst_ttc_n), .wr_en(evid_wr && !evid_full), .wr_data(evid_wdata),
    .full(evid_full), .wlevel(evid_wlevel),
    .rclk(clk), .rrst_n(rst_core_n), .rd_en(evid_rd), .rd_data(evid_rdata),
    .empty(evid_empty), .rlevel(evid_rlevel));

  async_fifo #(.WIDTH(TT_W), .AW(EVID_AW)) u_tt_fifo (
    .wclk(clk_ttc), .wrst_n(rst_ttc_n), .wr_en(tt_wr && !tt_full), .wr_data(tt_wdata),
    .full(tt_full), .wlevel(tt_wlevel),
    .rclk(clk), .rrst_n(rst_core_n), .rd_en(tt_rd), .rd_data(tt_rdata),
    .empty(tt_empty), .rlevel(tt_rlevel));

  // test event IDs loaded over the local bus; in test mode build_evid reads
  // these and the TTC FIFOs keep their entries
  logic        evid_test, tevid_wr, tevid_full, tevid_empty, tevid_rd;
  logic [EVID_W+BCID_W+TT_W-1:0] tevid_wdata, tevid_rdata;
  logic        b_evid_rd, b_tt_rd;
  sync_fifo #(.WIDTH(EVID_W+BCID_W+TT_W), .DEPTH(16)) u_tevid_fifo (
    .clk, .rst_n(rst_core_n), .wr_en(tevid_wr), .wr_data(tevid_wdata), .full(tevid_full),
    .rd_en(tevid_rd), .rd_data(tevid_rdata), .empty(tevid_empty), .count());
  assign tevid_rd = evid_test && b_evid_rd;
  assign evid_rd  = !evid_test && b_evid_rd;
  assign tt_rd    = !evid_test && b_tt_rd;

  evid_t evid;
  logic  evid_valid, evid_ready;
  build_evid u_build (
    .clk, .rst_n(rst_core_n),
    .evid_fifo_data(evid_test ? tevid_rdata[EVID_W+BCID_W+TT_W-1:TT_W] : evid_rdata),
    .evid_fifo_empty(evid_test ? tevid_empty : evid_empty), .evid_fifo_rd(b_evid_rd),
    .tt_fifo_data(evid_test ? tevid_rdata[TT_W-1:0] : tt_rdata),
    .tt_fifo_empty(evid_test ? tevid_empty : tt_empty), .tt_fifo_rd(b_tt_rd),
    .evid, .evid_valid, .evid_ready);

  // ---------------- link domain
  logic        tlink_wr, tlink_full, tlink_empty, tlink_rd;
  logic [18:0] tlink_wdata, tlink_rdata;
  logic [4:0]  tlink_wlevel, tlink_rlevel;
  async_fifo #(.WIDTH(19), .AW(4)) u_tlink_fifo (
    .wclk(clk), .wrst_n(rst_core_n), .wr_en(tlink_wr), .wr_data(tlink_wdata),
    .full(tlink_full), .wlevel(tlink_wlevel),
    .rclk(clk_link), .rrst_n(rst_link_n), .rd_en(tlink_rd), .rd_data(tlink_rdata),
    .empty(tlink_empty), .rlevel(tlink_rlevel));
  assign tlink_rd = !tlink_empty && link_test;

  ev_cw_t      ev_cw      [N_LINKS];
  logic [16:0] ev_data    [N_LINKS];
  logic [N_LINKS-1:0] ev_cw_empty, ev_cw_rd, ev_data_empty, ev_data_rd;
  logic [LINK_AW:0] data_rlevel [N_LINKS];
  logic [EVCW_AW:0] cw_rlevel   [N_LINKS];
  logic [15:0]      dropped     [N_LINKS];

  for (genvar i = 0; i < N_LINKS; i++) begin : g_link
    logic        d_wr, c_wr, d_full, c_full, ena;
    logic [16:0] d_wdata;
    ev_cw_t      c_wdata;
    logic [LINK_AW:0] d_wlevel;
    logic [EVCW_AW:0] c_wlevel;
    logic        t_ready;

    gate_keeper #(.DATA_AW(LINK_AW), .CW_AW(EVCW_AW)) u_gk (
      .clk(clk_link), .rst_n(rst_link_n),
      .fe_valid(fe_valid[i]), .fe_word(fe_word[i]),
      .test_mode(link_test),
      .test_valid(!tlink_empty && tlink_rdata[18:17] == 2'(i)),
      .test_word(tlink_rdata[16:0]), .test_ready(t_ready),
      .resync_tgl,
      .data_wr(d_wr), .data_wdata(d_wdata), .data_level(d_wlevel),
      .cw_wr(c_wr), .cw_wdata(c_wdata), .cw_level(c_wlevel),
      .dropped(dropped[i]), .ena);

    async_fifo #(.WIDTH(17), .AW(LINK_AW)) u_data (
      .wclk(clk_link), .wrst_n(rst_link_n), .wr_en(d_wr), .wr_data(d_wdata),
      .full(d_full), .wlevel(d_wlevel),
      .rclk(clk), .rrst_n(rst_core_n), .rd_en(ev_data_rd[i]), .rd_data(ev_data[i]),
      .empty(ev_data_empty[i]), .rlevel(data_rlevel[i]));

    async_fifo #(.WIDTH($bits(ev_cw_t)), .AW(EVCW_AW)) u_cw (
      .wclk(clk_link), .wrst_n(rst_link_n), .wr_en(c_wr), .wr_data(c_wdata),
      .full(c_full), .wlevel(c_wlevel),
      .rclk(clk), .rrst_n(rst_core_n), .rd_en(ev_cw_rd[i]), .rd_data(ev_cw[i]),
      .empty(ev_cw_empty[i]), .rlevel(cw_rlevel[i]));
  end

  // ---------------- synchronise, parse and verify
  logic        raw_wr, raw_full, raw_cw_wr, raw_cw_full;
  logic [16:0] raw_wdata;
  cw_t         raw_cw_w;
  logic        cell_wr, cell_cw_wr;
  cell_t       cell_w;
  cw_t         cell_cw_w;
  logic        hc_full, tc_full, hcw_full, tcw_full;
  logic [N_ERR-1:0] err_pulse;

  sync_parse #(.LINKS(N_LINKS), .TIMEOUT(TIMEOUT), .RAW_MAX(1023)) u_parse (
    .clk, .rst_n(rst_core_n), .link_en(link_en_r[N_LINKS-1:0]), .sb_mask, .raw_en,
    .evid, .evid_valid, .evid_ready,
    .ev_cw, .ev_cw_empty, .ev_cw_rd, .ev_data, .ev_data_empty, .ev_data_rd,
    .raw_wr, .raw_wdata, .raw_full, .raw_cw_wr, .raw_cw(raw_cw_w), .raw_cw_full,
    .cell_wr, .cell_data(cell_w), .cell_full(hc_full || tc_full),
    .cell_cw_wr, .cell_cw(cell_cw_w), .cell_cw_full(hcw_full || tcw_full),
    .err_pulse);

  logic [15:0] err_cnt [N_ERR];
  error_counters #(.N(N_ERR), .W(16)) u_errc (
    .clk, .rst_n(rst_core_n), .inc(err_pulse), .clear(err_clear), .cnt(err_cnt));

  // raw CW/data FIFO pair
  logic [16:0] raw_rdata;
  cw_t   raw_cw_r;
  logic  raw_empty, raw_rd, raw_cw_empty, raw_cw_rd;
  sync_fifo #(.WIDTH(17), .DEPTH(1024)) u_raw_data (
    .clk, .rst_n(rst_core_n), .wr_en(raw_wr), .wr_data(raw_wdata), .full(raw_full),
    .rd_en(raw_rd), .rd_data(raw_rdata), .empty(raw_empty), .count());
  sync_fifo #(.WIDTH($bits(cw_t)), .DEPTH(16)) u_raw_cw (
    .clk, .rst_n(rst_core_n), .wr_en(raw_cw_wr), .wr_data(raw_cw_w), .full(raw_cw_full),
    .rd_en(raw_cw_rd), .rd_data(raw_cw_r), .empty(raw_cw_empty), .count());

  // hit-path cell FIFO pair
  cell_t hc_rdata; cw_t hcw_rdata;
  logic  hc_empty, hc_rd, hcw_empty, hcw_rd;
  sync_fifo #(.WIDTH($bits(cell_t)), .DEPTH(256)) u_hcell (
    .clk, .rst_n(rst_core_n), .wr_en(cell_wr), .wr_data(cell_w), .full(hc_full),
    .rd_en(hc_rd), .rd_data(hc_rdata), .empty(hc_empty), .count());
  sync_fifo #(.WIDTH($bits(cw_t)), .DEPTH(16)) u_hcw (
    .clk, .rst_n(rst_core_n), .wr_en(cell_cw_wr), .wr_data(cell_cw_w), .full(hcw_full),
    .rd_en(hcw_rd), .rd_data(hcw_rdata), .empty(hcw_empty), .count());

  // tracklet-path cell FIFO pair
  cell_t tc_rdata; cw_t tcw_rdata;
  logic  tc_empty, tc_rd, tcw_empty, tcw_rd;
  sync_fifo #(.WIDTH($bits(cell_t)), .DEPTH(256)) u_tcell (
    .clk, .rst_n(rst_core_n), .wr_en(cell_wr), .wr_data(cell_w), .full(tc_full),
    .rd_en(tc_rd), .rd_data(tc_rdata), .empty(tc_empty), .count());
  sync_fifo #(.WIDTH($bits(cw_t)), .DEPTH(16)) u_tcw (
    .clk, .rst_n(rst_core_n), .wr_en(cell_cw_wr), .wr_data(cell_cw_w), .full(tcw_full),
    .rd_en(tcw_rd), .rd_data(tcw_rdata), .empty(tcw_empty), .count());

  // ---------------- LUT bus
  logic [2:0]  lreq, lwe, lgnt, lrvalid;
  logic [18:0] laddr  [3];
  logic [35:0] lwdata [3];
  logic [35:0] lrdata;
  lut_arb #(.N(3), .AW(19), .DW(36)) u_lut_arb (
    .clk, .rst_n(rst_core_n), .req(lreq), .we(lwe), .addr(laddr), .wdata(lwdata),
    .gnt(lgnt), .rvalid(lrvalid), .rdata(lrdata),
    .lut_cs, .lut_we, .lut_addr, .lut_wdata, .lut_rdata);

  // ---------------- hits
  logic hit_valid, hit_last, hit_ready;
  logic [CHAN_W-1:0] hit_chan;
  cw_t  hit_cw;
  extract_hits u_hits (
    .clk, .rst_n(rst_core_n),
    .cell_in(hc_rdata), .cell_empty(hc_empty), .cell_rd(hc_rd),
    .cw_in(hcw_rdata), .cw_empty(hcw_empty), .cw_rd(hcw_rd),
    .hit_valid, .hit_last, .hit_chan, .hit_cw, .hit_ready);

  logic hm_wr, hm_full, hm_empty, hm_rd;
  logic [31:0] hm_wdata, hm_rdata;
  logic [8:0]  hm_count;
  logic [15:0] hm_missed;
  sampler #(.W(32)) u_hit_smp (
    .clk, .rst_n(rst_core_n), .enable(hit_smp_en), .prescale(hit_prescale),
    .in_fire(hit_valid && hit_ready && !hit_last), .in_data(32'(hit_chan)),
    .mon_wr(hm_wr), .mon_data(hm_wdata), .mon_full(hm_full), .missed(hm_missed));
  sync_fifo #(.WIDTH(32), .DEPTH(256)) u_hit_mon (
    .clk, .rst_n(rst_core_n), .wr_en(hm_wr), .wr_data(hm_wdata), .full(hm_full),
    .rd_en(hm_rd), .rd_data(hm_rdata), .empty(hm_empty), .count(hm_count));

  logic hd_wr, hd_full, hd_empty, hd_rd, hcwo_wr, hcwo_full, hcwo_empty, hcwo_rd;
  logic [32:0] hd_wdata, hd_rdata;
  cw_t  hcwo_wdata, hcwo_rdata;
  assign lwe[1] = 1'b0;
  assign lwdata[1] = '0;
  translate #(.LUT_AW(19), .LUT_DW(36), .MAX_HITS(511)) u_translate (
    .clk, .rst_n(rst_core_n),
    .hit_valid, .hit_last, .hit_chan, .hit_cw, .hit_ready,
    .lut_req(lreq[1]), .lut_addr(laddr[1]), .lut_gnt(lgnt[1]),
    .lut_rvalid(lrvalid[1]), .lut_rdata(lrdata),
    .data_wr(hd_wr), .data_wdata(hd_wdata), .data_full(hd_full),
    .cw_wr(hcwo_wr), .cw_wdata(hcwo_wdata), .cw_full(hcwo_full));
  sync_fifo #(.WIDTH(33), .DEPTH(512)) u_hit_data (
    .clk, .rst_n(rst_core_n), .wr_en(hd_wr), .wr_data(hd_wdata), .full(hd_full),
    .rd_en(hd_rd), .rd_data(hd_rdata), .empty(hd_empty), .count());
  sync_fifo #(.WIDTH($bits(cw_t)), .DEPTH(16)) u_hit_cw (
    .clk, .rst_n(rst_core_n), .wr_en(hcwo_wr), .wr_data(hcwo_wdata), .full(hcwo_full),
    .rd_en(hcwo_rd), .rd_data(hcwo_rdata), .empty(hcwo_empty), .count());

  // ---------------- tracklets
  logic td_wr, td_full, td_empty, td_rd, tcwo_wr, tcwo_full, tcwo_empty, tcwo_rd;
  logic [32:0] td_wdata, td_rdata;
  cw_t  tcwo_wdata, tcwo_rdata;
  logic tl_fire;
  logic [31:0] tl_word;
  assign lwe[0] = 1'b0;
  assign lwdata[0] = '0;
  extract_tracklets #(.ROADS(ROADS), .LUT_AW(19), .LUT_DW(36)) u_tlets (
    .clk, .rst_n(rst_core_n),
    .cell_in(tc_rdata), .cell_empty(tc_empty), .cell_rd(tc_rd),
    .cw_in(tcw_rdata), .cw_empty(tcw_empty), .cw_rd(tcw_rd),
    .lut_req(lreq[0]), .lut_addr(laddr[0]), .lut_gnt(lgnt[0]),
    .lut_rvalid(lrvalid[0]), .lut_rdata(lrdata),
    .data_wr(td_wr), .data_wdata(td_wdata), .data_full(td_full),
    .cw_wr(tcwo_wr), .cw_wdata(tcwo_wdata), .cw_full(tcwo_full),
    .tlet_fire(tl_fire), .tlet_word(tl_word));
  sync_fifo #(.WIDTH(33), .DEPTH(256)) u_tl_data (
    .clk, .rst_n(rst_core_n), .wr_en(td_wr), .wr_data(td_wdata), .full(td_full),
    .rd_en(td_rd), .rd_data(td_rdata), .empty(td_empty), .count());
  sync_fifo #(.WIDTH($bits(cw_t)), .DEPTH(16)) u_tl_cw (
    .clk, .rst_n(rst_core_n), .wr_en(tcwo_wr), .wr_data(tcwo_wdata), .full(tcwo_full),
    .rd_en(tcwo_rd), .rd_data(tcwo_rdata), .empty(tcwo_empty), .count());

  logic tm_wr, tm_full, tm_empty, tm_rd;
  logic [31:0] tm_wdata, tm_rdata;
  logic [8:0]  tm_count;
  logic [15:0] tm_missed;
  sampler #(.W(32)) u_tl_smp (
    .clk, .rst_n(rst_core_n), .enable(tl_smp_en), .prescale(tl_prescale),
    .in_fire(tl_fire), .in_data(tl_word),
    .mon_wr(tm_wr), .mon_data(tm_wdata), .mon_full(tm_full), .missed(tm_missed));
  sync_fifo #(.WIDTH(32), .DEPTH(256)) u_tl_mon (
    .clk, .rst_n(rst_core_n), .wr_en(tm_wr), .wr_data(tm_wdata), .full(tm_full),
    .rd_en(tm_rd), .rd_data(tm_rdata), .empty(tm_empty), .count(tm_count));

  // ---------------- format, sample, output
  logic        f_valid, f_ready, ev_start;
  logic [32:0] f_word;
  evid_t       ev_evid;
  format_rob u_format (
    .clk, .rst_n(rst_core_n), .raw_en,
    .hit_cw(hcwo_rdata), .hit_cw_empty(hcwo_empty), .hit_cw_rd(hcwo_rd),
    .hit_data(hd_rdata), .hit_data_empty(hd_empty), .hit_data_rd(hd_rd),
    .tl_cw(tcwo_rdata), .tl_cw_empty(tcwo_empty), .tl_cw_rd(tcwo_rd),
    .tl_data(td_rdata), .tl_data_empty(td_empty), .tl_data_rd(td_rd),
    .raw_cw(raw_cw_r), .raw_cw_empty(raw_cw_empty), .raw_cw_rd(raw_cw_rd),
    .raw_data(raw_rdata), .raw_data_empty(raw_empty), .raw_data_rd(raw_rd),
    .out_valid(f_valid), .out_word(f_word), .out_ready(f_ready),
    .ev_start, .ev_evid);

  logic        em_wr, em_full, em_empty, em_rd;
  logic [32:0] em_wdata, em_rdata;
  logic [9:0]  em_count;
  logic [15:0] ev_sampled, ev_truncated;
  sample_control #(.LEVEL_W(10), .DEPTH(512), .MARGIN(64)) u_smpctl (
    .clk, .rst_n(rst_core_n), .enable(ev_smp_en), .prescale(ev_prescale),
    .bcid_en, .bcid_sel, .tt_en, .tt_sel, .ev_start, .ev_evid,
    .in_fire(f_valid && f_ready), .in_word(f_word),
    .mon_wr(em_wr), .mon_data(em_wdata), .mon_level(em_count), .mon_full(em_full),
    .sampled(ev_sampled), .truncated(ev_truncated));
  sync_fifo #(.WIDTH(33), .DEPTH(512)) u_ev_mon (
    .clk, .rst_n(rst_core_n), .wr_en(em_wr), .wr_data(em_wdata), .full(em_full),
    .rd_en(em_rd), .rd_data(em_rdata), .empty(em_empty), .count(em_count));

  // output mux: formatter or test data from the ILB
  logic        tout_wr, out_full, out_empty, out_rd, o_wr;
  logic [32:0] tout_data, out_rdata, o_wdata;
  logic [OUT_AW:0] out_wlevel, out_rlevel;
  assign f_ready = !out_test && !out_full;
  assign o_wr    = out_test ? tout_wr : (f_valid && !out_full);
  assign o_wdata = out_test ? tout_data : f_word;
  async_fifo #(.WIDTH(33), .AW(OUT_AW)) u_out_fifo (
    .wclk(clk), .wrst_n(rst_core_n), .wr_en(o_wr), .wr_data(o_wdata),
    .full(out_full), .wlevel(out_wlevel),
    .rclk(clk_slink), .rrst_n(rst_slink_n), .rd_en(out_rd), .rd_data(out_rdata),
    .empty(out_empty), .rlevel(out_rlevel));

  logic        sl_stopped;
  logic [31:0] sl_words;
  logic [15:0] sl_xoffs;
  slink_control u_slink (
    .clk(clk_slink), .rst_n(rst_slink_n),
    .fifo_data(out_rdata), .fifo_empty(out_empty), .fifo_rd(out_rd),
    .lff, .xon, .xoff, .uwen, .uctrl, .ud,
    .stopped(sl_stopped), .words(sl_words), .xoffs(sl_xoffs));

  // ---------------- BUSY: link data FIFOs and the EVID FIFO
  logic [9:0] b_level [N_LINKS+1];
  logic [9:0] b_hi    [N_LINKS+1];
  logic [9:0] b_lo    [N_LINKS+1];
  logic [31:0] busy_cycles;
  always_comb begin
    for (int i = 0; i < N_LINKS; i++) begin
      b_level[i] = 10'(data_rlevel[i]);
      b_hi[i]    = busy_hi;
      b_lo[i]    = busy_lo;
    end
    b_level[N_LINKS] = 10'(evid_rlevel);
    b_hi[N_LINKS]    = 10'(2**EVID_AW - 4);
    b_lo[N_LINKS]    = 10'(2**EVID_AW / 2);
  end
  busy_ctrl #(.N(N_LINKS+1), .W(10)) u_busy (
    .clk, .rst_n(rst_core_n), .level(b_level), .hi(b_hi), .lo(b_lo),
    .force_busy, .busy, .busy_cycles);

  // ---------------- internal local bus
  logic        ilb_wr, ilb_rd;
  logic [5:0]  ilb_addr;
  logic [15:0] ilb_wdata, ilb_rdata;
  logic [15:0] stat [24];
  always_comb begin
    for (int i = 0; i < 4; i++) begin
      stat[i]     = (i < N_LINKS) ? 16'(data_rlevel[i]) : 16'h0;
      stat[4 + i] = (i < N_LINKS) ? 16'(cw_rlevel[i])   : 16'h0;
    end
    stat[8]  = 16'(evid_rlevel);
    stat[9]  = 16'(out_wlevel);
    stat[10] = 16'(hm_count);
    stat[11] = 16'(tm_count);
    stat[12] = 16'(em_count);
    stat[13] = {13'h0, sl_stopped, evid_valid, busy};
    stat[14] = ev_sampled;
    stat[15] = busy_cycles[15:0];
    stat[16] = ev_truncated;
    stat[17] = hm_missed;
    stat[18] = tm_missed;
    stat[19] = sl_xoffs;
    for (int i = 0; i < 4; i++) stat[20 + i] = (i < N_LINKS) ? dropped[i] : 16'h0;
  end

  logic [4:0] la_sel;
  always_ff @(posedge clk or negedge rst_core_n)
    if (!rst_core_n) la_out <= '0;
    else             la_out <= (la_sel < 5'd24) ? stat[la_sel] : 16'h0;

  ilb_regs #(.N_STAT(24)) u_ilb (
    .clk, .rst_n(rst_core_n), .ilb_wr, .ilb_rd, .ilb_addr, .ilb_wdata, .ilb_rdata,
    .link_en(link_en_r), .raw_en, .link_test, .out_test, .hit_smp_en, .tl_smp_en,
    .ev_smp_en, .bcid_en, .tt_en, .force_busy, .evid_test, .ttc_sim_en, .l1a_period, .la_sel, .resync_tgl, .bc_offset, .sb_mask,
    .ev_prescale, .hit_prescale, .tl_prescale, .bcid_sel, .tt_sel, .busy_hi, .busy_lo,
    .err_clear,
    .lut_req(lreq[2]), .lut_addr(laddr[2]), .lut_wdata(lwdata[2]), .lut_gnt(lgnt[2]),
    .tlink_wr, .tlink_data(tlink_wdata), .tlink_full,
    .tout_wr, .tout_data, .tout_full(out_full),
    .tevid_wr, .tevid_data(tevid_wdata), .tevid_full,
    .hit_mon(hm_rdata), .hit_mon_empty(hm_empty), .hit_mon_rd(hm_rd),
    .tl_mon(tm_rdata), .tl_mon_empty(tm_empty), .tl_mon_rd(tm_rd),
    .ev_mon(em_rdata), .ev_mon_empty(em_empty), .ev_mon_rd(em_rd),
    .err_cnt, .stat);
  assign lwe[2] = 1'b1;

  lb_bridge u_lb (
    .lb_clk(clk_lb), .lb_rst_n(rst_lb_n), .lb_cs, .lb_wr, .lb_addr, .lb_wdata,
    .lb_rdata, .lb_ack, .clk, .rst_n(rst_core_n),
    .ilb_wr, .ilb_rd, .ilb_addr, .ilb_wdata, .ilb_rdata);
endmodule
