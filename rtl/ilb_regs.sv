// ilb_regs: register file on the internal local bus (ILB).
//
// The ILB is a 6-bit address, 16-bit data bus in the core clock domain
// through which the board's local bus (and so VME software) configures the
// FPGA, reads every buffer occupancy and error counter at any time, drains
// the monitor FIFOs, loads the external LUT and injects test data. Address 0
// is a no-operation. A write takes effect at the clock edge of ilb_wr;
// ilb_rdata is combinational from ilb_addr, and a read strobe (ilb_rd) pops
// the monitor FIFO whose last half-word is read.
//   addr  write                               read
//   1     control: [3:0] link enable, [4] raw data in output, [5] links
//         take test data, [6] output FIFO takes test data, [7] hit,
//         [8] tracklet, [9] event sampling enable, [10] event sampling by
//         BCID, [11] by trigger type, [12] force BUSY, [13] event IDs
//         come from the test event-ID FIFO instead of the TTC, [14] the
//         TTC signals come from the internal TTC simulator      same
//   2     re-sync all links (any value)       -
//   3     BC offset                           same
//   4,5   Slave Board mask [15:0], [23:16]    same
//   6,7,8 event, hit, tracklet prescale       same
//   9,10  sampling BCID, trigger type         same
//   11,12 LUT address [15:0], [18:16]         same
//   13,14 LUT data [15:0], [31:16]            same
//   15    LUT data [35:32]; writes the word and advances the address
//   16    push test half-word to a link       -
//   17    test config: [1:0] link, [2] control flag   same
//   18    output test word [15:0]             same
//   19    output test word [31:16], pushes it -
//   20,21 BUSY high, low mark                 same
//   22,23 test event ID: L1ID [15:0], [31:16] same
//   24    test event ID: BCID                 hit monitor [15:0]
//   25    test event ID: trigger type; pushes the test event ID
//                                             hit monitor [31:16] (pops)
//   26    simulated L1A period in bunch clocks  tracklet monitor [15:0]
//   27    logic-analyser status word select   tracklet monitor [31:16] (pops)
//   28,29,30 -                                event monitor [15:0], [31:16], [32] (pops)
//   31    -                                   {event, tracklet, hit} monitor empty
//   32    clear error counters                error counter 0; 33..39 the others
//   40..63 -                                  status words (occupancies, counts)
// The bus widths and the A=0 no-op are the document's, as is loading test
// data into the event-ID, input link and output FIFOs over VME; the
// register map is this design's own.
module ilb_regs
  import rod_pkg::*;
#(
  parameter int N_STAT = 24
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        ilb_wr,
  input  logic        ilb_rd,
  input  logic [5:0]  ilb_addr,
  input  logic [15:0] ilb_wdata,
  output logic [15:0] ilb_rdata,
  // configuration
  output logic [3:0]  link_en,
  output logic        raw_en,
  output logic        link_test,
  output logic        out_test,
  output logic        hit_smp_en,
  output logic        tl_smp_en,
  output logic        ev_smp_en,
  output logic        bcid_en,
  output logic        tt_en,
  output logic        force_busy,
  output logic        evid_test,
  output logic        ttc_sim_en,
  output logic [15:0] l1a_period,
  output logic [4:0]  la_sel,
  output logic        resync_tgl,
  output logic [BCID_W-1:0] bc_offset,
  output logic [23:0] sb_mask,
  output logic [15:0] ev_prescale,
  output logic [15:0] hit_prescale,
  output logic [15:0] tl_prescale,
  output logic [BCID_W-1:0] bcid_sel,
  output logic [TT_W-1:0]   tt_sel,
  output logic [9:0]  busy_hi,
  output logic [9:0]  busy_lo,
  output logic        err_clear,
  // LUT loading (LUT bus requester)
  output logic        lut_req,
  output logic [18:0] lut_addr,
  output logic [35:0] lut_wdata,
  input  logic        lut_gnt,
  // test data into the link receivers and the output FIFO
  output logic        tlink_wr,
  output logic [18:0] tlink_data,    // {link[1:0], ctrl, halfword}
  input  logic        tlink_full,
  output logic        tout_wr,
  output logic [32:0] tout_data,
  input  logic        tout_full,
  output logic        tevid_wr,
  output logic [EVID_W+BCID_W+TT_W-1:0] tevid_data,   // {L1ID, BCID, type}
  input  logic        tevid_full,
  // monitor FIFOs
  input  logic [31:0] hit_mon,
  input  logic        hit_mon_empty,
  output logic        hit_mon_rd,
  input  logic [31:0] tl_mon,
  input  logic        tl_mon_empty,
  output logic        tl_mon_rd,
  input  logic [32:0] ev_mon,
  input  logic        ev_mon_empty,
  output logic        ev_mon_rd,
  // counters and status
  input  logic [15:0] err_cnt [N_ERR],
  input  logic [15:0] stat    [N_STAT]
);
  localparam int SW = $clog2(N_STAT);
  logic [15:0] ctrl, tcfg, tout_lo;
  logic [EVID_W-1:0] tev_l1id;
  logic [BCID_W-1:0] tev_bcid;

  assign link_en    = ctrl[3:0];
  assign raw_en     = ctrl[4];
  assign link_test  = ctrl[5];
  assign out_test   = ctrl[6];
  assign hit_smp_en = ctrl[7];
  assign tl_smp_en  = ctrl[8];
  assign ev_smp_en  = ctrl[9];
  assign bcid_en    = ctrl[10];
  assign tt_en      = ctrl[11];
  assign force_busy = ctrl[12];
  assign evid_test  = ctrl[13];
  assign ttc_sim_en = ctrl[14];

  logic wr;
  assign wr = ilb_wr && ilb_addr != 6'd0;

  assign tlink_wr   = wr && ilb_addr == 6'd16 && !tlink_full;
  assign tlink_data = {tcfg[1:0], tcfg[2], ilb_wdata};
  assign tout_wr    = wr && ilb_addr == 6'd19 && !tout_full;
  assign tout_data  = {tcfg[2], ilb_wdata, tout_lo};
  assign tevid_wr   = wr && ilb_addr == 6'd25 && !tevid_full;
  assign tevid_data = {tev_l1id, tev_bcid, ilb_wdata[TT_W-1:0]};
  assign err_clear  = wr && ilb_addr == 6'd32;
  assign hit_mon_rd = ilb_rd && ilb_addr == 6'd25 && !hit_mon_empty;
  assign tl_mon_rd  = ilb_rd && ilb_addr == 6'd27 && !tl_mon_empty;
  assign ev_mon_rd  = ilb_rd && ilb_addr == 6'd30 && !ev_mon_empty;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ctrl <= 16'h000F; tcfg <= '0; tout_lo <= '0; resync_tgl <= 1'b0;
      bc_offset <= '0; sb_mask <= '0; ev_prescale <= '0; hit_prescale <= '0;
      tl_prescale <= '0; bcid_sel <= '0; tt_sel <= '0;
      busy_hi <= 10'd384; busy_lo <= 10'd128;
      lut_req <= 1'b0; lut_addr <= '0; lut_wdata <= '0;
      tev_l1id <= '0; tev_bcid <= '0; l1a_period <= '0; la_sel <= '0;
    end else begin
      if (lut_req && lut_gnt) begin
        lut_req  <= 1'b0;
        lut_addr <= lut_addr + 1'b1;
      end
      if (wr) begin
        unique case (ilb_addr)
          6'd1:  ctrl <= ilb_wdata;
          6'd2:  resync_tgl <= !resync_tgl;
          6'd3:  bc_offset <= ilb_wdata[BCID_W-1:0];
          6'd4:  sb_mask[15:0] <= ilb_wdata;
          6'd5:  sb_mask[23:16] <= ilb_wdata[7:0];
          6'd6:  ev_prescale <= ilb_wdata;
          6'd7:  hit_prescale <= ilb_wdata;
          6'd8:  tl_prescale <= ilb_wdata;
          6'd9:  bcid_sel <= ilb_wdata[BCID_W-1:0];
          6'd10: tt_sel <= ilb_wdata[TT_W-1:0];
          6'd11: lut_addr[15:0] <= ilb_wdata;
          6'd12: lut_addr[18:16] <= ilb_wdata[2:0];
          6'd13: lut_wdata[15:0] <= ilb_wdata;
          6'd14: lut_wdata[31:16] <= ilb_wdata;
          6'd15: begin lut_wdata[35:32] <= ilb_wdata[3:0]; lut_req <= 1'b1; end
          6'd17: tcfg <= ilb_wdata;
          6'd18: tout_lo <= ilb_wdata;
          6'd20: busy_hi <= ilb_wdata[9:0];
          6'd21: busy_lo <= ilb_wdata[9:0];
          6'd22: tev_l1id[15:0] <= ilb_wdata;
          6'd23: tev_l1id[31:16] <= ilb_wdata;
          6'd24: tev_bcid <= ilb_wdata[BCID_W-1:0];
          6'd26: l1a_period <= ilb_wdata;
          6'd27: la_sel <= ilb_wdata[4:0];
          default: ;
        endcase
      end
    end
  end

  always_comb begin
    ilb_rdata = '0;
    unique case (ilb_addr)
      6'd1:  ilb_rdata = ctrl;
      6'd3:  ilb_rdata = 16'(bc_offset);
      6'd4:  ilb_rdata = sb_mask[15:0];
      6'd5:  ilb_rdata = {8'h0, sb_mask[23:16]};
      6'd6:  ilb_rdata = ev_prescale;
      6'd7:  ilb_rdata = hit_prescale;
      6'd8:  ilb_rdata = tl_prescale;
      6'd9:  ilb_rdata = 16'(bcid_sel);
      6'd10: ilb_rdata = 16'(tt_sel);
      6'd11: ilb_rdata = lut_addr[15:0];
      6'd12: ilb_rdata = {13'h0, lut_addr[18:16]};
      6'd13: ilb_rdata = lut_wdata[15:0];
      6'd14: ilb_rdata = lut_wdata[31:16];
      6'd17: ilb_rdata = tcfg;
      6'd18: ilb_rdata = tout_lo;
      6'd20: ilb_rdata = 16'(busy_hi);
      6'd21: ilb_rdata = 16'(busy_lo);
      6'd22: ilb_rdata = tev_l1id[15:0];
      6'd23: ilb_rdata = tev_l1id[31:16];
      6'd24: ilb_rdata = hit_mon[15:0];
      6'd25: ilb_rdata = hit_mon[31:16];
      6'd26: ilb_rdata = tl_mon[15:0];
      6'd27: ilb_rdata = tl_mon[31:16];
      6'd28: ilb_rdata = ev_mon[15:0];
      6'd29: ilb_rdata = ev_mon[31:16];
      6'd30: ilb_rdata = {15'h0, ev_mon[32]};
      6'd31: ilb_rdata = {13'h0, ev_mon_empty, tl_mon_empty, hit_mon_empty};
      default: begin
        if (ilb_addr >= 6'd32 && ilb_addr < 6'd32 + 6'(N_ERR))
          ilb_rdata = err_cnt[3'(ilb_addr - 6'd32)];
        else if (int'(ilb_addr) >= 40 && int'(ilb_addr) < 40 + N_STAT)
          ilb_rdata = stat[SW'(ilb_addr - 6'd40)];
      end
    endcase
  end
endmodule
