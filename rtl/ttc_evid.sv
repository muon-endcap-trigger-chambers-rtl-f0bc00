// ttc_evid: event-ID counters in the TTC (bunch crossing) clock domain.
//
// The TTC receiver delivers the bunch clock, Bunch Counter Reset (BCR),
// Event Counter Reset (ECR), Level-1 Accept (L1A) and, over channel B, the
// trigger type. From these the ROD builds the ID of every accepted event:
// - BC: a 12-bit bunch counter that is loaded with bc_offset on BCR and
//   counts every clock otherwise. The offset exists because the ROD's L1A
//   arrives at a different distance from BCR than the front end's.
// - EC: the 24-bit L1ID, advanced on each L1A, plus an 8-bit count of ECRs;
//   together the 32-bit extended L1ID ("24+8"). After ECR the next L1A
//   gets L1ID 0 (this design's choice).
// - Orbit: counts BCRs since the last orbit-count reset (ocr).
// - TT: each trigger-type strobe is pushed into the TrigType FIFO.
// On every L1A one EVID entry {extended L1ID, BCID} is pushed the same
// cycle (evid_wr); signals arriving in the same cycle as L1A act after it.
// Timing: all outputs are registered except the FIFO write strobes, which
// are combinational copies of l1a and tt_strobe.
module ttc_evid
  import rod_pkg::*;
(
  input  logic              clk,        // bunch clock
  input  logic              rst_n,
  input  logic              bcr,
  input  logic              ecr,
  input  logic              ocr,
  input  logic              l1a,
  input  logic              tt_strobe,
  input  logic [TT_W-1:0]   tt,
  input  logic [BCID_W-1:0] bc_offset,
  output logic              evid_wr,
  output logic [EVID_W+BCID_W-1:0] evid_data,   // {l1id, bcid}
  output logic              tt_wr,
  output logic [TT_W-1:0]   tt_data,
  output logic [31:0]       orbit,
  output logic [BCID_W-1:0] bcid
);
  logic [L1ID_W-1:0] l1id;
  logic [ECRC_W-1:0] ecrc;

  assign evid_wr   = l1a;
  assign evid_data = {ecrc, l1id, bcid};
  assign tt_wr     = tt_strobe;
  assign tt_data   = tt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bcid  <= '0;
      l1id  <= '0;
      ecrc  <= '0;
      orbit <= '0;
    end else begin
      bcid <= bcr ? bc_offset : bcid + 1'b1;
      if (ocr)      orbit <= '0;
      else if (bcr) orbit <= orbit + 1'b1;
      if (ecr) begin
        l1id <= '0;
        ecrc <= ecrc + 1'b1;
      end else if (l1a) begin
        l1id <= l1id + 1'b1;
      end
    end
  end
endmodule
