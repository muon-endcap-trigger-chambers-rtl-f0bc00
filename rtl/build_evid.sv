// build_evid: forms the current event ID from the EVID and TrigType FIFOs.
//
// Every L1A leaves one entry in the EVID FIFO ({extended L1ID, BCID}) and
// one trigger type in the TrigType FIFO; they arrive separately because the
// trigger type comes later over TTC channel B. This process waits until
// both FIFOs hold an entry, pops both in the same cycle and holds the joined
// evid_t in an output register with a valid/ready handshake towards the
// synchroniser. One event per two cycles at most (pop, then hand over),
// which is far above the 100 kHz L1A rate.
module build_evid
  import rod_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  [EVID_W+BCID_W-1:0] evid_fifo_data,
  input  logic  evid_fifo_empty,
  output logic  evid_fifo_rd,
  input  logic  [TT_W-1:0] tt_fifo_data,
  input  logic  tt_fifo_empty,
  output logic  tt_fifo_rd,
  output evid_t evid,
  output logic  evid_valid,
  input  logic  evid_ready
);
  logic take;
  assign take         = !evid_fifo_empty && !tt_fifo_empty && (!evid_valid || evid_ready);
  assign evid_fifo_rd = take;
  assign tt_fifo_rd   = take;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      evid_valid <= 1'b0;
      evid       <= '0;
    end else if (take) begin
      evid_valid <= 1'b1;
      evid       <= '{l1id:  evid_fifo_data[EVID_W+BCID_W-1:BCID_W],
                      bcid:  evid_fifo_data[BCID_W-1:0],
                      ttype: tt_fifo_data};
    end else if (evid_ready) begin
      evid_valid <= 1'b0;
    end
  end
endmodule
