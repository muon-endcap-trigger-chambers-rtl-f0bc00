// lb_bridge: board local bus slave and its crossing to the internal bus.
//
// The VME interface drives a board local bus (21 address bits, 32 data
// bits) in its own clock domain. For each access the master raises lb_cs
// (with lb_wr, lb_addr, lb_wdata) and holds it until lb_ack. The slave
// latches the access, flips a request toggle that a two-flip-flop
// synchroniser carries into the core domain, where exactly one ILB cycle is
// issued (ilb_wr or ilb_rd with the 6-bit word address lb_addr[5:0] and the
// low 16 data bits). The read data is captured and an acknowledge toggle
// crosses back; the slave then loads the Data reg (lb_rdata, upper 16 bits
// zero) and pulses lb_ack. The master must drop lb_cs for at least one
// cycle between accesses. A round trip takes about six cycles of the slower
// clock. The toggle handshake and the address mapping are this design's.
module lb_bridge (
  input  logic        lb_clk,
  input  logic        lb_rst_n,
  input  logic        lb_cs,
  input  logic        lb_wr,
  input  logic [20:0] lb_addr,
  input  logic [31:0] lb_wdata,
  output logic [31:0] lb_rdata,
  output logic        lb_ack,
  input  logic        clk,
  input  logic        rst_n,
  output logic        ilb_wr,
  output logic        ilb_rd,
  output logic [5:0]  ilb_addr,
  output logic [15:0] ilb_wdata,
  input  logic [15:0] ilb_rdata
);
  // local bus side
  logic        req_tgl, busy;
  logic [2:0]  ack_s;
  logic        a_wr;
  logic [5:0]  a_addr;
  logic [15:0] a_wdata;
  logic [15:0] rd_hold;   // core-domain capture, stable while the toggle crosses
  logic [2:0]  req_s;
  logic        ack_tgl;

  always_ff @(posedge lb_clk or negedge lb_rst_n) begin
    if (!lb_rst_n) begin
      req_tgl <= 1'b0; busy <= 1'b0; ack_s <= '0; lb_ack <= 1'b0; lb_rdata <= '0;
      a_wr <= 1'b0; a_addr <= '0; a_wdata <= '0;
    end else begin
      ack_s  <= {ack_s[1:0], ack_tgl};
      lb_ack <= 1'b0;
      if (lb_cs && !busy && !lb_ack) begin
        busy    <= 1'b1;
        a_wr    <= lb_wr;
        a_addr  <= lb_addr[5:0];
        a_wdata <= lb_wdata[15:0];
        req_tgl <= !req_tgl;
      end
      if (busy && (ack_s[2] ^ ack_s[1])) begin
        busy     <= 1'b0;
        lb_ack   <= 1'b1;
        lb_rdata <= {16'h0, rd_hold};
      end
    end
  end

  // core side
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      req_s <= '0; ack_tgl <= 1'b0; rd_hold <= '0;
    end else begin
      req_s <= {req_s[1:0], req_tgl};
      if (req_s[2] ^ req_s[1]) begin
        if (!a_wr) rd_hold <= ilb_rdata;
        ack_tgl <= !ack_tgl;
      end
    end
  end
  assign ilb_wr    = (req_s[2] ^ req_s[1]) && a_wr;
  assign ilb_rd    = (req_s[2] ^ req_s[1]) && !a_wr;
  assign ilb_addr  = a_addr;
  assign ilb_wdata = a_wdata;
endmodule
