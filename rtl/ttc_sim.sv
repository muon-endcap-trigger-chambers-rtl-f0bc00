// ttc_sim: TTC signal generator inside the FPGA, for tests without a TTC
// receiver.
//
// While enabled it stands in for the TTC inputs in the bunch-clock domain:
// - BCR: one pulse every ORBIT bunch clocks (3564 bunches in an LHC orbit);
// - L1A: one pulse every l1a_period bunch clocks (0 stops triggers), held
//   back while BUSY is high, as the central trigger would do;
// - trigger type: TT_DELAY clocks after each L1A a tt_strobe carries the
//   next value of an 8-bit counter, like the type sent later over TTC
//   channel B.
// A new L1A waits until the previous trigger type has gone out, so the
// shortest spacing is TT_DELAY + 1 clocks (TT_DELAY >= 1). ECR and
// orbit-count reset are not generated. Disabling clears the generator; the
// next enable starts a new orbit with an L1A on the first clock. Software
// sets the period to 0 a few clocks before clearing enable, otherwise the
// trigger type of an L1A just sent is lost.
// Interface: enable and l1a_period are quasi-static configuration from the
// core domain; busy comes from the core domain and passes two synchroniser
// flops. All outputs are registered.
// That the FPGA can simulate the TTC signals is the document's; the orbit
// length is the LHC's; the L1A pattern and the trigger-type values are this
// design's choice.
module ttc_sim
  import rod_pkg::*;
#(
  parameter int ORBIT    = 3564,
  parameter int TT_DELAY = 3
) (
  input  logic            clk,          // bunch clock
  input  logic            rst_n,
  input  logic            enable,
  input  logic [15:0]     l1a_period,
  input  logic            busy,         // core domain
  output logic            bcr,
  output logic            l1a,
  output logic            tt_strobe,
  output logic [TT_W-1:0] tt
);
  localparam int BW = $clog2(ORBIT);
  localparam int DW = $clog2(TT_DELAY + 1);

  logic [BW-1:0] bc;
  logic [15:0]   gap;
  logic [DW-1:0] dly;
  logic          pend;
  logic [1:0]    busy_s;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bc <= '0; gap <= '0; dly <= '0; pend <= 1'b0; busy_s <= '0;
      bcr <= 1'b0; l1a <= 1'b0; tt_strobe <= 1'b0; tt <= '0;
    end else begin
      busy_s    <= {busy_s[0], busy};
      bcr       <= 1'b0;
      l1a       <= 1'b0;
      tt_strobe <= 1'b0;
      if (tt_strobe) tt <= tt + 1'b1;
      if (!enable) begin
        bc <= '0; gap <= '0; pend <= 1'b0;
      end else begin
        bc  <= (int'(bc) == ORBIT - 1) ? '0 : bc + 1'b1;
        bcr <= int'(bc) == ORBIT - 1;
        if (gap != 16'd0) gap <= gap - 1'b1;
        if (pend) begin
          if (dly == '0) begin
            tt_strobe <= 1'b1;
            pend      <= 1'b0;
          end else dly <= dly - 1'b1;
        end else if (l1a_period != 16'd0 && gap == 16'd0 && !busy_s[1]) begin
          l1a  <= 1'b1;
          gap  <= l1a_period - 1'b1;
          pend <= 1'b1;
          dly  <= DW'(TT_DELAY - 1);
        end
      end
    end
  end
endmodule
