// rst_sync: reset synchroniser for one clock domain.
//
// Reset is asserted asynchronously and released synchronously, two clock
// edges after the board reset goes away, so that every flip-flop of the
// domain leaves reset in the same cycle.
module rst_sync (
  input  logic clk,
  input  logic rst_n_in,
  output logic rst_n
);
  logic r1;
  always_ff @(posedge clk or negedge rst_n_in) begin
    if (!rst_n_in) begin
      r1    <= 1'b0;
      rst_n <= 1'b0;
    end else begin
      r1    <= 1'b1;
      rst_n <= r1;
    end
  end
endmodule
