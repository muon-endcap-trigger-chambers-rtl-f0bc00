// error_counters: one saturating counter per error kind.
//
// The synchroniser reports each error it finds as a one-cycle pulse on
// inc[k]; counter k then adds one, stopping at all-ones rather than
// wrapping so that a large count is never mistaken for a small one. All
// counters are cleared together by clear (a local-bus write). The counts
// are read by software over the 16-bit internal local bus, hence the
// default width. Saturation and the common clear are this design's choice.
module error_counters #(
  parameter int N = 8,
  parameter int W = 16
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] inc,
  input  logic         clear,
  output logic [W-1:0] cnt [N]
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N; i++) cnt[i] <= '0;
    end else begin
      for (int i = 0; i < N; i++) begin
        if (clear)                    cnt[i] <= '0;
        else if (inc[i] && cnt[i] != '1) cnt[i] <= cnt[i] + 1'b1;
      end
    end
  end
endmodule
