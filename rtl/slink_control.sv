// slink_control: drive the S-link source interface from the output FIFO.
//
// Runs in the S-link clock domain. While the output FIFO has a word (rdy)
// and the link can take it, it pops the word and presents it on the S-link
// user interface with uwen for one cycle: ud is the 32-bit data and uctrl
// marks a control word. The link can refuse data in two ways: lff (link
// full flag) stops writes at once, and the receiving ROB's flow control,
// seen as xoff and xon pulses, stops them from an xoff until the next xon.
// words counts the words sent and xoffs the number of xoff periods. The
// signal names follow the S-link interface; active-high polarities and the
// registered outputs are this design's choice.
module slink_control (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [32:0] fifo_data,   // {ctrl, data}
  input  logic        fifo_empty,
  output logic        fifo_rd,
  input  logic        lff,
  input  logic        xon,
  input  logic        xoff,
  output logic        uwen,
  output logic        uctrl,
  output logic [31:0] ud,
  output logic        stopped,
  output logic [31:0] words,
  output logic [15:0] xoffs
);
  assign fifo_rd = !fifo_empty && !lff && !stopped;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      uwen <= 1'b0; uctrl <= 1'b0; ud <= '0; stopped <= 1'b0; words <= '0; xoffs <= '0;
    end else begin
      uwen <= fifo_rd;
      if (fifo_rd) begin
        uctrl <= fifo_data[32];
        ud    <= fifo_data[31:0];
        words <= words + 1'b1;
      end
      if (xoff && !stopped) begin
        stopped <= 1'b1;
        xoffs   <= xoffs + 1'b1;
      end else if (xon) begin
        stopped <= 1'b0;
      end
    end
  end
endmodule
