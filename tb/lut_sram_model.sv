// lut_sram_model: behavioural model of the external LUT SRAM, for testbenches.
//
// Synchronous SRAM with 2**AW words of DW bits: on a clock edge with cs, a
// write stores wdata at addr, a read puts mem[addr] on rdata one cycle
// later. Unwritten words read as fill_word(addr), a formula the testbenches
// also use as their reference, so no table needs loading.
module lut_sram_model #(
  parameter int AW = 19,
  parameter int DW = 36
) (
  input  logic          clk,
  input  logic          cs,
  input  logic          we,
  input  logic [AW-1:0] addr,
  input  logic [DW-1:0] wdata,
  output logic [DW-1:0] rdata
);
  logic [DW-1:0] mem [logic [AW-1:0]];

  // default contents: channels with bits [2:0] == 7 are unconnected
  function automatic logic [DW-1:0] fill_word(input logic [AW-1:0] a);
    return {a[2:0] != 3'd7, 3'b000, 32'(a) * 32'd3 + 32'h100};
  endfunction

  always @(posedge clk) begin
    if (cs) begin
      if (we) mem[addr] = wdata;
      else rdata <= mem.exists(addr) ? mem[addr] : fill_word(addr);
    end
  end
endmodule
