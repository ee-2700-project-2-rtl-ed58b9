// mem_model: behavioural model of the external synchronous memory, for
// testbenches only.
//
// 2^AW bytes. While the active-low read strobe is low the addressed byte is
// driven onto the data pins within the cycle; otherwise the pins are
// released. While the active-low write strobe is low the byte on the pins is
// stored at the rising clock edge. Testbenches preload and inspect the
// array `mem` hierarchically.
module mem_model #(
  parameter int unsigned AW = 8,
  parameter int unsigned W  = 8
) (
  input  logic          clk,
  input  logic [AW-1:0] addr,
  inout  wire  [W-1:0]  data,
  input  logic          rd_n,
  input  logic          wr_n
);

  logic [W-1:0] mem [2**AW];

  assign data = !rd_n ? mem[addr] : 'z;

  always @(posedge clk)
    if (!wr_n) mem[addr] <= data;

endmodule
