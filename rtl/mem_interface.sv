// mem_interface: the bidirectional memory data bus and its strobes.
//
// The data pins are shared by reads and writes. Line drivers put the
// accumulator on the pins only while the write control line is asserted;
// the rest of the time they are released and the memory drives the pins.
// Whatever is on the pins is passed onto the internal data bus, which feeds
// the ALU, the PC, the MAR and the controller. The read and write strobes
// on the pins are active low; the control lines from the controller are
// active high. Read and write must never be asserted together.
//
// Interface: rd, wr, wdata in; mem_data inout (pins); mem_rd_n, mem_wr_n
// and bus out.
// Timing: combinational; the memory samples the written data or presents
// the read data within the same clock cycle.
//
// The tri-state line drivers and active-low strobes follow the design; the
// active-high internal control lines are this design's choice.
module mem_interface #(
  parameter int unsigned W = mp_pkg::DATA_W
) (
  input  logic         rd,
  input  logic         wr,
  input  logic [W-1:0] wdata,
  inout  wire  [W-1:0] mem_data,
  output logic         mem_rd_n,
  output logic         mem_wr_n,
  output logic [W-1:0] bus
);

  assign mem_data = wr ? wdata : 'z;
  assign bus      = mem_data;
  assign mem_rd_n = ~rd;
  assign mem_wr_n = ~wr;

endmodule
