// sub_array: one 8 KB SRAM sub-array of a last-level-cache data array, seen
// at its 32-bit port.
//
// A data array holds two such sub-arrays; each access reads or writes one
// 32-bit row in a single cycle. The read result is registered and held until
// the next read. In compute mode that held row is the "memory latch" between
// the array and the mux trees: the controller issues one read per folding
// step, and while the clusters stall it issues none, so the latch keeps the
// current step's LUT configuration. The row count and port width follow the
// document (8 KB, 32 bits); the held read register standing in for the
// memory latch is this design's choice.
//
// Interface: en (access), we (write when en), addr, wdata; rdata is valid the
// cycle after a read and stays until the next read. No reset: the contents
// and the latch hold whatever was written.
module sub_array #(
  parameter int unsigned ROWS  = 2048,
  parameter int unsigned WIDTH = 32,
  localparam int unsigned AW   = $clog2(ROWS)
) (
  input  logic             clk,
  input  logic             en,
  input  logic             we,
  input  logic [AW-1:0]    addr,
  input  logic [WIDTH-1:0] wdata,
  output logic [WIDTH-1:0] rdata
);
  logic [WIDTH-1:0] mem [ROWS];

  always_ff @(posedge clk) begin
    if (en) begin
      if (we) mem[addr] <= wdata;
      else    rdata     <= mem[addr];
    end
  end
endmodule
