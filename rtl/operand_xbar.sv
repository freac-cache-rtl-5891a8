// operand_xbar: the cluster's bit-level operand crossbar.
//
// Every LUT input of the cluster (8 per sub-array, 32 in all) takes one bit
// of the operand pool, chosen by a 9-bit select from the current step's
// crossbar configuration. The pool is the 256 intermediate register bits,
// the 8 LUT state latches (the LUT outputs of the previous step) and the 32
// bits arriving on the inter-cluster link; selects past the pool read 0.
// The document places a crossbar that feeds the LUTs from registers, LUTs
// and the bus; the pool layout and select width are this design's.
// Purely combinational.
module operand_xbar
  import freac_pkg::*;
(
  input  logic [REG_BITS-1:0]                regs,
  input  logic [NUM_LUT-1:0]                 latches,
  input  logic [WORD_W-1:0]                  link_in,
  input  logic [NUM_LUT_IN-1:0][SEL_W-1:0]   sel,
  output logic [NUM_LUT_IN-1:0]              lut_in
);
  logic [POOL_N-1:0] pool;
  assign pool = {link_in, latches, regs};

  always_comb begin
    for (int i = 0; i < NUM_LUT_IN; i++) begin
      if (sel[i] < SEL_W'(POOL_N)) lut_in[i] = pool[sel[i]];
      else                         lut_in[i] = 1'b0;
    end
  end
endmodule
