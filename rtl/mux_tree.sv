// mux_tree: the look-up-table multiplexer fed by a latched sub-array row.
//
// A 32-bit row holds the truth table of one 5-input LUT, or of two 4-input
// LUTs. In 5-LUT mode the five select inputs in[4:0] pick one of the 32 bits
// and the result appears on out[0]; out[1] is 0. In 4-LUT mode the tree is
// split: in[3:0] index the low half (bits 15..0) onto out[0] and in[7:4]
// index the high half (bits 31..16) onto out[1]. The 32:1 tree and the
// one-5-LUT / two-4-LUT split are the document's; placing the two 4-LUT
// tables in the low and high halves is this design's choice.
// Purely combinational.
module mux_tree (
  input  logic [31:0] row,      // latched configuration bits
  input  logic        lut4,     // 1: two 4-LUTs, 0: one 5-LUT
  input  logic [7:0]  in,       // LUT inputs from the operand crossbar
  output logic [1:0]  out
);
  always_comb begin
    if (lut4) begin
      out[0] = row[{1'b0, in[3:0]}];
      out[1] = row[{1'b1, in[7:4]}];
    end else begin
      out[0] = row[in[4:0]];
      out[1] = 1'b0;
    end
  end
endmodule
