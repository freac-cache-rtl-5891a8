// mac_unit: the cluster's dedicated 32-bit integer multiply-accumulate unit.
//
// Multiplication is expensive in LUTs, so each cluster carries one MAC that a
// folding step may use once. MAC_MUL loads a*b into the accumulator, MAC_ACC
// adds a*b to it, MAC_CLR clears it, MAC_NOP keeps it. Only the low 32 bits
// are kept (two's-complement wrap). The operation is applied when 'commit'
// is high, i.e. when the step completes; acc is the registered result.
// The 32-bit MAC is the document's; the op codes and wrap-around are this
// design's. Synchronous active-high reset clears acc.
module mac_unit
  import freac_pkg::*;
(
  input  logic              clk,
  input  logic              rst,
  input  logic              commit,
  input  mac_op_e           op,
  input  logic [WORD_W-1:0] a,
  input  logic [WORD_W-1:0] b,
  output logic [WORD_W-1:0] acc
);
  logic [WORD_W-1:0] prod;
  assign prod = a * b;

  always_ff @(posedge clk) begin
    if (rst) acc <= '0;
    else if (commit) begin
      unique case (op)
        MAC_MUL: acc <= prod;
        MAC_ACC: acc <= acc + prod;
        MAC_CLR: acc <= '0;
        default: acc <= acc;
      endcase
    end
  end
endmodule
