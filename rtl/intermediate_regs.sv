// intermediate_regs: the cluster's bank of 256 intermediate-value flip-flops.
//
// The bank holds the values a folded circuit passes between time steps and
// the state of the original circuit's flip-flops. It is read as a flat
// 256-bit vector (by the crossbar) and as eight 32-bit words (by the MAC, the
// operand bus and the link). When 'commit' is high the step's writes are
// applied: first up to two whole-word writes (port A, then port B, which wins
// on the same word), then up to eight single-bit writes from the LUTs, which
// override word writes on the same bit (a higher-numbered LUT wins among
// LUTs). The 256-bit size is the document's; the write ports and their
// priority are this design's. Synchronous active-high reset clears the bank.
module intermediate_regs
  import freac_pkg::*;
(
  input  logic                              clk,
  input  logic                              rst,
  input  logic                              commit,
  input  logic                              wa_en,
  input  logic [RW_AW-1:0]                  wa_idx,
  input  logic [WORD_W-1:0]                 wa_data,
  input  logic                              wb_en,
  input  logic [RW_AW-1:0]                  wb_idx,
  input  logic [WORD_W-1:0]                 wb_data,
  input  logic [NUM_LUT-1:0]                bit_en,
  input  logic [NUM_LUT-1:0][RB_AW-1:0]     bit_idx,
  input  logic [NUM_LUT-1:0]                bit_data,
  output logic [REG_BITS-1:0]               q
);
  logic [REG_WORDS-1:0][WORD_W-1:0] nxt;

  always_comb begin
    nxt = q;
    if (wa_en) nxt[wa_idx] = wa_data;
    if (wb_en) nxt[wb_idx] = wb_data;
    for (int k = 0; k < NUM_LUT; k++)
      if (bit_en[k]) nxt[bit_idx[k][RB_AW-1:5]][bit_idx[k][4:0]] = bit_data[k];
  end

  always_ff @(posedge clk) begin
    if (rst)         q <= '0;
    else if (commit) q <= nxt;
  end
endmodule
