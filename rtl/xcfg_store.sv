// xcfg_store: tag/state arrays of the compute ways reused as the store of
// per-step crossbar configuration words.
//
// While a way computes, its tag arrays are idle, so they hold one crossbar
// configuration word (freac_pkg::xcfg_t) per folding step. The host fills an
// entry 32 bits at a time (wr_word selects the 32-bit slice of the entry);
// the controller reads a whole entry per step, registered, one cycle before
// the step executes. Using the tag arrays for this is the document's; the
// depth (1024 sets of a 64 KB way with 64-byte lines) and the 32-bit write
// slicing are this design's. No reset: the contents are whatever was written.
module xcfg_store
  import freac_pkg::*;
#(
  parameter int unsigned DEPTH = 1024,
  localparam int unsigned AW   = $clog2(DEPTH),
  localparam int unsigned WSW  = $clog2(XCFG_WORDS)
) (
  input  logic            clk,
  input  logic            wr_en,
  input  logic [AW-1:0]   wr_addr,
  input  logic [WSW-1:0]  wr_word,
  input  logic [31:0]     wr_data,
  input  logic            rd_en,
  input  logic [AW-1:0]   rd_addr,
  output xcfg_t           rd_data
);
  logic [XCFG_WORDS-1:0][31:0] mem [DEPTH];
  logic [XCFG_WORDS*32-1:0]    rd_raw;

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr][wr_word] <= wr_data;
    if (rd_en) rd_raw <= mem[rd_addr];
  end

  assign rd_data = xcfg_t'(rd_raw[XCFG_W-1:0]);
endmodule
