// freac_pkg: types and constants shared by the folded-logic compute slice.
//
// The slice follows a 20-way last-level-cache slice whose ways each hold four
// 32 KB data arrays of two sub-arrays. Every sub-array in this design is 8 KB
// with a 32-bit port (2048 rows). Two adjacent ways form a "way pair"; the
// four data-array pairs of a way pair each carry the logic of one micro compute
// cluster (MCC), so a way pair gives four MCCs and a slice gives forty
// cluster sites, of which the ways chosen for compute are used.
//
// The layout of a crossbar configuration word (xcfg_t), the operand pool
// numbering, the MAC and bus operation codes and the way modes are choices
// of this design; the document gives the components but not their encoding.
package freac_pkg;

  // ---------------------------------------------------------------- geometry
  localparam int unsigned SA_W        = 32;    // sub-array port width (bits)
  localparam int unsigned SA_PER_MCC  = 4;     // 2 data arrays x 2 sub-arrays
  localparam int unsigned MCC_PER_PAIR = 4;    // 4 data-array pairs per way pair
  localparam int unsigned WORD_W      = 32;    // MAC / bus / link word width

  // ------------------------------------------------------- cluster resources
  localparam int unsigned REG_BITS    = 256;   // intermediate flip-flops
  localparam int unsigned REG_WORDS   = REG_BITS / WORD_W;   // 8 words
  localparam int unsigned RW_AW       = $clog2(REG_WORDS);   // 3
  localparam int unsigned RB_AW       = $clog2(REG_BITS);    // 8
  localparam int unsigned NUM_LUT     = 2 * SA_PER_MCC;      // 8 LUT outputs
  localparam int unsigned IN_PER_SA   = 8;     // LUT input selects per sub-array
  localparam int unsigned NUM_LUT_IN  = IN_PER_SA * SA_PER_MCC; // 32

  // Operand pool seen by every LUT input through the crossbar:
  //   0   .. 255 : intermediate register bits
  //   256 .. 263 : LUT state latches (LUT outputs of the previous step)
  //   264 .. 295 : inter-cluster link input word
  //   296 .. 511 : constant 0
  localparam int unsigned POOL_LATCH  = REG_BITS;              // 256
  localparam int unsigned POOL_LINK   = POOL_LATCH + NUM_LUT;  // 264
  localparam int unsigned POOL_N      = POOL_LINK + WORD_W;    // 296
  localparam int unsigned SEL_W       = 9;

  // Register bit the controller samples as the accelerator's "done" output.
  localparam int unsigned DONE_BIT    = REG_BITS - 1;

  typedef enum logic [1:0] {
    MAC_NOP = 2'd0,   // accumulator unchanged
    MAC_MUL = 2'd1,   // acc <= a * b
    MAC_ACC = 2'd2,   // acc <= acc + a * b
    MAC_CLR = 2'd3    // acc <= 0
  } mac_op_e;

  typedef enum logic [1:0] {
    BUS_NONE  = 2'd0,
    BUS_READ  = 2'd1,
    BUS_WRITE = 2'd2
  } bus_op_e;

  typedef enum logic [1:0] {
    WAY_CACHE   = 2'd0,  // way pair serves as ordinary cache
    WAY_COMPUTE = 2'd1,  // way pair locked, its four MCCs compute
    WAY_SCRATCH = 2'd2   // way pair locked as scratchpad
  } way_mode_e;

  // One crossbar configuration word: everything of a time step that is not a
  // LUT truth table. It is stored in the tag arrays and broadcast to all
  // clusters one cycle ahead of use.
  typedef struct packed {
    logic                                done_chk;    // sample DONE_BIT after this step
    logic [RW_AW-1:0]                    link_src;    // register word driven on the link
    logic [RW_AW-1:0]                    bus_dst;     // register word receiving read data
    logic [RW_AW-1:0]                    bus_data;    // register word holding write data
    logic [RW_AW-1:0]                    bus_addr;    // register word holding the address
    bus_op_e                             bus_op;
    logic [RW_AW-1:0]                    mac_dst;     // register word receiving acc
    logic                                mac_wr;      // write acc result this step
    logic [RW_AW-1:0]                    mac_b;
    logic [RW_AW-1:0]                    mac_a;
    mac_op_e                             mac_op;
    logic [NUM_LUT-1:0][RB_AW-1:0]       lut_dst;     // register bit per LUT output
    logic [NUM_LUT-1:0]                  lut_wr;      // write enable per LUT output
    logic [NUM_LUT_IN-1:0][SEL_W-1:0]    lut_in_sel;  // operand pool index per LUT input
    logic                                lut4_mode;   // 1: eight 4-LUTs, 0: four 5-LUTs
  } xcfg_t;

  localparam int unsigned XCFG_W     = $bits(xcfg_t);
  localparam int unsigned XCFG_WORDS = (XCFG_W + 31) / 32;

  // Host address map (word addresses inside the slice's reserved range).
  localparam logic [1:0] RGN_CTRL   = 2'd0;  // control registers
  localparam logic [1:0] RGN_ARRAY  = 2'd1;  // sub-array words (config / scratchpad)
  localparam logic [1:0] RGN_XCFG   = 2'd2;  // crossbar configuration (tag arrays)
  localparam logic [1:0] RGN_SWCFG  = 2'd3;  // switch-box configuration

  // Control register indices.
  localparam logic [3:0] REG_WAY_MODE   = 4'd0;
  localparam logic [3:0] REG_STATUS     = 4'd1;
  localparam logic [3:0] REG_SCHED_BASE = 4'd2;
  localparam logic [3:0] REG_SCHED_LEN  = 4'd3;
  localparam logic [3:0] REG_ITERS      = 4'd4;
  localparam logic [3:0] REG_OFF_BASE   = 4'd5;
  localparam logic [3:0] REG_OFF_STRIDE = 4'd6;
  localparam logic [3:0] REG_RUN        = 4'd7;
  localparam logic [3:0] REG_CYCLES     = 4'd8;
  localparam logic [3:0] REG_STALLS     = 4'd9;
  localparam logic [3:0] REG_ITER_DONE  = 4'd10;

endpackage
