// freac_slice: one last-level-cache slice turned into a reconfigurable
// compute slice (folded-logic computing in the cache).
//
// The slice keeps its 20 ways of data arrays. Adjacent ways are grouped in
// pairs; each pair can serve as ordinary cache, as scratchpad, or as four
// micro compute clusters (MCCs), each built from one data array of each way
// (four 8 KB sub-arrays) and the cluster logic between them. Every data-array
// pair carries cluster logic, so any way pair can be switched to compute.
// The pieces:
//   * cc_ctrl       the compute cluster controller in the control box: host
//                   registers, flush and lock of ways, configuration and
//                   scratchpad loading, schedule stepping, operand serving;
//   * xcfg_store    the tag arrays reused to hold one crossbar word per step,
//                   broadcast to all clusters (the configuration datapath);
//   * mcc x 4*NUM_PAIRS  the clusters, running in lock-step on the same
//                   broadcast row address and crossbar word;
//   * switch_box x SB_ROWS*4  a grid laid over the first SB_ROWS+1 way pairs
//                   (7 x 4 boxes over 16 ways by default): box (r,c) sits
//                   between cluster c of pair r and of pair r+1 and links to
//                   its four neighbour boxes, so clusters exchange 32-bit
//                   words each step over X-Y routes and several clusters act
//                   as one large tile.
// Ports left to the surrounding cache: the flush handshake and lock mask, an
// array port through which the existing cache controller reaches data arrays
// of cache-mode pairs (locked pairs are refused: llc_acc_ok low), and the
// ext_* port on which operand requests with address bit 31 set are handed
// to the cache controller.
// Host access: host_* (see cc_ctrl for the address map). All parameters
// default to the document's slice: 20 ways, 8 KB sub-arrays.
// Clusters of pairs beyond the grid work only as single-cluster tiles. Each
// cluster has one link input, the OR of the two boxes next to it (own
// choice). Synchronous active-high reset.
module freac_slice
  import freac_pkg::*;
#(
  parameter int unsigned NUM_PAIRS  = 10,
  parameter int unsigned SA_ROWS    = 2048,
  parameter int unsigned XCFG_DEPTH = 1024,
  parameter int unsigned SB_ROWS    = 7,     // switch-box rows (over SB_ROWS+1 pairs)
  localparam int unsigned NUM_MCC   = NUM_PAIRS * MCC_PER_PAIR,
  localparam int unsigned AW        = $clog2(SA_ROWS),
  localparam int unsigned NUM_WAYS  = 2 * NUM_PAIRS
) (
  input  logic                      clk,
  input  logic                      rst,
  // host loads / stores to the reserved range
  input  logic                      host_req,
  input  logic                      host_we,
  input  logic [23:0]               host_addr,
  input  logic [31:0]               host_wdata,
  output logic                      host_ready,
  output logic                      host_rvalid,
  output logic [31:0]               host_rdata,
  // cache controller: way flush and lock
  output logic                      flush_req,
  output logic [NUM_WAYS-1:0]       flush_mask,
  input  logic                      flush_ack,
  output logic [NUM_WAYS-1:0]       lock_mask,
  // cache controller: data-array access for cache-mode ways
  input  logic                      llc_acc_en,
  input  logic                      llc_acc_we,
  input  logic [AW+7:0]             llc_acc_addr,   // pair, mcc, sub-array, row
  input  logic [31:0]               llc_acc_wdata,
  output logic                      llc_acc_ok,
  output logic [31:0]               llc_acc_rdata,
  // cache controller: forwarded operand requests
  output logic                      ext_req,
  output logic                      ext_we,
  output logic [31:0]               ext_addr,
  output logic [31:0]               ext_wdata,
  input  logic                      ext_gnt,
  input  logic                      ext_rvalid,
  input  logic [31:0]               ext_rdata,
  output logic                      running
);
  localparam int unsigned XAW = $clog2(XCFG_DEPTH);

  if (SB_ROWS < 1 || SB_ROWS >= NUM_PAIRS || SB_ROWS * MCC_PER_PAIR > 32) begin : g_bad_grid
    $error("freac_slice: SB_ROWS must lie in 1..NUM_PAIRS-1 and give at most 32 boxes");
  end
  localparam int unsigned WSW = $clog2(XCFG_WORDS);

  way_mode_e [NUM_PAIRS-1:0]  way_mode;
  logic                       acc_en, acc_we, acc_bcast;
  logic [3:0]                 acc_pair;
  logic [1:0]                 acc_mcc, acc_sa;
  logic [AW-1:0]              acc_row;
  logic [31:0]                acc_wdata, acc_rdata;
  logic                       xs_we, xs_re;
  logic [XAW-1:0]             xs_waddr, xs_raddr;
  logic [WSW-1:0]             xs_word;
  logic [31:0]                xs_wdata;
  xcfg_t                      xcfg;
  logic                       sw_we;
  logic [4:0]                 sw_idx;
  logic [AW-1:0]              sw_addr;
  logic [31:0]                sw_wdata;
  logic [NUM_MCC-1:0]         cmp_mask;
  logic                       step_re, exec, commit;
  logic [AW-1:0]              step_addr;
  logic [NUM_MCC-1:0]         bus_req, bus_we, rsp_valid, done_bits;
  logic [NUM_MCC-1:0][31:0]   bus_addr, bus_wdata, mcc_rdata, link_out, link_in;
  logic [31:0]                rsp_data;

  cc_ctrl #(.NUM_PAIRS(NUM_PAIRS), .SA_ROWS(SA_ROWS), .XCFG_DEPTH(XCFG_DEPTH)) u_ctrl (
    .clk, .rst,
    .host_req, .host_we, .host_addr, .host_wdata, .host_ready, .host_rvalid, .host_rdata,
    .way_mode, .lock_mask, .flush_req, .flush_mask, .flush_ack,
    .acc_en, .acc_we, .acc_bcast, .acc_pair, .acc_mcc, .acc_sa, .acc_row, .acc_wdata, .acc_rdata,
    .xs_we, .xs_waddr, .xs_word, .xs_wdata, .xs_re, .xs_raddr, .xcfg_cur(xcfg),
    .sw_we, .sw_idx, .sw_addr, .sw_wdata,
    .cmp_mask, .step_re, .step_addr, .exec, .commit,
    .bus_req, .bus_we, .bus_addr, .bus_wdata, .rsp_valid, .rsp_data, .done_bits,
    .ext_req, .ext_we, .ext_addr, .ext_wdata, .ext_gnt, .ext_rvalid, .ext_rdata,
    .running
  );

  xcfg_store #(.DEPTH(XCFG_DEPTH)) u_xcfg (
    .clk, .wr_en(xs_we), .wr_addr(xs_waddr), .wr_word(xs_word), .wr_data(xs_wdata),
    .rd_en(xs_re), .rd_addr(xs_raddr), .rd_data(xcfg)
  );

  // -------------------------------------------------- array access routing
  logic [3:0] llc_pair;
  logic [1:0] llc_mcc;
  assign llc_pair   = llc_acc_addr[AW+7:AW+4];
  assign llc_mcc    = llc_acc_addr[AW+3:AW+2];
  assign llc_acc_ok = (32'(llc_pair) < NUM_PAIRS) && (way_mode[llc_pair] == WAY_CACHE);

  logic [$clog2(NUM_MCC)-1:0] cc_sel_q, llc_sel_q;
  always_ff @(posedge clk) begin
    if (acc_en && !acc_bcast) cc_sel_q  <= $clog2(NUM_MCC)'({acc_pair, acc_mcc});
    if (llc_acc_en)           llc_sel_q <= $clog2(NUM_MCC)'({llc_pair, llc_mcc});
  end
  assign acc_rdata     = mcc_rdata[cc_sel_q];
  assign llc_acc_rdata = mcc_rdata[llc_sel_q];

  // ------------------------------------------------------------- clusters
  for (genvar p = 0; p < NUM_PAIRS; p++) begin : g_pair
    for (genvar m = 0; m < MCC_PER_PAIR; m++) begin : g_mcc
      localparam int unsigned I = p * MCC_PER_PAIR + m;
      logic          cc_hit, llc_hit, en, we;
      logic [1:0]    sa;
      logic [AW-1:0] row;
      logic [31:0]   wdata;
      assign cc_hit  = acc_en && (acc_bcast ? cmp_mask[I]
                                            : (acc_pair == 4'(p) && acc_mcc == 2'(m)));
      assign llc_hit = llc_acc_en && llc_acc_ok && llc_pair == 4'(p) && llc_mcc == 2'(m);
      assign en      = cc_hit || llc_hit;
      assign we      = cc_hit ? acc_we    : llc_acc_we;
      assign sa      = cc_hit ? acc_sa    : llc_acc_addr[AW+1:AW];
      assign row     = cc_hit ? acc_row   : llc_acc_addr[AW-1:0];
      assign wdata   = cc_hit ? acc_wdata : llc_acc_wdata;

      mcc #(.SA_ROWS(SA_ROWS)) u_mcc (
        .clk, .rst,
        .acc_en(en), .acc_we(we), .acc_sa(sa), .acc_row(row), .acc_wdata(wdata),
        .acc_rdata(mcc_rdata[I]),
        .cmp_en(cmp_mask[I]), .step_re, .step_addr, .xcfg, .exec, .commit,
        .bus_req(bus_req[I]), .bus_we(bus_we[I]), .bus_addr(bus_addr[I]),
        .bus_wdata(bus_wdata[I]), .rsp_valid(rsp_valid[I]), .rsp_data,
        .link_out(link_out[I]), .link_in(link_in[I]), .done_bit(done_bits[I])
      );
    end
  end

  // ------------------------------------------------------ switch-box grid
  // Box (r,c) lies between cluster c of pair r and cluster c of pair r+1.
  for (genvar r = 0; r < SB_ROWS; r++) begin : g_sbr
    for (genvar c = 0; c < MCC_PER_PAIR; c++) begin : g_sbc
      logic [31:0] up_out, dn_out, n_in, s_in, e_in, w_in, n_out, s_out, e_out, w_out;
      switch_box #(.LINK_W(32), .CFG_ROWS(SA_ROWS)) u_sb (
        .clk,
        .cfg_we(sw_we && sw_idx == 5'(r * MCC_PER_PAIR + c)), .cfg_addr(sw_addr),
        .cfg_wdata(sw_wdata), .cfg_re(step_re), .cfg_raddr(step_addr),
        .up_in(link_out[r * MCC_PER_PAIR + c]), .dn_in(link_out[(r + 1) * MCC_PER_PAIR + c]),
        .n_in, .s_in, .e_in, .w_in, .up_out, .dn_out, .n_out, .s_out, .e_out, .w_out
      );
    end
  end

  for (genvar r = 0; r < SB_ROWS; r++) begin : g_sbw
    for (genvar c = 0; c < MCC_PER_PAIR; c++) begin : g_sbc
      if (r == 0) begin : g_n0
        assign g_sbr[r].g_sbc[c].n_in = '0;
      end else begin : g_n
        assign g_sbr[r].g_sbc[c].n_in = g_sbr[r-1].g_sbc[c].s_out;
      end
      if (r == SB_ROWS - 1) begin : g_s0
        assign g_sbr[r].g_sbc[c].s_in = '0;
      end else begin : g_s
        assign g_sbr[r].g_sbc[c].s_in = g_sbr[r+1].g_sbc[c].n_out;
      end
      if (c == 0) begin : g_w0
        assign g_sbr[r].g_sbc[c].w_in = '0;
      end else begin : g_w
        assign g_sbr[r].g_sbc[c].w_in = g_sbr[r].g_sbc[c-1].e_out;
      end
      if (c == MCC_PER_PAIR - 1) begin : g_e0
        assign g_sbr[r].g_sbc[c].e_in = '0;
      end else begin : g_e
        assign g_sbr[r].g_sbc[c].e_in = g_sbr[r].g_sbc[c+1].w_out;
      end
    end
  end

  // A cluster's link input merges the box below it (its "up" output) and the
  // box above it (its "down" output); a schedule routes to a cluster from one
  // of them in a step and leaves the other at 0.
  for (genvar p = 0; p < NUM_PAIRS; p++) begin : g_lnk
    for (genvar c = 0; c < MCC_PER_PAIR; c++) begin : g_c
      logic [31:0] from_below, from_above;
      if (p < SB_ROWS) begin : g_b
        assign from_below = g_sbr[p].g_sbc[c].up_out;
      end else begin : g_b0
        assign from_below = '0;
      end
      if (p >= 1 && p <= SB_ROWS) begin : g_a
        assign from_above = g_sbr[p-1].g_sbc[c].dn_out;
      end else begin : g_a0
        assign from_above = '0;
      end
      assign link_in[p * MCC_PER_PAIR + c] = from_below | from_above;
    end
  end
endmodule
