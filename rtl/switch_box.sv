// switch_box: lightweight routing switch of the grid that joins micro compute
// clusters of a slice into larger accelerator tiles.
//
// The boxes form a two-dimensional grid laid over the compute ways: box (r,c)
// sits between cluster c of way pair r ("up") and cluster c of way pair r+1
// ("down"), and has 32-bit links to its neighbour boxes north (r-1), south
// (r+1), east (c+1) and west (c-1); the east-west link between columns 1 and
// 2 is the one crossing the tag arrays and the control box. For every folding
// step the box reads one 32-bit word from its own configuration memory (8 KB,
// 2048 rows, one row per step address) that fixes its routes for that step.
// Each output has a 3-bit source code:
//   0 none (drives 0), 1 up cluster, 2 down cluster, 3 north input,
//   4 south input, 5 east input, 6 west input, 7 none
// at route bits 2:0 up output, 5:3 down output, 8:6 north output,
// 11:9 south output, 14:12 east output, 17:15 west output.
// Routing is X-Y (dimension ordered): a word travels east or west first and
// may then turn north or south, never back to a row link, and never leaves
// the way it came in. So the east output takes only the west input (or a
// local cluster), the north output anything but the north input, and so on;
// a disallowed code drives 0. This keeps any configuration of the grid free
// of combinational loops. Routing is combinational, so a word crosses the
// grid within one step, as the document requires of its links.
// The document gives the 32-bit links, static routing per step, the X-Y
// grid of boxes between groups of four clusters and 8 KB of configuration
// memory per box group; the route encoding, the rule set and one memory per
// box are this design's.
// Interface: cfg_we/cfg_addr/cfg_wdata load the memory; cfg_re/cfg_raddr read
// the row for the next step (registered, used the cycle after).
module switch_box #(
  parameter int unsigned LINK_W   = 32,
  parameter int unsigned CFG_ROWS = 2048,
  localparam int unsigned AW      = $clog2(CFG_ROWS)
) (
  input  logic              clk,
  input  logic              cfg_we,
  input  logic [AW-1:0]     cfg_addr,
  input  logic [31:0]       cfg_wdata,
  input  logic              cfg_re,
  input  logic [AW-1:0]     cfg_raddr,
  input  logic [LINK_W-1:0] up_in,
  input  logic [LINK_W-1:0] dn_in,
  input  logic [LINK_W-1:0] n_in,
  input  logic [LINK_W-1:0] s_in,
  input  logic [LINK_W-1:0] e_in,
  input  logic [LINK_W-1:0] w_in,
  output logic [LINK_W-1:0] up_out,
  output logic [LINK_W-1:0] dn_out,
  output logic [LINK_W-1:0] n_out,
  output logic [LINK_W-1:0] s_out,
  output logic [LINK_W-1:0] e_out,
  output logic [LINK_W-1:0] w_out
);
  logic [31:0] mem [CFG_ROWS];
  logic [31:0] route;   // configuration row of the current step

  always_ff @(posedge clk) begin
    if (cfg_we) mem[cfg_addr] <= cfg_wdata;
    if (cfg_re) route <= mem[cfg_raddr];
  end

  function automatic logic [LINK_W-1:0] gate(input logic [2:0] sel, input logic [2:0] code,
                                             input logic [LINK_W-1:0] d);
    return (sel == code) ? d : '0;
  endfunction

  // Each output is an AND-OR of only the inputs it may take, so the netlist
  // itself contains no path from an output back to the input of its side.
  assign up_out = gate(route[2:0], 3'd1, up_in) | gate(route[2:0], 3'd2, dn_in)
                | gate(route[2:0], 3'd3, n_in)  | gate(route[2:0], 3'd4, s_in)
                | gate(route[2:0], 3'd5, e_in)  | gate(route[2:0], 3'd6, w_in);
  assign dn_out = gate(route[5:3], 3'd1, up_in) | gate(route[5:3], 3'd2, dn_in)
                | gate(route[5:3], 3'd3, n_in)  | gate(route[5:3], 3'd4, s_in)
                | gate(route[5:3], 3'd5, e_in)  | gate(route[5:3], 3'd6, w_in);
  assign n_out  = gate(route[8:6], 3'd1, up_in) | gate(route[8:6], 3'd2, dn_in)
                | gate(route[8:6], 3'd4, s_in)
                | gate(route[8:6], 3'd5, e_in)  | gate(route[8:6], 3'd6, w_in);
  assign s_out  = gate(route[11:9], 3'd1, up_in) | gate(route[11:9], 3'd2, dn_in)
                | gate(route[11:9], 3'd3, n_in)
                | gate(route[11:9], 3'd5, e_in)  | gate(route[11:9], 3'd6, w_in);
  assign e_out  = gate(route[14:12], 3'd1, up_in) | gate(route[14:12], 3'd2, dn_in)
                | gate(route[14:12], 3'd6, w_in);
  assign w_out  = gate(route[17:15], 3'd1, up_in) | gate(route[17:15], 3'd2, dn_in)
                | gate(route[17:15], 3'd5, e_in);
endmodule
