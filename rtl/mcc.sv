// mcc: micro compute cluster, the unit of folded-logic computation.
//
// A cluster is built from two data arrays in adjacent ways, i.e. four
// sub-arrays, plus cluster logic placed between them: a memory latch and a
// mux tree per sub-array, LUT state latches, the operand crossbar, 256
// intermediate register bits, a 32-bit MAC and one port on the operand bus.
// A folded circuit runs one level (time step) per cycle:
//   * the controller issues step_re with the step's row address; all four
//     sub-arrays read that row, which then sits in their read registers
//     (the memory latches) as the truth tables of four 5-LUTs or eight 4-LUTs;
//   * in the same cycle the step's crossbar word arrives on 'xcfg';
//   * the next cycle (exec) the crossbar feeds the LUT inputs, the MAC reads
//     its two register words, and a bus request, if any, is raised;
//   * on 'commit' the LUT outputs go to the state latches and to their
//     register bits, the MAC updates its accumulator, and the register bank
//     takes the MAC result (the accumulator as it stood before this step) and
//     the bus read data. Without a bus operation exec and commit coincide, so
//     a step costs one cycle; with one, the controller withholds commit
//     (the cluster stalls) until every cluster's request is served.
// The inter-cluster link carries one register word out to the switch box and
// brings one word in, which the crossbar can route to LUT inputs.
// Outside compute mode the sub-arrays are reached through the access port
// (configuration loading, scratchpad or cache use); acc_rdata is the word
// read by the previous access.
// The composition (4 sub-arrays, latch + mux tree each, crossbar, registers,
// MAC, one bus operation per step, configuration rows at sequential
// addresses, lock-step stepping) follows the document; the timing above, the
// write priorities and the link port are this design's.
// Reset (synchronous, active high) clears registers, state latches and MAC.
module mcc
  import freac_pkg::*;
#(
  parameter int unsigned SA_ROWS = 2048,
  localparam int unsigned AW     = $clog2(SA_ROWS)
) (
  input  logic              clk,
  input  logic              rst,
  // array access port (configuration, scratchpad, cache)
  input  logic              acc_en,
  input  logic              acc_we,
  input  logic [1:0]        acc_sa,
  input  logic [AW-1:0]     acc_row,
  input  logic [SA_W-1:0]   acc_wdata,
  output logic [SA_W-1:0]   acc_rdata,
  // folding-step control, broadcast by the controller
  input  logic              cmp_en,     // this cluster computes
  input  logic              step_re,    // read the rows of the next step
  input  logic [AW-1:0]     step_addr,
  input  xcfg_t             xcfg,       // crossbar word of the executing step
  input  logic              exec,       // a step is executing
  input  logic              commit,     // the executing step completes
  // operand bus
  output logic              bus_req,
  output logic              bus_we,
  output logic [WORD_W-1:0] bus_addr,
  output logic [WORD_W-1:0] bus_wdata,
  input  logic              rsp_valid,
  input  logic [WORD_W-1:0] rsp_data,
  // inter-cluster link
  output logic [WORD_W-1:0] link_out,
  input  logic [WORD_W-1:0] link_in,
  output logic              done_bit
);
  logic [SA_PER_MCC-1:0][SA_W-1:0] row_q;      // memory latches
  logic [1:0]                      acc_sa_q;
  logic [REG_BITS-1:0]             regs;
  logic [REG_WORDS-1:0][WORD_W-1:0] regw;
  logic [NUM_LUT-1:0]              state_q;    // LUT state latches
  logic [NUM_LUT_IN-1:0]           lut_in;
  logic [NUM_LUT-1:0]              lut_out;
  logic [NUM_LUT-1:0]              lut_wr_ok;
  logic [WORD_W-1:0]               acc;
  logic [WORD_W-1:0]               rsp_buf;
  logic                            do_commit;

  assign regw      = regs;
  assign do_commit = commit && exec && cmp_en;

  // ------------------------------------------------ sub-arrays + mux trees
  for (genvar s = 0; s < SA_PER_MCC; s++) begin : g_sa
    logic          en, we;
    logic [AW-1:0] addr;
    always_comb begin
      if (cmp_en && step_re) begin
        en = 1'b1; we = 1'b0; addr = step_addr;
      end else begin
        en = acc_en && (acc_sa == 2'(s)); we = acc_we; addr = acc_row;
      end
    end
    sub_array #(.ROWS(SA_ROWS), .WIDTH(SA_W)) u_sa (
      .clk, .en, .we, .addr, .wdata(acc_wdata), .rdata(row_q[s])
    );
    mux_tree u_mt (
      .row (row_q[s]),
      .lut4(xcfg.lut4_mode),
      .in  (lut_in[IN_PER_SA*s +: IN_PER_SA]),
      .out (lut_out[2*s +: 2])
    );
    // In 5-LUT mode each sub-array has one LUT, on its even output.
    assign lut_wr_ok[2*s]   = xcfg.lut_wr[2*s];
    assign lut_wr_ok[2*s+1] = xcfg.lut_wr[2*s+1] && xcfg.lut4_mode;
  end

  always_ff @(posedge clk)
    if (acc_en && !acc_we) acc_sa_q <= acc_sa;
  assign acc_rdata = row_q[acc_sa_q];

  // --------------------------------------------------------- operand xbar
  operand_xbar u_xbar (
    .regs, .latches(state_q), .link_in, .sel(xcfg.lut_in_sel), .lut_in
  );

  // ------------------------------------------------------------------ MAC
  mac_unit u_mac (
    .clk, .rst, .commit(do_commit), .op(xcfg.mac_op),
    .a(regw[xcfg.mac_a]), .b(regw[xcfg.mac_b]), .acc
  );

  // ------------------------------------------------- intermediate registers
  intermediate_regs u_regs (
    .clk, .rst, .commit(do_commit),
    .wa_en  (xcfg.mac_wr),
    .wa_idx (xcfg.mac_dst),
    .wa_data(acc),
    .wb_en  (xcfg.bus_op == BUS_READ),
    .wb_idx (xcfg.bus_dst),
    .wb_data(rsp_buf),
    .bit_en (lut_wr_ok),
    .bit_idx(xcfg.lut_dst),
    .bit_data(lut_out),
    .q      (regs)
  );

  always_ff @(posedge clk) begin
    if (rst)            state_q <= '0;
    else if (do_commit) state_q <= lut_out;
  end

  // ------------------------------------------------------------ operand bus
  always_ff @(posedge clk) begin
    if (rst)            rsp_buf <= '0;
    else if (rsp_valid) rsp_buf <= rsp_data;
  end

  assign bus_req   = exec && cmp_en && (xcfg.bus_op != BUS_NONE);
  assign bus_we    = (xcfg.bus_op == BUS_WRITE);
  assign bus_addr  = regw[xcfg.bus_addr];
  assign bus_wdata = regw[xcfg.bus_data];

  assign link_out  = regw[xcfg.link_src];
  assign done_bit  = regs[DONE_BIT];

  // A response may only arrive for an outstanding read.
  a_rsp_for_read : assert property (@(posedge clk) disable iff (rst)
    rsp_valid |-> (bus_req && !bus_we));
endmodule
