// tb_workload_stencil2d: 2-D stencil (STN2), a 3 x 3 filter over a 6 x 6
// grid giving 4 x 4 outputs, on 32 single-cluster tiles of a full-size
// slice (16 compute ways, scratchpad in pairs 8-9). One iteration computes
// one output with the nine taps unrolled over the MAC.
//
// Tile window (words): grid g[y][x] at 8y + x, filter f[3dy+dx] at 64 + tap,
// output o[r][c] at 128 + 4r + c. Register w2 holds the output address, so
// its bits 3:0 are the counter t = 4r + c. The grid address of a tap is
// {r + dy, c + dx} in 3-bit fields; each of its bits is a 4-LUT of two
// counter bits with the tap's fixed offset folded into the truth table:
//   per tap (steps 3tap .. 3tap+2)
//     read g (address w0) ; constant 4-LUTs set w1 = 64 + tap (tap 0 also
//                           sets w2.b7)
//     read f (address w1) ; 4-LUTs set w0 to the next tap's grid address
//     MAC  acc = g*f (tap 0) or acc += g*f
//   s27  store acc in w6
//   s28  write o (address w2) ; 4-LUTs: t += 1
//   s29  4-LUTs set w0 to the first tap's grid address of the new t
// Every output, the iteration count and the cycle count are checked.
module tb_workload_stencil2d;
  import freac_pkg::*;
  localparam int AW = 11, NT = 32, STRIDE = 256;

  logic clk = 0, rst;
  logic host_req, host_we, host_ready, host_rvalid;
  logic [23:0] host_addr;
  logic [31:0] host_wdata, host_rdata;
  logic flush_req, flush_ack;
  logic [19:0] flush_mask, lock_mask;
  logic llc_acc_en, llc_acc_we, llc_acc_ok;
  logic [AW+7:0] llc_acc_addr;
  logic [31:0] llc_acc_wdata, llc_acc_rdata;
  logic ext_req, ext_we, ext_gnt, ext_rvalid, running;
  logic [31:0] ext_addr, ext_wdata, ext_rdata;

  freac_slice dut (.*);
  always #5 clk = ~clk;

  assign flush_ack  = flush_req;     // nothing dirty: flush completes at once
  assign ext_gnt    = 1'b1;
  assign ext_rvalid = 1'b0;
  assign ext_rdata  = '0;

  int checks = 0, failures = 0;
  task automatic check(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  task automatic hw(input logic [1:0] rgn, input logic [21:0] a, input logic [31:0] d);
    @(negedge clk);
    host_req = 1; host_we = 1; host_addr = {rgn, a}; host_wdata = d;
    while (!host_ready) @(negedge clk);
    @(negedge clk);
    host_req = 0; host_we = 0;
  endtask
  task automatic hr(input logic [1:0] rgn, input logic [21:0] a, output logic [31:0] d);
    @(negedge clk);
    host_req = 1; host_we = 0; host_addr = {rgn, a};
    while (!host_ready) @(negedge clk);
    @(negedge clk);
    host_req = 0;
    d = host_rdata;
  endtask
  task automatic put_step(input int s, input xcfg_t c, input logic [31:0] r0, r1, r2, r3);
    logic [XCFG_WORDS*32-1:0] raw;
    raw = '0;
    raw[XCFG_W-1:0] = c;
    for (int w = 0; w < XCFG_WORDS; w++) hw(RGN_XCFG, {8'd0, 10'(s), 4'(w)}, raw[32*w +: 32]);
    hw(RGN_ARRAY, {1'b1, 17'(0), 4'(0)} | 22'(s), r0);
    hw(RGN_ARRAY, (22'(1) << 21) | (22'(1) << AW) | 22'(s), r1);
    hw(RGN_ARRAY, (22'(1) << 21) | (22'(2) << AW) | 22'(s), r2);
    hw(RGN_ARRAY, (22'(1) << 21) | (22'(3) << AW) | 22'(s), r3);
  endtask
  function automatic xcfg_t blank();
    xcfg_t c;
    c = '0;
    for (int i = 0; i < NUM_LUT_IN; i++) c.lut_in_sel[i] = 9'd511;
    return c;
  endfunction

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // 4-LUT l of a step: output to register bit dst, truth table tt, inputs in0/in1
  task automatic lut4(inout xcfg_t c, inout logic [31:0] rows [4], input int l, input int dst,
                      input logic [15:0] tt, input int in0 = 511, input int in1 = 511);
    c.lut_in_sel[4 * l]     = 9'(in0);
    c.lut_in_sel[4 * l + 1] = 9'(in1);
    c.lut_wr[l] = 1; c.lut_dst[l] = 8'(dst);
    rows[l / 2][16 * (l % 2) +: 16] = tt;
  endtask

  // 4-LUT table of output bit k of (2-bit input) + offset
  function automatic logic [15:0] add_tt(input int offset, input int k);
    logic [15:0] t;
    t = '0;
    for (int v = 0; v < 4; v++) t[v] = 1'(((v + offset) >> k) & 1);
    return t;
  endfunction
  // 4-LUTs 0-5: w0 = grid address of tap (dy, dx) for the counter in w2
  task automatic grid_addr(inout xcfg_t c, inout logic [31:0] rows [4], input int dy, dx);
    for (int k = 0; k < 3; k++) begin
      lut4(c, rows, k, k, add_tt(dx, k), 64, 65);
      lut4(c, rows, 3 + k, 3 + k, add_tt(dy, k), 66, 67);
    end
  endtask

  initial begin
    logic [31:0] d, g [NT][6][6], f [NT][9], y;
    logic [31:0] rows [4];
    logic [15:0] inc [4];
    xcfg_t c;
    int base_sp, st;
    host_req = 0; host_we = 0; host_addr = 0; host_wdata = 0;
    llc_acc_en = 0; llc_acc_we = 0; llc_acc_addr = 0; llc_acc_wdata = 0;
    rst = 1; repeat (3) @(negedge clk); rst = 0;
    for (int s = 0; s < 4; s++)
      for (int v = 0; v < 16; v++) inc[s][v] = 1'(((v + 1) >> s) & 1);

    hw(RGN_CTRL, REG_WAY_MODE, 32'b10_10_01_01_01_01_01_01_01_01);
    repeat (3) @(negedge clk);
    check("ways locked", 32'(lock_mask), 32'hFFFFF);

    for (int tap = 0; tap < 9; tap++) begin
      // read g ; w1 = 64 + tap ; tap 0: w2.b7 = 1
      c = blank(); c.bus_op = BUS_READ; c.bus_addr = 0; c.bus_dst = 4; c.lut4_mode = 1;
      rows = '{default: 0};
      for (int b = 0; b < 4; b++) lut4(c, rows, b, 32 + b, tap[b] ? 16'hFFFF : 16'h0000);
      lut4(c, rows, 4, 32 + 6, 16'hFFFF);
      if (tap == 0) lut4(c, rows, 5, 64 + 7, 16'hFFFF);
      put_step(3 * tap, c, rows[0], rows[1], rows[2], rows[3]);
      // read f ; w0 = grid address of the next tap
      c = blank(); c.bus_op = BUS_READ; c.bus_addr = 1; c.bus_dst = 5; c.lut4_mode = 1;
      rows = '{default: 0};
      if (tap < 8) grid_addr(c, rows, (tap + 1) / 3, (tap + 1) % 3);
      put_step(3 * tap + 1, c, rows[0], rows[1], rows[2], rows[3]);
      // multiply-accumulate
      c = blank(); c.mac_op = (tap == 0) ? MAC_MUL : MAC_ACC; c.mac_a = 4; c.mac_b = 5;
      put_step(3 * tap + 2, c, 0, 0, 0, 0);
    end
    c = blank(); c.mac_wr = 1; c.mac_dst = 6;
    put_step(27, c, 0, 0, 0, 0);
    // write o ; t (w2[3:0]) += 1
    c = blank(); c.bus_op = BUS_WRITE; c.bus_addr = 2; c.bus_data = 6; c.lut4_mode = 1;
    for (int l = 0; l < 4; l++) begin
      for (int i = 0; i < 4; i++) c.lut_in_sel[4 * l + i] = 9'(64 + i);
      c.lut_wr[l] = 1; c.lut_dst[l] = 8'(64 + l);
    end
    put_step(28, c, {inc[1], inc[0]}, {inc[3], inc[2]}, 0, 0);
    // w0 = grid address of tap 0 for the new t
    c = blank(); c.lut4_mode = 1; rows = '{default: 0};
    grid_addr(c, rows, 0, 0);
    put_step(29, c, rows[0], rows[1], rows[2], rows[3]);

    base_sp = 8 << (AW + 4);
    for (int t = 0; t < NT; t++) begin
      for (int yy = 0; yy < 6; yy++)
        for (int xx = 0; xx < 6; xx++) begin
          g[t][yy][xx] = 32'($urandom_range(0, 65535));
          hw(RGN_ARRAY, 22'(base_sp + STRIDE * t + 8 * yy + xx), g[t][yy][xx]);
        end
      for (int tap = 0; tap < 9; tap++) begin
        f[t][tap] = 32'($urandom_range(0, 65535));
        hw(RGN_ARRAY, 22'(base_sp + STRIDE * t + 64 + tap), f[t][tap]);
      end
    end
    hw(RGN_CTRL, REG_SCHED_BASE, 0);
    hw(RGN_CTRL, REG_SCHED_LEN, 30);
    hw(RGN_CTRL, REG_ITERS, 16);
    hw(RGN_CTRL, REG_OFF_BASE, base_sp);
    hw(RGN_CTRL, REG_OFF_STRIDE, STRIDE);
    hw(RGN_CTRL, REG_RUN, 1);
    st = 0;
    do begin hr(RGN_CTRL, REG_STATUS, d); st++; end while (d[1] && st < 100000);
    check("no address error", 32'(d[3]), 0);
    hr(RGN_CTRL, REG_ITER_DONE, d);
    check("iterations = outputs", d, 16);
    hr(RGN_CTRL, REG_CYCLES, d);
    check("cycles", d, 1 + 16 * (9 * (2 * (1 + 2 * NT + 1) + 1) + 1 + (1 + NT + 1) + 1));
    for (int t = 0; t < NT; t++)
      for (int r = 0; r < 4; r++)
        for (int cc = 0; cc < 4; cc++) begin
          y = 0;
          for (int tap = 0; tap < 9; tap++) y += g[t][r + tap / 3][cc + tap % 3] * f[t][tap];
          hr(RGN_ARRAY, 22'(base_sp + STRIDE * t + 128 + 4 * r + cc), d);
          check($sformatf("tile %0d o[%0d][%0d]", t, r, cc), d, y);
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
