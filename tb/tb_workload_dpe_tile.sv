// tb_workload_dpe_tile: a dot-product engine (DPE) built as one large
// accelerator tile of several clusters joined by the switch-box grid, on a
// full-size slice, at two tile sizes:
//   8 clusters  (way pairs 0-1, scratchpad pair 2)
//   32 clusters (way pairs 0-7, scratchpad pairs 8-9), the largest tile
//
// Run 1 (3 folding steps per element, 16 elements per cluster): every cluster
// reads a[i], b[i] from its own scratchpad window and accumulates a[i]*b[i]
// in its MAC; 4-LUTs build the operand addresses and count the elements.
// Run 2 reduces the partial sums over the grid in a tree, with switch routes
// that change from level to level (cluster k is cluster k%4 of pair k/4):
//   8:  1->0, 3->2, 5->4, 7->6 (west) | 2->0, 6->4 (two hops west) | 4->0
//   32: per column, pair 1->0, 3->2, 5->4, 7->6 | pair 2->0, 6->4 (north,
//       two boxes) | pair 4->0 (north, four boxes) | then in pair 0:
//       1->0, 3->2 | 2->0
// A level takes six steps: four steps of 4-LUTs copy the 32-bit link word,
// 8 bits per step, into a register word; the MAC adds it (word * 1); the new
// partial is stored and driven on the link. Clusters that receive nothing
// add 0. Every cluster finally writes its partial to window word 32; cluster
// 0 holds the tile's result. The tree is emulated here to give the expected
// value of every cluster; results and cycle counts are checked.
module tb_workload_dpe_tile;
  import freac_pkg::*;
  localparam int AW = 11, MAXT = 32, N = 16, STRIDE = 64;

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

  // crossbar entry and sub-array row e of a step
  task automatic put_stepb(input int e, input xcfg_t c, input logic [31:0] r0, r1, r2, r3);
    logic [XCFG_WORDS*32-1:0] raw;
    raw = '0;
    raw[XCFG_W-1:0] = c;
    for (int w = 0; w < XCFG_WORDS; w++) hw(RGN_XCFG, {8'd0, 10'(e), 4'(w)}, raw[32*w +: 32]);
    for (int sa = 0; sa < 4; sa++)
      hw(RGN_ARRAY, (22'(1) << 21) | (22'(sa) << AW) | 22'(e),
         sa == 0 ? r0 : sa == 1 ? r1 : sa == 2 ? r2 : r3);
  endtask
  function automatic logic [31:0] sw_route(input int up, dn, n, so, e, w);
    return {14'd0, 3'(w), 3'(e), 3'(so), 3'(n), 3'(dn), 3'(up)};
  endfunction

  // route word of box bx at reduction level lv, for a tile of ts clusters
  function automatic logic [31:0] route(input int ts, input int lv, input int bx);
    int r, c;
    r = bx / 4; c = bx % 4;
    if (ts == 8) begin
      if (r > 1) return 0;
      case (lv)
        0: return (c == 1 || c == 3) ? sw_route(0, 0, 0, 0, 0, 1) : sw_route(5, 0, 0, 0, 0, 0);
        1: return (c == 2) ? sw_route(0, 0, 0, 0, 0, 1) : (c == 1) ? sw_route(0, 0, 0, 0, 0, 5) :
                  (c == 0) ? sw_route(5, 0, 0, 0, 0, 0) : 0;
        default: return (bx == 0) ? sw_route(2, 0, 0, 0, 0, 0) : 0;
      endcase
    end
    case (lv)
      0: return (r % 2 == 0) ? sw_route(2, 0, 0, 0, 0, 0) : 0;
      1: return (r == 1 || r == 5) ? sw_route(0, 0, 2, 0, 0, 0) :
                (r == 0 || r == 4) ? sw_route(4, 0, 0, 0, 0, 0) : 0;
      2: return (r == 3) ? sw_route(0, 0, 2, 0, 0, 0) :
                (r == 1 || r == 2) ? sw_route(0, 0, 4, 0, 0, 0) :
                (r == 0) ? sw_route(4, 0, 0, 0, 0, 0) : 0;
      3: return (bx == 1 || bx == 3) ? sw_route(0, 0, 0, 0, 0, 1) :
                (bx == 0 || bx == 2) ? sw_route(5, 0, 0, 0, 0, 0) : 0;
      default: return (bx == 2) ? sw_route(0, 0, 0, 0, 0, 1) : (bx == 1) ? sw_route(0, 0, 0, 0, 0, 5) :
                      (bx == 0) ? sw_route(5, 0, 0, 0, 0, 0) : 0;
    endcase
  endfunction

  // transfer j of level lv: source and destination cluster (-1: none)
  function automatic void xfer(input int ts, input int lv, input int j, output int src, output int dst);
    src = -1; dst = -1;
    if (ts == 8) begin
      case (lv)
        0: if (j < 4) begin src = 2 * j + 1; dst = 2 * j; end
        1: if (j < 2) begin src = 4 * j + 2; dst = 4 * j; end
        default: if (j == 0) begin src = 4; dst = 0; end
      endcase
    end else begin
      case (lv)
        0: if (j < 16) begin src = 4 * (2 * (j / 4) + 1) + j % 4; dst = 4 * (2 * (j / 4)) + j % 4; end
        1: if (j < 8) begin src = 4 * (4 * (j / 4) + 2) + j % 4; dst = 4 * (4 * (j / 4)) + j % 4; end
        2: if (j < 4) begin src = 16 + j; dst = j; end
        3: if (j < 2) begin src = 2 * j + 1; dst = 2 * j; end
        default: if (j == 0) begin src = 2; dst = 0; end
      endcase
    end
  endfunction

  task automatic run_tile(input int nt, input logic [31:0] mode, input int sp_pair);
    logic [31:0] d, a [MAXT][N], b [MAXT][N], part [MAXT], val [MAXT];
    logic [15:0] inc [4];
    xcfg_t c;
    int base_sp, st, nlv;
    string name;
    name = $sformatf("tile %0d:", nt);
    nlv = (nt == 8) ? 3 : 5;
    hw(RGN_CTRL, REG_WAY_MODE, mode);
    st = 0;
    do begin hr(RGN_CTRL, REG_STATUS, d); st++; end while (d[0] && st < 1000);

    for (int s = 0; s < 4; s++)
      for (int v = 0; v < 16; v++) inc[s][v] = 1'(((v + 1) >> s) & 1);

    // ---- clear the accumulators (entry/row 300)
    c = blank(); c.mac_op = MAC_CLR;
    put_stepb(300, c, 0, 0, 0, 0);
    // ---- run 1: partial dot products (entries/rows 0-2)
    // s0: read a ; constants w1.b0 (b address), w2.b5 (result address 32), w7.b0 (= 1)
    c = blank(); c.bus_op = BUS_READ; c.bus_addr = 0; c.bus_dst = 4; c.lut4_mode = 1;
    c.lut_wr[0] = 1; c.lut_dst[0] = 8'(32);
    c.lut_wr[1] = 1; c.lut_dst[1] = 8'(64 + 5);
    c.lut_wr[2] = 1; c.lut_dst[2] = 8'(224);
    put_stepb(0, c, '1, '1, 0, 0);
    // s1: read b
    c = blank(); c.bus_op = BUS_READ; c.bus_addr = 1; c.bus_dst = 5;
    put_stepb(1, c, 0, 0, 0, 0);
    // s2: acc += a*b ; element counter (bits 4:1 of w0 and w1) += 1
    c = blank(); c.mac_op = MAC_ACC; c.mac_a = 4; c.mac_b = 5; c.lut4_mode = 1;
    for (int s = 0; s < 4; s++) begin
      for (int h = 0; h < 2; h++)
        for (int i = 0; i < 4; i++) c.lut_in_sel[8*s + 4*h + i] = 9'(1 + i);
      c.lut_wr[2*s] = 1;     c.lut_dst[2*s]     = 8'(1 + s);
      c.lut_wr[2*s + 1] = 1; c.lut_dst[2*s + 1] = 8'(32 + 1 + s);
    end
    put_stepb(2, c, {inc[0], inc[0]}, {inc[1], inc[1]}, {inc[2], inc[2]}, {inc[3], inc[3]});

    // ---- run 2: tree reduction (entries/rows 100..)
    c = blank(); c.mac_wr = 1; c.mac_dst = 6;
    put_stepb(100, c, 0, 0, 0, 0);
    for (int lv = 0; lv < nlv; lv++) begin
      int e;
      e = 101 + 6 * lv;
      for (int q = 0; q < 4; q++) begin
        c = blank(); c.link_src = 6; c.lut4_mode = 1;
        for (int s = 0; s < 4; s++) begin
          c.lut_in_sel[8*s]     = 9'(POOL_LINK + 8 * q + 2 * s);
          c.lut_in_sel[8*s + 4] = 9'(POOL_LINK + 8 * q + 2 * s + 1);
          c.lut_wr[2*s] = 1;     c.lut_dst[2*s]     = 8'(96 + 8 * q + 2 * s);
          c.lut_wr[2*s + 1] = 1; c.lut_dst[2*s + 1] = 8'(96 + 8 * q + 2 * s + 1);
        end
        put_stepb(e + q, c, 32'hAAAA_AAAA, 32'hAAAA_AAAA, 32'hAAAA_AAAA, 32'hAAAA_AAAA);
        for (int bx = 0; bx < 28; bx++) hw(RGN_SWCFG, {6'd0, 5'(bx), 11'(e + q)}, route(nt, lv, bx));
      end
      c = blank(); c.mac_op = MAC_ACC; c.mac_a = 3; c.mac_b = 7;
      put_stepb(e + 4, c, 0, 0, 0, 0);
      c = blank(); c.mac_wr = 1; c.mac_dst = 6;
      put_stepb(e + 5, c, 0, 0, 0, 0);
    end
    c = blank(); c.bus_op = BUS_WRITE; c.bus_addr = 2; c.bus_data = 6;
    put_stepb(101 + 6 * nlv, c, 0, 0, 0, 0);

    base_sp = sp_pair << (AW + 4);
    for (int k = 0; k < nt; k++) begin
      part[k] = 0;
      for (int i = 0; i < N; i++) begin
        a[k][i] = $urandom(); b[k][i] = $urandom();
        part[k] += a[k][i] * b[k][i];
        hw(RGN_ARRAY, 22'(base_sp + STRIDE * k + 2 * i), a[k][i]);
        hw(RGN_ARRAY, 22'(base_sp + STRIDE * k + 2 * i + 1), b[k][i]);
      end
    end
    hw(RGN_CTRL, REG_OFF_BASE, base_sp);
    hw(RGN_CTRL, REG_OFF_STRIDE, STRIDE);
    hw(RGN_CTRL, REG_ITERS, 1);
    hw(RGN_CTRL, REG_SCHED_BASE, 300);
    hw(RGN_CTRL, REG_SCHED_LEN, 1);
    hw(RGN_CTRL, REG_RUN, 1);
    st = 0;
    do begin hr(RGN_CTRL, REG_STATUS, d); st++; end while (d[1] && st < 100000);
    hw(RGN_CTRL, REG_SCHED_BASE, 0);
    hw(RGN_CTRL, REG_SCHED_LEN, 3);
    hw(RGN_CTRL, REG_ITERS, N);
    hw(RGN_CTRL, REG_RUN, 1);
    st = 0;
    do begin hr(RGN_CTRL, REG_STATUS, d); st++; end while (d[1] && st < 100000);
    check({name, " run 1 no address error"}, 32'(d[3]), 0);
    hr(RGN_CTRL, REG_CYCLES, d);
    check({name, " run 1 cycles"}, d, 1 + N * (2 * (1 + 2 * nt + 1) + 1));

    hw(RGN_CTRL, REG_SCHED_BASE, 100);
    hw(RGN_CTRL, REG_SCHED_LEN, 2 + 6 * nlv);
    hw(RGN_CTRL, REG_ITERS, 1);
    hw(RGN_CTRL, REG_RUN, 1);
    st = 0;
    do begin hr(RGN_CTRL, REG_STATUS, d); st++; end while (d[1] && st < 100000);
    check({name, " run 2 no address error"}, 32'(d[3]), 0);
    hr(RGN_CTRL, REG_CYCLES, d);
    check({name, " run 2 cycles"}, d, 1 + (1 + 6 * nlv) + (1 + nt + 1));

    val = part;
    for (int lv = 0; lv < nlv; lv++) begin
      logic [31:0] sent [MAXT];
      sent = val;
      for (int j = 0; j < 16; j++) begin
        int sj, dj;
        xfer(nt, lv, j, sj, dj);
        if (sj >= 0) val[dj] += sent[sj];
      end
    end
    for (int k = 0; k < nt; k++) begin
      hr(RGN_ARRAY, 22'(base_sp + STRIDE * k + 32), d);
      check($sformatf("%s cluster %0d partial after reduction", name, k), d, val[k]);
    end
    begin
      logic [31:0] tot;
      tot = 0;
      for (int k = 0; k < nt; k++) tot += part[k];
      check({name, " tile result is the whole dot product"}, val[0], tot);
    end
  endtask

  initial begin
    host_req = 0; host_we = 0; host_addr = 0; host_wdata = 0;
    llc_acc_en = 0; llc_acc_we = 0; llc_acc_addr = 0; llc_acc_wdata = 0;
    rst = 1; repeat (3) @(negedge clk); rst = 0;
    run_tile(8, 32'b10_01_01, 2);
    check("tile 8 lock mask", 32'(lock_mask), 32'h3F);
    run_tile(32, 32'b10_10_01_01_01_01_01_01_01_01, 8);
    check("tile 32 lock mask", 32'(lock_mask), 32'hFFFFF);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
