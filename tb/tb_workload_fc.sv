// tb_workload_fc: fully connected layer with ReLU, y = max(0, W x) for 8
// inputs and 4 outputs (signed 32-bit), on 32 single-cluster tiles of a
// full-size slice (16 compute ways, scratchpad in pairs 8-9). One iteration
// computes one output: eight MAC taps, then the activation in 4-LUTs.
//
// Tile window (words): W[o][i] at 8o + i, x[i] at 32 + i, y[o] at 48 + o.
// w0 = address of W (bits 4:3 = o), w1 = address of x, w2 = address of y
// (bits 1:0 = o, the iteration counter):
//   per input i (steps 3i .. 3i+2)
//     read W[o][i] (address w0) ; w1 = 32 + i ; i = 0 also sets w2 bits 5:4
//     read x[i]    (address w1) ; w0 bits 2:0 = i + 1 mod 8
//     MAC  acc = W*x (i = 0) or acc += W*x
//   s24     store acc in w6
//   s25-28  ReLU: each bit of w6 <= bit & ~sign, eight bits per step, the
//           sign bit itself last
//   s29     write y[o] (address w2) ; 4-LUTs advance o in w2 and w0
// Every output (both signs occur), the iteration count and the cycle count
// are checked.
module tb_workload_fc;
  import freac_pkg::*;
  localparam int AW = 11, NT = 32, NI = 8, NO = 4, STRIDE = 64;

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

  initial begin
    logic [31:0] d, w [NT][NO][NI], x [NT][NI], y;
    logic [31:0] rows [4];
    xcfg_t c;
    int base_sp, st, neg;
    host_req = 0; host_we = 0; host_addr = 0; host_wdata = 0;
    llc_acc_en = 0; llc_acc_we = 0; llc_acc_addr = 0; llc_acc_wdata = 0;
    rst = 1; repeat (3) @(negedge clk); rst = 0;

    hw(RGN_CTRL, REG_WAY_MODE, 32'b10_10_01_01_01_01_01_01_01_01);
    repeat (3) @(negedge clk);
    check("ways locked", 32'(lock_mask), 32'hFFFFF);

    for (int i = 0; i < NI; i++) begin
      // read W ; w1 = 32 + i ; i = 0: w2.b4 = w2.b5 = 1
      c = blank(); c.bus_op = BUS_READ; c.bus_addr = 0; c.bus_dst = 4; c.lut4_mode = 1;
      rows = '{default: 0};
      for (int b = 0; b < 3; b++) lut4(c, rows, b, 32 + b, i[b] ? 16'hFFFF : 16'h0000);
      lut4(c, rows, 3, 32 + 5, 16'hFFFF);
      if (i == 0) begin
        lut4(c, rows, 4, 64 + 4, 16'hFFFF);
        lut4(c, rows, 5, 64 + 5, 16'hFFFF);
      end
      put_step(3 * i, c, rows[0], rows[1], rows[2], rows[3]);
      // read x ; w0[2:0] = i + 1 mod 8
      c = blank(); c.bus_op = BUS_READ; c.bus_addr = 1; c.bus_dst = 5; c.lut4_mode = 1;
      rows = '{default: 0};
      for (int b = 0; b < 3; b++) lut4(c, rows, b, b, ((i + 1) % 8) & (1 << b) ? 16'hFFFF : 16'h0000);
      put_step(3 * i + 1, c, rows[0], rows[1], rows[2], rows[3]);
      // multiply-accumulate
      c = blank(); c.mac_op = (i == 0) ? MAC_MUL : MAC_ACC; c.mac_a = 4; c.mac_b = 5;
      put_step(3 * i + 2, c, 0, 0, 0, 0);
    end
    c = blank(); c.mac_wr = 1; c.mac_dst = 6;
    put_step(3 * NI, c, 0, 0, 0, 0);
    // ReLU: bit & ~sign (in0 = bit, in1 = sign)
    for (int q = 0; q < 4; q++) begin
      c = blank(); c.lut4_mode = 1; rows = '{default: 0};
      for (int l = 0; l < 8; l++) lut4(c, rows, l, 192 + 8 * q + l, 16'h0002, 192 + 8 * q + l, 192 + 31);
      put_step(3 * NI + 1 + q, c, rows[0], rows[1], rows[2], rows[3]);
    end
    // write y ; o += 1 in w2[1:0] and w0[4:3]
    c = blank(); c.bus_op = BUS_WRITE; c.bus_addr = 2; c.bus_data = 6; c.lut4_mode = 1;
    rows = '{default: 0};
    lut4(c, rows, 0, 64, 16'h0005, 64, 65);       // o0' = ~o0
    lut4(c, rows, 1, 65, 16'h0006, 64, 65);       // o1' = o1 ^ o0
    lut4(c, rows, 2, 3, 16'h0005, 64, 65);
    lut4(c, rows, 3, 4, 16'h0006, 64, 65);
    put_step(3 * NI + 5, c, rows[0], rows[1], rows[2], rows[3]);

    base_sp = 8 << (AW + 4);
    for (int t = 0; t < NT; t++) begin
      for (int i = 0; i < NI; i++) begin
        x[t][i] = 32'($urandom_range(0, 2000)) - 32'd1000;
        hw(RGN_ARRAY, 22'(base_sp + STRIDE * t + 32 + i), x[t][i]);
        for (int o = 0; o < NO; o++) begin
          w[t][o][i] = 32'($urandom_range(0, 2000)) - 32'd1000;
          hw(RGN_ARRAY, 22'(base_sp + STRIDE * t + 8 * o + i), w[t][o][i]);
        end
      end
    end
    hw(RGN_CTRL, REG_SCHED_BASE, 0);
    hw(RGN_CTRL, REG_SCHED_LEN, 3 * NI + 6);
    hw(RGN_CTRL, REG_ITERS, NO);
    hw(RGN_CTRL, REG_OFF_BASE, base_sp);
    hw(RGN_CTRL, REG_OFF_STRIDE, STRIDE);
    hw(RGN_CTRL, REG_RUN, 1);
    st = 0;
    do begin hr(RGN_CTRL, REG_STATUS, d); st++; end while (d[1] && st < 100000);
    check("no address error", 32'(d[3]), 0);
    hr(RGN_CTRL, REG_ITER_DONE, d);
    check("iterations = outputs", d, NO);
    hr(RGN_CTRL, REG_CYCLES, d);
    check("cycles", d, 1 + NO * (NI * (2 * (1 + 2 * NT + 1) + 1) + 1 + 4 + (1 + NT + 1)));
    neg = 0;
    for (int t = 0; t < NT; t++)
      for (int o = 0; o < NO; o++) begin
        y = 0;
        for (int i = 0; i < NI; i++) y += w[t][o][i] * x[t][i];
        if (y[31]) begin neg++; y = 0; end
        hr(RGN_ARRAY, 22'(base_sp + STRIDE * t + 48 + o), d);
        check($sformatf("tile %0d y[%0d]", t, o), d, y);
      end
    check("both signs seen", 32'(neg > 0 && neg < NT * NO), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
