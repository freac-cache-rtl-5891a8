// tb_workload_gemm: dense matrix multiply C = A * B (4 x 4, 32-bit) on 32
// single-cluster tiles of a full-size slice (16 compute ways, scratchpad in
// pairs 8-9), output-stationary: one iteration computes one element C[i][j]
// with the k loop unrolled over the MAC.
//
// Tile window (words): A[i][k] at 4i + k, B[k][j] at 16 + 4k + j,
// C[i][j] at 32 + 4i + j. Register w2 holds the address of C[i][j], so its
// bits 3:0 are the iteration counter t = 4i + j; 4-LUTs derive the A and B
// addresses from it:
//   per k (steps 3k .. 3k+2)
//     read A[i][k] (address w0 = 4i + k) ; w1 bits 3:2 = k ; for k = 0 also
//                                  w1.b4 = 1, w2.b5 = 1
//     read B[k][j] (address w1 = 16 + 4k + j) ; w0 bits 1:0 = k + 1 mod 4
//     MAC  acc = A*B (k = 0) or acc += A*B
//   s12  store acc in w6
//   s13  write C[i][j] (address w2) ; 4-LUTs: t += 1
//   s14  4-LUTs copy i = t[3:2] into w0 and j = t[1:0] into w1
// Every C element, the iteration count and the cycle count are checked.
module tb_workload_gemm;
  import freac_pkg::*;
  localparam int AW = 11, NT = 32, M = 4, STRIDE = 64;

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
    logic [31:0] d, a [NT][M][M], b [NT][M][M], y;
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

    for (int k = 0; k < M; k++) begin
      // read A ; w1[3:2] = k ; k = 0: w1.b4 = 1, w2.b5 = 1
      c = blank(); c.bus_op = BUS_READ; c.bus_addr = 0; c.bus_dst = 4; c.lut4_mode = 1;
      rows = '{default: 0};
      lut4(c, rows, 0, 32 + 2, k[0] ? 16'hFFFF : 16'h0000);
      lut4(c, rows, 1, 32 + 3, k[1] ? 16'hFFFF : 16'h0000);
      if (k == 0) begin
        lut4(c, rows, 2, 32 + 4, 16'hFFFF);
        lut4(c, rows, 3, 64 + 5, 16'hFFFF);
      end
      put_step(3 * k, c, rows[0], rows[1], rows[2], rows[3]);
      // read B ; w0[1:0] = k + 1 mod 4
      c = blank(); c.bus_op = BUS_READ; c.bus_addr = 1; c.bus_dst = 5; c.lut4_mode = 1;
      rows = '{default: 0};
      lut4(c, rows, 0, 0, (((k + 1) % 4) & 1) != 0 ? 16'hFFFF : 16'h0000);
      lut4(c, rows, 1, 1, (((k + 1) % 4) & 2) != 0 ? 16'hFFFF : 16'h0000);
      put_step(3 * k + 1, c, rows[0], rows[1], rows[2], rows[3]);
      // multiply-accumulate
      c = blank(); c.mac_op = (k == 0) ? MAC_MUL : MAC_ACC; c.mac_a = 4; c.mac_b = 5;
      put_step(3 * k + 2, c, 0, 0, 0, 0);
    end
    c = blank(); c.mac_wr = 1; c.mac_dst = 6;
    put_step(3 * M, c, 0, 0, 0, 0);
    // write C ; t (w2[3:0]) += 1
    c = blank(); c.bus_op = BUS_WRITE; c.bus_addr = 2; c.bus_data = 6; c.lut4_mode = 1;
    for (int l = 0; l < 4; l++) begin
      for (int i = 0; i < 4; i++) c.lut_in_sel[4 * l + i] = 9'(64 + i);
      c.lut_wr[l] = 1; c.lut_dst[l] = 8'(64 + l);
    end
    put_step(3 * M + 1, c, {inc[1], inc[0]}, {inc[3], inc[2]}, 0, 0);
    // w0[3:2] = t[3:2], w1[1:0] = t[1:0]
    c = blank(); c.lut4_mode = 1; rows = '{default: 0};
    lut4(c, rows, 0, 2, 16'hAAAA, 64 + 2);
    lut4(c, rows, 1, 3, 16'hAAAA, 64 + 3);
    lut4(c, rows, 2, 32, 16'hAAAA, 64 + 0);
    lut4(c, rows, 3, 33, 16'hAAAA, 64 + 1);
    put_step(3 * M + 2, c, rows[0], rows[1], rows[2], rows[3]);

    base_sp = 8 << (AW + 4);
    for (int t = 0; t < NT; t++)
      for (int i = 0; i < M; i++)
        for (int k = 0; k < M; k++) begin
          a[t][i][k] = $urandom(); b[t][i][k] = $urandom();
          hw(RGN_ARRAY, 22'(base_sp + STRIDE * t + 4 * i + k), a[t][i][k]);
          hw(RGN_ARRAY, 22'(base_sp + STRIDE * t + 16 + 4 * i + k), b[t][i][k]);
        end
    hw(RGN_CTRL, REG_SCHED_BASE, 0);
    hw(RGN_CTRL, REG_SCHED_LEN, 3 * M + 3);
    hw(RGN_CTRL, REG_ITERS, M * M);
    hw(RGN_CTRL, REG_OFF_BASE, base_sp);
    hw(RGN_CTRL, REG_OFF_STRIDE, STRIDE);
    hw(RGN_CTRL, REG_RUN, 1);
    st = 0;
    do begin hr(RGN_CTRL, REG_STATUS, d); st++; end while (d[1] && st < 100000);
    check("no address error", 32'(d[3]), 0);
    hr(RGN_CTRL, REG_ITER_DONE, d);
    check("iterations = elements of C", d, M * M);
    hr(RGN_CTRL, REG_CYCLES, d);
    check("cycles", d, 1 + M * M * (M * (2 * (1 + 2 * NT + 1) + 1) + 1 + (1 + NT + 1) + 1));
    for (int t = 0; t < NT; t++)
      for (int i = 0; i < M; i++)
        for (int j = 0; j < M; j++) begin
          y = 0;
          for (int k = 0; k < M; k++) y += a[t][i][k] * b[t][k][j];
          hr(RGN_ARRAY, 22'(base_sp + STRIDE * t + 32 + 4 * i + j), d);
          check($sformatf("tile %0d C[%0d][%0d]", t, i, j), d, y);
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
