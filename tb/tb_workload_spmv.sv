// tb_workload_spmv: sparse matrix - vector product (SPMV, ELLPACK format with
// K non-zeros per row) on 32 single-cluster tiles of a full-size slice (16
// compute ways, scratchpad in pairs 8-9). The kernel's point is the indirect
// load: the column index read from the scratchpad becomes the address of
// the vector element read next.
//
// Tile window (words): entry e = K*r + j at 2e {column} and 2e+1 {value},
// y[r] at 32 + r, x[c] at 64 + c. One row is one iteration of 18 steps:
//   per entry j (steps 4j .. 4j+3)
//     read column -> w3 (address w0 = 2e) ; w1.b0 = 1 ; for j = 0 also
//                                 w2 = 32 + r from the entry counter
//     read value  -> w4 (address w1 = 2e+1) ; w3.b6 = 1 (address of x[col])
//     read x[col] -> w5 (address w3) ; 4-LUTs: entry counter += 1 (w0, w1)
//     MAC  acc = w4*w5 (j = 0) or acc += w4*w5
//   s16  store acc in w6
//   s17  write y[r] (address w2)
// Every y, the iteration count and the cycle count are checked.
module tb_workload_spmv;
  import freac_pkg::*;
  localparam int AW = 11, NT = 32, R = 4, K = 4, STRIDE = 128;

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

  initial begin
    logic [31:0] d, x [NT][32], val [NT][R*K], y;
    logic [4:0] col [NT][R*K];
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

    for (int j = 0; j < K; j++) begin
      // read column ; w1.b0 = 1 ; j = 0: w2.b5 = 1, w2[1:0] = entry counter bits 3:2
      c = blank(); c.bus_op = BUS_READ; c.bus_addr = 0; c.bus_dst = 3; c.lut4_mode = 1;
      c.lut_wr[0] = 1; c.lut_dst[0] = 8'(32);
      if (j == 0) begin
        c.lut_wr[1] = 1; c.lut_dst[1] = 8'(64 + 5);
        c.lut_in_sel[8] = 9'(3); c.lut_wr[2] = 1; c.lut_dst[2] = 8'(64);
        c.lut_in_sel[12] = 9'(4); c.lut_wr[3] = 1; c.lut_dst[3] = 8'(65);
      end
      put_step(4 * j, c, '1, 32'hAAAA_AAAA, 0, 0);
      // read value ; w3.b6 = 1
      c = blank(); c.bus_op = BUS_READ; c.bus_addr = 1; c.bus_dst = 4; c.lut4_mode = 1;
      c.lut_wr[0] = 1; c.lut_dst[0] = 8'(96 + 6);
      put_step(4 * j + 1, c, '1, 0, 0, 0);
      // read x[col] ; entry counter (bits 4:1 of w0 and w1) += 1
      c = blank(); c.bus_op = BUS_READ; c.bus_addr = 3; c.bus_dst = 5; c.lut4_mode = 1;
      for (int l = 0; l < 8; l++) begin
        for (int i = 0; i < 4; i++) c.lut_in_sel[4 * l + i] = 9'(1 + i);
        c.lut_wr[l] = 1; c.lut_dst[l] = 8'(l < 4 ? 1 + l : 32 + 1 + l - 4);
      end
      put_step(4 * j + 2, c, {inc[1], inc[0]}, {inc[3], inc[2]}, {inc[1], inc[0]}, {inc[3], inc[2]});
      // multiply-accumulate
      c = blank(); c.mac_op = (j == 0) ? MAC_MUL : MAC_ACC; c.mac_a = 4; c.mac_b = 5;
      put_step(4 * j + 3, c, 0, 0, 0, 0);
    end
    c = blank(); c.mac_wr = 1; c.mac_dst = 6;
    put_step(4 * K, c, 0, 0, 0, 0);
    c = blank(); c.bus_op = BUS_WRITE; c.bus_addr = 2; c.bus_data = 6;
    put_step(4 * K + 1, c, 0, 0, 0, 0);

    base_sp = 8 << (AW + 4);
    for (int k = 0; k < NT; k++) begin
      for (int i = 0; i < 32; i++) begin
        x[k][i] = 32'($urandom_range(0, 65535));
        hw(RGN_ARRAY, 22'(base_sp + STRIDE * k + 64 + i), x[k][i]);
      end
      for (int e = 0; e < R * K; e++) begin
        col[k][e] = 5'($urandom());
        val[k][e] = 32'($urandom_range(0, 65535));
        hw(RGN_ARRAY, 22'(base_sp + STRIDE * k + 2 * e), {27'd0, col[k][e]});
        hw(RGN_ARRAY, 22'(base_sp + STRIDE * k + 2 * e + 1), val[k][e]);
      end
    end
    hw(RGN_CTRL, REG_SCHED_BASE, 0);
    hw(RGN_CTRL, REG_SCHED_LEN, 4 * K + 2);
    hw(RGN_CTRL, REG_ITERS, R);
    hw(RGN_CTRL, REG_OFF_BASE, base_sp);
    hw(RGN_CTRL, REG_OFF_STRIDE, STRIDE);
    hw(RGN_CTRL, REG_RUN, 1);
    st = 0;
    do begin hr(RGN_CTRL, REG_STATUS, d); st++; end while (d[1] && st < 100000);
    check("no address error", 32'(d[3]), 0);
    hr(RGN_CTRL, REG_ITER_DONE, d);
    check("iterations = rows", d, R);
    hr(RGN_CTRL, REG_CYCLES, d);
    check("cycles", d, 1 + R * (K * (3 * (1 + 2 * NT + 1) + 1) + 1 + (1 + NT + 1)));
    for (int k = 0; k < NT; k++)
      for (int r = 0; r < R; r++) begin
        y = 0;
        for (int j = 0; j < K; j++) y += val[k][K * r + j] * x[k][col[k][K * r + j]];
        hr(RGN_ARRAY, 22'(base_sp + STRIDE * k + 32 + r), d);
        check($sformatf("tile %0d y[%0d]", k, r), d, y);
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
