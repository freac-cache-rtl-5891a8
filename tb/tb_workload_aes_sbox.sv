// tb_workload_aes_sbox: the SubBytes step of AES as a logic-bound folded
// accelerator on 32 single-cluster tiles of a full-size slice (16 compute
// ways, scratchpad in pairs 8-9). Each tile substitutes 16 bytes held one per
// word in its window and writes S(x) to window word 16+i.
//
// The S-box is computed here (multiplicative inverse in GF(2^8) followed by
// the affine map) and folded by Shannon decomposition of each of its eight
// output bits j on the three high input bits:
//   s0       read x ; a 5-LUT sets the result-address bit
//   s1-s16   64 cofactors C[j][k](x[4:0]) = S(k*32 + x[4:0])[j], four 5-LUTs
//            per step
//   s17-s20  D[j][m] = x5 ? C[j][2m+1] : C[j][2m], eight 4-LUTs per step
//   s21-s22  E[j][n] = x6 ? D[j][2n+1] : D[j][2n]
//   s23      S[j]    = x7 ? E[j][1]    : E[j][0]
//   s24      write S(x) ; 4-LUTs advance the byte counter in both address words
// 25 folding steps per byte, no MAC. Every result and the cycle count are
// checked, as are three known S-box values of the reference.
module tb_workload_aes_sbox;
  import freac_pkg::*;
  localparam int AW = 11, NT = 32, N = 16, STRIDE = 64;

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

  function automatic logic [7:0] gmul(input logic [7:0] a, b);
    logic [7:0] p;
    p = 0;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) p ^= a;
      a = {a[6:0], 1'b0} ^ (a[7] ? 8'h1B : 8'h00);
    end
    return p;
  endfunction
  function automatic logic [7:0] sbox(input logic [7:0] x);
    logic [7:0] inv, y;
    inv = 8'd1;
    for (int i = 0; i < 254; i++) inv = gmul(inv, x);   // x^254 = x^-1 (0 -> 0)
    y = inv;
    for (int i = 0; i < 8; i++)
      y[i] = inv[i] ^ inv[(i + 4) % 8] ^ inv[(i + 5) % 8] ^ inv[(i + 6) % 8] ^ inv[(i + 7) % 8];
    return y ^ 8'h63;
  endfunction

  initial begin
    logic [31:0] d;
    logic [7:0] sb [256], x [NT][N];
    logic [15:0] inc [4];
    xcfg_t c;
    int base_sp, st;
    host_req = 0; host_we = 0; host_addr = 0; host_wdata = 0;
    llc_acc_en = 0; llc_acc_we = 0; llc_acc_addr = 0; llc_acc_wdata = 0;
    rst = 1; repeat (3) @(negedge clk); rst = 0;

    for (int v = 0; v < 256; v++) sb[v] = sbox(8'(v));
    check("S(00)", 32'(sb[8'h00]), 32'h63);
    check("S(01)", 32'(sb[8'h01]), 32'h7C);
    check("S(53)", 32'(sb[8'h53]), 32'hED);
    for (int s = 0; s < 4; s++)
      for (int v = 0; v < 16; v++) inc[s][v] = 1'(((v + 1) >> s) & 1);

    hw(RGN_CTRL, REG_WAY_MODE, 32'b10_10_01_01_01_01_01_01_01_01);
    repeat (3) @(negedge clk);
    check("ways locked", 32'(lock_mask), 32'hFFFFF);

    // s0: read x into w4 ; w7.b4 = 1 (result address 16 + i)
    c = blank(); c.bus_op = BUS_READ; c.bus_addr = 0; c.bus_dst = 4;
    c.lut_wr[0] = 1; c.lut_dst[0] = 8'(224 + 4);
    put_step(0, c, '1, 0, 0, 0);
    // s1-s16: cofactors into w1, w2 (bit 32 + 8j + k), 5-LUTs on x[4:0]
    for (int t = 0; t < 16; t++) begin
      logic [31:0] rows [4];
      c = blank();
      for (int l = 0; l < 4; l++) begin
        int q, j, k;
        q = 4 * t + l; j = q / 8; k = q % 8;
        for (int i = 0; i < 5; i++) c.lut_in_sel[8*l + i] = 9'(128 + i);
        c.lut_wr[2*l] = 1; c.lut_dst[2*l] = 8'(32 + 8 * j + k);
        for (int idx = 0; idx < 32; idx++) rows[l][idx] = sb[k * 32 + idx][j];
      end
      put_step(1 + t, c, rows[0], rows[1], rows[2], rows[3]);
    end
    // s17-s23: 2:1 mux levels (4-LUTs: in0 = sel ? in1 : in0 with sel on in2)
    for (int u = 0; u < 7; u++) begin
      c = blank(); c.lut4_mode = 1;
      for (int l = 0; l < 8; l++) begin
        int q, b0, sel, dst, base;
        base = 8 * (l / 2) + 4 * (l % 2);
        q = 8 * (u < 4 ? u : u < 6 ? u - 4 : 0) + l;
        if (u < 4) begin        // D[j][m], j = q/4, m = q%4
          b0 = 32 + 8 * (q / 4) + 2 * (q % 4); sel = 128 + 5; dst = 96 + q;
        end else if (u < 6) begin   // E[j][n], j = q/2, n = q%2
          b0 = 96 + 4 * (q / 2) + 2 * (q % 2); sel = 128 + 6; dst = 160 + q;
        end else begin          // S[j], j = l
          b0 = 160 + 2 * l; sel = 128 + 7; dst = 192 + l;
        end
        c.lut_in_sel[base]     = 9'(b0);
        c.lut_in_sel[base + 1] = 9'(b0 + 1);
        c.lut_in_sel[base + 2] = 9'(sel);
        c.lut_wr[l] = 1; c.lut_dst[l] = 8'(dst);
      end
      put_step(17 + u, c, 32'h00CA_00CA, 32'h00CA_00CA, 32'h00CA_00CA, 32'h00CA_00CA);
    end
    // s24: write S(x) to [w7] ; counter (w0 bits 3:0, w7 bits 3:0) += 1
    c = blank(); c.bus_op = BUS_WRITE; c.bus_addr = 7; c.bus_data = 6; c.lut4_mode = 1;
    for (int l = 0; l < 8; l++) begin
      for (int i = 0; i < 4; i++) c.lut_in_sel[4 * l + i] = 9'(i);
      c.lut_wr[l] = 1; c.lut_dst[l] = 8'(l < 4 ? l : 224 + l - 4);
    end
    put_step(24, c, {inc[1], inc[0]}, {inc[3], inc[2]}, {inc[1], inc[0]}, {inc[3], inc[2]});

    base_sp = 8 << (AW + 4);
    for (int k = 0; k < NT; k++)
      for (int i = 0; i < N; i++) begin
        x[k][i] = $urandom();
        if (k == 0) x[k][i] = 8'(i * 17);            // includes 00 and ff
        hw(RGN_ARRAY, 22'(base_sp + STRIDE * k + i), {24'd0, x[k][i]});
      end
    hw(RGN_CTRL, REG_SCHED_BASE, 0);
    hw(RGN_CTRL, REG_SCHED_LEN, 25);
    hw(RGN_CTRL, REG_ITERS, N);
    hw(RGN_CTRL, REG_OFF_BASE, base_sp);
    hw(RGN_CTRL, REG_OFF_STRIDE, STRIDE);
    hw(RGN_CTRL, REG_RUN, 1);
    st = 0;
    do begin hr(RGN_CTRL, REG_STATUS, d); st++; end while (d[1] && st < 100000);
    check("no address error", 32'(d[3]), 0);
    hr(RGN_CTRL, REG_CYCLES, d);
    check("cycles", d, 1 + N * ((1 + 2 * NT + 1) + 23 + (1 + NT + 1)));
    for (int k = 0; k < NT; k++)
      for (int i = 0; i < N; i++) begin
        hr(RGN_ARRAY, 22'(base_sp + STRIDE * k + 16 + i), d);
        check($sformatf("tile %0d S(%h)", k, x[k][i]), d, {24'd0, sb[x[k][i]]});
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
