// tb_workload_nw: Needleman-Wunsch sequence alignment (NW) on 32
// single-cluster tiles of a full-size slice (16 compute ways, scratchpad in
// pairs 8-9). Each tile fills the 4 x 4 inner cells of the score matrix of
// two 4-character sequences (match +1, mismatch -1, gap -1).
//
// Scores are kept biased: the stored value is M'[i][j] = M[i][j] + i + j + 64.
// The recurrence then reads M' = max(diag + 1 + 2*match, up, left), so the
// MAC does the one addition and all values stay small and non-negative, and
// the maximum uses an unsigned 8-bit LUT comparator. The host writes the
// boundary (all 64 in this form).
//
// Tile window (words): M'[i][j] at 8i + j, a[i] at 64 + i, b[j] at 72 + j.
// The cell counter t = 4r + c (cell i = r+1, j = c+1) is kept in w7 bits
// 19:16; 4-LUTs derive every address from it into w0, each address bit a
// function of two counter bits with the offset folded into the table.
//   s0-s4  read diag -> w1, up -> w3, left -> w4, a[r] -> w5, b[c] -> w6,
//          each step setting w0 to the next address
//   s5     chunk equalities of a and b ; clear w5 bits 7:4
//   s6     w2 = {match, 1} ; w5 = 1
//   s7-s9  MAC acc = diag*1 + w2*1 ; store in w6
//   s10-13 compare w6 with up (three steps), w1 = max
//   s14-17 compare w1 with left, w6 = max
//   s18    write M'[i][j] ; t += 1
//   s19    w0 = address of the next cell's diag
// Every cell, the cycle count and the match count are checked.
module tb_workload_nw;
  import freac_pkg::*;
  localparam int AW = 11, NT = 32, STRIDE = 128;

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

  function automatic logic [15:0] table4(input int kind);
    logic [15:0] t;
    for (int idx = 0; idx < 16; idx++) begin
      logic [3:0] v;
      v = 4'(idx);
      case (kind)
        0: t[idx] = v[1:0] < v[3:2];            // lt of 2-bit chunks
        1: t[idx] = v[1:0] == v[3:2];           // eq of 2-bit chunks
        2: t[idx] = v[0] | (v[1] & v[2]);       // in0 | in1 & in2
        3: t[idx] = v[0] & v[1];                // in0 & in1
        default: t[idx] = v[2] ? v[0] : v[1];   // in2 ? in0 : in1
      endcase
    end
    return t;
  endfunction

  function automatic logic [15:0] add_tt(input int offset, input int k);
    logic [15:0] t;
    t = '0;
    for (int v = 0; v < 4; v++) t[v] = 1'(((v + offset) >> k) & 1);
    return t;
  endfunction
  localparam int CT = 240;   // counter bits in the pool: c = CT+0..1, r = CT+2..3
  // 4-LUTs 0-6: w0 = 8 (r + dy) + (c + dx)
  task automatic m_addr(inout xcfg_t c, inout logic [31:0] rows [4], input int dy, dx);
    for (int k = 0; k < 3; k++) begin
      lut4(c, rows, k, k, add_tt(dx, k), CT, CT + 1);
      lut4(c, rows, 3 + k, 3 + k, add_tt(dy, k), CT + 2, CT + 3);
    end
    lut4(c, rows, 6, 6, 16'h0000);
  endtask
  // 4-LUTs 0-6: w0 = 64 + 8 * hi + field (field = r or c)
  task automatic seq_addr(inout xcfg_t c, inout logic [31:0] rows [4], input int hi, input int fld);
    lut4(c, rows, 0, 0, 16'hAAAA, fld);
    lut4(c, rows, 1, 1, 16'hAAAA, fld + 1);
    lut4(c, rows, 2, 2, 16'h0000);
    lut4(c, rows, 3, 3, hi ? 16'hFFFF : 16'h0000);
    lut4(c, rows, 4, 4, 16'h0000);
    lut4(c, rows, 5, 5, 16'h0000);
    lut4(c, rows, 6, 6, 16'hFFFF);
  endtask
  // three comparison steps: w7 bit 11 = (word wa < word wb), low 8 bits
  task automatic compare(inout int s, input int wa, input int wb);
    xcfg_t c;
    logic [31:0] rows [4];
    int a, b;
    a = 32 * wa; b = 32 * wb;
    c = blank(); c.lut4_mode = 1; rows = '{default: 0};
    for (int i = 0; i < 4; i++)
      for (int e = 0; e < 2; e++) begin
        int l;
        l = 2 * i + e;
        c.lut_in_sel[4 * l]     = 9'(a + 2 * i);
        c.lut_in_sel[4 * l + 1] = 9'(a + 2 * i + 1);
        c.lut_in_sel[4 * l + 2] = 9'(b + 2 * i);
        c.lut_in_sel[4 * l + 3] = 9'(b + 2 * i + 1);
        c.lut_wr[l] = 1; c.lut_dst[l] = 8'(224 + l);
        rows[l / 2][16 * (l % 2) +: 16] = table4(e);
      end
    put_step(s++, c, rows[0], rows[1], rows[2], rows[3]);
    c = blank(); c.lut4_mode = 1; rows = '{default: 0};
    lut4(c, rows, 0, 232, table4(2), 224 + 6, 224 + 7);
    c.lut_in_sel[2] = 9'(224 + 4);
    lut4(c, rows, 1, 233, table4(3), 224 + 7, 224 + 5);
    lut4(c, rows, 2, 234, table4(2), 224 + 2, 224 + 3);
    c.lut_in_sel[10] = 9'(224 + 0);
    put_step(s++, c, rows[0], rows[1], rows[2], rows[3]);
    c = blank(); c.lut4_mode = 1; rows = '{default: 0};
    lut4(c, rows, 0, 235, table4(2), 232, 233);
    c.lut_in_sel[2] = 9'(234);
    put_step(s++, c, rows[0], rows[1], rows[2], rows[3]);
  endtask
  // one step: word wd (low 8 bits) = lt ? word wb : word wa  (the maximum)
  task automatic take_max(inout int s, input int wd, input int wa, input int wb);
    xcfg_t c;
    logic [31:0] rows [4];
    c = blank(); c.lut4_mode = 1; rows = '{default: 0};
    for (int i = 0; i < 8; i++) begin
      lut4(c, rows, i, 32 * wd + i, table4(4), 32 * wb + i, 32 * wa + i);
      c.lut_in_sel[4 * i + 2] = 9'(235);
    end
    put_step(s++, c, rows[0], rows[1], rows[2], rows[3]);
  endtask

  initial begin
    logic [31:0] d, rows [4];
    logic [7:0] sa [NT][4], sb [NT][4];
    int m [5][5], s, base_sp, st, n_match;
    logic [15:0] inc [4];
    xcfg_t c;
    host_req = 0; host_we = 0; host_addr = 0; host_wdata = 0;
    llc_acc_en = 0; llc_acc_we = 0; llc_acc_addr = 0; llc_acc_wdata = 0;
    rst = 1; repeat (3) @(negedge clk); rst = 0;
    for (int q = 0; q < 4; q++)
      for (int v = 0; v < 16; v++) inc[q][v] = 1'(((v + 1) >> q) & 1);

    hw(RGN_CTRL, REG_WAY_MODE, 32'b10_10_01_01_01_01_01_01_01_01);
    repeat (3) @(negedge clk);
    check("ways locked", 32'(lock_mask), 32'hFFFFF);

    s = 0;
    // s0-s4: the five reads, each preparing the next address
    c = blank(); c.bus_op = BUS_READ; c.bus_addr = 0; c.bus_dst = 1; c.lut4_mode = 1;
    rows = '{default: 0}; m_addr(c, rows, 0, 1);
    put_step(s++, c, rows[0], rows[1], rows[2], rows[3]);
    c = blank(); c.bus_op = BUS_READ; c.bus_addr = 0; c.bus_dst = 3; c.lut4_mode = 1;
    rows = '{default: 0}; m_addr(c, rows, 1, 0);
    put_step(s++, c, rows[0], rows[1], rows[2], rows[3]);
    c = blank(); c.bus_op = BUS_READ; c.bus_addr = 0; c.bus_dst = 4; c.lut4_mode = 1;
    rows = '{default: 0}; seq_addr(c, rows, 0, CT + 2);
    put_step(s++, c, rows[0], rows[1], rows[2], rows[3]);
    c = blank(); c.bus_op = BUS_READ; c.bus_addr = 0; c.bus_dst = 5; c.lut4_mode = 1;
    rows = '{default: 0}; seq_addr(c, rows, 1, CT);
    put_step(s++, c, rows[0], rows[1], rows[2], rows[3]);
    c = blank(); c.bus_op = BUS_READ; c.bus_addr = 0; c.bus_dst = 6; c.lut4_mode = 1;
    rows = '{default: 0}; m_addr(c, rows, 1, 1);
    put_step(s++, c, rows[0], rows[1], rows[2], rows[3]);
    // s5: chunk equalities into w7 bits 3:0 ; w5 bits 7:4 = 0
    c = blank(); c.lut4_mode = 1; rows = '{default: 0};
    for (int i = 0; i < 4; i++) begin
      c.lut_in_sel[4 * i]     = 9'(160 + 2 * i);
      c.lut_in_sel[4 * i + 1] = 9'(160 + 2 * i + 1);
      c.lut_in_sel[4 * i + 2] = 9'(192 + 2 * i);
      c.lut_in_sel[4 * i + 3] = 9'(192 + 2 * i + 1);
      c.lut_wr[i] = 1; c.lut_dst[i] = 8'(224 + i);
      rows[i / 2][16 * (i % 2) +: 16] = table4(1);
      lut4(c, rows, 4 + i, 160 + 4 + i, 16'h0000);
    end
    put_step(s++, c, rows[0], rows[1], rows[2], rows[3]);
    // s6: w2 = {match, 1} ; w5 = 1
    c = blank(); c.lut4_mode = 1; rows = '{default: 0};
    lut4(c, rows, 0, 64 + 1, 16'h8000, 224, 225);
    c.lut_in_sel[2] = 9'(226); c.lut_in_sel[3] = 9'(227);
    lut4(c, rows, 1, 64, 16'hFFFF);
    lut4(c, rows, 2, 160, 16'hFFFF);
    for (int i = 1; i < 4; i++) lut4(c, rows, 2 + i, 160 + i, 16'h0000);
    put_step(s++, c, rows[0], rows[1], rows[2], rows[3]);
    // s7-s9: acc = diag*1 + w2*1 -> w6
    c = blank(); c.mac_op = MAC_MUL; c.mac_a = 1; c.mac_b = 5;
    put_step(s++, c, 0, 0, 0, 0);
    c = blank(); c.mac_op = MAC_ACC; c.mac_a = 2; c.mac_b = 5;
    put_step(s++, c, 0, 0, 0, 0);
    c = blank(); c.mac_wr = 1; c.mac_dst = 6;
    put_step(s++, c, 0, 0, 0, 0);
    // s10-s17: two maxima
    compare(s, 6, 3);  take_max(s, 1, 6, 3);
    compare(s, 1, 4);  take_max(s, 6, 1, 4);
    // s18: write ; t += 1
    c = blank(); c.bus_op = BUS_WRITE; c.bus_addr = 0; c.bus_data = 6; c.lut4_mode = 1;
    for (int l = 0; l < 4; l++) begin
      for (int i = 0; i < 4; i++) c.lut_in_sel[4 * l + i] = 9'(CT + i);
      c.lut_wr[l] = 1; c.lut_dst[l] = 8'(CT + l);
    end
    put_step(s++, c, {inc[1], inc[0]}, {inc[3], inc[2]}, 0, 0);
    // s19: w0 = diag address of the next cell
    c = blank(); c.lut4_mode = 1; rows = '{default: 0}; m_addr(c, rows, 0, 0);
    put_step(s++, c, rows[0], rows[1], rows[2], rows[3]);
    check("schedule length", s, 20);

    base_sp = 8 << (AW + 4);
    n_match = 0;
    for (int t = 0; t < NT; t++) begin
      for (int i = 0; i < 5; i++)
        for (int j = 0; j < 5; j++)
          if (i == 0 || j == 0) hw(RGN_ARRAY, 22'(base_sp + STRIDE * t + 8 * i + j), 64);
      for (int q = 0; q < 4; q++) begin
        sa[t][q] = 8'("ACGT" >> (8 * $urandom_range(0, 3)));
        sb[t][q] = (t == 0) ? sa[t][q] : 8'("ACGT" >> (8 * $urandom_range(0, 3)));
        hw(RGN_ARRAY, 22'(base_sp + STRIDE * t + 64 + q), {24'd0, sa[t][q]});
        hw(RGN_ARRAY, 22'(base_sp + STRIDE * t + 72 + q), {24'd0, sb[t][q]});
      end
    end
    hw(RGN_CTRL, REG_SCHED_BASE, 0);
    hw(RGN_CTRL, REG_SCHED_LEN, 20);
    hw(RGN_CTRL, REG_ITERS, 16);
    hw(RGN_CTRL, REG_OFF_BASE, base_sp);
    hw(RGN_CTRL, REG_OFF_STRIDE, STRIDE);
    hw(RGN_CTRL, REG_RUN, 1);
    st = 0;
    do begin hr(RGN_CTRL, REG_STATUS, d); st++; end while (d[1] && st < 100000);
    check("no address error", 32'(d[3]), 0);
    hr(RGN_CTRL, REG_CYCLES, d);
    check("cycles", d, 1 + 16 * (5 * (1 + 2 * NT + 1) + (1 + NT + 1) + 14));
    for (int t = 0; t < NT; t++) begin
      for (int i = 0; i < 5; i++) begin m[i][0] = -i; m[0][i] = -i; end
      for (int i = 1; i < 5; i++)
        for (int j = 1; j < 5; j++) begin
          int dg, up, lf;
          if (sa[t][i-1] == sb[t][j-1]) n_match++;
          dg = m[i-1][j-1] + (sa[t][i-1] == sb[t][j-1] ? 1 : -1);
          up = m[i-1][j] - 1; lf = m[i][j-1] - 1;
          m[i][j] = dg > up ? (dg > lf ? dg : lf) : (up > lf ? up : lf);
          hr(RGN_ARRAY, 22'(base_sp + STRIDE * t + 8 * i + j), d);
          check($sformatf("tile %0d M[%0d][%0d]", t, i, j), d, 32'(m[i][j] + i + j + 64));
        end
      if (t == 0) check("identical sequences score", 32'(m[4][4]), 4);
    end
    check("matches and mismatches seen", 32'(n_match > 16 && n_match < NT * 16), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
