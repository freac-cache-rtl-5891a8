// tb_workload_sort: sorting (SRT) as a logic-bound kernel: every one of 32
// single-cluster tiles of a full-size slice (16 compute ways, scratchpad in
// pairs 8-9) sorts four 8-bit keys with the five-comparator network
// (0,1) (2,3) (0,2) (1,3) (1,2), all comparisons and swaps done in 4-LUTs.
//
// Tile window (words): keys at 0..3, sorted keys written to 16..19.
// Keys live in the low byte of register words 1..6 (slots); the schedule
// tracks statically which slot holds which key, so a compare-exchange moves
// its two keys into the two free slots instead of swapping in place:
//   c1  per 2-bit chunk i: lt_i = a_i < b_i, eq_i = a_i == b_i  (8 LUTs)
//   c2  L_hi = lt3 | eq3 & lt2, E_hi = eq3 & eq2, L_lo = lt1 | eq1 & lt0
//   c3  lt = L_hi | E_hi & L_lo
//   m1  min = lt ? a : b into a free slot (one 4-LUT per bit)
//   m2  max = lt ? b : a into the other free slot
// 4 reads + 5 x 5 logic steps + 4 writes = 33 steps; constant 4-LUTs set the
// address word before each bus step. Every output, the ordering and the
// cycle count are checked.
module tb_workload_sort;
  import freac_pkg::*;
  localparam int AW = 11, NT = 32, STRIDE = 64;

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

  // constant 4-LUTs: address word bits 4:0 = value
  task automatic set_addr(inout xcfg_t c, inout logic [31:0] rows [4], input int value);
    for (int b = 0; b < 5; b++) lut4(c, rows, 3 + b, b, value[b] ? 16'hFFFF : 16'h0000);
  endtask

  initial begin
    logic [31:0] d, rows [4];
    logic [7:0] key [NT][4], srt [4];
    int loc [4], free [2], ce [5][2], s, base_sp, st;
    xcfg_t c;
    host_req = 0; host_we = 0; host_addr = 0; host_wdata = 0;
    llc_acc_en = 0; llc_acc_we = 0; llc_acc_addr = 0; llc_acc_wdata = 0;
    rst = 1; repeat (3) @(negedge clk); rst = 0;
    ce = '{'{0, 1}, '{2, 3}, '{0, 2}, '{1, 3}, '{1, 2}};

    hw(RGN_CTRL, REG_WAY_MODE, 32'b10_10_01_01_01_01_01_01_01_01);
    repeat (3) @(negedge clk);
    check("ways locked", 32'(lock_mask), 32'hFFFFF);

    s = 0;
    for (int q = 0; q < 4; q++) begin           // read key q into word 1+q
      c = blank(); c.bus_op = BUS_READ; c.bus_addr = 0; c.bus_dst = 3'(1 + q); c.lut4_mode = 1;
      rows = '{default: 0};
      set_addr(c, rows, q < 3 ? q + 1 : 16);
      put_step(s++, c, rows[0], rows[1], rows[2], rows[3]);
      loc[q] = 1 + q;
    end
    free = '{5, 6};
    for (int n = 0; n < 5; n++) begin
      int a, b, f0, f1;
      a = 32 * loc[ce[n][0]]; b = 32 * loc[ce[n][1]];
      // c1: chunk comparisons into w7 bits 7:0
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
      // c2: w7 bits 10:8 = L_hi, E_hi, L_lo
      c = blank(); c.lut4_mode = 1; rows = '{default: 0};
      lut4(c, rows, 0, 232, table4(2), 224 + 6, 224 + 7);
      c.lut_in_sel[2] = 9'(224 + 4);
      lut4(c, rows, 1, 233, table4(3), 224 + 7, 224 + 5);
      lut4(c, rows, 2, 234, table4(2), 224 + 2, 224 + 3);
      c.lut_in_sel[10] = 9'(224 + 0);
      put_step(s++, c, rows[0], rows[1], rows[2], rows[3]);
      // c3: w7 bit 11 = lt
      c = blank(); c.lut4_mode = 1; rows = '{default: 0};
      lut4(c, rows, 0, 235, table4(2), 232, 233);
      c.lut_in_sel[2] = 9'(234);
      put_step(s++, c, rows[0], rows[1], rows[2], rows[3]);
      // m1 / m2: min and max into the free slots
      f0 = free[0]; f1 = free[1];
      for (int m = 0; m < 2; m++) begin
        c = blank(); c.lut4_mode = 1; rows = '{default: 0};
        for (int i = 0; i < 8; i++) begin
          lut4(c, rows, i, 32 * (m == 0 ? f0 : f1) + i, table4(4),
               (m == 0 ? a : b) + i, (m == 0 ? b : a) + i);
          c.lut_in_sel[4 * i + 2] = 9'(235);
        end
        put_step(s++, c, rows[0], rows[1], rows[2], rows[3]);
      end
      free = '{loc[ce[n][0]], loc[ce[n][1]]};
      loc[ce[n][0]] = f0; loc[ce[n][1]] = f1;
    end
    for (int q = 0; q < 4; q++) begin           // write rank q to 16+q
      c = blank(); c.bus_op = BUS_WRITE; c.bus_addr = 0; c.bus_data = 3'(loc[q]); c.lut4_mode = 1;
      rows = '{default: 0};
      set_addr(c, rows, 16 + q + 1);
      put_step(s++, c, rows[0], rows[1], rows[2], rows[3]);
    end
    check("schedule length", s, 33);

    base_sp = 8 << (AW + 4);
    for (int t = 0; t < NT; t++)
      for (int q = 0; q < 4; q++) begin
        key[t][q] = $urandom();
        if (t == 0) key[t][q] = 8'(q == 1 ? 255 : q == 3 ? 0 : 8'h5A);  // duplicates, extremes
        if (t == 1) key[t][q] = 8'(200 - 50 * q);                          // reverse order
        hw(RGN_ARRAY, 22'(base_sp + STRIDE * t + q), {24'd0, key[t][q]});
      end
    hw(RGN_CTRL, REG_SCHED_BASE, 0);
    hw(RGN_CTRL, REG_SCHED_LEN, 33);
    hw(RGN_CTRL, REG_ITERS, 1);
    hw(RGN_CTRL, REG_OFF_BASE, base_sp);
    hw(RGN_CTRL, REG_OFF_STRIDE, STRIDE);
    hw(RGN_CTRL, REG_RUN, 1);
    st = 0;
    do begin hr(RGN_CTRL, REG_STATUS, d); st++; end while (d[1] && st < 100000);
    check("no address error", 32'(d[3]), 0);
    hr(RGN_CTRL, REG_CYCLES, d);
    check("cycles", d, 1 + 4 * (1 + 2 * NT + 1) + 25 + 4 * (1 + NT + 1));
    for (int t = 0; t < NT; t++) begin
      srt = key[t];
      srt.sort();
      for (int q = 0; q < 4; q++) begin
        hr(RGN_ARRAY, 22'(base_sp + STRIDE * t + 16 + q), d);
        check($sformatf("tile %0d rank %0d", t, q), d, {24'd0, srt[q]});
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
