// tb_workload_kmp: the character-matching core of a string search (KMP)
// kernel, as a logic-bound accelerator on 32 single-cluster tiles of a
// full-size slice (16 compute ways, scratchpad in pairs 8-9).
//
// Each tile counts the occurrences of a two-character pattern P0 P1 in a
// 16-character text held one character per word in its window. Per
// character (4 folding steps):
//   s0 read the character (4-LUT constants: result address, a word of 1)
//   s1 eight 4-LUTs: two compare the character's nibbles with P1, two with
//      P0 (outputs kept only in the state latches), four increment the
//      character counter that forms the read address
//   s2 4-LUTs read the state latches: match = (char == P1) & previous-was-P0,
//      and previous-was-P0 is updated
//   s3 the MAC adds the match bit to the count (match * 1)
// A second two-step schedule stores the count to window word 32. The count
// of every tile and the cycle count are checked.
module tb_workload_kmp;
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

  // same as put_step, for run 2: crossbar entry and sub-array row 100 + s
  task automatic put_step2(input int s, input xcfg_t c, input logic [31:0] r0, r1, r2, r3);
    logic [XCFG_WORDS*32-1:0] raw;
    raw = '0;
    raw[XCFG_W-1:0] = c;
    for (int w = 0; w < XCFG_WORDS; w++) hw(RGN_XCFG, {8'd0, 10'(100 + s), 4'(w)}, raw[32*w +: 32]);
    for (int sa = 0; sa < 4; sa++)
      hw(RGN_ARRAY, (22'(1) << 21) | (22'(sa) << AW) | 22'(100 + s),
         sa == 0 ? r0 : sa == 1 ? r1 : sa == 2 ? r2 : r3);
  endtask
  initial begin
    logic [31:0] d;
    logic [7:0] txt [NT][N];
    logic [15:0] inc [4];
    int cnt [NT];
    xcfg_t c;
    int base_sp, st;
    localparam logic [7:0] P0 = 8'h41, P1 = 8'h42;   // "AB"
    host_req = 0; host_we = 0; host_addr = 0; host_wdata = 0;
    llc_acc_en = 0; llc_acc_we = 0; llc_acc_addr = 0; llc_acc_wdata = 0;
    rst = 1; repeat (3) @(negedge clk); rst = 0;

    hw(RGN_CTRL, REG_WAY_MODE, 32'b10_10_01_01_01_01_01_01_01_01);
    repeat (3) @(negedge clk);
    check("ways locked", 32'(lock_mask), 32'hFFFFF);
    for (int s = 0; s < 4; s++)
      for (int v = 0; v < 16; v++) inc[s][v] = 1'(((v + 1) >> s) & 1);

    // s0: read character ; constants w2.b5 (result address 32), w7.b0 (= 1)
    c = blank(); c.bus_op = BUS_READ; c.bus_addr = 0; c.bus_dst = 4; c.lut4_mode = 1;
    c.lut_wr[0] = 1; c.lut_dst[0] = 8'(64 + 5);
    c.lut_wr[1] = 1; c.lut_dst[1] = 8'(224);
    put_step(0, c, '1, 0, 0, 0);
    // s1: nibble comparators into the latches, counter (w0 bits 3:0) += 1
    c = blank(); c.lut4_mode = 1;
    for (int i = 0; i < 4; i++) begin
      c.lut_in_sel[0 + i]  = 9'(128 + i);       // LUT0: char[3:0] == P1[3:0]
      c.lut_in_sel[4 + i]  = 9'(128 + 4 + i);   // LUT1: char[7:4] == P1[7:4]
      c.lut_in_sel[8 + i]  = 9'(128 + i);       // LUT2: char[3:0] == P0[3:0]
      c.lut_in_sel[12 + i] = 9'(128 + 4 + i);   // LUT3: char[7:4] == P0[7:4]
      for (int h = 0; h < 4; h++) c.lut_in_sel[16 + 4*h + i] = 9'(i);   // LUT4-7: counter
    end
    for (int b = 0; b < 4; b++) begin
      c.lut_wr[4 + b] = 1; c.lut_dst[4 + b] = 8'(b);
    end
    put_step(1, c, {16'(1) << P1[7:4], 16'(1) << P1[3:0]}, {16'(1) << P0[7:4], 16'(1) << P0[3:0]},
             {inc[1], inc[0]}, {inc[3], inc[2]});
    // s2: w3.b0 = LUT0 & LUT1 & w5.b0 ; w5.b0 = LUT2 & LUT3
    c = blank(); c.lut4_mode = 1;
    c.lut_in_sel[0] = 9'(POOL_LATCH + 0); c.lut_in_sel[1] = 9'(POOL_LATCH + 1); c.lut_in_sel[2] = 9'(160);
    c.lut_in_sel[4] = 9'(POOL_LATCH + 2); c.lut_in_sel[5] = 9'(POOL_LATCH + 3);
    c.lut_wr[0] = 1; c.lut_dst[0] = 8'(96);
    c.lut_wr[1] = 1; c.lut_dst[1] = 8'(160);
    put_step(2, c, {16'h0008, 16'h0080}, 0, 0, 0);
    // s3: count += match
    c = blank(); c.mac_op = MAC_ACC; c.mac_a = 3; c.mac_b = 7;
    put_step(3, c, 0, 0, 0, 0);
    // store schedule: entries / rows 100-101
    c = blank(); c.mac_wr = 1; c.mac_dst = 6;
    put_step2(0, c, 0, 0, 0, 0);
    c = blank(); c.bus_op = BUS_WRITE; c.bus_addr = 2; c.bus_data = 6;
    put_step2(1, c, 0, 0, 0, 0);

    base_sp = 8 << (AW + 4);
    for (int k = 0; k < NT; k++) begin
      cnt[k] = 0;
      for (int i = 0; i < N; i++) begin
        txt[k][i] = 8'h41 + 8'($urandom_range(2));   // 'A'..'C'
        if (i > 0 && txt[k][i-1] == P0 && txt[k][i] == P1) cnt[k]++;
        hw(RGN_ARRAY, 22'(base_sp + STRIDE * k + i), {24'd0, txt[k][i]});
      end
    end

    hw(RGN_CTRL, REG_SCHED_BASE, 0);
    hw(RGN_CTRL, REG_SCHED_LEN, 4);
    hw(RGN_CTRL, REG_ITERS, N);
    hw(RGN_CTRL, REG_OFF_BASE, base_sp);
    hw(RGN_CTRL, REG_OFF_STRIDE, STRIDE);
    hw(RGN_CTRL, REG_RUN, 1);
    st = 0;
    do begin hr(RGN_CTRL, REG_STATUS, d); st++; end while (d[1] && st < 100000);
    check("no address error", 32'(d[3]), 0);
    hr(RGN_CTRL, REG_CYCLES, d);
    check("match run cycles", d, 1 + N * ((1 + 2 * NT + 1) + 3));
    hw(RGN_CTRL, REG_SCHED_BASE, 100);
    hw(RGN_CTRL, REG_SCHED_LEN, 2);
    hw(RGN_CTRL, REG_ITERS, 1);
    hw(RGN_CTRL, REG_RUN, 1);
    st = 0;
    do begin hr(RGN_CTRL, REG_STATUS, d); st++; end while (d[1] && st < 100000);
    st = 0;
    for (int k = 0; k < NT; k++) begin
      hr(RGN_ARRAY, 22'(base_sp + STRIDE * k + 32), d);
      check($sformatf("tile %0d match count", k), d, cnt[k]);
      st += cnt[k];
    end
    $display("total matches %0d", st);
    check("some matches occur", 32'(st > 0), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
