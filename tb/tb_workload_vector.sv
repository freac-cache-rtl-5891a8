// tb_workload_vector: vector add (VADD) and vector multiply (VMUL) kernels
// on a full-size slice, one cluster per accelerator tile, run on four
// compute/scratchpad partitions in turn, re-partitioning the slice between
// them:
//   32CC-256KB  pairs 0-7 compute (32 tiles), pairs 8-9 scratchpad
//   16CC-768KB  pairs 0-3 compute (16 tiles), pairs 4-9 scratchpad
//   16CC-640KB  pairs 0-3 compute, pairs 4-8 scratchpad, pair 9 stays cache
//   16CC-512KB  pairs 0-3 compute, pairs 4-7 scratchpad, pairs 8-9 stay
//               cache (256 KB), the published example partition
//
// Each tile owns a 2048-word scratchpad window holding N element groups
// {a[i], b[i], c[i], d[i]} at words 4i..4i+3 and computes c[i] = a[i] + b[i]
// and d[i] = a[i] * b[i]. The folded accelerator uses seven steps per
// element:
//   s0 read a (4-LUT constants build the address words and a word of 1)
//   s1 read b, MAC acc = a*1
//   s2 MAC acc += b*1        (the addition is done by the MAC)
//   s3 store acc (a+b), MAC acc = a*b
//   s4 write c, store acc (a*b)
//   s5 write d, 4-LUTs increment the element counter, set done on wrap
//   s6 4-LUTs copy the counter into the c/d address words, done check
// After each re-partition the truth-table rows are broadcast again (to the
// clusters now computing). Results are compared with sums and products
// computed here, the lock mask with the partition, and the cycle count with
// the serialised-bus cost of one request per tile per bus step.
module tb_workload_vector;
  import freac_pkg::*;
  localparam int AW = 11, MAXT = 32, N = 8, STRIDE = 2048;

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

  task automatic program_steps();
    xcfg_t c;
    logic [15:0] inc [3];
    for (int s = 0; s < 3; s++) inc[s] = '0;
    for (int v = 0; v < 16; v++) begin
      logic [2:0] nv;
      nv = 3'(v + 1);
      for (int s = 0; s < 3; s++) inc[s][v] = nv[s];
    end
    // s0: read a ; constants w1.b0, w2.b1, w3.b0, w3.b1, w7.b0 = 1, done = 0
    c = blank(); c.bus_op = BUS_READ; c.bus_addr = 0; c.bus_dst = 4; c.lut4_mode = 1;
    c.lut_wr[0] = 1; c.lut_dst[0] = 8'(32);
    c.lut_wr[1] = 1; c.lut_dst[1] = 8'(65);
    c.lut_wr[2] = 1; c.lut_dst[2] = 8'(96);
    c.lut_wr[3] = 1; c.lut_dst[3] = 8'(97);
    c.lut_wr[4] = 1; c.lut_dst[4] = 8'(224);
    // the done bit shares word 7: clear it (LUT6, all-zero table) before the
    // MAC uses the word as 1, in case a previous run left it set
    c.lut_wr[6] = 1; c.lut_dst[6] = 8'(DONE_BIT);
    put_step(0, c, '1, '1, '1, 0);
    // s1: read b ; acc = a * 1
    c = blank(); c.bus_op = BUS_READ; c.bus_addr = 1; c.bus_dst = 5;
    c.mac_op = MAC_MUL; c.mac_a = 4; c.mac_b = 7;
    put_step(1, c, 0, 0, 0, 0);
    // s2: acc += b * 1
    c = blank(); c.mac_op = MAC_ACC; c.mac_a = 5; c.mac_b = 7;
    put_step(2, c, 0, 0, 0, 0);
    // s3: w6 <- acc (a+b) ; acc = a*b
    c = blank(); c.mac_wr = 1; c.mac_dst = 6; c.mac_op = MAC_MUL; c.mac_a = 4; c.mac_b = 5;
    put_step(3, c, 0, 0, 0, 0);
    // s4: write c ; w6 <- acc (a*b)
    c = blank(); c.bus_op = BUS_WRITE; c.bus_addr = 2; c.bus_data = 6; c.mac_wr = 1; c.mac_dst = 6;
    put_step(4, c, 0, 0, 0, 0);
    // s5: write d ; counter (bits 4:2 of w0, w1) += 1 ; done <- counter == 7
    c = blank(); c.bus_op = BUS_WRITE; c.bus_addr = 3; c.bus_data = 6; c.lut4_mode = 1;
    for (int s = 0; s < 4; s++)
      for (int h = 0; h < 2; h++)
        for (int i = 0; i < 3; i++) c.lut_in_sel[8*s + 4*h + i] = 9'(2 + i);
    for (int s = 0; s < 3; s++) begin
      c.lut_wr[2*s] = 1;     c.lut_dst[2*s]     = 8'(2 + s);
      c.lut_wr[2*s + 1] = 1; c.lut_dst[2*s + 1] = 8'(32 + 2 + s);
    end
    c.lut_wr[6] = 1; c.lut_dst[6] = 8'(DONE_BIT);
    put_step(5, c, {inc[0], inc[0]}, {inc[1], inc[1]}, {inc[2], inc[2]}, 32'h0000_0080);
    // s6: copy counter into w2, w3 ; done check
    c = blank(); c.lut4_mode = 1; c.done_chk = 1;
    for (int s = 0; s < 3; s++) begin
      c.lut_in_sel[8*s]     = 9'(2 + s);
      c.lut_in_sel[8*s + 4] = 9'(2 + s);
      c.lut_wr[2*s] = 1;     c.lut_dst[2*s]     = 8'(64 + 2 + s);
      c.lut_wr[2*s + 1] = 1; c.lut_dst[2*s + 1] = 8'(96 + 2 + s);
    end
    put_step(6, c, 32'hAAAA_AAAA, 32'hAAAA_AAAA, 32'hAAAA_AAAA, 0);
  endtask

  task automatic run_partition(input string name, input logic [31:0] mode, input int nt,
                               input int sp_pair, input logic [19:0] lock_exp);
    logic [31:0] d, a [MAXT][N], b [MAXT][N];
    int base_sp, st;
    hw(RGN_CTRL, REG_WAY_MODE, mode);
    st = 0;
    do begin hr(RGN_CTRL, REG_STATUS, d); st++; end while (d[0] && st < 1000);
    check({name, " lock mask"}, 32'(lock_mask), 32'(lock_exp));
    program_steps();
    // tile k window at scratch pair sp_pair + 2048k
    base_sp = sp_pair << (AW + 4);
    for (int k = 0; k < nt; k++)
      for (int i = 0; i < N; i++) begin
        a[k][i] = $urandom(); b[k][i] = $urandom();
        hw(RGN_ARRAY, 22'(base_sp + STRIDE * k + 4 * i), a[k][i]);
        hw(RGN_ARRAY, 22'(base_sp + STRIDE * k + 4 * i + 1), b[k][i]);
      end
    hw(RGN_CTRL, REG_SCHED_BASE, 0);
    hw(RGN_CTRL, REG_SCHED_LEN, 7);
    hw(RGN_CTRL, REG_ITERS, 0);
    hw(RGN_CTRL, REG_OFF_BASE, base_sp);
    hw(RGN_CTRL, REG_OFF_STRIDE, STRIDE);
    hw(RGN_CTRL, REG_RUN, 1);
    st = 0;
    do begin hr(RGN_CTRL, REG_STATUS, d); st++; end while (d[1] && st < 100000);
    check({name, " done"}, 32'(d[2]), 1);
    check({name, " no address error"}, 32'(d[3]), 0);
    hr(RGN_CTRL, REG_ITER_DONE, d);
    check({name, " iterations = elements"}, d, N);
    hr(RGN_CTRL, REG_CYCLES, d);
    check({name, " cycles"}, d, 1 + N * (2 * (1 + 2 * nt + 1) + 2 * (1 + nt + 1) + 3));
    for (int k = 0; k < nt; k++)
      for (int i = 0; i < N; i++) begin
        hr(RGN_ARRAY, 22'(base_sp + STRIDE * k + 4 * i + 2), d);
        check($sformatf("%s VADD tile %0d elem %0d", name, k, i), d, a[k][i] + b[k][i]);
        hr(RGN_ARRAY, 22'(base_sp + STRIDE * k + 4 * i + 3), d);
        check($sformatf("%s VMUL tile %0d elem %0d", name, k, i), d, a[k][i] * b[k][i]);
      end
  endtask

  initial begin
    host_req = 0; host_we = 0; host_addr = 0; host_wdata = 0;
    llc_acc_en = 0; llc_acc_we = 0; llc_acc_addr = 0; llc_acc_wdata = 0;
    rst = 1; repeat (3) @(negedge clk); rst = 0;
    run_partition("32CC-256KB", 32'b10_10_01_01_01_01_01_01_01_01, 32, 8, 20'hFFFFF);
    run_partition("16CC-768KB", 32'b10_10_10_10_10_10_01_01_01_01, 16, 4, 20'hFFFFF);
    run_partition("16CC-640KB", 32'b00_10_10_10_10_10_01_01_01_01, 16, 4, 20'h3FFFF);
    run_partition("16CC-512KB", 32'b00_00_10_10_10_10_01_01_01_01, 16, 4, 20'h0FFFF);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
