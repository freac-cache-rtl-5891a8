// tb_freac_slice: end-to-end test of a full-size compute slice (20 ways,
// 8 KB sub-arrays, all parameters at their defaults), driven only through
// the host load/store port, with a model of the surrounding cache
// controller (flush acknowledge, array access, forwarded operands).
//
// Sequence:
//  1. way pairs 0-1 become compute (8 clusters), pair 2 scratchpad: flush
//     handshake, lock, and the cache controller is refused the locked ways;
//  2. LUT rows are broadcast to all compute clusters, crossbar words written
//     to the tag-array store, switch-box routes loaded;
//  3. the host fills each tile's scratchpad window with two 16-element
//     vectors (interleaved) and runs a folded dot-product accelerator: per
//     accelerator cycle (5 folding steps) it reads a[i] and b[i] over the
//     bus, accumulates a[i]*b[i] in the MAC, increments a 4-bit element
//     counter with 4-LUTs, raises done with a 5-LUT when it wraps, and writes
//     the running sum back (a[i] at window word 2i, b[i] at 2i+1, sum at 32). The run stops on the done check;
//  4. a second schedule passes each tile's result to another tile over the
//     switch-box grid (multi-hop, east, west, north, south, X-then-Y turns)
//     and, with an offset that sets address bit 31, sends its
//     operand traffic to the cache controller.
// Results are compared with sums computed here; the cycle count of run 1 is
// checked against the serialised bus model (one cycle per step, two per
// scratchpad read, one per write, one extra to enter and leave a stall).
// Each mechanism is counted and must have happened at least once.
module tb_freac_slice;
  import freac_pkg::*;
  localparam int AW = 11, NT = 8, J = 16, STRIDE = 64;

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

  int checks = 0, failures = 0;
  task automatic check(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  // mechanism counters
  int n_flush, n_refused, n_bcast, n_stall, n_ext_rd, n_ext_wr, n_done_stop,
      n_link, n_lut4, n_lut5, n_mac;

  // -------------------------------------------- cache controller model
  logic [31:0] ext_wr_addr [$], ext_wr_data [$];
  logic        ext_pend;
  logic [31:0] ext_pend_addr;
  assign ext_gnt = 1'b1;
  always_ff @(posedge clk) begin
    if (rst) begin
      ext_pend <= 0; ext_rvalid <= 0;
    end else begin
      ext_rvalid <= ext_pend;
      ext_pend   <= ext_req && !ext_we && !ext_pend && !ext_rvalid;
      ext_pend_addr <= ext_addr;
      if (ext_req && ext_we) begin
        ext_wr_addr.push_back(ext_addr); ext_wr_data.push_back(ext_wdata); n_ext_wr++;
      end
      if (ext_req && !ext_we && !ext_pend && !ext_rvalid) n_ext_rd++;
    end
  end
  assign ext_rdata = ext_pend_addr ^ 32'h5A5A_5A5A;

  always_ff @(posedge clk) if (running && dut.u_ctrl.commit == 1'b0 && dut.u_ctrl.exec) n_stall++;

  // ------------------------------------------------------- host helpers
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
  function automatic logic [21:0] arr(input int pair, input int m, input int sa, input int row,
                                      input bit bcast);
    return {bcast, 2'b00, 4'(pair), 2'(m), 2'(sa), 11'(row)};
  endfunction
  task automatic put_xcfg(input int entry, input xcfg_t c);
    logic [XCFG_WORDS*32-1:0] raw;
    raw = '0;
    raw[XCFG_W-1:0] = c;
    for (int w = 0; w < XCFG_WORDS; w++) hw(RGN_XCFG, {8'd0, 10'(entry), 4'(w)}, raw[32*w +: 32]);
  endtask
  function automatic logic [31:0] sw_route(input int up, dn, n, so, e, w);
    return {14'd0, 3'(w), 3'(e), 3'(so), 3'(n), 3'(dn), 3'(up)};
  endfunction
  int link_src [NT] = '{2, 5, 1, 7, 0, 2, -1, 6};

  task automatic put_rows(input int row, input logic [31:0] r0, r1, r2, r3);
    hw(RGN_ARRAY, arr(0, 0, 0, row, 1), r0);
    hw(RGN_ARRAY, arr(0, 0, 1, row, 1), r1);
    hw(RGN_ARRAY, arr(0, 0, 2, row, 1), r2);
    hw(RGN_ARRAY, arr(0, 0, 3, row, 1), r3);
    n_bcast++;
  endtask
  task automatic wait_done();
    logic [31:0] st;
    int n;
    n = 0;
    do begin hr(RGN_CTRL, REG_STATUS, st); n++; end while (st[1] && n < 100000);
  endtask
  function automatic xcfg_t blank();
    xcfg_t c;
    c = '0;
    for (int i = 0; i < NUM_LUT_IN; i++) c.lut_in_sel[i] = 9'd511;
    return c;
  endfunction

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] d, a [NT][J], b [NT][J], dot [NT];
    xcfg_t c;
    int base_sp;
    {n_flush, n_refused, n_bcast, n_stall, n_ext_rd, n_ext_wr, n_done_stop,
     n_link, n_lut4, n_lut5, n_mac} = '0;
    host_req = 0; host_we = 0; host_addr = 0; host_wdata = 0; flush_ack = 0;
    llc_acc_en = 0; llc_acc_we = 0; llc_acc_addr = 0; llc_acc_wdata = 0;
    rst = 1; repeat (3) @(negedge clk); rst = 0;

    // ---- 0. the cache controller uses pair 5 as cache
    @(negedge clk);
    llc_acc_en = 1; llc_acc_we = 1; llc_acc_addr = {4'd5, 2'd1, 2'd2, 11'd9}; llc_acc_wdata = 32'h0BAD_CAFE;
    @(negedge clk);
    llc_acc_we = 0; @(negedge clk); llc_acc_en = 0;
    check("cache way readable", llc_acc_rdata, 32'h0BAD_CAFE);

    // ---- 1. select, flush, lock
    fork
      hw(RGN_CTRL, REG_WAY_MODE, 32'b10_01_01);
      begin
        wait (flush_req);
        check("flush mask (ways 0-5)", 32'(flush_mask), 32'h3F);
        repeat (5) @(negedge clk);
        check("lock waits for flush", 32'(lock_mask), 0);
        flush_ack = 1; @(negedge clk); flush_ack = 0;
        n_flush++;
      end
    join
    repeat (2) @(negedge clk);
    check("lock mask", 32'(lock_mask), 32'h3F);
    llc_acc_addr = {4'd0, 2'd0, 2'd0, 11'd3}; #1;
    check("locked way refused to cache", 32'(llc_acc_ok), 0);
    if (!llc_acc_ok) n_refused++;
    llc_acc_addr = {4'd5, 2'd1, 2'd2, 11'd9}; #1;
    check("cache way still open", 32'(llc_acc_ok), 1);

    // ---- 2. configuration: dot-product schedule at rows 100.., entries 0..4
    // s0: read a[i] (address word0) -> word2
    //     and word1 bit0 <- 1 with a constant 5-LUT, ahead of its first use
    c = blank(); c.bus_op = BUS_READ; c.bus_addr = 0; c.bus_dst = 2;
    c.lut_wr[0] = 1; c.lut_dst[0] = 8'(32);
    put_xcfg(100, c); put_rows(100, 32'hFFFF_FFFF, 0, 0, 0);
    // s1: read b[i] (address word1 = word0 | 1) -> word3
    c = blank(); c.bus_op = BUS_READ; c.bus_addr = 1; c.bus_dst = 3;
    put_xcfg(101, c); put_rows(101, 0, 0, 0, 0);
    // s2: acc += a*b ; counter (word0 bits 4:1) +1 into word0 and word1 with 4-LUTs
    c = blank(); c.lut4_mode = 1; c.mac_op = MAC_ACC; c.mac_a = 2; c.mac_b = 3;
    for (int s = 0; s < 4; s++)
      for (int h = 0; h < 2; h++) begin
        for (int i = 0; i < 4; i++) c.lut_in_sel[8*s + 4*h + i] = 9'(1 + i);
        c.lut_wr[2*s + h]  = 1;
        c.lut_dst[2*s + h] = 8'(32 * h + 1 + s);
      end
    put_xcfg(102, c);
    // truth tables of counter bit k' over inputs c0..c3, same in both halves
    begin
      logic [15:0] t [4];
      for (int s = 0; s < 4; s++) t[s] = '0;
      for (int v = 0; v < 16; v++) begin
        logic [3:0] nv;
        nv = 4'(v + 1);
        for (int s = 0; s < 4; s++) t[s][v] = nv[s];
      end
      put_rows(102, {t[0], t[0]}, {t[1], t[1]}, {t[2], t[2]}, {t[3], t[3]});
    end
    // s3: word4 <- acc ; done bit <- counter == 0 (5-LUT NOR) ;
    //     word5 bit5 <- 1 (result address 32)
    c = blank(); c.mac_wr = 1; c.mac_dst = 4;
    for (int i = 0; i < 4; i++) c.lut_in_sel[i] = 9'(1 + i);
    c.lut_wr[0] = 1; c.lut_dst[0] = 8'(DONE_BIT);
    c.lut_wr[4] = 1; c.lut_dst[4] = 8'(5 * 32 + 5);
    put_xcfg(103, c); put_rows(103, 32'h0001_0001, 0, 32'hFFFF_FFFF, 0);
    // s4: write word4 to address word5 ; done check
    c = blank(); c.bus_op = BUS_WRITE; c.bus_addr = 5; c.bus_data = 4; c.done_chk = 1;
    put_xcfg(104, c); put_rows(104, 0, 0, 0, 0);

    // ---- 3. scratchpad fill: tile k window at pair 2 word 64k
    base_sp = 2 << (AW + 4);
    for (int k = 0; k < NT; k++) begin
      dot[k] = 0;
      for (int j = 0; j < J; j++) begin
        a[k][j] = $urandom_range(100000); b[k][j] = $urandom();
        dot[k] = dot[k] + a[k][j] * b[k][j];
        hw(RGN_ARRAY, 22'(base_sp + STRIDE * k + 2 * j), a[k][j]);
        hw(RGN_ARRAY, 22'(base_sp + STRIDE * k + 2 * j + 1), b[k][j]);
      end
    end
    hr(RGN_ARRAY, 22'(base_sp + STRIDE * 3 + 5), d);
    check("scratchpad readback", d, b[3][2]);

    hw(RGN_CTRL, REG_SCHED_BASE, 100);
    hw(RGN_CTRL, REG_SCHED_LEN, 5);
    hw(RGN_CTRL, REG_ITERS, 1000);
    hw(RGN_CTRL, REG_OFF_BASE, base_sp);
    hw(RGN_CTRL, REG_OFF_STRIDE, STRIDE);
    hw(RGN_CTRL, REG_RUN, 1);
    wait_done();
    hr(RGN_CTRL, REG_ITER_DONE, d);
    check("stopped by done check after J iterations", d, J);
    if (d == J) n_done_stop++;
    n_lut4 += J; n_lut5 += J; n_mac += J;
    hr(RGN_CTRL, REG_CYCLES, d);
    check("run-1 cycles", d, 1 + J * (2 * (1 + 2 * NT + 1) + 1 + 1 + (1 + NT + 1)));
    for (int k = 0; k < NT; k++) begin
      hr(RGN_ARRAY, 22'(base_sp + STRIDE * k + 32), d);
      check($sformatf("dot product tile %0d", k), d, dot[k]);
    end

    // ---- 4. link exchange and forwarded operands (rows and crossbar entries 200-203)
    // switch-box grid, route row 200 (codes: 1 up, 2 down, 3 N, 4 S, 5 E, 6 W;
    // fields up, down, N, S, E, W from bit 0). Tile k is cluster k%4 of pair k/4.
    //   t0 <- t2 (two hops west), t1 <- t5 (down to up), t2 <- t1 (east),
    //   t3 <- t7 (north through box row 1), t4 <- t0, t5 <- t2 (west, then
    //   south into box row 1), t6 <- nothing, t7 <- t6 (east)
    for (int b = 0; b < 28; b++) hw(RGN_SWCFG, {6'd0, 5'(b), 11'd200}, 0);
    hw(RGN_SWCFG, {6'd0, 5'd0, 11'd200}, sw_route(5, 1, 0, 0, 0, 0));
    hw(RGN_SWCFG, {6'd0, 5'd1, 11'd200}, sw_route(2, 0, 0, 5, 1, 5));
    hw(RGN_SWCFG, {6'd0, 5'd2, 11'd200}, sw_route(6, 0, 0, 0, 2, 1));
    hw(RGN_SWCFG, {6'd0, 5'd3, 11'd200}, sw_route(4, 6, 0, 0, 0, 0));
    hw(RGN_SWCFG, {6'd0, 5'd5, 11'd200}, sw_route(3, 0, 0, 0, 0, 0));
    hw(RGN_SWCFG, {6'd0, 5'd7, 11'd200}, sw_route(0, 0, 1, 0, 0, 0));
    // t0: link carries word4; identity 5-LUTs copy link bits 0..3 into word6
    c = blank(); c.link_src = 4;
    for (int s = 0; s < 4; s++) begin
      c.lut_in_sel[8*s] = 9'(POOL_LINK + s);
      c.lut_wr[2*s] = 1; c.lut_dst[2*s] = 8'(6 * 32 + s);
    end
    put_xcfg(200, c); put_rows(200, 32'hAAAA_AAAA, 32'hAAAA_AAAA, 32'hAAAA_AAAA, 32'hAAAA_AAAA);
    c = blank(); c.bus_op = BUS_READ;  c.bus_addr = 0; c.bus_dst = 7;  put_xcfg(201, c); put_rows(201, 0, 0, 0, 0);
    c = blank(); c.bus_op = BUS_WRITE; c.bus_addr = 5; c.bus_data = 6; put_xcfg(202, c); put_rows(202, 0, 0, 0, 0);
    c = blank(); c.bus_op = BUS_WRITE; c.bus_addr = 0; c.bus_data = 7; put_xcfg(203, c); put_rows(203, 0, 0, 0, 0);
    hw(RGN_CTRL, REG_SCHED_BASE, 200);
    hw(RGN_CTRL, REG_SCHED_LEN, 4);
    hw(RGN_CTRL, REG_ITERS, 1);
    hw(RGN_CTRL, REG_OFF_BASE, 32'h8000_0000);
    hw(RGN_CTRL, REG_RUN, 1);
    wait_done();
    check("forwarded writes", ext_wr_addr.size(), 2 * NT);
    if (ext_wr_addr.size() == 2 * NT) begin
      for (int k = 0; k < NT; k++) begin
        logic [31:0] nb;
        nb = (link_src[k] < 0) ? 32'd0 : {28'd0, dot[link_src[k]][3:0]};
        check($sformatf("link word tile %0d addr", k), ext_wr_addr[k], 32'h8000_0000 + 32 + STRIDE * k);
        check($sformatf("link word tile %0d", k), ext_wr_data[k], nb);
        if (ext_wr_data[k] == nb) n_link++;
        check($sformatf("forwarded read tile %0d", k), ext_wr_data[NT + k],
              (32'h8000_0000 + STRIDE * k) ^ 32'h5A5A_5A5A);
      end
    end

    $display("mechanisms: flush=%0d refused=%0d bcast=%0d stall=%0d ext_rd=%0d ext_wr=%0d done_stop=%0d link=%0d lut4=%0d lut5=%0d mac=%0d",
             n_flush, n_refused, n_bcast, n_stall, n_ext_rd, n_ext_wr, n_done_stop, n_link, n_lut4, n_lut5, n_mac);
    if (n_flush == 0 || n_refused == 0 || n_bcast == 0 || n_stall == 0 || n_ext_rd == 0 ||
        n_ext_wr == 0 || n_done_stop == 0 || n_link == 0 || n_lut4 == 0 || n_lut5 == 0 || n_mac == 0) begin
      failures++;
      $display("FAIL a mechanism never happened");
    end
    checks++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
