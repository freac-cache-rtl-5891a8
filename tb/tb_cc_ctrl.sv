// tb_cc_ctrl: drives the controller through its host registers with models
// of the clusters, the tag-array store, the scratchpad arrays and the cache
// controller around it. Checks: flush handshake then lock, refusal of cache
// ways, configuration-store writes, the broadcast row-address sequence and
// one step per cycle, iteration count, operand serving (offset per tile,
// scratchpad reads/writes, forwarding to the cache controller, stall count)
// and early stop on the done check.
module tb_cc_ctrl;
  import freac_pkg::*;
  localparam int NP = 10, NM = 40, AW = 11;

  logic clk = 0, rst;
  logic host_req, host_we, host_ready, host_rvalid;
  logic [23:0] host_addr;
  logic [31:0] host_wdata, host_rdata;
  way_mode_e [NP-1:0] way_mode;
  logic [2*NP-1:0] lock_mask, flush_mask;
  logic flush_req, flush_ack;
  logic acc_en, acc_we, acc_bcast;
  logic [3:0] acc_pair;
  logic [1:0] acc_mcc, acc_sa;
  logic [AW-1:0] acc_row;
  logic [31:0] acc_wdata, acc_rdata;
  logic xs_we, xs_re;
  logic [9:0] xs_waddr, xs_raddr;
  logic [3:0] xs_word;
  logic [31:0] xs_wdata;
  xcfg_t xcfg_cur;
  logic sw_we;
  logic [4:0] sw_idx;
  logic [AW-1:0] sw_addr, step_addr;
  logic [31:0] sw_wdata;
  logic [NM-1:0] cmp_mask, bus_req, bus_we, rsp_valid, done_bits;
  logic step_re, exec, commit, running;
  logic [NM-1:0][31:0] bus_addr, bus_wdata;
  logic [31:0] rsp_data;
  logic ext_req, ext_we, ext_gnt, ext_rvalid;
  logic [31:0] ext_addr, ext_wdata, ext_rdata;

  cc_ctrl #(.NUM_PAIRS(NP), .SA_ROWS(2048), .XCFG_DEPTH(1024)) dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  // ------------------------------------------------ environment models
  xcfg_t       store [16];
  logic [31:0] sp  [1 << 19];       // scratchpad words by linear address
  logic        spv [1 << 19];       // word has been written
  logic [31:0] rsp_got [NM];
  int          rsp_cnt, ext_cnt;
  logic [10:0] addr_log [$];

  // the store model holds entries 100..115; the entry read must follow the row
  int xs_mis = 0;
  always_ff @(posedge clk) if (xs_re) begin
    xcfg_cur <= store[4'(xs_raddr - 10'd100)];
    if (xs_raddr != 10'(step_addr)) xs_mis <= xs_mis + 1;
  end
  always_ff @(posedge clk) begin
    if (acc_en && acc_we) begin
      sp[{acc_pair, acc_mcc, acc_sa, acc_row}]  <= acc_wdata;
      spv[{acc_pair, acc_mcc, acc_sa, acc_row}] <= 1'b1;
    end
    if (acc_en && !acc_we) acc_rdata <= spv[{acc_pair, acc_mcc, acc_sa, acc_row}]
                                        ? sp[{acc_pair, acc_mcc, acc_sa, acc_row}] : 32'hdead;
    if (step_re) addr_log.push_back(step_addr);
    for (int i = 0; i < NM; i++) if (rsp_valid[i]) begin rsp_got[i] <= rsp_data; rsp_cnt++; end
  end
  // cache controller: grants immediately, answers reads two cycles later
  logic [1:0] ext_pipe;
  always_ff @(posedge clk) begin
    if (rst) ext_pipe <= 0;
    else ext_pipe <= {ext_pipe[0], ext_req && !ext_we};
    if (ext_req) ext_cnt++;
  end
  assign ext_gnt    = 1'b1;
  assign ext_rvalid = ext_pipe[1];
  assign ext_rdata  = 32'hE0E0_0000 | ext_addr[15:0];

  always_comb begin
    for (int i = 0; i < NM; i++) begin
      bus_req[i]   = exec && cmp_mask[i] && xcfg_cur.bus_op != BUS_NONE;
      bus_we[i]    = xcfg_cur.bus_op == BUS_WRITE;
      bus_addr[i]  = (i == 2) ? 32'h8000_0010 : 32'(i);  // cluster 2 goes off-slice
      bus_wdata[i] = 32'h1000 + 32'(i);
    end
  end

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
    if (!host_rvalid) begin failures++; $display("FAIL no rvalid"); end
  endtask
  task automatic wait_idle(output int cyc);
    logic [31:0] st;
    cyc = 0;
    do begin hr(RGN_CTRL, REG_STATUS, st); cyc++; end while (st[1] && cyc < 2000);
  endtask

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] d;
    int n;
    host_req = 0; host_we = 0; host_addr = 0; host_wdata = 0; flush_ack = 0;
    done_bits = '0; acc_rdata = 0; rsp_cnt = 0; ext_cnt = 0;
    for (int s = 0; s < 16; s++) store[s] = '0;
    for (int a = 0; a < (1 << 19); a++) spv[a] = 1'b0;
    rst = 1; repeat (2) @(negedge clk); rst = 0;

    // ---- partition: pair 0 compute, pair 1 scratchpad, rest cache
    hw(RGN_CTRL, REG_WAY_MODE, 32'b10_01);
    repeat (4) begin
      @(negedge clk);
      check("flush requested", 32'(flush_req), 1);
      check("flush mask", 32'(flush_mask), 32'hF);
      check("not locked before flush", 32'(lock_mask), 0);
    end
    flush_ack = 1; @(negedge clk); flush_ack = 0; @(negedge clk);
    check("lock mask", 32'(lock_mask), 32'hF);
    check("cmp mask", 32'(cmp_mask), 32'hF);
    hr(RGN_CTRL, REG_WAY_MODE, d);
    check("way mode readback", d, 32'b10_01);

    // ---- array access: scratchpad pair 1 accepted, cache pair 3 refused
    hw(RGN_ARRAY, {3'd0, 4'd1, 2'd0, 2'd0, 11'd7}, 32'hCAFE_0001);
    check("scratch word written", spv[{4'd1, 2'd0, 2'd0, 11'd7}] ? sp[{4'd1, 2'd0, 2'd0, 11'd7}] : 0, 32'hCAFE_0001);
    hw(RGN_ARRAY, {3'd0, 4'd3, 2'd0, 2'd0, 11'd7}, 32'hBAD);
    check("cache pair refused", 32'(spv[{4'd3, 2'd0, 2'd0, 11'd7}]), 0);
    hr(RGN_ARRAY, {3'd0, 4'd1, 2'd0, 2'd0, 11'd7}, d);
    check("scratch word read", d, 32'hCAFE_0001);

    // ---- crossbar store write path
    fork
      begin
        @(posedge xs_we);
        check("xs entry", 32'(xs_waddr), 5);
        check("xs word", 32'(xs_word), 3);
        check("xs data", xs_wdata, 32'h1234_5678);
      end
      hw(RGN_XCFG, {8'd0, 10'd5, 4'd3}, 32'h1234_5678);
    join

    // ---- run 1: 3 steps, 4 iterations, no bus traffic
    hw(RGN_CTRL, REG_SCHED_BASE, 100);
    hw(RGN_CTRL, REG_SCHED_LEN, 3);
    hw(RGN_CTRL, REG_ITERS, 4);
    addr_log.delete();
    hw(RGN_CTRL, REG_RUN, 1);
    wait_idle(n);
    hr(RGN_CTRL, REG_CYCLES, d);
    check("cycles = 1 + steps*iters", d, 1 + 3 * 4);
    hr(RGN_CTRL, REG_ITER_DONE, d);
    check("iterations", d, 4);
    check("row addresses issued", addr_log.size(), 12);
    for (int k = 0; k < addr_log.size() && k < 12; k++)
      check("row address", 32'(addr_log[k]), 100 + k % 3);

    // ---- run 2: step 1 reads operands (scratch + one forwarded), 1 iteration
    store[1].bus_op = BUS_READ;
    store[2].bus_op = BUS_WRITE;
    for (int i = 0; i < 4; i++) begin
      sp[{4'd1, 2'd0, 2'd0, 11'(32 + 2 * i + i)}]  = 32'h5000 + 32'(i);
      spv[{4'd1, 2'd0, 2'd0, 11'(32 + 2 * i + i)}] = 1'b1;
    end
    // tile k reads word (k + 32 + 2k) of pair 1: base 32 + pair1 offset, stride 2
    hw(RGN_CTRL, REG_OFF_BASE, (1 << (AW + 4)) + 32);
    hw(RGN_CTRL, REG_OFF_STRIDE, 2);
    hw(RGN_CTRL, REG_ITERS, 1);
    rsp_cnt = 0; ext_cnt = 0;
    hw(RGN_CTRL, REG_RUN, 1);
    wait_idle(n);
    check("responses", rsp_cnt, 4);
    for (int i = 0; i < 4; i++)
      if (i != 2) check("scratch operand", rsp_got[i], 32'h5000 + 32'(i));
    check("forwarded operand", rsp_got[2], 32'hE0E0_0000 | ((32'h10 + (1 << (AW + 4)) + 32 + 4) & 32'hFFFF));
    check("forwarded requests", ext_cnt, 2);
    for (int i = 0; i < 4; i++)
      if (i != 2) check("scratch write", sp[{4'd1, 2'd0, 2'd0, 11'(32 + 3 * i)}], 32'h1000 + 32'(i));
    hr(RGN_CTRL, REG_STALLS, d);
    checks++;
    if (d < 8) begin failures++; $display("FAIL stalls %0d", d); end
    hr(RGN_CTRL, REG_CYCLES, d);
    begin
      logic [31:0] st;
      hr(RGN_CTRL, REG_STALLS, st);
      check("cycles = 1 + steps + stalls", d, 1 + 3 + st);
    end

    // ---- run 3: done check on step 0, unlimited iterations
    store[1].bus_op = BUS_NONE; store[2].bus_op = BUS_NONE;
    store[0].done_chk = 1;
    hw(RGN_CTRL, REG_ITERS, 0);
    hw(RGN_CTRL, REG_RUN, 1);
    repeat (20) @(negedge clk);
    hr(RGN_CTRL, REG_STATUS, d);
    check("still running without done", 32'(d[1]), 1);
    done_bits = '1;
    wait_idle(n);
    hr(RGN_CTRL, REG_STATUS, d);
    check("done flag", 32'(d[2]), 1);
    checks++;
    if (n > 10) begin failures++; $display("FAIL done stop slow"); end

    checks++;
    if (xs_mis != 0) begin failures++; $display("FAIL crossbar entry differs from row address %0d times", xs_mis); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
