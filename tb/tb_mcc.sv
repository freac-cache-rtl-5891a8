// tb_mcc: runs a small folded circuit on one cluster, acting as the
// controller. The schedule loads two operands over the bus, computes their
// low-byte XOR with eight 4-LUTs, a carry (majority) with a 5-LUT fed by a
// state latch, their product with the MAC, reads a word over the link, sets
// the done bit, and writes every result back over the bus, where the test
// compares them with values computed here. Each bus step is stalled for a
// few cycles to check that nothing commits before the response.
module tb_mcc;
  import freac_pkg::*;
  localparam int ROWS = 2048;
  localparam int BASE = 40;            // row of step 0
  localparam int NS   = 10;

  logic clk = 0, rst;
  logic acc_en, acc_we;
  logic [1:0] acc_sa;
  logic [10:0] acc_row;
  logic [31:0] acc_wdata, acc_rdata;
  logic cmp_en, step_re, exec, commit;
  logic [10:0] step_addr;
  xcfg_t xcfg;
  logic bus_req, bus_we, rsp_valid, done_bit;
  logic [31:0] bus_addr, bus_wdata, rsp_data, link_out, link_in;

  xcfg_t       cfg  [NS];
  logic [31:0] rows [NS][4];
  int checks = 0, failures = 0;
  int stall_cycles = 0;
  logic [31:0] A, B, L;
  logic [31:0] writes [$];

  mcc #(.SA_ROWS(ROWS)) dut (.clk, .rst, .acc_en, .acc_we, .acc_sa, .acc_row, .acc_wdata,
    .acc_rdata, .cmp_en, .step_re, .step_addr, .xcfg, .exec, .commit, .bus_req, .bus_we,
    .bus_addr, .bus_wdata, .rsp_valid, .rsp_data, .link_out, .link_in, .done_bit);
  always #5 clk = ~clk;

  task automatic check(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  function automatic xcfg_t blank();
    xcfg_t c;
    c = '0;
    for (int i = 0; i < NUM_LUT_IN; i++) c.lut_in_sel[i] = 9'd511;   // constant 0
    return c;
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    A = $urandom(); B = $urandom(); L = $urandom();
    // ---------------- build the schedule
    for (int s = 0; s < NS; s++) begin
      cfg[s] = blank();
      for (int k = 0; k < 4; k++) rows[s][k] = $urandom();   // unused rows: noise
    end
    // step 0,1: read A into word 1, B into word 2 (address from word 0 = 0)
    cfg[0].bus_op = BUS_READ; cfg[0].bus_addr = 0; cfg[0].bus_dst = 1;
    cfg[1].bus_op = BUS_READ; cfg[1].bus_addr = 0; cfg[1].bus_dst = 2;
    // step 2: eight 4-LUT XORs of bit k of A and B -> word 3 bit k
    cfg[2].lut4_mode = 1;
    for (int s = 0; s < 4; s++) begin
      rows[2][s] = 32'h6666_6666;
      for (int h = 0; h < 2; h++) begin
        int k;
        k = 2 * s + h;
        cfg[2].lut_in_sel[8*s + 4*h + 0] = 9'(32 + k);
        cfg[2].lut_in_sel[8*s + 4*h + 1] = 9'(64 + k);
        cfg[2].lut_wr[k]  = 1;
        cfg[2].lut_dst[k] = 8'(96 + k);
      end
    end
    // step 3: 5-LUT majority(A0, B0, latch0 = A0^B0) -> bit 128 ; MAC A*B
    rows[3][0] = 32'hE8E8_E8E8;
    cfg[3].lut_in_sel[0] = 9'd32;
    cfg[3].lut_in_sel[1] = 9'd64;
    cfg[3].lut_in_sel[2] = 9'(POOL_LATCH + 0);
    cfg[3].lut_wr[0] = 1; cfg[3].lut_dst[0] = 8'd128;
    cfg[3].lut_wr[1] = 1; cfg[3].lut_dst[1] = 8'd129;   // ignored in 5-LUT mode
    cfg[3].mac_op = MAC_MUL; cfg[3].mac_a = 1; cfg[3].mac_b = 2;
    // step 4: MAC result -> word 5, accumulate A*A ; drive word 2 on the link
    cfg[4].mac_wr = 1; cfg[4].mac_dst = 5;
    cfg[4].mac_op = MAC_ACC; cfg[4].mac_a = 1; cfg[4].mac_b = 1;
    cfg[4].link_src = 2;
    // step 5: copy link bits 0..3 into word 6 with identity 5-LUTs; set done
    for (int s = 0; s < 4; s++) begin
      rows[5][s] = 32'hAAAA_AAAA;
      cfg[5].lut_in_sel[8*s] = 9'(POOL_LINK + s);
      cfg[5].lut_wr[2*s] = 1; cfg[5].lut_dst[2*s] = 8'(192 + s);
    end
    cfg[5].mac_wr = 1; cfg[5].mac_dst = 7;
    // steps 6..9: write words 3,4,5,6 over the bus; step 9 also sets done bit
    for (int s = 6; s < 10; s++) begin
      cfg[s].bus_op = BUS_WRITE; cfg[s].bus_addr = 0; cfg[s].bus_data = 3'(s - 3);
    end
    rows[9][0] = 32'hFFFF_FFFF;
    cfg[9].lut_wr[0] = 1; cfg[9].lut_dst[0] = 8'(DONE_BIT);

    // ---------------- reset and load configuration rows
    rst = 1; acc_en = 0; acc_we = 0; acc_sa = 0; acc_row = 0; acc_wdata = 0;
    cmp_en = 0; step_re = 0; step_addr = 0; xcfg = blank(); exec = 0; commit = 0;
    rsp_valid = 0; rsp_data = 0; link_in = 0;
    @(negedge clk); @(negedge clk);
    rst = 0;
    for (int s = 0; s < NS; s++)
      for (int k = 0; k < 4; k++) begin
        acc_en = 1; acc_we = 1; acc_sa = 2'(k); acc_row = 11'(BASE + s); acc_wdata = rows[s][k];
        @(negedge clk);
      end
    acc_en = 0; acc_we = 0;
    // read-back of one row through the access port
    acc_en = 1; acc_sa = 2; acc_row = 11'(BASE + 2); @(negedge clk); acc_en = 0;
    check("access read", acc_rdata, rows[2][2]);
    check("done low after reset", 32'(done_bit), 0);

    // ---------------- run the schedule
    cmp_en = 1;
    step_re = 1; step_addr = 11'(BASE); @(negedge clk);
    for (int s = 0; s < NS; s++) begin
      xcfg = cfg[s]; exec = 1;
      if (s == 5) link_in = link_out;        // switch box loops the word back
      if (cfg[s].bus_op != BUS_NONE) begin
        step_re = 0; commit = 0;
        #1;
        check("bus_req raised", 32'(bus_req), 1);
        check("bus_we", 32'(bus_we), 32'(cfg[s].bus_op == BUS_WRITE));
        repeat (3) begin @(negedge clk); stall_cycles++; end
        if (cfg[s].bus_op == BUS_READ) begin
          rsp_valid = 1; rsp_data = (s == 0) ? A : B;
          @(negedge clk); stall_cycles++;
          rsp_valid = 0; rsp_data = 32'd0;   // the shared word moves on
        end else begin
          writes.push_back(bus_wdata);
        end
      end
      commit = 1;
      if (s + 1 < NS) begin step_re = 1; step_addr = 11'(BASE + s + 1); end
      else step_re = 0;
      @(negedge clk);
      commit = 0;
    end
    exec = 0; step_re = 0;
    @(negedge clk);

    check("write count", writes.size(), 4);
    if (writes.size() == 4) begin
      check("xor byte", writes[0], {24'd0, A[7:0] ^ B[7:0]});
      check("majority", writes[1], {31'd0, (A[0] & B[0]) | (A[0] & (A[0] ^ B[0])) | (B[0] & (A[0] ^ B[0]))});
      check("mac product", writes[2], A * B);
      check("link copy", writes[3], {28'd0, B[3:0]});
    end
    check("link carried word 2", link_in, B);
    check("done bit", 32'(done_bit), 1);
    check("stall cycles", stall_cycles, 2 * 4 + 4 * 3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
