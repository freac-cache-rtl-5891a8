// tb_switch_box: loads random route rows, steps through them with random
// link words, and checks all six outputs against a reference router that
// applies the X-Y rules (east/west outputs never take north/south inputs,
// no output takes the input on its own side). It also checks that the route
// holds on cycles where no new row is read.
module tb_switch_box;
  logic clk = 0;
  logic cfg_we, cfg_re;
  logic [10:0] cfg_addr, cfg_raddr;
  logic [31:0] cfg_wdata;
  logic [31:0] up_in, dn_in, n_in, s_in, e_in, w_in;
  logic [31:0] up_out, dn_out, n_out, s_out, e_out, w_out;
  logic [31:0] rows [64];
  int checks = 0, failures = 0;

  switch_box #(.LINK_W(32), .CFG_ROWS(2048)) dut (.*);
  always #5 clk = ~clk;

  // reference: source code s for an output whose own side is code "own";
  // horiz = 1 for east/west outputs
  function automatic logic [31:0] src(input logic [2:0] s, input int own, input logic horiz);
    if (s == 3'(own)) return 32'd0;
    if (horiz && (s == 3'd3 || s == 3'd4)) return 32'd0;
    case (s)
      3'd1: return up_in;
      3'd2: return dn_in;
      3'd3: return n_in;
      3'd4: return s_in;
      3'd5: return e_in;
      3'd6: return w_in;
      default: return 32'd0;
    endcase
  endfunction

  task automatic chk(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cfg_we = 0; cfg_re = 0; cfg_addr = 0; cfg_raddr = 0; cfg_wdata = 0;
    {up_in, dn_in, n_in, s_in, e_in, w_in} = '0;
    for (int r = 0; r < 64; r++) begin
      @(negedge clk);
      cfg_we = 1; cfg_addr = 11'(100 + r); cfg_wdata = $urandom(); rows[r] = cfg_wdata;
    end
    @(negedge clk);
    cfg_we = 0;
    for (int k = 0; k < 2000; k++) begin
      int r;
      r = $urandom_range(63);
      cfg_re = 1; cfg_raddr = 11'(100 + r);
      @(negedge clk);
      cfg_re = 0;
      for (int j = 0; j < 3; j++) begin   // route holds while no new row is read
        up_in = $urandom(); dn_in = $urandom(); n_in = $urandom();
        s_in = $urandom(); e_in = $urandom(); w_in = $urandom();
        #1;
        chk("up",    up_out, src(rows[r][2:0],   0, 0));
        chk("down",  dn_out, src(rows[r][5:3],   0, 0));
        chk("north", n_out,  src(rows[r][8:6],   3, 0));
        chk("south", s_out,  src(rows[r][11:9],  4, 0));
        chk("east",  e_out,  src(rows[r][14:12], 5, 1));
        chk("west",  w_out,  src(rows[r][17:15], 6, 1));
        @(negedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
