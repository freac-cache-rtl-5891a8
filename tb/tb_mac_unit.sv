// tb_mac_unit: random operation sequences checked against a software
// accumulator; commit low must leave the accumulator unchanged.
module tb_mac_unit;
  import freac_pkg::*;
  logic        clk = 0, rst, commit;
  mac_op_e     op;
  logic [31:0] a, b, acc;
  logic [31:0] model;
  int checks = 0, failures = 0;

  mac_unit dut (.clk, .rst, .commit, .op, .a, .b, .acc);
  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; commit = 0; op = MAC_NOP; a = 0; b = 0; model = 0;
    @(negedge clk); @(negedge clk);
    rst = 0;
    for (int t = 0; t < 5000; t++) begin
      op     = mac_op_e'($urandom_range(3));
      a      = (t % 3 == 0) ? 32'($urandom_range(1000)) : $urandom();
      b      = (t % 3 == 0) ? 32'($urandom_range(1000)) : $urandom();
      commit = ($urandom_range(4) != 0);
      if (commit) begin
        case (op)
          MAC_MUL: model = a * b;
          MAC_ACC: model = model + a * b;
          MAC_CLR: model = 0;
          default: ;
        endcase
      end
      @(negedge clk);
      checks++;
      if (acc !== model) begin
        failures++;
        if (failures < 5) $display("t=%0d op=%0d acc=%h exp=%h", t, op, acc, model);
      end
    end
    // a small dot product: sum of i*(i+1), i = 1..10 = 440
    op = MAC_CLR; commit = 1; @(negedge clk);
    for (int i = 1; i <= 10; i++) begin
      op = MAC_ACC; a = i; b = i + 1; @(negedge clk);
    end
    checks++;
    if (acc !== 32'd440) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
