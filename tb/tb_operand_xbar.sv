// tb_operand_xbar: random pools and selects, compared with an independent
// flat-pool reference (registers, then state latches, then link word, then 0).
module tb_operand_xbar;
  import freac_pkg::*;
  logic [REG_BITS-1:0]              regs;
  logic [NUM_LUT-1:0]               latches;
  logic [WORD_W-1:0]                link_in;
  logic [NUM_LUT_IN-1:0][SEL_W-1:0] sel;
  logic [NUM_LUT_IN-1:0]            lut_in;
  int checks = 0, failures = 0;

  operand_xbar dut (.regs, .latches, .link_in, .sel, .lut_in);

  function automatic logic ref_bit(int s);
    if (s < 256)      return regs[s];
    else if (s < 264) return latches[s - 256];
    else if (s < 296) return link_in[s - 264];
    else              return 1'b0;
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 2000; t++) begin
      for (int w = 0; w < 8; w++) regs[32*w +: 32] = $urandom();
      latches = 8'($urandom());
      link_in = $urandom();
      for (int i = 0; i < NUM_LUT_IN; i++) begin
        // bias towards the interesting boundaries
        case ($urandom_range(3))
          0: sel[i] = SEL_W'($urandom_range(511));
          1: sel[i] = SEL_W'($urandom_range(263, 256));
          2: sel[i] = SEL_W'($urandom_range(295, 264));
          default: sel[i] = SEL_W'($urandom_range(255));
        endcase
      end
      #1;
      for (int i = 0; i < NUM_LUT_IN; i++) begin
        checks++;
        if (lut_in[i] !== ref_bit(int'(sel[i]))) begin
          failures++;
          if (failures < 5) $display("input %0d sel %0d got %b", i, sel[i], lut_in[i]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
