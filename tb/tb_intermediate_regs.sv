// tb_intermediate_regs: random word and bit writes, checked against a model
// that applies word A, then word B, then LUT bits in index order.
module tb_intermediate_regs;
  import freac_pkg::*;
  logic clk = 0, rst, commit;
  logic wa_en, wb_en;
  logic [RW_AW-1:0] wa_idx, wb_idx;
  logic [31:0] wa_data, wb_data;
  logic [NUM_LUT-1:0] bit_en, bit_data;
  logic [NUM_LUT-1:0][RB_AW-1:0] bit_idx;
  logic [REG_BITS-1:0] q, model;
  int checks = 0, failures = 0;

  intermediate_regs dut (.clk, .rst, .commit, .wa_en, .wa_idx, .wa_data, .wb_en, .wb_idx,
                         .wb_data, .bit_en, .bit_idx, .bit_data, .q);
  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; commit = 0; wa_en = 0; wb_en = 0; bit_en = 0;
    wa_idx = 0; wb_idx = 0; wa_data = 0; wb_data = 0; bit_idx = '0; bit_data = 0;
    model = '0;
    @(negedge clk); @(negedge clk);
    rst = 0;
    checks++;
    if (q !== '0) failures++;
    for (int t = 0; t < 5000; t++) begin
      commit  = ($urandom_range(5) != 0);
      wa_en   = $urandom_range(1); wa_idx = RW_AW'($urandom_range(7)); wa_data = $urandom();
      wb_en   = $urandom_range(1); wb_idx = RW_AW'($urandom_range(7)); wb_data = $urandom();
      bit_en  = 8'($urandom()); bit_data = 8'($urandom());
      for (int k = 0; k < NUM_LUT; k++)
        bit_idx[k] = (t % 2 == 0) ? {wa_idx, 5'($urandom_range(31))} : RB_AW'($urandom_range(255));
      if (commit) begin
        if (wa_en) model[32*wa_idx +: 32] = wa_data;
        if (wb_en) model[32*wb_idx +: 32] = wb_data;
        for (int k = 0; k < NUM_LUT; k++) if (bit_en[k]) model[bit_idx[k]] = bit_data[k];
      end
      @(negedge clk);
      checks++;
      if (q !== model) begin
        failures++;
        if (failures < 5) $display("t=%0d mismatch", t);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
