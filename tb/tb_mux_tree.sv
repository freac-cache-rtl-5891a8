// tb_mux_tree: checks the LUT mux tree against a bit-indexing reference in
// both modes, over random truth tables and every input combination.
module tb_mux_tree;
  logic [31:0] row;
  logic        lut4;
  logic [7:0]  in;
  logic [1:0]  out;
  int checks = 0, failures = 0;

  mux_tree dut (.row, .lut4, .in, .out);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [1:0] exp;
    for (int t = 0; t < 40; t++) begin
      row = $urandom();
      for (int v = 0; v < 256; v++) begin
        in = 8'(v);
        lut4 = 1'b0;
        #1;
        exp = {1'b0, (row >> in[4:0]) & 32'd1 ? 1'b1 : 1'b0};
        checks++;
        if (out !== exp) begin
          failures++;
          if (failures < 5) $display("5-LUT mismatch row=%h in=%h out=%b", row, in, out);
        end
        lut4 = 1'b1;
        #1;
        exp[0] = row[in[3:0]];
        exp[1] = row[16 + in[7:4]];
        checks++;
        if (out !== exp) begin
          failures++;
          if (failures < 5) $display("4-LUT mismatch row=%h in=%h out=%b", row, in, out);
        end
      end
    end
    // a known function: 5-input XOR (parity) truth table
    row = 32'h9669_6996;
    lut4 = 1'b0;
    for (int v = 0; v < 32; v++) begin
      in = 8'(v);
      #1;
      checks++;
      if (out[0] !== ^in[4:0]) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
