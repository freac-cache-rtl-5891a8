// tb_xcfg_store: fills entries 32 bits at a time and reads whole crossbar
// words back, one cycle after the read is issued.
module tb_xcfg_store;
  import freac_pkg::*;
  localparam int DEPTH = 1024;
  logic clk = 0;
  logic wr_en, rd_en;
  logic [9:0] wr_addr, rd_addr;
  logic [3:0] wr_word;
  logic [31:0] wr_data;
  xcfg_t rd_data;
  logic [XCFG_WORDS*32-1:0] model [64];
  int checks = 0, failures = 0;

  xcfg_store #(.DEPTH(DEPTH)) dut (.clk, .wr_en, .wr_addr, .wr_word, .wr_data,
                                    .rd_en, .rd_addr, .rd_data);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wr_en = 0; rd_en = 0; wr_addr = 0; rd_addr = 0; wr_word = 0; wr_data = 0;
    for (int e = 0; e < 64; e++) begin
      for (int w = 0; w < XCFG_WORDS; w++) begin
        @(negedge clk);
        wr_en = 1; wr_addr = 10'(e * 16 + 3); wr_word = 4'(w); wr_data = $urandom();
        model[e][32*w +: 32] = wr_data;
      end
    end
    @(negedge clk);
    wr_en = 0;
    for (int k = 0; k < 500; k++) begin
      int e;
      e = $urandom_range(63);
      rd_en = 1; rd_addr = 10'(e * 16 + 3);
      @(negedge clk);
      rd_en = 0;
      checks++;
      if (rd_data !== model[e][XCFG_W-1:0]) begin
        failures++;
        if (failures < 5) $display("entry %0d mismatch", e);
      end
      // field view: the broadcast word decodes as the struct layout
      checks++;
      if (rd_data.lut4_mode !== model[e][0]) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
