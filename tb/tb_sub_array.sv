// tb_sub_array: writes random words into a full-size 8 KB sub-array, reads
// them back, and checks the one-cycle read latency and that the read
// register holds its value while no read is issued (memory latch).
module tb_sub_array;
  localparam int ROWS = 2048;
  logic        clk = 0;
  logic        en, we;
  logic [10:0] addr;
  logic [31:0] wdata, rdata;
  logic [31:0] model [ROWS];
  int checks = 0, failures = 0;

  sub_array #(.ROWS(ROWS), .WIDTH(32)) dut (.clk, .en, .we, .addr, .wdata, .rdata);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    en = 0; we = 0; addr = 0; wdata = 0;
    for (int i = 0; i < ROWS; i++) begin
      @(negedge clk);
      en = 1; we = 1; addr = 11'(i); wdata = $urandom(); model[i] = wdata;
    end
    @(negedge clk);
    en = 0; we = 0;
    for (int k = 0; k < 3000; k++) begin
      int a;
      a = $urandom_range(ROWS - 1);
      @(negedge clk);
      en = 1; we = 0; addr = 11'(a);
      @(negedge clk);                  // one cycle later the word is there
      en = 0;
      checks++;
      if (rdata !== model[a]) begin
        failures++;
        if (failures < 5) $display("read %0d got %h exp %h", a, rdata, model[a]);
      end
      // hold: an idle cycle and a write must not disturb the latch
      if (k % 7 == 0) begin
        int b;
        b = $urandom_range(ROWS - 1);
        en = 1; we = 1; addr = 11'(b); wdata = $urandom(); model[b] = wdata;
        @(negedge clk);
        en = 0; we = 0;
        @(negedge clk);
        checks++;
        if (rdata !== model[a] && a != b) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
