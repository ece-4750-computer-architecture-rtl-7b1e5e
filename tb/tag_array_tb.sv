// tag_array_tb: writes random tags to random entries of a 4-entry, 26-bit
// tag array and checks every combinational read against a reference copy,
// including that a read in the cycle of a write still sees the old value.
module tag_array_tb;
  logic clk = 0;
  always #5 clk = ~clk;

  logic [1:0]  idx;
  logic        wen;
  logic [25:0] wdata, rdata;
  logic [25:0] ref_mem [4];
  bit          ref_ok  [4];
  int checks = 0, failures = 0;

  tag_array #(.NUM_ENTRIES(4), .TAG_W(26)) dut (.*);

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4; i++) ref_ok[i] = 0;
    wen = 0; idx = 0; wdata = 0;
    for (int i = 0; i < 4; i++) begin
      @(negedge clk);
      idx = 2'(i); wen = 1; wdata = 26'($urandom);
      @(posedge clk);
      ref_mem[i] = wdata; ref_ok[i] = 1;
    end
    for (int n = 0; n < 500; n++) begin
      @(negedge clk);
      idx = 2'($urandom_range(3));
      wen = ($urandom_range(3) == 0);
      wdata = 26'($urandom);
      #1;
      checks++;
      if (rdata !== ref_mem[idx]) begin
        failures++;
        $display("FAIL idx=%0d got %h exp %h", idx, rdata, ref_mem[idx]);
      end
      @(posedge clk);
      if (wen) ref_mem[idx] = wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
