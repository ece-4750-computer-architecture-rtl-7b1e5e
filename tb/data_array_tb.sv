// data_array_tb: random whole-line and single-word writes into a 4-line data
// array through the write port while the read port reads another random
// line; every read is checked against a reference copy (old data during a
// write to the same line, per-word enables honoured).
module data_array_tb;
  logic clk = 0;
  always #5 clk = ~clk;

  logic [1:0]   raddr, waddr;
  logic [127:0] rdata, wdata;
  logic         wen;
  logic [3:0]   word_en;
  logic [127:0] ref_mem [4];
  int checks = 0, failures = 0;

  data_array #(.NUM_LINES(4), .LINE_W(128)) dut (.*);

  function automatic logic [127:0] rand_line();
    return {$urandom, $urandom, $urandom, $urandom};
  endfunction

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wen = 0; raddr = 0; waddr = 0; word_en = 0; wdata = 0;
    for (int i = 0; i < 4; i++) begin
      @(negedge clk);
      waddr = 2'(i); wen = 1; word_en = 4'b1111; wdata = rand_line();
      @(posedge clk);
      ref_mem[i] = wdata;
    end
    for (int n = 0; n < 800; n++) begin
      @(negedge clk);
      raddr   = 2'($urandom_range(3));
      waddr   = 2'($urandom_range(3));
      wen     = ($urandom_range(1) == 0);
      word_en = ($urandom_range(3) == 0) ? 4'b1111 : 4'b0001 << $urandom_range(3);
      wdata   = rand_line();
      #1;
      checks++;
      if (rdata !== ref_mem[raddr]) begin
        failures++;
        $display("FAIL raddr=%0d got %h exp %h", raddr, rdata, ref_mem[raddr]);
      end
      @(posedge clk);
      if (wen)
        for (int w = 0; w < 4; w++)
          if (word_en[w]) ref_mem[waddr][w*32 +: 32] = wdata[w*32 +: 32];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
