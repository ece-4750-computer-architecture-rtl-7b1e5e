// write_buffer_tb: self-checking test of write_buffer between a request source that
// behaves like a cache's memory port and the combinational memory model.
// Random line reads and word writes
// from the cache side, with idle cycles, over a few lines. Every read must
// return the newest data (the checker's own memory copy), including words
// still waiting in the buffer. The test also checks that reads take the
// memory port ahead of a buffered write, that bypassing happened, and that
// after idle cycles the buffer is empty and memory holds every write.
module write_buffer_tb;
  import cache_pkg::*;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic              creq_val, mreq_val;
  mem_req_t          creq, mreq;
  logic [LINE_W-1:0] cresp_data, mresp_data;
  logic              empty, ev1, ev2;

  write_buffer #(.NUM_ENTRIES(4)) dut (.clk, .rst, .creq_val, .creq, .cresp_data,
    .mreq_val, .mreq, .mresp_data, .empty(empty), .bypass_event(ev1));
  magic_mem mem (.clk, .rst, .memreq_val(mreq_val), .memreq(mreq), .memresp_data(mresp_data));

  int checks = 0, failures = 0;
  int n_ev1 = 0, n_ev2 = 0;
  logic [31:0] shadow [4096];

  function automatic logic [31:0] init_word(input logic [29:0] w);
    return (32'(w) * 32'h9E37_79B1) ^ 32'h5A5A_0000;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %0t: %s", $time, what); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (!rst) begin
    if (ev1) n_ev1++;
    if (ev2) n_ev2++;
  end

  task automatic idle(input int n);
    repeat (n) begin
      @(negedge clk);
      creq_val = 0;
    end
  endtask

  task automatic rd(input logic [31:0] a);
    @(negedge clk);
    creq_val = 1;
    creq = '{rtype: REQ_READ, addr: {a[31:4], 4'h0}, data: '0};
    #1;
    for (int w = 0; w < 4; w++)
      check(cresp_data[w*32 +: 32] == shadow[{a[13:4], 2'(w)}],
            $sformatf("line %h word %0d got %h exp %h", a, w, cresp_data[w*32 +: 32],
                      shadow[{a[13:4], 2'(w)}]));
    check(mreq_val ? (mreq.rtype == REQ_READ && mreq.addr == {a[31:4], 4'h0}) : 1'b1,
          "memory port carries the cache read");
  endtask

  task automatic wr(input logic [31:0] a, input logic [31:0] d);
    @(negedge clk);
    creq_val = 1;
    creq = '{rtype: REQ_WRITE, addr: {a[31:2], 2'b00}, data: zext(d)};
    shadow[a[13:2]] = d;
  endtask

  initial begin
    int h0, n;
    for (int i = 0; i < 4096; i++) shadow[i] = init_word(30'(i));
    creq_val = 0; creq = '0; ev2 = 0; empty = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 0;
    // a burst of writes longer than the buffer, then reads of the same lines
    for (int i = 0; i < 6; i++) wr(32'h1000 + 32'(4 * i), 32'hAB00_0000 + 32'(i));
    // each write cycle leaves the port free, so older writes have drained:
    // only the last word is still buffered when the reads arrive
    rd(32'h1010);
    rd(32'h1000);
    check(!empty, "the newest write still waits behind the reads");
    idle(1);
    check(n_ev1 == 1, $sformatf("one read bypassed from the buffer (%0d)", n_ev1));
    // random traffic
    for (int i = 0; i < 2000; i++) begin
      logic [31:0] a;
      a = 32'h1000 | {18'h0, 2'($urandom_range(3)), 6'h0, 2'($urandom_range(3)),
                      2'($urandom_range(3)), 2'b00};
      n = $urandom_range(9);
      if (n < 4)      wr(a, $urandom);
      else if (n < 8) rd(a);
      else            idle(1);
    end
    idle(8);
    check(empty, "buffer drains when idle");
    for (int i = 0; i < 4096; i++)
      if (mem.words[i] != shadow[i]) check(0, $sformatf("memory word %0d not written", i));
    check(1, "memory holds every write");
    $display("bypasses=%0d", n_ev1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
