// fsm_cache_tb: self-checking test of the two-way FSM cache against the
// combinational memory model.
//
// A reference model in the testbench keeps its own copy of memory and its
// own two-way LRU tag store, and predicts for every request the returned
// data, hit or miss, and the latency: 2 cycles for a read hit or any write,
// 4 for a read miss, plus any cycles the response is held up by
// cacheresp_rdy. It also predicts the number of memory line reads and word
// writes. A directed sequence exercises hit, miss, LRU eviction and
// write hit / write miss (no allocate); a random sequence with random
// response back-pressure follows.
module fsm_cache_tb;
  import cache_pkg::*;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic              cachereq_val, cachereq_rdy;
  cache_req_t        cachereq;
  logic              cacheresp_val, cacheresp_rdy;
  cache_resp_t       cacheresp;
  logic              memreq_val;
  mem_req_t          memreq;
  logic [LINE_W-1:0] memresp_data;
  logic              hit_event, miss_event;

  fsm_cache dut (.*);
  magic_mem mem (.clk, .rst, .memreq_val, .memreq, .memresp_data);

  int checks = 0, failures = 0;
  int cycle = 0;
  always @(posedge clk) cycle++;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- reference model ----------------
  logic [31:0] shadow [4096];
  logic [26:0] rtag   [2][2];
  logic        rvalid [2][2];
  logic        rlast  [2];
  int exp_reads = 0, exp_writes = 0, n_hits = 0, n_misses = 0;

  function automatic logic [31:0] init_word(input logic [29:0] w);
    return (32'(w) * 32'h9E37_79B1) ^ 32'h5A5A_0000;
  endfunction

  // returns 1 on hit, updates tag state like an LRU write-through cache
  function automatic bit ref_access(input req_type_e t, input logic [31:0] a,
                                    input logic [31:0] d);
    int s = int'(a[4]);
    logic [26:0] tg = a[31:5];
    int way = -1;
    for (int w = 0; w < 2; w++) if (rvalid[s][w] && rtag[s][w] == tg) way = w;
    if (t == REQ_WRITE) begin
      shadow[a[13:2]] = d;
      exp_writes++;
      if (way >= 0) rlast[s] = 1'(way);
      return way >= 0;
    end
    if (way < 0) begin
      way = !rvalid[s][0] ? 0 : !rvalid[s][1] ? 1 : int'(!rlast[s]);
      rvalid[s][way] = 1;
      rtag[s][way]   = tg;
      exp_reads++;
      rlast[s] = 1'(way);
      return 0;
    end
    rlast[s] = 1'(way);
    return 1;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0d: %s", cycle, what);
    end
  endtask

  int resp_rdy_pct = 100;

  // One request, waits for its response, checks data, hit/miss and latency.
  task automatic access(input req_type_e t, input logic [31:0] a, input logic [31:0] d);
    int t_acc, t_resp, stalls, nmiss_evt, nhit_evt;
    bit exp_hit;
    logic [31:0] exp_data;
    exp_data = shadow[a[13:2]];
    exp_hit  = ref_access(t, a, d);
    if (exp_hit) n_hits++; else n_misses++;
    @(negedge clk);
    cachereq_val = 1;
    cachereq     = '{rtype: t, addr: a, data: d};
    while (!cachereq_rdy) @(negedge clk);
    @(posedge clk);
    t_acc = cycle;
    stalls = 0; nmiss_evt = 0; nhit_evt = 0;
    forever begin
      @(negedge clk);
      cachereq_val  = 0;
      cacheresp_rdy = ($urandom_range(99) < resp_rdy_pct);
      if (hit_event)  nhit_evt++;
      if (miss_event) nmiss_evt++;
      if (cacheresp_val && !cacheresp_rdy) stalls++;
      if (cacheresp_val && cacheresp_rdy) break;
    end
    @(posedge clk);
    t_resp = cycle;
    check(cacheresp.rtype == t, $sformatf("resp type for %h", a));
    if (t == REQ_READ)
      check(cacheresp.data == exp_data,
            $sformatf("read %h got %h exp %h", a, cacheresp.data, exp_data));
    check(nhit_evt + nmiss_evt == 1 && (nhit_evt == 1) == exp_hit,
          $sformatf("hit/miss for %h exp_hit=%0d", a, exp_hit));
    check(t_resp - t_acc == ((t == REQ_READ && !exp_hit) ? 4 : 2) + stalls,
          $sformatf("latency for %h: %0d (stalls %0d, exp_hit %0d)", a,
                    t_resp - t_acc, stalls, exp_hit));
  endtask

  initial begin
    for (int i = 0; i < 4096; i++) shadow[i] = init_word(30'(i));
    for (int s = 0; s < 2; s++) begin
      rlast[s] = 0;
      for (int w = 0; w < 2; w++) begin rvalid[s][w] = 0; rtag[s][w] = '0; end
    end
    cachereq_val = 0; cachereq = '0; cacheresp_rdy = 1;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;

    // directed: compulsory miss, spatial hit, write hit, write miss, LRU
    access(REQ_READ,  32'h1000, 0);
    access(REQ_READ,  32'h1004, 0);
    access(REQ_WRITE, 32'h1008, 32'hCAFE_0001);
    access(REQ_READ,  32'h1008, 0);
    access(REQ_WRITE, 32'h3000, 32'hBEEF_0002);   // write miss, no allocate
    access(REQ_READ,  32'h2000, 0);               // fills second way of set 0
    access(REQ_READ,  32'h1000, 0);               // hit, 0x2000 now LRU
    access(REQ_READ,  32'h3000, 0);               // miss, evicts 0x2000
    access(REQ_READ,  32'h1004, 0);               // still a hit
    access(REQ_READ,  32'h2000, 0);               // miss again
    access(REQ_READ,  32'h1010, 0);               // set 1
    access(REQ_READ,  32'h1014, 0);

    // random traffic over a few conflicting lines, with back-pressure
    resp_rdy_pct = 70;
    for (int i = 0; i < 400; i++) begin
      logic [31:0] a;
      a = {18'h0, 2'($urandom_range(3)), 6'h0, 2'($urandom_range(3)), 2'($urandom_range(3)), 2'b00} | 32'h1000;
      if ($urandom_range(2) == 0) access(REQ_WRITE, a, $urandom);
      else                        access(REQ_READ,  a, 0);
    end

    @(negedge clk);
    check(mem.num_reads == exp_reads,
          $sformatf("memory line reads %0d exp %0d", mem.num_reads, exp_reads));
    check(mem.num_writes == exp_writes,
          $sformatf("memory word writes %0d exp %0d", mem.num_writes, exp_writes));
    check(n_hits > 0 && n_misses > 0, "both hits and misses seen");
    $display("hits=%0d misses=%0d", n_hits, n_misses);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
