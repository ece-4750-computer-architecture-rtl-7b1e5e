// cache_top_tb: end-to-end test of cache_top at its default parameters.
// Each of the five caches gets its own combinational memory model and its
// own stream driver, and all five run the same workloads:
//   copy      64 elements: rd 0x1000+4i, wr 0x2000+4i
//   incr      64 elements: rd 0x1000+4i, wr 0x1000+4i
//   raw       4 pairs of wr/rd to one word (read-after-write hazards)
//   lru       FSM cache only: a conflict pattern in one set
//   random    300 random requests with response back-pressure
// Every response is checked against the driver's memory copy. The total
// cycles of copy and incr are checked against the latencies of each design
// (FSM: 2 per hit or write, 4 per read miss; pipelined: one request per
// cycle plus 3 cycles per read miss plus the pipeline depth, plus one per
// structural stall for the single-ported array). The test also
// counts how often each mechanism happened (refill, write-through, LRU
// eviction keeping the recently used line, RAW stall, RAW bypass, structural
// stall, response
// back-pressure, prefetch-buffer hit, write-buffer bypass) and fails any
// that never happened. The write buffer, brought out on its own ports, gets
// random word writes and line reads, with reads right after writes.
module cache_top_tb;
  import cache_pkg::*;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic              fsm_cachereq_val, fsm_cachereq_rdy, fsm_cacheresp_val, fsm_cacheresp_rdy;
  cache_req_t        fsm_cachereq;
  cache_resp_t       fsm_cacheresp;
  logic              fsm_memreq_val;
  mem_req_t          fsm_memreq;
  logic [LINE_W-1:0] fsm_memresp_data;
  logic              fsm_hit_event, fsm_miss_event;
  logic              fsm_pf_hit_event, fsm_pf_prefetch_event;
  logic              wb_creq_val, wb_mreq_val, wb_empty, wb_bypass_event;
  mem_req_t          wb_creq, wb_mreq;
  logic [LINE_W-1:0] wb_cresp_data, wb_mresp_data;

  logic              pipe_cachereq_val [4], pipe_cachereq_rdy [4];
  cache_req_t        pipe_cachereq [4];
  logic              pipe_cacheresp_val [4], pipe_cacheresp_rdy [4];
  cache_resp_t       pipe_cacheresp [4];
  logic              pipe_memreq_val [4];
  mem_req_t          pipe_memreq [4];
  logic [LINE_W-1:0] pipe_memresp_data [4];
  logic              pipe_hit_event [4], pipe_miss_event [4];
  logic              pipe_raw_stall_event [4], pipe_raw_bypass_event [4];
  logic              pipe_struct_stall_event [4];

  cache_top dut (.*);

  int dchecks [5], dfail [5];

  magic_mem m_wb (.clk, .rst, .memreq_val(wb_mreq_val), .memreq(wb_mreq),
                  .memresp_data(wb_mresp_data));
  magic_mem m_fsm (.clk, .rst, .memreq_val(fsm_memreq_val), .memreq(fsm_memreq),
                   .memresp_data(fsm_memresp_data));
  stream_driver d_fsm (.clk, .rst,
    .cachereq_val(fsm_cachereq_val), .cachereq_rdy(fsm_cachereq_rdy), .cachereq(fsm_cachereq),
    .cacheresp_val(fsm_cacheresp_val), .cacheresp_rdy(fsm_cacheresp_rdy),
    .cacheresp(fsm_cacheresp), .checks(dchecks[0]), .failures(dfail[0]));

  for (genvar i = 0; i < 4; i++) begin : g
    magic_mem m (.clk, .rst, .memreq_val(pipe_memreq_val[i]), .memreq(pipe_memreq[i]),
                 .memresp_data(pipe_memresp_data[i]));
    stream_driver d (.clk, .rst,
      .cachereq_val(pipe_cachereq_val[i]), .cachereq_rdy(pipe_cachereq_rdy[i]),
      .cachereq(pipe_cachereq[i]), .cacheresp_val(pipe_cacheresp_val[i]),
      .cacheresp_rdy(pipe_cacheresp_rdy[i]), .cacheresp(pipe_cacheresp[i]),
      .checks(dchecks[i+1]), .failures(dfail[i+1]));
  end

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // event counters
  int fsm_hits = 0, fsm_misses = 0, pf_hits = 0, pf_issued = 0, wb_bypasses = 0;
  int raw_stalls [4], raw_bypasses [4], pmisses [4], struct_stalls [4];
  initial for (int i = 0; i < 4; i++) begin
    raw_stalls[i] = 0; raw_bypasses[i] = 0; pmisses[i] = 0; struct_stalls[i] = 0;
  end
  always @(posedge clk) if (!rst) begin
    if (fsm_hit_event)  fsm_hits++;
    if (fsm_miss_event) fsm_misses++;
    if (fsm_pf_hit_event)      pf_hits++;
    if (fsm_pf_prefetch_event) pf_issued++;
    if (wb_bypass_event)       wb_bypasses++;
    for (int i = 0; i < 4; i++) begin
      if (pipe_struct_stall_event[i]) struct_stalls[i]++;
      if (pipe_raw_stall_event[i])  raw_stalls[i]++;
      if (pipe_raw_bypass_event[i]) raw_bypasses[i]++;
      if (pipe_miss_event[i])       pmisses[i]++;
    end
  end

  initial begin
    repeat (20000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  localparam int N = 64;
  // pipeline fill: responses come HIT_LAT cycles after acceptance
  localparam int HIT_LAT [4] = '{2, 1, 1, 1};
  // incr on the single-ported array: every read hit follows a write hit
  // (N reads less N/4 line misses)
  localparam int INCR_STRUCT [4] = '{0, 0, 0, N - N / 4};

  initial begin
    int cyc [5];
    int s0;
    int h0, m0;
    wb_creq_val = 0; wb_creq = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;

    // copy
    fork
      d_fsm.run_copy(N);
      g[0].d.run_copy(N);
      g[1].d.run_copy(N);
      g[2].d.run_copy(N);
      g[3].d.run_copy(N);
    join
    cyc[0] = d_fsm.batch_cycles(); cyc[1] = g[0].d.batch_cycles();
    cyc[2] = g[1].d.batch_cycles(); cyc[3] = g[2].d.batch_cycles();
    cyc[4] = g[3].d.batch_cycles();
    $display("copy %0d accesses: fsm %0d cycles, pipe 2-cycle %0d, parallel-read/stall %0d, parallel-read/bypass %0d, single-port %0d",
             2 * N, cyc[0], cyc[1], cyc[2], cyc[3], cyc[4]);
    // FSM: N/4 read misses at 4, 3N/4 read hits at 2, N writes at 2
    check(cyc[0] == (N / 4) * 4 + (3 * N / 4) * 2 + N * 2, "fsm copy cycles");
    for (int i = 0; i < 4; i++)
      check(cyc[i+1] == 2 * N - 1 + HIT_LAT[i] + 3 * (N / 4), $sformatf("pipe %0d copy cycles", i));
    check(struct_stalls[3] == 0, "copy has no structural stall");

    // incr
    fork
      d_fsm.run_incr(N);
      g[0].d.run_incr(N);
      g[1].d.run_incr(N);
      g[2].d.run_incr(N);
      g[3].d.run_incr(N);
    join
    cyc[0] = d_fsm.batch_cycles(); cyc[1] = g[0].d.batch_cycles();
    cyc[2] = g[1].d.batch_cycles(); cyc[3] = g[2].d.batch_cycles();
    cyc[4] = g[3].d.batch_cycles();
    $display("incr %0d accesses: fsm %0d cycles, pipe 2-cycle %0d, parallel-read/stall %0d, parallel-read/bypass %0d, single-port %0d",
             2 * N, cyc[0], cyc[1], cyc[2], cyc[3], cyc[4]);
    check(cyc[0] == (N / 4) * 4 + (3 * N / 4) * 2 + N * 2, "fsm incr cycles");
    for (int i = 0; i < 4; i++)
      check(cyc[i+1] == 2 * N - 1 + HIT_LAT[i] + 3 * (N / 4) + INCR_STRUCT[i],
            $sformatf("pipe %0d incr cycles", i));
    check(struct_stalls[3] == INCR_STRUCT[3], $sformatf("incr structural stalls %0d", struct_stalls[3]));
    s0 = struct_stalls[3];

    // read-after-write pairs
    fork
      d_fsm.run_raw(4);
      g[0].d.run_raw(4);
      g[1].d.run_raw(4);
      g[2].d.run_raw(4);
      g[3].d.run_raw(4);
    join
    check(raw_stalls[1] == 3 && raw_bypasses[1] == 0, $sformatf("RAW stalls %0d", raw_stalls[1]));
    check(raw_bypasses[2] == 3 && raw_stalls[2] == 0, $sformatf("RAW bypasses %0d", raw_bypasses[2]));
    check(raw_stalls[0] == 0 && raw_bypasses[0] == 0, "two-cycle design has no RAW hazard");
    // the first write misses (no-write-allocate), the next three hit
    check(struct_stalls[3] - s0 == 3 && raw_stalls[3] == 0 && raw_bypasses[3] == 0,
          $sformatf("single-port RAW stalls %0d", struct_stalls[3] - s0));
    check(struct_stalls[0] == 0 && struct_stalls[1] == 0 && struct_stalls[2] == 0,
          "dual-ported designs have no structural stall");

    // LRU in set 1 of the FSM cache (set 1 holds 0x10D0 and 0x10F0, 0x10F0 last)
    h0 = fsm_hits; m0 = fsm_misses;
    d_fsm.send(REQ_READ, 32'h2010, 0);   // miss, evicts 0x10D0
    d_fsm.send(REQ_READ, 32'h3010, 0);   // miss, evicts 0x10F0
    d_fsm.send(REQ_READ, 32'h2010, 0);   // hit
    d_fsm.send(REQ_READ, 32'h1010, 0);   // miss, evicts 0x3010 (least recently used)
    d_fsm.send(REQ_READ, 32'h2010, 0);   // hit only with LRU
    d_fsm.send(REQ_READ, 32'h3010, 0);   // miss
    d_fsm.wait_idle();
    check(fsm_hits - h0 == 2 && fsm_misses - m0 == 4,
          $sformatf("LRU pattern: %0d hits %0d misses", fsm_hits - h0, fsm_misses - m0));
    void'(d_fsm.batch_cycles());

    // write buffer: random word writes and line reads, reads right after writes
    begin
      logic [31:0] wshadow [4096];
      for (int i = 0; i < 4096; i++) wshadow[i] = d_fsm.init_word(30'(i));
      for (int i = 0; i < 400; i++) begin
        logic [31:0] a, d;
        int n;
        a = 32'h1000 | {18'h0, 2'($urandom_range(3)), 6'h0, 2'($urandom_range(3)),
                        2'($urandom_range(3)), 2'b00};
        n = $urandom_range(9);
        @(negedge clk);
        wb_creq_val = (n < 8);
        if (n < 4) begin
          d = $urandom;
          wb_creq = '{rtype: REQ_WRITE, addr: a, data: zext(d)};
          wshadow[a[13:2]] = d;
        end else begin
          wb_creq = '{rtype: REQ_READ, addr: {a[31:4], 4'h0}, data: '0};
          #1;
          if (n < 8)
            for (int w = 0; w < 4; w++)
              check(wb_cresp_data[w*32 +: 32] == wshadow[{a[13:4], 2'(w)}],
                    $sformatf("write buffer read %h word %0d", a, w));
        end
      end
      @(negedge clk) wb_creq_val = 0;
      repeat (2) @(negedge clk);
    end

    // random traffic with back-pressure
    d_fsm.rdy_pct = 60; g[0].d.rdy_pct = 60; g[1].d.rdy_pct = 60; g[2].d.rdy_pct = 60;
    g[3].d.rdy_pct = 60;
    fork
      d_fsm.run_random(300);
      g[0].d.run_random(300);
      g[1].d.run_random(300);
      g[2].d.run_random(300);
      g[3].d.run_random(300);
    join
    @(negedge clk);

    // mechanisms
    $display("refills: fsm %0d, pipe %0d %0d %0d %0d", m_fsm.num_reads,
             g[0].m.num_reads, g[1].m.num_reads, g[2].m.num_reads, g[3].m.num_reads);
    $display("write-through words: fsm %0d, pipe %0d %0d %0d %0d", m_fsm.num_writes,
             g[0].m.num_writes, g[1].m.num_writes, g[2].m.num_writes, g[3].m.num_writes);
    $display("raw stalls %0d, raw bypasses %0d, structural stalls %0d, back-pressure cycles %0d %0d %0d %0d %0d",
             raw_stalls[1], raw_bypasses[2], struct_stalls[3], d_fsm.backpressure,
             g[0].d.backpressure, g[1].d.backpressure, g[2].d.backpressure, g[3].d.backpressure);
    check(m_fsm.num_reads > 0 && g[0].m.num_reads > 0 && g[1].m.num_reads > 0 &&
          g[2].m.num_reads > 0 && g[3].m.num_reads > 0, "refill happened");
    check(m_fsm.num_writes > 0 && g[0].m.num_writes > 0 && g[1].m.num_writes > 0 &&
          g[2].m.num_writes > 0 && g[3].m.num_writes > 0, "write-through happened");
    $display("fsm prefetch buffer: %0d prefetches, %0d refills served; write buffer bypasses %0d",
             pf_issued, pf_hits, wb_bypasses);
    check(pf_issued > 0 && pf_hits > 0, "prefetch buffer served refills");
    check(wb_bypasses > 0, "write buffer bypass happened");
    check(wb_empty, "write buffer drained");
    check(pmisses[0] >= g[0].m.num_reads && pmisses[1] >= g[1].m.num_reads &&
          pmisses[2] >= g[2].m.num_reads && pmisses[3] >= g[3].m.num_reads,
          "pipe miss events cover refills");
    check(raw_stalls[1] > 0, "RAW stall happened");
    check(raw_bypasses[2] > 0, "RAW bypass happened");
    check(struct_stalls[3] > 0, "structural stall happened");
    check(d_fsm.backpressure > 0 && g[0].d.backpressure > 0 && g[1].d.backpressure > 0 &&
          g[2].d.backpressure > 0 && g[3].d.backpressure > 0, "response back-pressure happened");
    for (int i = 0; i < 5; i++) begin
      checks += dchecks[i];
      failures += dfail[i];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
