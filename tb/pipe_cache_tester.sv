// pipe_cache_tester: drives one pipe_cache configuration against the
// combinational memory model and checks it; pipe_cache_tb runs one tester
// per configuration.
//
// A reference model (its own memory copy and direct-mapped tag store) gives
// the expected read data and hit/miss of each request in program order. The
// test has four phases:
//   1. isolated requests with no back-pressure: exact latency of read hit,
//      read miss and write (1/4/1 cycles with parallel read, 2/5/2 without);
//   2. a stream of read hits: one request per cycle;
//   3. (parallel read only) write then read of the same word back to back:
//      one stall cycle, or none with bypassing, and the read sees the new data;
//      then write and read of different words of one line: no stall with
//      duplicated ports, one structural stall with a single port;
//   4. random traffic with random request gaps and response back-pressure.
// Memory line reads and word writes are counted against the model too.
module pipe_cache_tester
  import cache_pkg::*;
#(
  parameter bit PR  = 1'b1,
  parameter bit BYP = 1'b0,
  parameter bit DUP = 1'b1
) (
  output logic done,
  output int   checks,
  output int   failures,
  output int   n_raw_stall,
  output int   n_raw_bypass,
  output int   n_miss,
  output int   n_struct
);

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic              cachereq_val, cachereq_rdy;
  cache_req_t        cachereq;
  logic              cacheresp_val, cacheresp_rdy;
  cache_resp_t       cacheresp;
  logic              memreq_val;
  mem_req_t          memreq;
  logic [LINE_W-1:0] memresp_data;
  logic              hit_event, miss_event, raw_stall_event, raw_bypass_event;
  logic              struct_stall_event;

  pipe_cache #(.PARALLEL_READ(PR), .RAW_BYPASS(BYP), .DUAL_PORT(DUP)) dut (.*);
  magic_mem mem (.clk, .rst, .memreq_val, .memreq, .memresp_data);

  localparam int HIT_LAT  = PR ? 1 : 2;
  localparam int MISS_LAT = PR ? 4 : 5;

  int cycle = 0;
  always @(posedge clk) cycle++;

  initial begin
    done = 0; checks = 0; failures = 0;
    n_raw_stall = 0; n_raw_bypass = 0; n_miss = 0; n_struct = 0;
  end

  always @(posedge clk) begin
    if (!rst) begin
      if (raw_stall_event)  n_raw_stall++;
      if (raw_bypass_event) n_raw_bypass++;
      if (miss_event)       n_miss++;
      if (struct_stall_event) n_struct++;
    end
  end

  // ---------------- reference model ----------------
  logic [31:0] shadow [4096];
  logic [25:0] rtag   [4];
  logic        rvalid [4];
  int exp_reads = 0, exp_writes = 0;

  function automatic logic [31:0] init_word(input logic [29:0] w);
    return (32'(w) * 32'h9E37_79B1) ^ 32'h5A5A_0000;
  endfunction

  typedef struct {
    req_type_e   t;
    logic [31:0] data;
    int          lat;        // expected latency, -1 = do not check
    int          acc;        // cycle of acceptance
  } exp_t;
  exp_t exp_q[$];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL [PR=%0d BYP=%0d] @%0d: %s", PR, BYP, cycle, what);
    end
  endtask

  int  gap_pct = 0;
  int  rdy_pct = 100;
  bit  check_lat = 1;
  int  outstanding = 0;
  int  last_resp = 0;

  // Sends one request (returns once it is accepted) and queues its expectation.
  task automatic send(input req_type_e t, input logic [31:0] a, input logic [31:0] d);
    exp_t e;
    int idx = int'(a[5:4]);
    bit hit = rvalid[idx] && rtag[idx] == a[31:6];
    e.t = t; e.data = shadow[a[13:2]];
    e.lat = !check_lat ? -1 : (t == REQ_READ && !hit) ? MISS_LAT : HIT_LAT;
    if (t == REQ_WRITE) begin
      shadow[a[13:2]] = d;
      exp_writes++;
    end else if (!hit) begin
      rvalid[idx] = 1; rtag[idx] = a[31:6];
      exp_reads++;
    end
    while ($urandom_range(99) < gap_pct) @(negedge clk);
    cachereq_val = 1;
    cachereq = '{rtype: t, addr: a, data: d};
    forever begin
      #2;
      if (cachereq_rdy) break;
      @(negedge clk);
    end
    e.acc = cycle + 1;
    exp_q.push_back(e);
    outstanding++;
    @(negedge clk);
    cachereq_val = 0;
  endtask

  task automatic drain();
    while (outstanding > 0) @(negedge clk);
  endtask

  // Response monitor: sampled mid-cycle, after the negedge drive settles.
  initial begin
    forever begin
      @(negedge clk);
      cacheresp_rdy = ($urandom_range(99) < rdy_pct);
      #2;
      if (!rst && cacheresp_val && cacheresp_rdy) begin
        if (exp_q.size() == 0) begin
          check(0, "response with nothing outstanding");
        end else begin
          exp_t e;
          e = exp_q.pop_front();
          check(cacheresp.rtype == e.t, "response type");
          if (e.t == REQ_READ)
            check(cacheresp.data == e.data,
                  $sformatf("read data %h exp %h", cacheresp.data, e.data));
          if (e.lat >= 0)
            check(cycle + 1 - e.acc == e.lat,
                  $sformatf("latency %0d exp %0d", cycle + 1 - e.acc, e.lat));
          last_resp = cycle + 1;
          outstanding--;
        end
      end
    end
  end

  initial begin
    int t_start;
    for (int i = 0; i < 4096; i++) shadow[i] = init_word(30'(i));
    for (int i = 0; i < 4; i++) begin rvalid[i] = 0; rtag[i] = '0; end
    cachereq_val = 0; cachereq = '0; cacheresp_rdy = 1;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;

    // 1. isolated requests, exact latency
    send(REQ_READ,  32'h1000, 0);            drain();   // miss
    send(REQ_READ,  32'h1004, 0);            drain();   // hit
    send(REQ_WRITE, 32'h1008, 32'h1111_2222); drain(); // write hit
    send(REQ_READ,  32'h1008, 0);            drain();
    send(REQ_WRITE, 32'h2000, 32'h3333_4444); drain(); // write miss
    send(REQ_READ,  32'h2000, 0);            drain();   // miss, evicts 0x1000
    send(REQ_READ,  32'h1000, 0);            drain();   // miss again

    // 2. stream of hits: 12 hits back to back, one per cycle
    t_start = cycle + 1;
    for (int i = 0; i < 12; i++) send(REQ_READ, 32'h1000 + 32'(4 * (i % 4)), 0);
    drain();
    check(last_resp - t_start == 12 - 1 + HIT_LAT,
          $sformatf("hit stream took %0d cycles", last_resp - t_start));

    // 3. write then read of the same word, back to back
    if (PR) begin
      check_lat = 0;
      t_start = cycle + 1;
      for (int i = 0; i < 4; i++) begin
        send(REQ_WRITE, 32'h100C, 32'hA000_0000 + 32'(i));
        send(REQ_READ,  32'h100C, 0);
      end
      drain();
      check(last_resp - t_start == 8 - 1 + HIT_LAT + ((BYP && DUP) ? 0 : 4),
            $sformatf("write/read pairs took %0d cycles", last_resp - t_start));
      if (DUP)
        check(BYP ? (n_raw_bypass == 4 && n_raw_stall == 0)
                  : (n_raw_stall == 4 && n_raw_bypass == 0),
              $sformatf("RAW events stall=%0d bypass=%0d", n_raw_stall, n_raw_bypass));
      else
        check(n_struct == 4 && n_raw_stall == 0 && n_raw_bypass == 0,
              $sformatf("structural stalls %0d", n_struct));
      // write then read of another word of the same line: a hazard only for
      // a single-ported array
      t_start = cycle + 1;
      for (int i = 0; i < 4; i++) begin
        send(REQ_WRITE, 32'h1000, 32'hB000_0000 + 32'(i));
        send(REQ_READ,  32'h1004, 0);
      end
      drain();
      check(last_resp - t_start == 8 - 1 + HIT_LAT + (DUP ? 0 : 4),
            $sformatf("write/read-other-word pairs took %0d cycles", last_resp - t_start));
      check(n_struct == (DUP ? 0 : 8), $sformatf("structural stalls %0d", n_struct));
    end

    // 4. random traffic with gaps and back-pressure
    check_lat = 0; gap_pct = 30; rdy_pct = 70;
    for (int i = 0; i < 600; i++) begin
      logic [31:0] a;
      a = 32'h1000 | {18'h0, 2'($urandom_range(3)), 6'h0, 2'($urandom_range(3)),
                      2'($urandom_range(3)), 2'b00};
      if ($urandom_range(2) == 0) send(REQ_WRITE, a, $urandom);
      else                        send(REQ_READ,  a, 0);
    end
    drain();
    @(negedge clk);
    check(mem.num_reads == exp_reads,
          $sformatf("memory line reads %0d exp %0d", mem.num_reads, exp_reads));
    check(mem.num_writes == exp_writes,
          $sformatf("memory word writes %0d exp %0d", mem.num_writes, exp_writes));
    done = 1;
  end
endmodule
