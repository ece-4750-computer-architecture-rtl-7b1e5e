// stream_driver: test helper that feeds one cache a stream of requests,
// issuing a new request whenever the cache is ready, and checks every
// response in order against its own copy of memory. The memory copy starts
// from the same init_word formula as magic_mem. Requests are added with
// send(); wait_idle() returns once every response has arrived. The cycles
// between the first acceptance and the last response of a batch are
// reported by batch_cycles() for throughput checks.
module stream_driver
  import cache_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  output logic        cachereq_val,
  input  logic        cachereq_rdy,
  output cache_req_t  cachereq,
  input  logic        cacheresp_val,
  output logic        cacheresp_rdy,
  input  cache_resp_t cacheresp,
  output int          checks,
  output int          failures
);

  logic [31:0] shadow [4096];
  typedef struct { req_type_e t; logic [31:0] data; } exp_t;
  exp_t exp_q[$];
  int cycle = 0, outstanding = 0, first_acc = -1, last_resp = 0;

  function automatic logic [31:0] init_word(input logic [29:0] w);
    return (32'(w) * 32'h9E37_79B1) ^ 32'h5A5A_0000;
  endfunction

  initial begin
    checks = 0; failures = 0;
    cachereq_val = 0; cachereq = '0; cacheresp_rdy = 1;
    for (int i = 0; i < 4096; i++) shadow[i] = init_word(30'(i));
  end

  always @(posedge clk) cycle++;

  task automatic send(input req_type_e t, input logic [31:0] a, input logic [31:0] d);
    exp_t e;
    e.t = t; e.data = shadow[a[13:2]];
    if (t == REQ_WRITE) shadow[a[13:2]] = d;
    if (!cachereq_val) @(negedge clk);
    cachereq_val = 1;
    cachereq = '{rtype: t, addr: a, data: d};
    forever begin
      #2;
      if (cachereq_rdy) break;
      @(negedge clk);
    end
    if (first_acc < 0) first_acc = cycle + 1;
    exp_q.push_back(e);
    outstanding++;
    @(negedge clk);
  endtask

  task automatic wait_idle();
    cachereq_val = 0;
    while (outstanding > 0) @(negedge clk);
  endtask

  function automatic int batch_cycles();
    int n = last_resp - first_acc;
    first_acc = -1;
    return n;
  endfunction

  // Workloads (addresses from 0x1000; 4-byte elements).
  // copy: rd src[i], wr dst[i]; incr: rd a[i], wr a[i]; raw: wr x, rd x.
  task automatic run_copy(input int n);
    for (int i = 0; i < n; i++) begin
      send(REQ_READ,  32'h1000 + 32'(4 * i), 0);
      send(REQ_WRITE, 32'h2000 + 32'(4 * i), shadow[(32'h1000 + 32'(4 * i)) >> 2]);
    end
    wait_idle();
  endtask

  task automatic run_incr(input int n);
    for (int i = 0; i < n; i++) begin
      send(REQ_READ,  32'h1000 + 32'(4 * i), 0);
      send(REQ_WRITE, 32'h1000 + 32'(4 * i), shadow[(32'h1000 + 32'(4 * i)) >> 2] + 1);
    end
    wait_idle();
  endtask

  task automatic run_raw(input int n);
    for (int i = 0; i < n; i++) begin
      send(REQ_WRITE, 32'h100C, 32'hC0DE_0000 + 32'(i));
      send(REQ_READ,  32'h100C, 0);
    end
    wait_idle();
  endtask

  task automatic run_random(input int n);
    for (int i = 0; i < n; i++) begin
      logic [31:0] a;
      a = 32'h1000 | {18'h0, 2'($urandom_range(3)), 6'h0, 2'($urandom_range(3)),
                      2'($urandom_range(3)), 2'b00};
      if ($urandom_range(2) == 0) send(REQ_WRITE, a, $urandom);
      else                        send(REQ_READ,  a, 0);
    end
    wait_idle();
  endtask

  int rdy_pct = 100;
  int backpressure = 0;   // cycles a response waited for cacheresp_rdy

  initial begin
    forever begin
      @(negedge clk);
      cacheresp_rdy = ($urandom_range(99) < rdy_pct);
      #2;
      if (!rst && cacheresp_val && !cacheresp_rdy) backpressure++;
      if (!rst && cacheresp_val && cacheresp_rdy) begin
        checks++;
        if (exp_q.size() == 0) begin
          failures++;
          $display("FAIL %m: unexpected response");
        end else begin
          exp_t e;
          e = exp_q.pop_front();
          if (cacheresp.rtype != e.t || (e.t == REQ_READ && cacheresp.data != e.data)) begin
            failures++;
            $display("FAIL %m: response %0d/%h, expected %0d/%h",
                     cacheresp.rtype, cacheresp.data, e.t, e.data);
          end
          outstanding--;
          last_resp = cycle + 1;
        end
      end
    end
  end
endmodule
