// cache_top: the cache designs of this library side by side, each with its
// own processor-side and memory-side ports.
//
//   fsm_*        two-way set-associative FSM cache (fsm_cache): multi-cycle
//                hits, 2 cycles per hit or write, 4 per read miss. Its
//                memory side passes through a next-line prefetch buffer
//                (prefetch_buffer) before reaching the fsm_memreq ports; the
//                buffer keeps the combinational memory interface, so the
//                cache's timing is unchanged.
//   wb_*         a write buffer (write_buffer) with its own cache-side and
//                memory-side ports, to be placed between a write-through
//                cache and a memory. Behind a combinational memory the
//                caches here leave the memory port free in the cycle after
//                each write, so the buffer would drain at once and never be
//                exercised; it is therefore brought out on its own.
//   pipe_*[0]    direct-mapped pipelined cache with two-cycle hit latency
//                (pipe_cache, PARALLEL_READ = 0).
//   pipe_*[1]    direct-mapped pipelined cache with parallel read and
//                pipelined write, read-after-write hazards stalled
//                (PARALLEL_READ = 1, RAW_BYPASS = 0).
//   pipe_*[2]    the same with read-after-write hazards bypassed
//                (PARALLEL_READ = 1, RAW_BYPASS = 1).
//   pipe_*[3]    parallel read and pipelined write on a data array with a
//                single port: a read hit behind a write hit stalls for one
//                cycle on the structural hazard, and read-after-write
//                hazards are covered by the same stall (PARALLEL_READ = 1,
//                DUAL_PORT = 0).
//
// All five are write-through, no-write-allocate caches of four 16-byte lines
// for 4-byte requests on physical addresses. Each expects a combinational
// main memory on its memreq/memresp ports: a line read asked for with
// memreq_val must be answered on memresp_data in the same cycle. The
// processor-side channels use valid/ready handshakes. The *_event outputs
// pulse once per event and exist for performance counting.
module cache_top
  import cache_pkg::*;
(
  input  logic              clk,
  input  logic              rst,

  // FSM cache
  input  logic              fsm_cachereq_val,
  output logic              fsm_cachereq_rdy,
  input  cache_req_t        fsm_cachereq,
  output logic              fsm_cacheresp_val,
  input  logic              fsm_cacheresp_rdy,
  output cache_resp_t       fsm_cacheresp,
  output logic              fsm_memreq_val,
  output mem_req_t          fsm_memreq,
  input  logic [LINE_W-1:0] fsm_memresp_data,
  output logic              fsm_hit_event,
  output logic              fsm_miss_event,
  output logic              fsm_pf_hit_event,
  output logic              fsm_pf_prefetch_event,

  // Write buffer: cache side (wb_c*) and memory side (wb_m*)
  input  logic              wb_creq_val,
  input  mem_req_t          wb_creq,
  output logic [LINE_W-1:0] wb_cresp_data,
  output logic              wb_mreq_val,
  output mem_req_t          wb_mreq,
  input  logic [LINE_W-1:0] wb_mresp_data,
  output logic              wb_empty,
  output logic              wb_bypass_event,

  // Pipelined caches: [0] two-cycle hit, [1] parallel read + RAW stall,
  // [2] parallel read + RAW bypass, [3] parallel read, single-ported array
  input  logic              pipe_cachereq_val  [4],
  output logic              pipe_cachereq_rdy  [4],
  input  cache_req_t        pipe_cachereq      [4],
  output logic              pipe_cacheresp_val [4],
  input  logic              pipe_cacheresp_rdy [4],
  output cache_resp_t       pipe_cacheresp     [4],
  output logic              pipe_memreq_val    [4],
  output mem_req_t          pipe_memreq        [4],
  input  logic [LINE_W-1:0] pipe_memresp_data  [4],
  output logic              pipe_hit_event     [4],
  output logic              pipe_miss_event    [4],
  output logic              pipe_raw_stall_event  [4],
  output logic              pipe_raw_bypass_event [4],
  output logic              pipe_struct_stall_event [4]
);

  // FSM cache -> prefetch buffer -> memory
  logic              c_memreq_val;
  mem_req_t          c_memreq;
  logic [LINE_W-1:0] c_memresp_data;

  fsm_cache u_fsm (
    .clk, .rst,
    .cachereq_val (fsm_cachereq_val),
    .cachereq_rdy (fsm_cachereq_rdy),
    .cachereq     (fsm_cachereq),
    .cacheresp_val(fsm_cacheresp_val),
    .cacheresp_rdy(fsm_cacheresp_rdy),
    .cacheresp    (fsm_cacheresp),
    .memreq_val   (c_memreq_val),
    .memreq       (c_memreq),
    .memresp_data (c_memresp_data),
    .hit_event    (fsm_hit_event),
    .miss_event   (fsm_miss_event)
  );

  prefetch_buffer u_pfbuf (
    .clk, .rst,
    .creq_val      (c_memreq_val),
    .creq          (c_memreq),
    .cresp_data    (c_memresp_data),
    .mreq_val      (fsm_memreq_val),
    .mreq          (fsm_memreq),
    .mresp_data    (fsm_memresp_data),
    .hit_event     (fsm_pf_hit_event),
    .prefetch_event(fsm_pf_prefetch_event)
  );

  write_buffer u_wbuf (
    .clk, .rst,
    .creq_val    (wb_creq_val),
    .creq        (wb_creq),
    .cresp_data  (wb_cresp_data),
    .mreq_val    (wb_mreq_val),
    .mreq        (wb_mreq),
    .mresp_data  (wb_mresp_data),
    .empty       (wb_empty),
    .bypass_event(wb_bypass_event)
  );

  localparam bit PR  [4] = '{1'b0, 1'b1, 1'b1, 1'b1};
  localparam bit BYP [4] = '{1'b0, 1'b0, 1'b1, 1'b0};
  localparam bit DUP [4] = '{1'b1, 1'b1, 1'b1, 1'b0};

  for (genvar i = 0; i < 4; i++) begin : g_pipe
    pipe_cache #(.PARALLEL_READ(PR[i]), .RAW_BYPASS(BYP[i]), .DUAL_PORT(DUP[i])) u_pipe (
      .clk, .rst,
      .cachereq_val    (pipe_cachereq_val[i]),
      .cachereq_rdy    (pipe_cachereq_rdy[i]),
      .cachereq        (pipe_cachereq[i]),
      .cacheresp_val   (pipe_cacheresp_val[i]),
      .cacheresp_rdy   (pipe_cacheresp_rdy[i]),
      .cacheresp       (pipe_cacheresp[i]),
      .memreq_val      (pipe_memreq_val[i]),
      .memreq          (pipe_memreq[i]),
      .memresp_data    (pipe_memresp_data[i]),
      .hit_event       (pipe_hit_event[i]),
      .miss_event      (pipe_miss_event[i]),
      .raw_stall_event (pipe_raw_stall_event[i]),
      .raw_bypass_event(pipe_raw_bypass_event[i]),
      .struct_stall_event(pipe_struct_stall_event[i])
    );
  end

endmodule
