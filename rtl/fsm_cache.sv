// fsm_cache: two-way set-associative, write-through, no-write-allocate cache
// built as a datapath driven by a finite-state control unit.
//
// Configuration: four 16-byte lines in two sets of two ways, LRU replacement,
// 4-byte requests, single-ported combinational SRAMs for tags and data, and
// a combinational main memory behind it (no TLB: addresses are physical).
// Address: tag [31:5] | index [4] | word offset [3:2] | 00.
//
// Timing, counted from the cycle a request is accepted: a read hit answers
// 2 cycles later (check tag, read data), a read miss 4 cycles later (check
// tag, refill request, refill write, read data), and every write 2 cycles
// later (check tag, write-through). The next request can be accepted in the
// cycle a response is taken. See fsm_cache_ctrl for the handshakes.
//
// Ports: cachereq/cacheresp on the processor side (valid/ready, cache_req_t
// and cache_resp_t from cache_pkg), memreq/memresp on the memory side
// (mem_req_t; a read line comes back on memresp_data in the same cycle).
// hit_event/miss_event pulse once per tag check, for counting.
module fsm_cache
  import cache_pkg::*;
#(
  parameter int unsigned NUM_SETS = 2
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              cachereq_val,
  output logic              cachereq_rdy,
  input  cache_req_t        cachereq,
  output logic              cacheresp_val,
  input  logic              cacheresp_rdy,
  output cache_resp_t       cacheresp,
  output logic              memreq_val,
  output mem_req_t          memreq,
  input  logic [LINE_W-1:0] memresp_data,
  output logic              hit_event,
  output logic              miss_event
);

  localparam int unsigned IDX_W = (NUM_SETS > 1) ? $clog2(NUM_SETS) : 1;

  fsm_ctrl_t        ctrl;
  fsm_status_t      status;
  logic [IDX_W-1:0] idx;

  fsm_cache_ctrl #(.NUM_SETS(NUM_SETS)) u_ctrl (
    .clk, .rst,
    .cachereq_val, .cachereq_rdy,
    .cacheresp_val, .cacheresp_rdy,
    .cacheresp_type(cacheresp.rtype),
    .memreq_val,
    .memreq_type(memreq.rtype),
    .ctrl, .status, .idx,
    .hit_event, .miss_event
  );

  fsm_cache_dpath #(.NUM_SETS(NUM_SETS)) u_dpath (
    .clk, .rst,
    .cachereq,
    .ctrl, .status, .idx,
    .cacheresp_data(cacheresp.data),
    .memreq_addr(memreq.addr),
    .memreq_data(memreq.data),
    .memresp_data
  );

endmodule
