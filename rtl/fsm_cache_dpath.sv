// fsm_cache_dpath: datapath of the two-way set-associative FSM cache.
//
// A request register captures the incoming request. Its address splits into
// tag | index | word offset | 00 (27 | 1 | 2 | 2 bits with two sets). Each way
// has a tag array read with the index and an equality comparator; the two
// match signals go to the control unit, which owns the valid bits and so
// decides hit or miss. The data array holds all four lines and is addressed by
// {way, index}; the way comes from the control unit. Its write data is either
// the request word replicated into all four slots (write hit, with a one-word
// enable from the offset) or the refill line (whole-line enable). The refill
// line is captured from the combinational main memory in a register, because
// it is fetched in state R0 and written one cycle later in R1. The response
// word is picked out of the data array line by the offset.
//
// Memory side: memreq.addr is the request address with its low four bits
// cleared (z4b) for a refill, or the plain word address for a write-through
// write; memreq.data is the write word zero-extended to 128 bits.
//
// All storage is combinational-read / clocked-write, so a tag check and a
// data read each take one state of the controller.
module fsm_cache_dpath
  import cache_pkg::*;
#(
  parameter int unsigned NUM_SETS = 2,
  localparam int unsigned IDX_W   = (NUM_SETS > 1) ? $clog2(NUM_SETS) : 1,
  localparam int unsigned TAG_W   = ADDR_W - 4 - $clog2(NUM_SETS)
) (
  input  logic              clk,
  input  logic              rst,
  input  cache_req_t        cachereq,
  input  fsm_ctrl_t         ctrl,
  output fsm_status_t       status,
  output logic [IDX_W-1:0]  idx,
  output logic [WORD_W-1:0] cacheresp_data,
  output logic [ADDR_W-1:0] memreq_addr,
  output logic [LINE_W-1:0] memreq_data,
  input  logic [LINE_W-1:0] memresp_data
);

  cache_req_t        req_q;
  logic [LINE_W-1:0] refill_q;

  always_ff @(posedge clk) begin
    if (rst)                 req_q <= '0;
    else if (ctrl.req_reg_en) req_q <= cachereq;
  end

  always_ff @(posedge clk) begin
    if (rst)                     refill_q <= '0;
    else if (ctrl.memresp_reg_en) refill_q <= memresp_data;
  end

  logic [TAG_W-1:0] tag;
  logic [1:0]       off;
  assign tag = req_q.addr[ADDR_W-1 -: TAG_W];
  assign off = req_q.addr[3:2];
  if (NUM_SETS > 1) begin : g_idx
    assign idx = req_q.addr[4 +: IDX_W];
  end else begin : g_noidx
    assign idx = '0;
  end

  logic [TAG_W-1:0] tag0, tag1;

  tag_array #(.NUM_ENTRIES(NUM_SETS), .TAG_W(TAG_W)) u_tarray0 (
    .clk, .idx, .wen(ctrl.tarray0_wen), .wdata(tag), .rdata(tag0)
  );
  tag_array #(.NUM_ENTRIES(NUM_SETS), .TAG_W(TAG_W)) u_tarray1 (
    .clk, .idx, .wen(ctrl.tarray1_wen), .wdata(tag), .rdata(tag1)
  );

  assign status.tarray0_match = (tag0 == tag);
  assign status.tarray1_match = (tag1 == tag);
  assign status.rtype         = req_q.rtype;

  localparam int unsigned DA_W = IDX_W + 1;
  logic [DA_W-1:0]   da_addr;
  logic [LINE_W-1:0] da_rdata, da_wdata;
  logic [3:0]        da_wen_words;

  assign da_addr      = {ctrl.way, idx};
  assign da_wdata     = ctrl.darray_wdata_sel ? refill_q : repl(req_q.data);
  assign da_wen_words = ctrl.word_en_sel ? 4'b1111 : word_en(off);

  data_array #(.NUM_LINES(2 * NUM_SETS), .LINE_W(LINE_W)) u_darray (
    .clk,
    .raddr  (da_addr),
    .rdata  (da_rdata),
    .wen    (ctrl.darray_wen),
    .waddr  (da_addr),
    .word_en(da_wen_words),
    .wdata  (da_wdata)
  );

  assign cacheresp_data = word_sel(da_rdata, off);
  assign memreq_addr    = ctrl.z4b_sel ? z4b(req_q.addr) : req_q.addr;
  assign memreq_data    = zext(req_q.data);

endmodule
