// prefetch_buffer: next-line hardware prefetcher with a small buffer of
// whole lines, placed between a cache and main memory.
//
// It sits on the cache's combinational memory interface and presents the same
// interface to memory, so the cache sees no change in timing. Each entry holds
// a line address (tag) and a 16-byte line. The stream of line reads it sees
// is the cache's miss stream; for each one it predicts that the next
// sequential line will miss next and remembers that line as a pending
// prefetch (a newer prediction replaces an older one). In the first cycle the
// memory port is idle, the pending line is read from memory, unless already
// buffered, into the next entry in round-robin order.
//
// A line read that finds its line in the buffer is answered from the buffer
// and the entry is freed (the line moves into the cache); otherwise it goes to
// memory in the same cycle. Word writes pass straight to memory and also
// update a buffered copy of their line, so the buffer never returns stale
// data. The prediction rule (next line), the entry count and the round-robin
// replacement are this design's choices.
//
// Outputs: hit_event pulses when a read is served from the buffer,
// prefetch_event when a prefetch read is sent to memory.
module prefetch_buffer
  import cache_pkg::*;
#(
  parameter int unsigned NUM_ENTRIES = 4
) (
  input  logic              clk,
  input  logic              rst,
  // cache side
  input  logic              creq_val,
  input  mem_req_t          creq,
  output logic [LINE_W-1:0] cresp_data,
  // memory side
  output logic              mreq_val,
  output mem_req_t          mreq,
  input  logic [LINE_W-1:0] mresp_data,
  output logic              hit_event,
  output logic              prefetch_event
);

  localparam int unsigned LA_W  = ADDR_W - 4;   // line address width
  localparam int unsigned PTR_W = (NUM_ENTRIES > 1) ? $clog2(NUM_ENTRIES) : 1;

  logic [NUM_ENTRIES-1:0] valid;
  logic [LA_W-1:0]        tag   [NUM_ENTRIES];
  logic [LINE_W-1:0]      line  [NUM_ENTRIES];
  logic [PTR_W-1:0]       alloc;
  logic                   pend_v;
  logic [LA_W-1:0]        pend_la;

  logic c_read, c_write;
  logic [LA_W-1:0] c_la;
  assign c_read  = creq_val && (creq.rtype == REQ_READ);
  assign c_write = creq_val && (creq.rtype == REQ_WRITE);
  assign c_la    = creq.addr[ADDR_W-1:4];

  // lookup of the cache request's line
  logic             c_hit;
  logic [PTR_W-1:0] c_way;
  always_comb begin
    c_hit = 1'b0;
    c_way = '0;
    for (int k = 0; k < NUM_ENTRIES; k++)
      if (valid[k] && tag[k] == c_la) begin
        c_hit = 1'b1;
        c_way = PTR_W'(k);
      end
  end

  // is the pending line already buffered?
  logic pend_have;
  always_comb begin
    pend_have = 1'b0;
    for (int k = 0; k < NUM_ENTRIES; k++)
      if (valid[k] && tag[k] == pend_la) pend_have = 1'b1;
  end

  logic issue;
  assign issue          = !creq_val && pend_v && !pend_have;
  assign hit_event      = c_read && c_hit;
  assign prefetch_event = issue;

  always_comb begin
    mreq_val = (creq_val && !(c_read && c_hit)) || issue;
    mreq     = creq;
    if (issue) begin
      mreq.rtype = REQ_READ;
      mreq.addr  = {pend_la, 4'h0};
      mreq.data  = '0;
    end
  end

  assign cresp_data = (c_read && c_hit) ? line[c_way] : mresp_data;

  always_ff @(posedge clk) begin
    if (rst) begin
      valid  <= '0;
      alloc  <= '0;
      pend_v <= 1'b0;
      pend_la <= '0;
    end else begin
      if (c_read) begin
        pend_v  <= 1'b1;
        pend_la <= c_la + 1'b1;
        if (c_hit) valid[c_way] <= 1'b0;
      end else if (issue || (pend_v && pend_have && !creq_val)) begin
        pend_v <= 1'b0;
      end
      if (c_write && c_hit)
        line[c_way][creq.addr[3:2]*WORD_W +: WORD_W] <= creq.data[WORD_W-1:0];
      if (issue) begin
        valid[alloc] <= 1'b1;
        tag[alloc]   <= pend_la;
        line[alloc]  <= mresp_data;
        alloc        <= (alloc == PTR_W'(NUM_ENTRIES - 1)) ? '0 : alloc + 1'b1;
      end
    end
  end

endmodule
