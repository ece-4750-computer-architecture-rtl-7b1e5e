// write_buffer: buffer for write-through words between a cache and main
// memory, letting line reads go to memory ahead of buffered writes.
//
// It sits on the cache's combinational memory interface (memreq/memresp)
// and presents the same interface to memory, so the cache sees no change in
// timing. Every word write from the cache is queued in a FIFO of NUM_ENTRIES
// entries; the cache never waits for it. The memory port serves one request
// per cycle: a line read from the cache has priority and goes to memory at
// once; in any cycle without a read the oldest buffered write drains to
// memory. A cache write arrives only in a cycle without a cache read, so a
// full buffer always drains one entry in the cycle it takes a new one and
// never has to refuse a write. Behind a combinational memory the port is
// free in every write cycle, so words wait in the buffer only while reads
// (cache misses or prefetches) hold the port; the depth is a parameter for
// that reason.
//
// A line read may ask for a line whose newest words are still in the buffer.
// The buffer checks every entry's address against the line and replaces the
// memory's word with the youngest buffered copy (address check and bypass),
// so reads always see the latest value. The buffer depth and the FIFO order
// are this design's choices; the alternative policy of draining the buffer
// before every read miss is not built here.
//
// Outputs: empty; bypass_event pulses when a read took a word from the buffer.
module write_buffer
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
  output logic              empty,
  output logic              bypass_event
);

  localparam int unsigned PTR_W = (NUM_ENTRIES > 1) ? $clog2(NUM_ENTRIES) : 1;

  typedef struct packed {
    logic [ADDR_W-3:0] waddr;   // word address
    logic [WORD_W-1:0] data;
  } entry_t;

  entry_t             buf_q [NUM_ENTRIES];
  logic [PTR_W-1:0]   head, tail;
  logic [PTR_W:0]     count;

  logic c_read, c_write, drain;
  assign c_read  = creq_val && (creq.rtype == REQ_READ);
  assign c_write = creq_val && (creq.rtype == REQ_WRITE);
  assign drain   = !c_read && (count != 0);
  assign empty   = (count == 0);

  function automatic logic [PTR_W-1:0] inc(input logic [PTR_W-1:0] p);
    return (p == PTR_W'(NUM_ENTRIES - 1)) ? '0 : p + 1'b1;
  endfunction

  // memory port: cache read first, else drain the oldest write
  always_comb begin
    mreq_val = c_read || drain;
    mreq     = creq;
    if (!c_read) begin
      mreq.rtype = REQ_WRITE;
      mreq.addr  = {buf_q[head].waddr, 2'b00};
      mreq.data  = zext(buf_q[head].data);
    end
  end

  // read bypass: youngest matching entry wins (scan oldest to youngest)
  always_comb begin
    cresp_data   = mresp_data;
    bypass_event = 1'b0;
    for (int k = 0; k < NUM_ENTRIES; k++) begin
      logic [PTR_W-1:0] p;
      p = PTR_W'((int'(head) + k) % NUM_ENTRIES);
      if (k < int'(count) && buf_q[p].waddr[ADDR_W-3:2] == creq.addr[ADDR_W-1:4]) begin
        cresp_data[buf_q[p].waddr[1:0]*WORD_W +: WORD_W] = buf_q[p].data;
        bypass_event = c_read;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      head  <= '0;
      tail  <= '0;
      count <= '0;
    end else begin
      if (c_write) begin
        buf_q[tail] <= '{waddr: creq.addr[ADDR_W-1:2], data: creq.data[WORD_W-1:0]};
        tail        <= inc(tail);
      end
      if (drain) head <= inc(head);
      count <= count + (PTR_W+1)'(c_write) - (PTR_W+1)'(drain);
    end
  end

  a_no_overflow: assert property (@(posedge clk) disable iff (rst)
    c_write |-> (count < (PTR_W+1)'(NUM_ENTRIES)) || drain);

endmodule
