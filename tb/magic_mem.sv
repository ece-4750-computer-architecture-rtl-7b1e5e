// magic_mem: behavioural model of the idealised main memory the caches are
// built against. It is combinational: in the cycle memreq_val is high, a line
// read returns the 16-byte line at memreq.addr on memresp_data, and a word
// write stores memreq.data[31:0] at the word address at the next clock edge.
// It holds 16 KB (addresses wrap above 0x3FFF). Every word starts as
// init_word(word address), so a testbench can compute expected values
// without loading anything. It also counts line reads and word writes.
// Requests are ignored while rst is high.
module magic_mem
  import cache_pkg::*;
(
  input  logic              clk,
  input  logic              rst,
  input  logic              memreq_val,
  input  mem_req_t          memreq,
  output logic [LINE_W-1:0] memresp_data
);

  localparam int unsigned WORDS = 4096;

  logic [31:0] words [WORDS];
  int unsigned num_reads  = 0;
  int unsigned num_writes = 0;

  function automatic logic [31:0] init_word(input logic [29:0] w);
    return (32'(w) * 32'h9E37_79B1) ^ 32'h5A5A_0000;
  endfunction

  initial begin
    for (int i = 0; i < WORDS; i++) words[i] = init_word(30'(i));
  end

  always_comb begin
    for (int i = 0; i < 4; i++)
      memresp_data[i*32 +: 32] = words[{memreq.addr[13:4], 2'(i)}];
  end

  always @(posedge clk) begin
    if (memreq_val && !rst) begin
      if (memreq.rtype == REQ_WRITE) begin
        words[memreq.addr[13:2]] <= memreq.data[31:0];
        num_writes++;
      end else begin
        num_reads++;
      end
    end
  end

endmodule
