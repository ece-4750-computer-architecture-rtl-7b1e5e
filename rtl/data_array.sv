// data_array: cache line storage, 128-bit lines with per-word write enables.
//
// Read is combinational: the line at `raddr` appears on `rdata` in the same
// cycle. Write is clocked: when `wen` is high, each 32-bit word of line
// `waddr` whose bit in `word_en` is set takes the matching word of `wdata`
// at the rising edge. A refill writes a whole line (word_en = 1111); a write
// hit writes one word (the write data is replicated into every word slot
// and the enable picks the slot).
//
// Separate read and write addresses let the pipelined cache read in one stage
// while writing in the other (the "hardware duplication" option for the
// structural hazard); a single-ported user ties both addresses together.
// A read of the line being written returns the old contents.
module data_array #(
  parameter int unsigned NUM_LINES = 4,
  parameter int unsigned LINE_W    = 128,
  localparam int unsigned WORDS    = LINE_W / 32,
  localparam int unsigned IDX_W    = (NUM_LINES > 1) ? $clog2(NUM_LINES) : 1
) (
  input  logic              clk,
  input  logic [IDX_W-1:0]  raddr,
  output logic [LINE_W-1:0] rdata,
  input  logic              wen,
  input  logic [IDX_W-1:0]  waddr,
  input  logic [WORDS-1:0]  word_en,
  input  logic [LINE_W-1:0] wdata
);

  logic [LINE_W-1:0] mem [NUM_LINES];

  assign rdata = mem[raddr];

  always_ff @(posedge clk) begin
    if (wen) begin
      for (int w = 0; w < WORDS; w++) begin
        if (word_en[w]) mem[waddr][w*32 +: 32] <= wdata[w*32 +: 32];
      end
    end
  end

endmodule
