// tag_array: one way of tag storage, modelled as a small single-ported SRAM
// with a combinational read and a clocked write.
//
// The caches in this library assume combinational SRAMs: the entry selected
// by `idx` appears on `rdata` in the same cycle, and when `wen` is high the
// entry is overwritten with `wdata` at the rising clock edge. One address
// serves both read and write (single port); the read during a write returns
// the old contents. Entries are not reset; validity is tracked by the cache
// controller in separate valid bits, as the design keeps them in the control
// unit.
//
// Parameters: NUM_ENTRIES sets (2 for the two-way FSM cache, 4 for the
// direct-mapped pipelined cache), TAG_W the tag width (27 and 26 bits).
module tag_array #(
  parameter int unsigned NUM_ENTRIES = 2,
  parameter int unsigned TAG_W       = 27,
  localparam int unsigned IDX_W      = (NUM_ENTRIES > 1) ? $clog2(NUM_ENTRIES) : 1
) (
  input  logic             clk,
  input  logic [IDX_W-1:0] idx,
  input  logic             wen,
  input  logic [TAG_W-1:0] wdata,
  output logic [TAG_W-1:0] rdata
);

  logic [TAG_W-1:0] mem [NUM_ENTRIES];

  assign rdata = mem[idx];

  always_ff @(posedge clk) begin
    if (wen) mem[idx] <= wdata;
  end

endmodule
