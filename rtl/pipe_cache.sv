// pipe_cache: direct-mapped, write-through, no-write-allocate cache with a
// two-stage hit pipeline (M0, M1) and a small refill FSM in M0.
//
// Configuration: four 16-byte lines, 4-byte requests,
// combinational SRAMs, a combinational main memory and physical addresses.
// Address: tag [31:6] | index [5:4] | word offset [3:2] | 00.
//
// M0 checks the tag of the request held in its input register against the
// tag array and the valid bit of the line. Hits move on down the pipeline.
// A read miss stalls in M0 while the M0 FSM walks pipe -> R0 -> R1 -> pipe:
// R0 sends the line read to memory and loads the returned line into the M0/M1
// register as a refill operation; R1 writes the tag and the valid bit while
// M1 writes the whole line into the data array. Back in pipe the request
// checks its tag again and now hits. Every write is sent to memory from M0
// (write-through); a write miss allocates nothing.
//
// PARALLEL_READ selects how M1 uses the data array:
//   0  two-cycle hit latency. M1 reads the line and returns the read data,
//      or writes the word of a write hit, and returns every response.
//      A read hit and a write are answered 2 cycles after acceptance, a read
//      miss 5 cycles after; one request per cycle streams through on hits.
//   1  parallel read, pipelined write. M0 reads the data array in parallel
//      with the tag check and answers reads and writes itself; M1 only writes
//      (the word of a write hit, or a refill line). The data array has a read
//      port for M0 and a write port for M1 (structural hazard removed by
//      duplication). Reads and writes are answered 1 cycle after acceptance,
//      a read miss 4 cycles after. A read in M0 of the very word that a write
//      hit in M1 is about to write is a read-after-write hazard:
//      RAW_BYPASS = 0 stalls the read one cycle, RAW_BYPASS = 1 forwards the
//      write data from M1 to the response.
//      DUAL_PORT = 0 keeps a single data-array port instead: a read hit in M0
//      stalls for one cycle whenever M1 writes the array (structural hazard
//      resolved by stalling); this also covers the read-after-write case,
//      so RAW_BYPASS then has no effect.
// The defaults (1, 0, 1) are the combination used for the cycle estimates:
// parallel read, duplicated ports, stall on RAW.
//
// Handshakes are valid/ready on both processor-side channels; the memory is
// combinational (memreq_val is also the cycle the memory acts). A response
// held up by cacheresp_rdy stalls the pipeline. The *_event outputs pulse for
// counting: hit/miss on each tag check that lets a request proceed or starts
// a refill, raw_stall, raw_bypass and struct_stall on each hazard resolved.
module pipe_cache
  import cache_pkg::*;
#(
  parameter int unsigned NUM_LINES     = 4,
  parameter bit          PARALLEL_READ = 1'b1,
  parameter bit          RAW_BYPASS    = 1'b0,
  parameter bit          DUAL_PORT     = 1'b1
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
  output logic              miss_event,
  output logic              raw_stall_event,
  output logic              raw_bypass_event,
  output logic              struct_stall_event
);

  localparam int unsigned IDX_W = (NUM_LINES > 1) ? $clog2(NUM_LINES) : 1;
  localparam int unsigned TAG_W = ADDR_W - 4 - $clog2(NUM_LINES);

  typedef enum logic [1:0] {
    S_PIPE = 2'd0,
    S_R0   = 2'd1,
    S_R1   = 2'd2
  } m0_state_e;

  // Operation carried by the M0/M1 register.
  typedef enum logic [1:0] {
    OP_READ     = 2'd0,   // read hit (two-cycle mode only)
    OP_WRITE    = 2'd1,   // write hit: write one word
    OP_WRITE_NA = 2'd2,   // write miss: nothing to write (two-cycle mode acks it)
    OP_REFILL   = 2'd3    // write a whole refill line
  } m1_op_e;

  // index field of an address (bits [4 +: IDX_W]); a single line has none
  function automatic logic [IDX_W-1:0] idx_of(input logic [IDX_W-1:0] field);
    if (NUM_LINES > 1) return field;
    else               return '0;
  endfunction

  // ---------------- M0 ----------------
  m0_state_e         state;
  logic              v0;
  cache_req_t        req0;
  logic [IDX_W-1:0]  idx0;
  logic [TAG_W-1:0]  tag0, tag_rd;
  logic [NUM_LINES-1:0] valid;

  // ---------------- M1 ----------------
  logic              v1;
  m1_op_e            op1;
  logic [ADDR_W-1:2] addr1;          // word address
  logic [LINE_W-1:0] wdata1;
  logic [IDX_W-1:0]  idx1;

  assign idx0 = idx_of(req0.addr[4 +: IDX_W]);
  assign tag0 = req0.addr[ADDR_W-1 -: TAG_W];
  assign idx1 = idx_of(addr1[4 +: IDX_W]);

  tag_array #(.NUM_ENTRIES(NUM_LINES), .TAG_W(TAG_W)) u_tarray (
    .clk, .idx(idx0), .wen(state == S_R1), .wdata(tag0), .rdata(tag_rd)
  );

  logic hit0, is_wr0;
  assign hit0   = valid[idx0] && (tag_rd == tag0);
  assign is_wr0 = (req0.rtype == REQ_WRITE);

  // Data array: read port address depends on the mode, write port in M1.
  logic [LINE_W-1:0] da_rdata;
  logic              da_wen;
  logic [3:0]        da_word_en;
  logic              fire1;

  assign da_wen     = v1 && fire1 && (op1 == OP_WRITE || op1 == OP_REFILL);
  assign da_word_en = (op1 == OP_REFILL) ? 4'b1111 : word_en(addr1[3:2]);

  // One shared address when the array has a single port: M1's write wins.
  logic [IDX_W-1:0] da_raddr;
  always_comb begin
    if (!PARALLEL_READ)                          da_raddr = idx1;
    else if (!DUAL_PORT && v1 && op1 != OP_READ) da_raddr = idx1;
    else                                         da_raddr = idx0;
  end

  data_array #(.NUM_LINES(NUM_LINES), .LINE_W(LINE_W)) u_darray (
    .clk,
    .raddr  (da_raddr),
    .rdata  (da_rdata),
    .wen    (da_wen),
    .waddr  (idx1),
    .word_en(da_word_en),
    .wdata  (wdata1)
  );

  // RAW hazard (parallel-read mode): read in M0 of the word a write hit in M1
  // writes at the end of this cycle.
  logic raw;
  assign raw = PARALLEL_READ && DUAL_PORT && v0 && (state == S_PIPE) && !is_wr0 && hit0 &&
               v1 && (op1 == OP_WRITE) && (req0.addr[ADDR_W-1:2] == addr1[ADDR_W-1:2]);

  // Structural hazard (parallel read, single port): a read hit in M0 needs
  // the array while a write hit in M1 uses it. (M1 holds a refill only while
  // the FSM is in R1, when M0 reads nothing.)
  logic struct_stall;
  assign struct_stall = PARALLEL_READ && !DUAL_PORT && v0 && (state == S_PIPE) &&
                        !is_wr0 && hit0 && v1 && (op1 == OP_WRITE);

  logic m0_stall;
  assign m0_stall = (raw && !RAW_BYPASS) || struct_stall;

  // M1 stall: only the two-cycle mode answers from M1.
  logic stall1, m1_resp;
  assign m1_resp = !PARALLEL_READ && v1 && (op1 != OP_REFILL);
  assign stall1  = m1_resp && !cacheresp_rdy;
  assign fire1   = !stall1;

  // M0 outcome in the pipe state.
  logic m0_miss, m0_go, m0_resp;
  assign m0_miss = v0 && (state == S_PIPE) && !is_wr0 && !hit0;
  assign m0_resp = PARALLEL_READ && v0 && (state == S_PIPE) && !m0_miss && !m0_stall;
  // M0 hands its request on (or retires it) when M1 can take a new entry and,
  // in parallel-read mode, its response is taken.
  assign m0_go   = v0 && (state == S_PIPE) && !m0_miss && !m0_stall && !stall1 &&
                   (!PARALLEL_READ || cacheresp_rdy);

  logic start_refill;
  assign start_refill = m0_miss && !stall1;

  assign cachereq_rdy = !v0 || m0_go;

  assign hit_event        = m0_go && hit0;
  assign miss_event       = (m0_go && !hit0) || start_refill;
  assign raw_stall_event    = raw && !RAW_BYPASS;
  assign struct_stall_event = struct_stall;
  assign raw_bypass_event = raw && RAW_BYPASS && m0_go;

  // Memory side: line read in R0, write-through word when a write leaves M0.
  assign memreq_val   = (state == S_R0) || (m0_go && is_wr0);
  assign memreq.rtype = (state == S_R0) ? REQ_READ : REQ_WRITE;
  assign memreq.addr  = (state == S_R0) ? z4b(req0.addr) : req0.addr;
  assign memreq.data  = zext(req0.data);

  // Responses.
  logic [WORD_W-1:0] m0_word, m1_word;
  assign m0_word = (raw && RAW_BYPASS) ? wdata1[WORD_W-1:0]
                                       : word_sel(da_rdata, req0.addr[3:2]);
  assign m1_word = word_sel(da_rdata, addr1[3:2]);

  always_comb begin
    if (PARALLEL_READ) begin
      cacheresp_val   = m0_resp;
      cacheresp.rtype = req0.rtype;
      cacheresp.data  = is_wr0 ? '0 : m0_word;
    end else begin
      cacheresp_val   = m1_resp;
      cacheresp.rtype = (op1 == OP_READ) ? REQ_READ : REQ_WRITE;
      cacheresp.data  = (op1 == OP_READ) ? m1_word : '0;
    end
  end

  // ---------------- state ----------------
  always_ff @(posedge clk) begin
    if (rst) begin
      state <= S_PIPE;
      v0    <= 1'b0;
      req0  <= '0;
      valid <= '0;
      v1    <= 1'b0;
      op1   <= OP_READ;
      addr1 <= '0;
      wdata1 <= '0;
    end else begin
      // M0 FSM
      unique case (state)
        S_PIPE: if (start_refill) state <= S_R0;
        S_R0:   state <= S_R1;
        S_R1:   begin
                  state       <= S_PIPE;
                  valid[idx0] <= 1'b1;
                end
        default: state <= S_PIPE;
      endcase

      // input register
      if (cachereq_val && cachereq_rdy) begin
        v0   <= 1'b1;
        req0 <= cachereq;
      end else if (m0_go) begin
        v0 <= 1'b0;
      end

      // M0/M1 register
      if (fire1) begin
        if (state == S_R0) begin
          v1     <= 1'b1;
          op1    <= OP_REFILL;
          addr1  <= {req0.addr[ADDR_W-1:4], 2'b00};
          wdata1 <= memresp_data;
        end else if (m0_go && (!PARALLEL_READ || (is_wr0 && hit0))) begin
          v1     <= 1'b1;
          op1    <= !is_wr0 ? OP_READ : (hit0 ? OP_WRITE : OP_WRITE_NA);
          addr1  <= req0.addr[ADDR_W-1:2];
          wdata1 <= repl(req0.data);
        end else begin
          v1 <= 1'b0;
        end
      end
    end
  end

  // The refill FSM only starts when M1 is free, so M1 is never occupied by a
  // request when the refill line has to enter it.
  a_refill_m1_free: assert property (@(posedge clk) disable iff (rst)
    (state == S_R0) |-> (!v1 || fire1));
  a_resp_stable: assert property (@(posedge clk) disable iff (rst)
    (cacheresp_val && !cacheresp_rdy) |=> cacheresp_val);

endmodule
