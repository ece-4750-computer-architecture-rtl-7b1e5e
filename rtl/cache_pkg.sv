// cache_pkg: types and helper functions shared by the caches in this library.
//
// A processor-side request carries a type (read or write), a 32-bit byte
// address and 32-bit write data; every access is one aligned 4-byte word.
// The address splits into tag | index | word offset (2 bits) | byte offset
// (2 bits, always 00). Cache lines are 16 bytes (128 bits, four words).
//
// The memory-side request is either a line read (address with the low four
// bits cleared, answered with a whole 128-bit line) or a word write (write
// through: the word's address and the word zero-extended to 128 bits). The
// encoding of these fields is this library's own choice.
//
// The small functions below are the datapath helpers named in the design:
// z4b (zero the low four address bits), zext (zero-extend a word to a line),
// the replication unit (copy a word into all four word slots of a line) and
// the one-hot word-enable decoder.
package cache_pkg;

  localparam int unsigned ADDR_W = 32;
  localparam int unsigned WORD_W = 32;
  localparam int unsigned LINE_W = 128;
  localparam int unsigned WORDS_PER_LINE = LINE_W / WORD_W;

  typedef enum logic {
    REQ_READ  = 1'b0,
    REQ_WRITE = 1'b1
  } req_type_e;

  typedef struct packed {
    req_type_e           rtype;
    logic [ADDR_W-1:0]   addr;
    logic [WORD_W-1:0]   data;
  } cache_req_t;

  typedef struct packed {
    req_type_e           rtype;
    logic [WORD_W-1:0]   data;
  } cache_resp_t;

  // Memory request: REQ_READ reads the 16-byte line at addr (low 4 bits zero),
  // REQ_WRITE writes data[31:0] to the word at addr.
  typedef struct packed {
    req_type_e           rtype;
    logic [ADDR_W-1:0]   addr;
    logic [LINE_W-1:0]   data;
  } mem_req_t;

  function automatic logic [ADDR_W-1:0] z4b(input logic [ADDR_W-1:0] a);
    return a & ~ADDR_W'(4'hF);
  endfunction

  function automatic logic [LINE_W-1:0] zext(input logic [WORD_W-1:0] w);
    return {{(LINE_W-WORD_W){1'b0}}, w};
  endfunction

  function automatic logic [LINE_W-1:0] repl(input logic [WORD_W-1:0] w);
    return {WORDS_PER_LINE{w}};
  endfunction

  function automatic logic [WORDS_PER_LINE-1:0] word_en(input logic [1:0] off);
    return 4'b0001 << off;
  endfunction

  function automatic logic [WORD_W-1:0] word_sel(input logic [LINE_W-1:0] line,
                                                 input logic [1:0] off);
    return line[off*WORD_W +: WORD_W];
  endfunction

  // Control bundle from the FSM cache control unit to its datapath.
  typedef struct packed {
    logic       req_reg_en;      // load the request register
    logic       tarray0_wen;     // write tag way 0
    logic       tarray1_wen;     // write tag way 1
    logic       darray_wen;      // write the data array
    logic       darray_wdata_sel;// 0: replicated write word, 1: refill line
    logic       word_en_sel;     // 0: one word by offset, 1: all four words
    logic       way;             // way addressed in the data array
    logic       memresp_reg_en;  // capture the refill line
    logic       z4b_sel;         // memreq.addr: 1 = line address, 0 = word address
  } fsm_ctrl_t;

  // Status bundle from the FSM cache datapath to its control unit.
  typedef struct packed {
    logic       tarray0_match;   // way 0 tag equals request tag
    logic       tarray1_match;   // way 1 tag equals request tag
    req_type_e  rtype;           // type of the registered request
  } fsm_status_t;

endpackage
