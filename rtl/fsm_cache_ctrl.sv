// fsm_cache_ctrl: control unit of the two-way set-associative FSM cache.
//
// Each request is carried out as a short sequence of states:
//   MT  check tag (wait here while no request is held)
//   MRD read the data array and return the read response
//   R0  send the refill request to memory and capture the returned line
//   R1  write the refill line into the data array and its tag into the tag array
//   MWD write-through: send the word to memory; on a hit also write it into
//       the data array; return the write acknowledgement
// Transitions: MT -> MRD on a read hit, MT -> R0 -> R1 -> MRD on a read miss,
// MT -> MWD on any write (no write allocate), MRD and MWD -> MT.
// So a read hit and a write take 2 cycles after the request is accepted and
// a read miss takes 4.
//
// The unit holds one valid bit per line and one use bit per set. The use bit
// names the way used last and is updated on every hit and on every refill;
// the victim is an invalid way if there is one, otherwise the way not used
// last (LRU, exact for two ways). Valid bits are cleared by reset.
//
// Handshakes (valid/ready, both sides): a request is taken when cachereq_val
// and cachereq_rdy are both high. cachereq_rdy is high in MT while no request
// is held, and in MRD/MWD in the cycle the response is taken, so hits can be
// issued back to back. The response stays valid until cacheresp_rdy. The
// main memory is combinational: a memreq_val cycle is also the cycle the
// memory acts (and, for a read, answers), so there is no memory ready signal.
// A write-through word is sent once even if the response is held up.
module fsm_cache_ctrl
  import cache_pkg::*;
#(
  parameter int unsigned NUM_SETS = 2,
  localparam int unsigned IDX_W   = (NUM_SETS > 1) ? $clog2(NUM_SETS) : 1
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             cachereq_val,
  output logic             cachereq_rdy,
  output logic             cacheresp_val,
  input  logic             cacheresp_rdy,
  output req_type_e        cacheresp_type,
  output logic             memreq_val,
  output req_type_e        memreq_type,
  output fsm_ctrl_t        ctrl,
  input  fsm_status_t      status,
  input  logic [IDX_W-1:0] idx,
  output logic             hit_event,   // pulses on a tag check that hits
  output logic             miss_event   // pulses on a tag check that misses
);

  typedef enum logic [2:0] {
    S_MT  = 3'd0,
    S_MRD = 3'd1,
    S_R0  = 3'd2,
    S_R1  = 3'd3,
    S_MWD = 3'd4
  } state_e;

  state_e state, state_n;

  logic                req_v;       // a request is held in the request register
  logic [1:0]          valid [NUM_SETS];
  logic [NUM_SETS-1:0] use_way;     // way used last in each set
  logic                way_q;       // way chosen by the tag check
  logic                hit_q;       // tag check hit (needed by MWD)
  logic                wr_sent;     // write-through word already sent

  // Tag check
  logic hit0, hit1, hit, victim, way_d;
  assign hit0   = valid[idx][0] && status.tarray0_match;
  assign hit1   = valid[idx][1] && status.tarray1_match;
  assign hit    = hit0 || hit1;
  assign victim = !valid[idx][0] ? 1'b0 :
                  !valid[idx][1] ? 1'b1 : !use_way[idx];
  assign way_d  = hit ? hit1 : victim;

  logic done;  // response taken this cycle
  assign done = (state == S_MRD || state == S_MWD) && cacheresp_rdy;

  assign cachereq_rdy = (state == S_MT && !req_v) || done;

  logic checking;
  assign checking   = (state == S_MT) && req_v;
  assign hit_event  = checking && hit;
  assign miss_event = checking && !hit;

  always_comb begin
    state_n = state;
    unique case (state)
      S_MT:  if (req_v) begin
               if (status.rtype == REQ_WRITE) state_n = S_MWD;
               else if (hit)                  state_n = S_MRD;
               else                           state_n = S_R0;
             end
      S_R0:  state_n = S_R1;
      S_R1:  state_n = S_MRD;
      S_MRD: if (cacheresp_rdy) state_n = S_MT;
      S_MWD: if (cacheresp_rdy) state_n = S_MT;
      default: state_n = S_MT;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state   <= S_MT;
      req_v   <= 1'b0;
      way_q   <= 1'b0;
      hit_q   <= 1'b0;
      wr_sent <= 1'b0;
      use_way <= '0;
      for (int s = 0; s < NUM_SETS; s++) valid[s] <= 2'b00;
    end else begin
      state <= state_n;
      if (cachereq_val && cachereq_rdy) req_v <= 1'b1;
      else if (done)                    req_v <= 1'b0;
      if (checking) begin
        way_q <= way_d;
        hit_q <= hit;
        if (hit) use_way[idx] <= hit1;
      end
      if (state == S_R1) begin
        valid[idx][way_q] <= 1'b1;
        use_way[idx]      <= way_q;
      end
      wr_sent <= (state == S_MWD) && !cacheresp_rdy;
    end
  end

  // Datapath controls
  always_comb begin
    ctrl                  = '0;
    ctrl.req_reg_en       = cachereq_val && cachereq_rdy;
    ctrl.way              = way_q;
    unique case (state)
      S_R0: begin
        ctrl.memresp_reg_en = 1'b1;
        ctrl.z4b_sel        = 1'b1;
      end
      S_R1: begin
        ctrl.darray_wen       = 1'b1;
        ctrl.darray_wdata_sel = 1'b1;
        ctrl.word_en_sel      = 1'b1;
        ctrl.tarray0_wen      = (way_q == 1'b0);
        ctrl.tarray1_wen      = (way_q == 1'b1);
      end
      S_MWD: begin
        ctrl.darray_wen = hit_q && !wr_sent;
      end
      default: ;
    endcase
  end

  assign memreq_val     = (state == S_R0) || (state == S_MWD && !wr_sent);
  assign memreq_type    = (state == S_R0) ? REQ_READ : REQ_WRITE;
  assign cacheresp_val  = (state == S_MRD) || (state == S_MWD);
  assign cacheresp_type = (state == S_MWD) ? REQ_WRITE : REQ_READ;

endmodule
