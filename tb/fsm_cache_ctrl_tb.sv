// fsm_cache_ctrl_tb: drives the FSM cache control unit with tag-match
// status values directly (no datapath) and checks, cycle by cycle, the state
// sequence seen through its outputs: MT -> MRD on a read hit, MT -> R0 -> R1
// -> MRD on a read miss, MT -> MWD on a write; the way chosen (the hitting way,
// else an invalid way, else the least recently used one); and that a write
// held up by cacheresp_rdy sends its memory write and data-array write once.
module fsm_cache_ctrl_tb;
  import cache_pkg::*;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic        cachereq_val, cachereq_rdy, cacheresp_val, cacheresp_rdy;
  req_type_e   cacheresp_type, memreq_type;
  logic        memreq_val;
  fsm_ctrl_t   ctrl;
  fsm_status_t status;
  logic [0:0]  idx;
  logic        hit_event, miss_event;

  fsm_cache_ctrl #(.NUM_SETS(2)) dut (.*);

  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %0t: %s", $time, what); end
  endtask

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // One request: accept it, present the tag match results in MT, then follow
  // the expected path. stall_cycles holds cacheresp_rdy low in MRD/MWD.
  task automatic req(input req_type_e t, input logic i, input logic m0, input logic m1,
                     input bit exp_hit, input logic exp_way, input int stall_cycles);
    @(negedge clk);
    cachereq_val = 1; cacheresp_rdy = 0;
    status = '{tarray0_match: 1'b0, tarray1_match: 1'b0, rtype: t};
    idx = i;
    #1 check(cachereq_rdy, "ready in MT");
    check(ctrl.req_reg_en, "request register loads");
    @(negedge clk);                       // MT with request
    cachereq_val = 0;
    status = '{tarray0_match: m0, tarray1_match: m1, rtype: t};
    #1 check(hit_event == exp_hit && miss_event == !exp_hit, "hit/miss event");
    check(!cacheresp_val && !memreq_val && !ctrl.darray_wen, "MT is quiet");
    if (t == REQ_READ && !exp_hit) begin
      @(negedge clk);                     // R0
      #1 check(memreq_val && memreq_type == REQ_READ && ctrl.z4b_sel && ctrl.memresp_reg_en,
               "R0 refill request");
      check(!ctrl.darray_wen && !cacheresp_val, "R0 writes nothing");
      @(negedge clk);                     // R1
      #1 check(ctrl.darray_wen && ctrl.darray_wdata_sel && ctrl.word_en_sel, "R1 line write");
      check(ctrl.tarray0_wen == (exp_way == 0) && ctrl.tarray1_wen == (exp_way == 1),
            $sformatf("R1 tag write to way %0d", exp_way));
      check(ctrl.way == exp_way, "R1 way");
      check(!memreq_val, "R1 no memory request");
    end
    for (int s = 0; s <= stall_cycles; s++) begin
      @(negedge clk);                     // MRD or MWD
      cacheresp_rdy = (s == stall_cycles);
      #1 check(cacheresp_val && cacheresp_type == t, "response valid");
      check(cachereq_rdy == cacheresp_rdy, "next request accepted with response");
      if (t == REQ_READ) begin
        check(ctrl.way == exp_way && !memreq_val && !ctrl.darray_wen, "MRD reads chosen way");
      end else begin
        check(memreq_val == (s == 0) && memreq_type == REQ_WRITE && !ctrl.z4b_sel,
              "MWD memory write sent once");
        check(ctrl.darray_wen == (exp_hit && s == 0), "MWD data write only on hit, once");
        if (exp_hit) check(ctrl.way == exp_way && !ctrl.word_en_sel && !ctrl.darray_wdata_sel,
                           "MWD word write to hit way");
      end
    end
    @(negedge clk);
    cacheresp_rdy = 0;
    #1 check(!cacheresp_val && cachereq_rdy, "back in MT, idle");
  endtask

  initial begin
    cachereq_val = 0; cacheresp_rdy = 0; idx = 0; status = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 0;
    #1 check(cachereq_rdy && !cacheresp_val && !memreq_val, "idle after reset");

    // stale tag matches are ignored while lines are invalid
    req(REQ_READ,  0, 1, 1, 0, 0, 0);   // miss, way 0 invalid -> way 0
    req(REQ_READ,  0, 1, 0, 1, 0, 0);   // hit way 0
    req(REQ_READ,  0, 0, 1, 0, 1, 0);   // way 1 invalid: match ignored, miss -> way 1
    req(REQ_READ,  0, 0, 1, 1, 1, 1);   // hit way 1 (stall 1 cycle)
    req(REQ_READ,  0, 0, 0, 0, 0, 0);   // miss, LRU is way 0
    req(REQ_READ,  0, 1, 0, 1, 0, 0);   // hit way 0
    req(REQ_READ,  0, 0, 0, 0, 1, 0);   // miss, LRU is way 1
    req(REQ_WRITE, 0, 1, 0, 1, 0, 2);   // write hit way 0, ack held 2 cycles
    req(REQ_READ,  0, 0, 0, 0, 1, 0);   // miss: write hit made way 0 MRU -> way 1
    req(REQ_WRITE, 0, 0, 0, 0, 0, 1);   // write miss: no allocate
    req(REQ_READ,  1, 1, 1, 0, 0, 0);   // set 1 starts invalid
    req(REQ_READ,  1, 0, 0, 0, 1, 0);
    req(REQ_READ,  1, 0, 1, 1, 1, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
