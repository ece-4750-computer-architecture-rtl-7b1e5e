// fsm_cache_dpath_tb: drives the FSM cache datapath's control bundle by hand
// and checks its outputs against a reference line store: request register,
// index and tag match per way, refill capture and whole-line write into the
// chosen way, single-word writes of the replicated request word, response
// word selection by offset, and the z4b / zext memory request formatting.
module fsm_cache_dpath_tb;
  import cache_pkg::*;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  cache_req_t        cachereq;
  fsm_ctrl_t         ctrl;
  fsm_status_t       status;
  logic [0:0]        idx;
  logic [WORD_W-1:0] cacheresp_data;
  logic [ADDR_W-1:0] memreq_addr;
  logic [LINE_W-1:0] memreq_data, memresp_data;

  fsm_cache_dpath #(.NUM_SETS(2)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %0t: %s", $time, what); end
  endtask

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [127:0] ref_line [2][2];   // [way][set]
  logic [26:0]  ref_tag  [2][2];
  bit           ref_has  [2][2];

  task automatic load_req(input req_type_e t, input logic [31:0] a, input logic [31:0] d);
    @(negedge clk);
    ctrl = '0; ctrl.req_reg_en = 1; cachereq = '{rtype: t, addr: a, data: d};
    @(negedge clk);
    ctrl = '0;
    #1;
    check(idx == a[4] && status.rtype == t, "index and type of registered request");
    ctrl.z4b_sel = 1;
    #1 check(memreq_addr == {a[31:4], 4'h0}, "z4b line address");
    ctrl.z4b_sel = 0;
    #1 check(memreq_addr == a && memreq_data == {96'h0, d}, "word address and zext data");
  endtask

  task automatic refill(input logic w, input logic [31:0] a);
    logic [127:0] line;
    line = {$urandom, $urandom, $urandom, $urandom};
    ctrl = '0; ctrl.memresp_reg_en = 1; ctrl.z4b_sel = 1; memresp_data = line;  // R0
    @(negedge clk);
    memresp_data = '0;  // the line must come from the refill register
    ctrl = '0; ctrl.darray_wen = 1; ctrl.darray_wdata_sel = 1; ctrl.word_en_sel = 1;
    ctrl.way = w; ctrl.tarray0_wen = !w; ctrl.tarray1_wen = w;                   // R1
    @(negedge clk);
    ref_line[w][a[4]] = line; ref_tag[w][a[4]] = a[31:5]; ref_has[w][a[4]] = 1;
    ctrl = '0;
  endtask

  task automatic read_check(input logic w, input logic [31:0] a);
    ctrl = '0; ctrl.way = w;
    #1;
    check(cacheresp_data == ref_line[w][a[4]][a[3:2]*32 +: 32],
          $sformatf("read way %0d addr %h got %h", w, a, cacheresp_data));
    for (int k = 0; k < 2; k++)
      if (ref_has[k][a[4]])
        check((k == 0 ? status.tarray0_match : status.tarray1_match) ==
              (ref_tag[k][a[4]] == a[31:5]), $sformatf("tag match way %0d", k));
  endtask

  initial begin
    ctrl = '0; cachereq = '0; memresp_data = '0;
    for (int w = 0; w < 2; w++) for (int s = 0; s < 2; s++) ref_has[w][s] = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int n = 0; n < 200; n++) begin
      logic [31:0] a, d;
      logic        w;
      a = {$urandom_range(3) == 0 ? 20'h00002 : 20'h00001, 7'h0, 1'($urandom), 2'($urandom), 2'b00};
      d = $urandom;
      w = 1'($urandom);
      if (!ref_has[w][a[4]] || $urandom_range(2) == 0) begin
        load_req(REQ_READ, a, 0);
        refill(w, a);
        read_check(w, a);
      end else begin
        load_req(REQ_WRITE, a, d);
        ctrl = '0; ctrl.darray_wen = 1; ctrl.way = w;   // MWD on a hit
        @(negedge clk);
        ref_line[w][a[4]][a[3:2]*32 +: 32] = d;
        read_check(w, a);
        // the other words of the line are untouched
        for (int o = 1; o < 4; o++) begin
          load_req(REQ_READ, {a[31:4], a[3:2] + 2'(o), 2'b00}, 0);
          read_check(w, {a[31:4], a[3:2] + 2'(o), 2'b00});
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
