// pipe_cache_tb: runs pipe_cache_tester on the four pipelined-cache
// configurations (two-cycle hit; parallel read with RAW stall; parallel read
// with RAW bypass; parallel read with a single-ported data array and
// structural-hazard stalls) and totals their checks.
module pipe_cache_tb;
  logic d0, d1, d2, d3;
  int   c0, c1, c2, c3, f0, f1, f2, f3;
  int   s0, s1, s2, s3, b0, b1, b2, b3, m0, m1, m2, m3, x0, x1, x2, x3;

  pipe_cache_tester #(.PR(1'b0), .BYP(1'b0)) t_two  (.done(d0), .checks(c0), .failures(f0),
    .n_raw_stall(s0), .n_raw_bypass(b0), .n_miss(m0), .n_struct(x0));
  pipe_cache_tester #(.PR(1'b1), .BYP(1'b0)) t_stall(.done(d1), .checks(c1), .failures(f1),
    .n_raw_stall(s1), .n_raw_bypass(b1), .n_miss(m1), .n_struct(x1));
  pipe_cache_tester #(.PR(1'b1), .BYP(1'b1)) t_byp  (.done(d2), .checks(c2), .failures(f2),
    .n_raw_stall(s2), .n_raw_bypass(b2), .n_miss(m2), .n_struct(x2));
  pipe_cache_tester #(.PR(1'b1), .BYP(1'b0), .DUP(1'b0)) t_sp (.done(d3), .checks(c3), .failures(f3),
    .n_raw_stall(s3), .n_raw_bypass(b3), .n_miss(m3), .n_struct(x3));

  initial begin
    #200000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", c0 + c1 + c2 + c3, f0 + f1 + f2 + f3 + 1);
    $finish;
  end

  initial begin
    wait (d0 === 1'b1 && d1 === 1'b1 && d2 === 1'b1 && d3 === 1'b1);
    $display("misses: %0d %0d %0d %0d; raw stalls %0d, raw bypasses %0d, structural stalls %0d",
             m0, m1, m2, m3, s1, b2, x3);
    $display("TB_RESULT checks=%0d failures=%0d", c0 + c1 + c2 + c3, f0 + f1 + f2 + f3);
    $finish;
  end
endmodule
