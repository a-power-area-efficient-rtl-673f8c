// tb_rdp: self-checking testbench for the reconfigurable datapath.
// Runs random operations of all six modes and compares each result with a
// real-number model (tolerances: a few LSBs for products and sums, 0.2 %
// + 5e-4 for normalisation and division, and an absolute 1.83e-3 for
// powers with base 0.3..1 and exponent 1..32, the maximum power error the
// reference architecture reports). Also checks latencies.
module tb_rdp;
  import ge_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic in_valid, in_ready, out_valid;
  rdp_mode_t mode;
  vec4_t a, b, out;
  int checks = 0, failures = 0;

  rdp dut (.clk, .rst_n, .in_valid, .in_ready, .mode, .a, .b, .out_valid, .out);

  function automatic real r(fx_t v); return real'(v) / 65536.0; endfunction
  function automatic fx_t f(real v); return fx_t'($rtoi(v * 65536.0)); endfunction
  function automatic real rnd(real lo, real hi);
    return lo + (hi - lo) * real'($urandom_range(0, 1000000)) / 1000000.0;
  endfunction

  task automatic chk(string what, real got, real exp, real rel, real absol);
    real err = got - exp;
    if (err < 0) err = -err;
    checks++;
    if (err > absol + rel * ((exp < 0) ? -exp : exp)) begin
      failures++;
      $display("FAIL %s: got %f expected %f", what, got, exp);
    end
  endtask

  task automatic run(rdp_mode_t m, vec4_t ia, vec4_t ib, int exp_lat);
    int lat = 0;
    @(negedge clk);
    mode = m; a = ia; b = ib; in_valid = 1;
    @(negedge clk);
    in_valid = 0;
    lat = 1;
    while (!out_valid && lat < 50) begin @(negedge clk); lat++; end
    checks++;
    if (lat != exp_lat) begin
      failures++;
      $display("FAIL latency mode %0d: %0d expected %0d", m, lat, exp_lat);
    end
  endtask

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    vec4_t ia, ib;
    real ex, ey, ez, l, n, base;
    in_valid = 0; mode = M_TRANS_DP; a = '0; b = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 40; t++) begin
      ia = '{x: f(rnd(-4, 4)), y: f(rnd(-4, 4)), z: f(rnd(-4, 4)), w: f(rnd(-8, 8))};
      ib = '{x: f(rnd(-4, 4)), y: f(rnd(-4, 4)), z: f(rnd(-4, 4)), w: f(rnd(0.5, 8))};
      // TRANS_DP
      run(M_TRANS_DP, ia, ib, 4);
      ex = r(ia.x)*r(ib.x) + r(ia.y)*r(ib.y) + r(ia.z)*r(ib.z) + r(ia.w);
      chk("trans_dp", r(out.x), ex, 0.0, 4.0/65536);
      // LIGHT_DP
      run(M_LIGHT_DP, ia, ib, 4);
      ex = r(ia.x)*r(ib.x) + r(ia.y)*r(ib.y) + r(ia.z)*r(ib.z);
      chk("light_dp", r(out.x), ex, 0.0, 4.0/65536);
      // VEC_SUB
      run(M_VEC_SUB, ia, ib, 4);
      chk("vec_sub.x", r(out.x), r(ia.x) - r(ib.x), 0.0, 0.0);
      chk("vec_sub.y", r(out.y), r(ia.y) - r(ib.y), 0.0, 0.0);
      chk("vec_sub.z", r(out.z), r(ia.z) - r(ib.z), 0.0, 0.0);
      // VEC_NORM
      run(M_VEC_NORM, ia, ib, 12);
      l = $sqrt(r(ib.x)**2 + r(ib.y)**2 + r(ib.z)**2);
      chk("vec_norm.x", r(out.x), r(ib.x) / l, 0.002, 0.0005);
      chk("vec_norm.y", r(out.y), r(ib.y) / l, 0.002, 0.0005);
      chk("vec_norm.z", r(out.z), r(ib.z) / l, 0.002, 0.0005);
      // PD (positive and negative w)
      if (t % 2 == 1) ib.w = -ib.w;
      run(M_PD, ia, ib, 9);
      chk("pd.x", r(out.x), r(ib.x) / r(ib.w), 0.002, 0.0005);
      chk("pd.y", r(out.y), r(ib.y) / r(ib.w), 0.002, 0.0005);
      chk("pd.z", r(out.z), r(ib.z) / r(ib.w), 0.002, 0.0005);
      chk("pd.w", r(out.w), 1.0 / r(ib.w), 0.002, 0.0005);
      // POW
      base = rnd(0.3, 1.0);
      n    = real'($urandom_range(1, 32));
      ia.x = f(n); ib.y = f(base);
      run(M_POW, ia, ib, 9);
      ey = base ** n;
      chk("pow", r(out.x), ey, 0.0, 1.83e-3);
    end
    // POW underflow saturates to the smallest value instead of wrapping
    ia.x = f(64.0); ib.y = f(0.05);
    run(M_POW, ia, ib, 9);
    ez = r(out.x);
    chk("pow underflow", ez, 0.0, 0.0, 3.0/65536);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
