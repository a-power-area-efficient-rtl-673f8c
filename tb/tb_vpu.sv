// tb_vpu: self-checking testbench for the vertex processing unit.
// The testbench loads the constant memory (modelview with translation,
// normal matrix, perspective projection, viewport, light, material), holds
// a small vertex-cache array and plays both dispatch queues.
// Original vertices (queue 1, random points in front of the camera with
// random normals) must produce the eye coordinate, eye normal, window
// coordinate with 1/w and the intensity with N.H, all compared with a
// real-number model (2 % + small absolute tolerances); generated vertices
// (queue 2, eye coordinate and normal preloaded) must produce the same
// lighting without touching the other words. lit_valid must name the entry
// and carry the highlight result (N.H > threshold, ignored within 0.03 of
// the threshold). Queue 2 must be served before a waiting queue-1 entry.
// Cycle counts per vertex are measured and must equal the micro-program's
// fixed schedule (constant for each vertex kind).
module tb_vpu;
  import ge_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic dq1_valid, dq1_pop, dq2_valid, dq2_pop, const_we, wr_en, lit_valid, lit_htest, busy;
  ent_t dq1_data, dq2_data, lit_ent;
  logic [3:0] const_addr;
  vec4_t const_wdata, rd_data, wr_data;
  fx_t h_threshold;
  caddr_t rd_addr, wr_addr;
  int checks = 0, failures = 0, n_prio = 0, n_hi = 0, n_lo = 0;

  vpu dut (.*);

  vec4_t mem [32][NWORDS];
  assign rd_data = mem[rd_addr.ent][rd_addr.word];
  always @(posedge clk) if (wr_en) mem[wr_addr.ent][wr_addr.word] <= wr_data;

  function automatic fx_t f(real v); return fx_t'($rtoi(v * 65536.0)); endfunction
  function automatic real r(fx_t v); return real'(v) / 65536.0; endfunction
  function automatic real rnd(real lo, real hi);
    return lo + (hi - lo) * real'($urandom_range(0, 100000)) / 100000.0;
  endfunction

  real M[3][4], P[4][4], VP[3][2], lpos[3];
  real Id = 0.5, Is = 0.5, Ia = 0.1, shin = 4.0, thr = 0.7;

  task automatic chk(string what, real got, real exp, real rel, real absol);
    real err = got - exp;
    if (err < 0) err = -err;
    checks++;
    if (err > absol + rel * ((exp < 0) ? -exp : exp)) begin
      failures++;
      $display("FAIL %s: got %f expected %f", what, got, exp);
    end
  endtask

  function automatic void norm3(ref real v[3]);
    real l = $sqrt(v[0] * v[0] + v[1] * v[1] + v[2] * v[2]);
    for (int k = 0; k < 3; k++) v[k] = v[k] / l;
  endfunction

  // lighting model: returns intensity and N.H
  task automatic light(real p[3], real n[3], output real inten, output real nh);
    real L[3], V[3], H[3], N[3], nl;
    for (int k = 0; k < 3; k++) begin L[k] = lpos[k] - p[k]; V[k] = p[k]; N[k] = n[k]; end
    norm3(L); norm3(V); norm3(N);
    for (int k = 0; k < 3; k++) H[k] = L[k] - V[k];
    norm3(H);
    nl = N[0] * L[0] + N[1] * L[1] + N[2] * L[2];
    nh = N[0] * H[0] + N[1] * H[1] + N[2] * H[2];
    if (nl < 0) nl = 0;
    if (nh < 0) nh = 0;
    inten = Id * nl + Is * (nh ** shin) + Ia;
  endtask

  task automatic cw(int a, real x, real y, real z, real w);
    @(negedge clk);
    const_we = 1; const_addr = 4'(a); const_wdata = '{x: f(x), y: f(y), z: f(z), w: f(w)};
    @(negedge clk);
    const_we = 0;
  endtask

  // process one entry through a queue; returns cycles from pop to lit_valid
  task automatic run(bit gen, ent_t e, output int cyc, output logic ht);
    @(negedge clk);
    if (gen) begin dq2_valid = 1; dq2_data = e; end
    else begin dq1_valid = 1; dq1_data = e; end
    while (!(gen ? dq2_pop : dq1_pop)) @(negedge clk);
    @(negedge clk);
    dq1_valid = 0; dq2_valid = 0;
    cyc = 1;
    while (!lit_valid && cyc < 2000) begin @(negedge clk); cyc++; end
    checks++;
    if (lit_ent != e) begin failures++; $display("FAIL lit_ent %0d expected %0d", lit_ent, e); end
    ht = lit_htest;
  endtask

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real c, s;
    int cyc, cyc_orig, cyc_gen;
    logic ht;
    dq1_valid = 0; dq2_valid = 0; dq1_data = '0; dq2_data = '0;
    const_we = 0; const_addr = '0; const_wdata = '0; h_threshold = f(thr);
    for (int e = 0; e < 32; e++) for (int w = 0; w < NWORDS; w++) mem[e][w] = '0;
    c = $cos(0.5); s = $sin(0.5);
    M = '{'{c, 0.0, s, 0.5}, '{0.0, 1.0, 0.0, -0.25}, '{-s, 0.0, c, -5.0}};
    P = '{'{1.0, 0.0, 0.0, 0.0}, '{0.0, 1.0, 0.0, 0.0},
          '{0.0, 0.0, -11.0 / 9.0, -20.0 / 9.0}, '{0.0, 0.0, -1.0, 0.0}};
    VP = '{'{100.0, 100.0}, '{80.0, 80.0}, '{0.5, 0.5}};
    lpos = '{2.0, 3.0, 1.0};
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < 3; k++) cw(k, M[k][0], M[k][1], M[k][2], M[k][3]);
    for (int k = 0; k < 3; k++) cw(3 + k, M[k][0], M[k][1], M[k][2], 0.0);
    for (int k = 0; k < 4; k++) cw(6 + k, P[k][0], P[k][1], P[k][2], P[k][3]);
    cw(10, VP[0][0], 0, 0, VP[0][1]);
    cw(11, 0, VP[1][0], 0, VP[1][1]);
    cw(12, 0, 0, VP[2][0], VP[2][1]);
    cw(13, lpos[0], lpos[1], lpos[2], 0);
    cw(14, Id, Is, 0, Ia);
    cw(15, shin, 0, 0, 0);
    cyc_orig = -1; cyc_gen = -1;
    for (int t = 0; t < 60; t++) begin
      real o[3], n[3], pe[3], ne[3], clip[4], win[3], inten, nh;
      automatic ent_t e = ent_t'($urandom_range(0, 15));
      automatic bit gen = (t % 3 == 2);
      if (gen) e = ent_t'(16 + $urandom_range(0, 15));
      for (int k = 0; k < 3; k++) begin o[k] = rnd(-1.5, 1.5); n[k] = rnd(-1, 1); end
      n[2] = n[2] + 1.5;   // mostly facing the viewer
      for (int k = 0; k < 3; k++) begin
        pe[k] = M[k][0] * o[0] + M[k][1] * o[1] + M[k][2] * o[2] + M[k][3];
        ne[k] = M[k][0] * n[0] + M[k][1] * n[1] + M[k][2] * n[2];
      end
      for (int k = 0; k < 4; k++) clip[k] = P[k][0] * pe[0] + P[k][1] * pe[1] + P[k][2] * pe[2] + P[k][3];
      for (int k = 0; k < 3; k++) win[k] = VP[k][0] * clip[k] / clip[3] + VP[k][1];
      for (int w = 0; w < NWORDS; w++) mem[e][w] = '0;
      if (gen) begin
        mem[e][W_EYE]  = '{x: f(pe[0]), y: f(pe[1]), z: f(pe[2]), w: 0};
        mem[e][W_EYEN] = '{x: f(ne[0]), y: f(ne[1]), z: f(ne[2]), w: 0};
      end else begin
        mem[e][W_OBJ]  = '{x: f(o[0]), y: f(o[1]), z: f(o[2]), w: f(1.0)};
        mem[e][W_OBJN] = '{x: f(n[0]), y: f(n[1]), z: f(n[2]), w: 0};
      end
      light(pe, ne, inten, nh);
      run(gen, e, cyc, ht);
      // fixed schedule per vertex kind
      checks++;
      if (gen) begin
        if (cyc_gen < 0) cyc_gen = cyc;
        if (cyc != cyc_gen) begin failures++; $display("FAIL generated vertex took %0d cycles, not %0d", cyc, cyc_gen); end
      end else begin
        if (cyc_orig < 0) cyc_orig = cyc;
        if (cyc != cyc_orig) begin failures++; $display("FAIL vertex took %0d cycles, not %0d", cyc, cyc_orig); end
      end
      @(negedge clk);
      if (!gen) begin
        for (int k = 0; k < 3; k++) begin
          chk("eye", r(mem[e][W_EYE][32*k +: 32]), pe[k], 0.0, 8.0 / 65536);
          chk("eye normal", r(mem[e][W_EYEN][32*k +: 32]), ne[k], 0.0, 8.0 / 65536);
          chk("window", r(mem[e][W_WIN][32*k +: 32]), win[k], 0.02, 0.02);
        end
        chk("1/w", r(mem[e][W_WIN].w), 1.0 / clip[3], 0.02, 0.001);
      end else begin
        checks++;
        if (mem[e][W_WIN] != '0 || mem[e][W_OBJ] != '0) begin failures++; $display("FAIL generated vertex transformed"); end
      end
      chk("intensity", r(mem[e][W_COL].x), inten, 0.01, 0.005);
      chk("N.H", r(mem[e][W_COL].y), nh, 0.03, 0.01);
      if ((nh - thr) ** 2 > 0.0009) begin
        checks++;
        if (ht != (nh > thr)) begin failures++; $display("FAIL htest %0d for N.H %f", ht, nh); end
        if (ht) n_hi++; else n_lo++;
      end
    end
    // priority: both queues waiting, queue 2 first
    @(negedge clk);
    dq1_valid = 1; dq1_data = 5'd3; dq2_valid = 1; dq2_data = 5'd20;
    #1;
    checks++;
    if (!(dq2_pop && !dq1_pop)) begin failures++; $display("FAIL queue 2 not first"); end
    else n_prio++;
    @(negedge clk);
    dq2_valid = 0;
    while (dq1_valid) begin @(negedge clk); if (dq1_pop) dq1_valid = 0; end
    repeat (1000) @(negedge clk);
    $display("cycles per vertex: original %0d, generated %0d", cyc_orig, cyc_gen);
    checks += 2;
    if (n_hi == 0 || n_lo == 0) begin failures++; $display("FAIL highlight test one-sided"); end
    if (!(cyc_gen < cyc_orig)) begin failures++; $display("FAIL generated vertices not shorter"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
