// tb_geometry_engine: end-to-end test of the geometry engine.
//
// Scene: a curved height-field patch (z = 0.5(1 - x^2 - y^2)) on a G x G
// grid of quads, two triangles each, plus two triangles with reversed
// winding that must be culled. The camera looks at the patch through a
// tilted modelview matrix, a perspective projection and a 128 x 128
// viewport; one point light. The scene is run at level 0, level 1 and
// level 2. A behavioural external memory answers vertex requests with two
// beats (object coordinate, normal) after a short delay; the output is
// randomly back-pressured.
//
// A real-number model computes, for every triangle, the culling decision,
// the transformed and lit vertices, the highlight test, and for subdivided
// triangles the grid of generated vertices by linear interpolation in eye
// and window space. Each output vertex (window x, y, z, intensity) is
// compared with the model (window coordinates within 2 % + 0.1, intensity
// within 0.02 + 2 %). Triangles whose highlight decision lies within 0.03 of
// the threshold may go either way; all others must match.
// Mechanisms counted (each must occur): cache hit, cache miss, entry
// replacement, reuse of a lit vertex, backface cull, level-1 and level-2
// subdivision, unsubdivided triangle at level > 0, output back-pressure.
module tb_geometry_engine;
  import ge_pkg::*;

  localparam int G      = 4;                 // quads per side
  localparam int NV     = (G + 1) * (G + 1);
  localparam int NT     = 2 * G * G + 2;     // two reversed triangles at the end
  localparam int IBASE  = 100;               // first vertex index

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic  idx_valid, idx_ready;
  idx_t  idx_data;
  logic  host_we;
  logic [5:0] host_addr;
  vec4_t host_wdata, host_rdata;
  logic  mem_req_valid, mem_req_ready, mem_rsp_valid;
  idx_t  mem_req_idx;
  vec4_t mem_rsp_data;
  logic  out_valid, out_last, out_ready;
  vec4_t out_data;
  logic  ev_hit, ev_miss, ev_cull, ev_subdiv, busy;

  geometry_engine dut (.*);

  int checks = 0, failures = 0;
  int cnt_hit = 0, cnt_miss = 0, cnt_cull = 0, cnt_sub1 = 0, cnt_sub2 = 0;
  int cnt_gouraud_hi = 0, cnt_stall = 0, cnt_reuse_lit = 0;
  int cycles = 0;
  int cur_level = 0;

  function automatic fx_t f(real v); return fx_t'($rtoi(v * 65536.0)); endfunction
  function automatic real r(fx_t v); return real'(v) / 65536.0; endfunction

  // ---------------- scene ----------------
  real ox[NV], oy[NV], oz[NV], nx[NV], ny[NV], nz[NV];
  int  tri_i[NT][3];
  real M[3][4];                   // modelview rows
  real P[4][4];                   // projection rows
  real VP[3][2];                  // viewport scale, offset
  real lpos[3];
  real Id = 0.6, Is = 0.4, Ia = 0.1, shin = 8.0;
  real thr = 0.7;

  task automatic build_scene();
    real c = $cos(0.35), s = $sin(0.35);
    int t = 0;
    for (int j = 0; j <= G; j++)
      for (int i = 0; i <= G; i++) begin
        int v = j * (G + 1) + i;
        ox[v] = -1.0 + 2.0 * i / G;
        oy[v] = -1.0 + 2.0 * j / G;
        oz[v] = 0.5 * (1.0 - ox[v] * ox[v] - oy[v] * oy[v]);
        nx[v] = ox[v]; ny[v] = oy[v]; nz[v] = 1.0;
      end
    for (int j = 0; j < G; j++)
      for (int i = 0; i < G; i++) begin
        int v0 = j * (G + 1) + i;
        tri_i[t] = '{v0, v0 + 1, v0 + G + 2}; t++;
        tri_i[t] = '{v0, v0 + G + 2, v0 + G + 1}; t++;
      end
    tri_i[t] = '{0, G + 2, 1}; t++;            // reversed: backface
    tri_i[t] = '{NV - 1, 0, NV - 2}; t++;      // reversed and shared vertices
    // modelview: rotation about x by 0.35 rad, then translation (0, 0, -4)
    M = '{'{1.0, 0.0, 0.0, 0.0}, '{0.0, c, -s, 0.0}, '{0.0, s, c, -4.0}};
    P = '{'{1.0, 0.0, 0.0, 0.0}, '{0.0, 1.0, 0.0, 0.0},
          '{0.0, 0.0, -11.0 / 9.0, -20.0 / 9.0}, '{0.0, 0.0, -1.0, 0.0}};
    VP = '{'{64.0, 64.0}, '{64.0, 64.0}, '{0.5, 0.5}};
    lpos = '{1.0, 1.5, 0.0};
  endtask

  // ---------------- reference model ----------------
  typedef struct { real p[3]; real n[3]; real w[3]; real i; real nh; } mv_t;

  function automatic void norm3(ref real v[3]);
    real l = $sqrt(v[0] * v[0] + v[1] * v[1] + v[2] * v[2]);
    for (int k = 0; k < 3; k++) v[k] = v[k] / l;
  endfunction

  function automatic void light(ref mv_t m);
    real L[3], V[3], H[3], N[3], nl, nh;
    for (int k = 0; k < 3; k++) begin L[k] = lpos[k] - m.p[k]; V[k] = m.p[k]; N[k] = m.n[k]; end
    norm3(L); norm3(V); norm3(N);
    for (int k = 0; k < 3; k++) H[k] = L[k] - V[k];
    norm3(H);
    nl = N[0] * L[0] + N[1] * L[1] + N[2] * L[2];
    nh = N[0] * H[0] + N[1] * H[1] + N[2] * H[2];
    if (nl < 0) nl = 0;
    if (nh < 0) nh = 0;
    m.nh = nh;
    m.i  = Id * nl + Is * (nh ** shin) + Ia;
  endfunction

  function automatic mv_t vertex(int v);
    mv_t m;
    real o[3], clip[4];
    o = '{ox[v], oy[v], oz[v]};
    for (int k = 0; k < 3; k++) begin
      m.p[k] = M[k][0] * o[0] + M[k][1] * o[1] + M[k][2] * o[2] + M[k][3];
      m.n[k] = M[k][0] * nx[v] + M[k][1] * ny[v] + M[k][2] * nz[v];
    end
    for (int k = 0; k < 4; k++)
      clip[k] = P[k][0] * m.p[0] + P[k][1] * m.p[1] + P[k][2] * m.p[2] + P[k][3];
    for (int k = 0; k < 3; k++) m.w[k] = VP[k][0] * clip[k] / clip[3] + VP[k][1];
    light(m);
    return m;
  endfunction

  function automatic bit is_back(int t);
    real e1[3], e2[3], n[3], vv[3], eye[3], d;
    int a = tri_i[t][0], b = tri_i[t][1], c = tri_i[t][2];
    real c0 = $cos(0.35), s0 = $sin(0.35);
    // eye in object space: -R^T t with t = (0, 0, -4), i.e. (0, 4 sin, 4 cos)
    eye = '{0.0, s0 * 4.0, c0 * 4.0};
    e1 = '{ox[b] - ox[a], oy[b] - oy[a], oz[b] - oz[a]};
    e2 = '{ox[c] - ox[a], oy[c] - oy[a], oz[c] - oz[a]};
    n  = '{e1[1] * e2[2] - e1[2] * e2[1], e1[2] * e2[0] - e1[0] * e2[2], e1[0] * e2[1] - e1[1] * e2[0]};
    vv = '{eye[0] - ox[a], eye[1] - oy[a], eye[2] - oz[a]};
    d  = n[0] * vv[0] + n[1] * vv[1] + n[2] * vv[2];
    return d <= 0.0;
  endfunction

  // grid point (rr, cc) of a triangle subdivided into ns segments
  function automatic mv_t gridpt(mv_t a, mv_t b, mv_t c, int rr, int cc, int ns);
    mv_t m;
    real u = real'(rr) / ns, q = real'(cc) / ns;
    // V = Va + rr*d2 + cc*d1, d2 = (Vb-Va)/ns, d1 = (Vc-Vb)/ns
    for (int k = 0; k < 3; k++) begin
      m.p[k] = a.p[k] + u * (b.p[k] - a.p[k]) + q * (c.p[k] - b.p[k]);
      m.n[k] = a.n[k] + u * (b.n[k] - a.n[k]) + q * (c.n[k] - b.n[k]);
      m.w[k] = a.w[k] + u * (b.w[k] - a.w[k]) + q * (c.w[k] - b.w[k]);
    end
    if (rr == 0) return a;
    if (rr == ns && cc == 0) return b;
    if (rr == ns && cc == ns) return c;
    light(m);
    return m;
  endfunction

  // ---------------- expected stream ----------------
  // per visible triangle: model vertices and decision
  mv_t  mv[NV];
  int   vis_t[$];

  task automatic chk_vertex(vec4_t o, mv_t m, string what);
    real ex[4], got[4];
    got = '{r(o.x), r(o.y), r(o.z), r(o.w)};
    ex  = '{m.w[0], m.w[1], m.w[2], m.i};
    for (int k = 0; k < 4; k++) begin
      real err = got[k] - ex[k];
      real tol = (k < 3) ? 0.1 + 0.02 * ((ex[k] < 0) ? -ex[k] : ex[k])
                         : 0.02 + 0.02 * ex[k];
      if (err < 0) err = -err;
      checks++;
      if (err > tol) begin
        failures++;
        if (failures < 20)
          $display("FAIL %s lane %0d: got %f expected %f (level %0d)", what, k, got[k], ex[k], cur_level);
      end
    end
  endtask

  // ---------------- host and memory ----------------
  task automatic host_write(int addr, vec4_t d);
    @(negedge clk);
    host_we = 1; host_addr = 6'(addr); host_wdata = d;
    @(negedge clk);
    host_we = 0;
  endtask

  task automatic load_constants(int level);
    for (int k = 0; k < 3; k++) host_write(k, '{x: f(M[k][0]), y: f(M[k][1]), z: f(M[k][2]), w: f(M[k][3])});
    for (int k = 0; k < 3; k++) host_write(3 + k, '{x: f(M[k][0]), y: f(M[k][1]), z: f(M[k][2]), w: 0});
    for (int k = 0; k < 4; k++) host_write(6 + k, '{x: f(P[k][0]), y: f(P[k][1]), z: f(P[k][2]), w: f(P[k][3])});
    host_write(10, '{x: f(VP[0][0]), y: 0, z: 0, w: f(VP[0][1])});
    host_write(11, '{x: 0, y: f(VP[1][0]), z: 0, w: f(VP[1][1])});
    host_write(12, '{x: 0, y: 0, z: f(VP[2][0]), w: f(VP[2][1])});
    host_write(13, '{x: f(lpos[0]), y: f(lpos[1]), z: f(lpos[2]), w: 0});
    host_write(14, '{x: f(Id), y: f(Is), z: 0, w: f(Ia)});
    host_write(15, '{x: f(shin), y: 0, z: 0, w: 0});
    host_write(16, '{x: 0, y: f($sin(0.35) * 4.0), z: f($cos(0.35) * 4.0), w: 0});
    host_write(17, '{x: level, y: f(thr), z: 0, w: 0});
  endtask

  // external memory: two beats after a short delay
  int mem_q[$];
  int mem_delay = 0, mem_beat = 0, mem_cur = 0;
  assign mem_req_ready = 1'b1;
  always @(posedge clk) begin
    if (mem_req_valid && mem_req_ready) mem_q.push_back(int'(mem_req_idx) - IBASE);
  end
  always @(negedge clk) begin
    mem_rsp_valid = 0;
    if (mem_beat == 0 && mem_q.size() > 0) begin
      if (mem_delay < 3) mem_delay++;
      else begin mem_delay = 0; mem_cur = mem_q.pop_front(); mem_beat = 1; end
    end
    if (mem_beat == 1) begin
      mem_rsp_valid = 1;
      mem_rsp_data = '{x: f(ox[mem_cur]), y: f(oy[mem_cur]), z: f(oz[mem_cur]), w: f(1.0)};
      mem_beat = 2;
    end else if (mem_beat == 2) begin
      mem_rsp_valid = 1;
      mem_rsp_data = '{x: f(nx[mem_cur]), y: f(ny[mem_cur]), z: f(nz[mem_cur]), w: 0};
      mem_beat = 0;
    end
  end

  // event counters
  always @(posedge clk) begin
    cycles++;
    if (ev_hit) begin
      cnt_hit++;
      if (dut.hit_processed) cnt_reuse_lit++;
    end
    if (ev_miss) cnt_miss++;
    if (ev_cull) cnt_cull++;
    if (ev_subdiv && cur_level == 1) cnt_sub1++;
    if (ev_subdiv && cur_level == 2) cnt_sub2++;
    if (out_valid && !out_ready) cnt_stall++;
  end

  // output collector
  vec4_t outq[$];
  logic  subq[$];
  always @(posedge clk) begin
    if (out_valid && out_ready) outq.push_back(out_data);
    if (ev_subdiv) subq.push_back(1'b1);
  end
  always @(negedge clk) out_ready = ($urandom_range(0, 3) != 0);

  // ---------------- run one level ----------------
  task automatic run_level(int level);
    int ns = 1 << level;
    int pos = 0;
    int exp_cull = 0;
    int cull0 = cnt_cull;
    cur_level = level;
    outq.delete(); subq.delete();
    load_constants(level);
    // feed indices
    fork
      begin
        for (int t = 0; t < NT; t++)
          for (int k = 0; k < 3; k++) begin
            @(negedge clk);
            idx_valid = 1; idx_data = idx_t'(IBASE + tri_i[t][k]);
            do @(posedge clk); while (!idx_ready);
            @(negedge clk);
            idx_valid = 0;
          end
      end
    join
    // wait until drained
    repeat (20) @(posedge clk);
    while (busy) @(posedge clk);
    repeat (50) @(posedge clk);
    // check the stream
    for (int t = 0; t < NT; t++) begin
      mv_t a, b, c;
      bit  sub_exp, amb;
      int  n_out;
      if (is_back(t)) begin exp_cull++; continue; end
      a = mv[tri_i[t][0]]; b = mv[tri_i[t][1]]; c = mv[tri_i[t][2]];
      sub_exp = (level > 0) && (a.nh > thr || b.nh > thr || c.nh > thr);
      amb = (level > 0) && ((a.nh - thr) ** 2 < 0.0009 || (b.nh - thr) ** 2 < 0.0009 ||
                            (c.nh - thr) ** 2 < 0.0009);
      // decide by what came out: Ns^2 triangles if subdivided
      n_out = 3;
      if (sub_exp || amb) begin
        // check the output count available: a subdivided triangle has ns*ns*3 vertices
        if (amb && !sub_exp) n_out = (outq.size() - pos >= 3 * ns * ns && level > 0 &&
                                      subq.size() > 0) ? 3 * ns * ns : 3;
        else n_out = 3 * ns * ns;
      end
      if (level > 0 && !sub_exp && !amb) cnt_gouraud_hi++;
      if (pos + n_out > outq.size()) begin
        failures++; checks++;
        $display("FAIL level %0d: output stream too short at triangle %0d", level, t);
        break;
      end
      if (n_out == 3) begin
        chk_vertex(outq[pos], a, "v0"); chk_vertex(outq[pos + 1], b, "v1");
        chk_vertex(outq[pos + 2], c, "v2");
      end else begin
        int q = pos;
        for (int rr = 0; rr < ns; rr++)
          for (int cc = 0; cc <= rr; cc++) begin
            chk_vertex(outq[q], gridpt(a, b, c, rr, cc, ns), "up0");
            chk_vertex(outq[q + 1], gridpt(a, b, c, rr + 1, cc, ns), "up1");
            chk_vertex(outq[q + 2], gridpt(a, b, c, rr + 1, cc + 1, ns), "up2");
            q += 3;
            if (cc < rr) begin
              chk_vertex(outq[q], gridpt(a, b, c, rr, cc, ns), "dn0");
              chk_vertex(outq[q + 1], gridpt(a, b, c, rr + 1, cc + 1, ns), "dn1");
              chk_vertex(outq[q + 2], gridpt(a, b, c, rr, cc + 1, ns), "dn2");
              q += 3;
            end
          end
        if (subq.size() > 0) void'(subq.pop_front());
      end
      pos += n_out;
    end
    checks++;
    if (pos != outq.size()) begin
      failures++;
      $display("FAIL level %0d: %0d output vertices, expected %0d", level, outq.size(), pos);
    end
    checks++;
    if (cnt_cull - cull0 != exp_cull) begin
      failures++;
      $display("FAIL level %0d: %0d culled, expected %0d", level, cnt_cull - cull0, exp_cull);
    end
    $display("level %0d: %0d output vertices, %0d cycles so far", level, outq.size(), cycles);
  endtask

  initial begin
    #40000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    idx_valid = 0; idx_data = '0; host_we = 0; host_addr = '0; host_wdata = '0;
    mem_rsp_valid = 0; mem_rsp_data = '0; out_ready = 1;
    build_scene();
    for (int v = 0; v < NV; v++) mv[v] = vertex(v);
    repeat (3) @(negedge clk);
    rst_n = 1;
    run_level(0);
    run_level(1);
    run_level(2);
    $display("events: hit %0d miss %0d reuse-lit %0d cull %0d sub1 %0d sub2 %0d gouraud@L>0 %0d stall %0d",
             cnt_hit, cnt_miss, cnt_reuse_lit, cnt_cull, cnt_sub1, cnt_sub2, cnt_gouraud_hi, cnt_stall);
    checks += 8;
    if (cnt_hit == 0)        begin failures++; $display("FAIL no cache hit"); end
    if (cnt_miss == 0)       begin failures++; $display("FAIL no cache miss"); end
    if (cnt_miss <= 16)      begin failures++; $display("FAIL no entry replacement"); end
    if (cnt_reuse_lit == 0)  begin failures++; $display("FAIL no reuse of a processed vertex"); end
    if (cnt_cull == 0)       begin failures++; $display("FAIL no culling"); end
    if (cnt_sub1 == 0 || cnt_sub2 == 0) begin failures++; $display("FAIL no subdivision"); end
    if (cnt_gouraud_hi == 0) begin failures++; $display("FAIL no unsubdivided triangle at level > 0"); end
    if (cnt_stall == 0)      begin failures++; $display("FAIL no output back-pressure"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
