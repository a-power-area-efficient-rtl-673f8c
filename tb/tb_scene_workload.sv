// tb_scene_workload: scene-sized run of the geometry engine at its default
// parameters.
//
// The evaluation scenes of the reference architecture have 304 to 1418
// triangles. This test builds a closed mesh of that size, a torus of
// 32 x 16 quads: 512 vertices and 1024 triangles, the triangle count of the
// largest teapot scene. It streams the mesh quad row by quad row, as a mesher
// would, at levels 0, 1 and 2, with an always-ready output and a memory that
// answers after 3 cycles.
//
// What is checked, per level:
// - Every index is looked up once (hits + misses = 3 x 1024).
// - The vertex-cache hit rate is at least 50 %. The published scenes reach
//   53.6 % to 63.3 % with a 16-entry cache.
// - The number of culled triangles matches a real-number backface model.
//   Triangles seen nearly edge-on, where the normalised dot product is
//   below 0.05, may go either way.
// - The output holds (visible + (Ns^2 - 1) x subdivided) triangles, and
//   out_last marks every third vertex.
// - At level 0, no triangle is subdivided.
// - At levels 1 and 2, the subdivided triangles are between the model's
//   count of clearly highlighted triangles and its count of possibly
//   highlighted ones. The highlight threshold is 0.7 with a margin of 0.03.
// The cycle count and the vertex rate at 100 MHz are printed, so the cost
// of subdivision can be compared between levels.
module tb_scene_workload;
  import ge_pkg::*;

  localparam int NU    = 32;                 // segments around the main ring
  localparam int NVV   = 16;                 // segments around the tube
  localparam int NV    = NU * NVV;
  localparam int NT    = 2 * NU * NVV;
  localparam real RMAJ = 4.0, RMIN = 1.6;    // object units
  localparam real ANG  = 0.6;                // camera tilt about x

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
  int cnt_hit, cnt_miss, cnt_cull, cnt_sub, cnt_out, cnt_last_bad, cycles;

  function automatic fx_t f(real v); return fx_t'($rtoi(v * 65536.0)); endfunction

  // ---------------- scene ----------------
  real ox[NV], oy[NV], oz[NV], nx[NV], ny[NV], nz[NV];
  int  tri_i[NT][3];
  real M[3][4], N3[3][3], P[4][4], VP[3][2], lpos[3], eye[3];
  real Id = 0.6, Is = 0.4, Ia = 0.1, shin = 8.0, thr = 0.7;
  real nh_v[NV];

  function automatic int vid(int u, int v);
    return ((v + NVV) % NVV) * NU + ((u + NU) % NU);
  endfunction

  task automatic build_scene();
    real c = $cos(ANG), s = $sin(ANG), k = 0.25;
    int t = 0;
    for (int v = 0; v < NVV; v++)
      for (int u = 0; u < NU; u++) begin
        real a = 6.283185307 * u / NU, b = 6.283185307 * v / NVV;
        int i = vid(u, v);
        ox[i] = (RMAJ + RMIN * $cos(b)) * $cos(a);
        oy[i] = (RMAJ + RMIN * $cos(b)) * $sin(a);
        oz[i] = RMIN * $sin(b);
        nx[i] = $cos(b) * $cos(a); ny[i] = $cos(b) * $sin(a); nz[i] = $sin(b);
      end
    // counter-clockwise seen from outside
    for (int v = 0; v < NVV; v++)
      for (int u = 0; u < NU; u++) begin
        tri_i[t] = '{vid(u, v), vid(u + 1, v), vid(u + 1, v + 1)}; t++;
        tri_i[t] = '{vid(u, v), vid(u + 1, v + 1), vid(u, v + 1)}; t++;
      end
    // modelview: scale 1/4, rotation about x, translation (0, 0, -4)
    M  = '{'{k, 0.0, 0.0, 0.0}, '{0.0, k * c, -k * s, 0.0}, '{0.0, k * s, k * c, -4.0}};
    N3 = '{'{1.0, 0.0, 0.0}, '{0.0, c, -s}, '{0.0, s, c}};
    P  = '{'{1.0, 0.0, 0.0, 0.0}, '{0.0, 1.0, 0.0, 0.0},
           '{0.0, 0.0, -11.0 / 9.0, -20.0 / 9.0}, '{0.0, 0.0, -1.0, 0.0}};
    VP = '{'{64.0, 64.0}, '{64.0, 64.0}, '{0.5, 0.5}};
    lpos = '{2.0, 2.0, 0.0};
    eye  = '{0.0, 16.0 * s, 16.0 * c};      // -(kR)^-1 t in object space
  endtask

  function automatic void norm3(ref real v[3]);
    real l = $sqrt(v[0] * v[0] + v[1] * v[1] + v[2] * v[2]);
    for (int q = 0; q < 3; q++) v[q] = v[q] / l;
  endfunction

  // N.H of an original vertex, as the lighting computes it
  function automatic real vertex_nh(int i);
    real p[3], n[3], L[3], V[3], H[3];
    for (int q = 0; q < 3; q++) begin
      p[q] = M[q][0] * ox[i] + M[q][1] * oy[i] + M[q][2] * oz[i] + M[q][3];
      n[q] = N3[q][0] * nx[i] + N3[q][1] * ny[i] + N3[q][2] * nz[i];
    end
    for (int q = 0; q < 3; q++) begin L[q] = lpos[q] - p[q]; V[q] = p[q]; end
    norm3(L); norm3(V); norm3(n);
    for (int q = 0; q < 3; q++) H[q] = L[q] - V[q];
    norm3(H);
    return n[0] * H[0] + n[1] * H[1] + n[2] * H[2];
  endfunction

  // normalised backface measure: > 0 front, <= 0 back
  function automatic real face_cos(int t);
    real e1[3], e2[3], n[3], w[3];
    int a = tri_i[t][0], b = tri_i[t][1], c = tri_i[t][2];
    e1 = '{ox[b] - ox[a], oy[b] - oy[a], oz[b] - oz[a]};
    e2 = '{ox[c] - ox[a], oy[c] - oy[a], oz[c] - oz[a]};
    n  = '{e1[1] * e2[2] - e1[2] * e2[1], e1[2] * e2[0] - e1[0] * e2[2], e1[0] * e2[1] - e1[1] * e2[0]};
    w  = '{eye[0] - ox[a], eye[1] - oy[a], eye[2] - oz[a]};
    norm3(n); norm3(w);
    return n[0] * w[0] + n[1] * w[1] + n[2] * w[2];
  endfunction

  // ---------------- host and memory ----------------
  task automatic host_write(int addr, vec4_t d);
    @(negedge clk);
    host_we = 1; host_addr = 6'(addr); host_wdata = d;
    @(negedge clk);
    host_we = 0;
  endtask

  task automatic load_constants(int level);
    for (int q = 0; q < 3; q++) host_write(q, '{x: f(M[q][0]), y: f(M[q][1]), z: f(M[q][2]), w: f(M[q][3])});
    for (int q = 0; q < 3; q++) host_write(3 + q, '{x: f(N3[q][0]), y: f(N3[q][1]), z: f(N3[q][2]), w: 0});
    for (int q = 0; q < 4; q++) host_write(6 + q, '{x: f(P[q][0]), y: f(P[q][1]), z: f(P[q][2]), w: f(P[q][3])});
    host_write(10, '{x: f(VP[0][0]), y: 0, z: 0, w: f(VP[0][1])});
    host_write(11, '{x: 0, y: f(VP[1][0]), z: 0, w: f(VP[1][1])});
    host_write(12, '{x: 0, y: 0, z: f(VP[2][0]), w: f(VP[2][1])});
    host_write(13, '{x: f(lpos[0]), y: f(lpos[1]), z: f(lpos[2]), w: 0});
    host_write(14, '{x: f(Id), y: f(Is), z: 0, w: f(Ia)});
    host_write(15, '{x: f(shin), y: 0, z: 0, w: 0});
    host_write(16, '{x: f(eye[0]), y: f(eye[1]), z: f(eye[2]), w: 0});
    host_write(17, '{x: level, y: f(thr), z: 0, w: 0});
  endtask

  int mem_q[$];
  int mem_delay = 0, mem_beat = 0, mem_cur = 0;
  assign mem_req_ready = 1'b1;
  always @(posedge clk) begin
    if (mem_req_valid && mem_req_ready) mem_q.push_back(int'(mem_req_idx));
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

  always @(posedge clk) begin
    cycles++;
    if (ev_hit)  cnt_hit++;
    if (ev_miss) cnt_miss++;
    if (ev_cull) cnt_cull++;
    if (ev_subdiv) cnt_sub++;
    if (out_valid && out_ready) begin
      cnt_out++;
      if (out_last != (cnt_out % 3 == 0)) cnt_last_bad++;
    end
  end

  task automatic expect_range(string what, int got, int lo, int hi);
    checks++;
    if (got < lo || got > hi) begin
      failures++;
      $display("FAIL %s: %0d, expected %0d..%0d", what, got, lo, hi);
    end
  endtask

  task automatic run_level(int level);
    int ns2 = (1 << level) * (1 << level);
    int back_sure = 0, back_amb = 0, hi_sure = 0, hi_amb = 0;
    int vis, t0;
    load_constants(level);
    cnt_hit = 0; cnt_miss = 0; cnt_cull = 0; cnt_sub = 0; cnt_out = 0; cnt_last_bad = 0;
    t0 = cycles;
    for (int t = 0; t < NT; t++)
      for (int q = 0; q < 3; q++) begin
        @(negedge clk);
        idx_valid = 1; idx_data = idx_t'(tri_i[t][q]);
        do @(posedge clk); while (!idx_ready);
        @(negedge clk);
        idx_valid = 0;
      end
    repeat (20) @(posedge clk);
    while (busy) @(posedge clk);
    t0 = cycles - t0;
    // event pulses are registered: the last one may come with busy low
    repeat (5) @(posedge clk);
    // model
    for (int t = 0; t < NT; t++) begin
      automatic real fc = face_cos(t);
      automatic real mx = -1.0, mn = 2.0;
      if (fc < 0.05 && fc > -0.05) begin back_amb++; continue; end
      if (fc <= 0.0) begin back_sure++; continue; end
      for (int q = 0; q < 3; q++) begin
        if (nh_v[tri_i[t][q]] > mx) mx = nh_v[tri_i[t][q]];
      end
      if (mx > thr + 0.03) hi_sure++;
      else if (mx > thr - 0.03) hi_amb++;
    end
    vis = NT - cnt_cull;
    expect_range("index look-ups", cnt_hit + cnt_miss, 3 * NT, 3 * NT);
    expect_range("hit rate in 0.1 %", (1000 * cnt_hit) / (3 * NT), 500, 1000);
    expect_range("culled triangles", cnt_cull, back_sure, back_sure + back_amb);
    expect_range("output vertices", cnt_out, 3 * (vis + (ns2 - 1) * cnt_sub), 3 * (vis + (ns2 - 1) * cnt_sub));
    expect_range("misplaced out_last", cnt_last_bad, 0, 0);
    if (level == 0) expect_range("subdivided at level 0", cnt_sub, 0, 0);
    // near-edge-on triangles may hold highlights too: allow them
    else expect_range("subdivided triangles", cnt_sub, hi_sure, hi_sure + hi_amb + back_amb);
    $display("level %0d: %0d triangles in, %0d culled, %0d subdivided, %0d out; hits %0d/%0d (%0d.%0d %%); %0d cycles, %0d.%02d Mvertices/s in at 100 MHz",
             level, NT, cnt_cull, cnt_sub, cnt_out / 3, cnt_hit, 3 * NT,
             (1000 * cnt_hit) / (3 * NT) / 10, (1000 * cnt_hit) / (3 * NT) % 10,
             t0, (300 * NT) / t0, ((30000 * NT) / t0) % 100);
  endtask

  initial begin
    #100000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cycles = 0;
    idx_valid = 0; idx_data = '0; host_we = 0; host_addr = '0; host_wdata = '0;
    mem_rsp_valid = 0; mem_rsp_data = '0; out_ready = 1;
    build_scene();
    for (int i = 0; i < NV; i++) nh_v[i] = vertex_nh(i);
    repeat (3) @(negedge clk);
    rst_n = 1;
    run_level(0);
    run_level(1);
    run_level(2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
