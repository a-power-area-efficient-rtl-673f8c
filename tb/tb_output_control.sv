// tb_output_control: self-checking testbench for the output control.
// The testbench plays the primitive queue, the VCMU vectors (lit flags set
// after random delays, random highlight flags), the subdivision control
// (random ready and completion delay), the vertex cache (each entry's
// window word and colour word hold values derived from the entry number)
// and a randomly stalling setup engine.
// Checks: a triangle is popped only when its three vertices are lit; it is
// sent to the subdivision control exactly when level > 0 and one of its
// vertices passed the highlight test; the output stream equals the model:
// the original triangle, or the Ns^2 grid triangles in row order (upward
// triangle (r,c) (r+1,c) (r+1,c+1), then downward (r,c) (r+1,c+1) (r,c+1))
// with the grid points mapped to the corner entries or to the generated
// entries in row order; out_last marks every third vertex; the three
// entries are released once, after the output. Mechanisms that must occur:
// level-0 output, level-1 and level-2 subdivision, an unsubdivided triangle
// at level > 0, waiting for lighting, output back-pressure.
module tb_output_control;
  import ge_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic pq_valid, pq_pop, sc_valid, sc_ready, sc_done, out_valid, out_last, out_ready, subdivided, busy;
  tri_t pq_data, sc_tri;
  logic [15:0] lit_vec, htest_vec, rel_mask;
  level_t level;
  caddr_t rd_addr;
  vec4_t rd_data, out_data;
  int checks = 0, failures = 0;
  int n_l0 = 0, n_l1 = 0, n_l2 = 0, n_plain = 0, n_litwait = 0, n_stall = 0;

  output_control dut (.*);

  function automatic vec4_t cache(caddr_t a);
    int e = int'(a.ent);
    if (a.word == W_WIN) return '{x: fx_t'(e * 100 + 1), y: fx_t'(e * 100 + 2), z: fx_t'(e * 100 + 3), w: 0};
    if (a.word == W_COL) return '{x: fx_t'(e * 100 + 4), y: 0, z: 0, w: 0};
    return '0;
  endfunction
  assign rd_data = cache(rd_addr);

  task automatic fail(string s);
    failures++;
    if (failures < 20) $display("FAIL %s at %0t", s, $time);
  endtask

  // grid point (r, c) of a triangle subdivided into ns segments
  function automatic int gent(tri_t t, int r, int c, int ns);
    int k = 0;
    if (r == 0) return int'(t.a);
    if (r == ns && c == 0) return int'(t.b);
    if (r == ns && c == ns) return int'(t.c);
    for (int rr = 1; rr <= ns; rr++)
      for (int cc = 0; cc <= rr; cc++) begin
        if (rr == ns && (cc == 0 || cc == ns)) continue;
        if (rr == r && cc == c) return GEN_BASE + k;
        k++;
      end
    return -1;
  endfunction

  initial begin
    #4000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // subdivision control
  int swait = -1;
  always @(negedge clk) begin
    sc_ready <= $urandom_range(0, 1);
    sc_done <= 0;
    if (swait > 0) swait--;
    else if (swait == 0) begin sc_done <= 1; swait = -1; end
  end
  int sc_reqs = 0;
  always @(posedge clk) if (sc_valid && sc_ready) begin
    sc_reqs++;
    swait = $urandom_range(0, 20);
    checks++;
    if (sc_tri != pq_data) fail("wrong triangle sent for subdivision");
  end

  // output collection
  int outs [$];
  logic lasts [$];
  always @(negedge clk) out_ready <= ($urandom_range(0, 3) != 0);
  always @(posedge clk) begin
    if (out_valid && out_ready) begin
      outs.push_back(int'(out_data.x) / 100);
      lasts.push_back(out_last);
      checks++;
      if (out_data.y != out_data.x + 1 || out_data.z != out_data.x + 2 || out_data.w != out_data.x + 3)
        fail("output word lanes");
    end
    if (out_valid && !out_ready) n_stall++;
  end
  int rels = 0;
  logic [15:0] rel_seen;
  always @(posedge clk) if (rel_mask != '0) begin rels++; rel_seen = rel_mask; end

  initial begin
    pq_valid = 0; pq_data = '0; lit_vec = '0; htest_vec = '0; level = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 90; t++) begin
      tri_t tr;
      int ns, exp_sub, pos, d;
      level = level_t'((t / 30) % 3);
      do tr = '{a: ent_t'($urandom_range(0, 15)), b: ent_t'($urandom_range(0, 15)), c: ent_t'($urandom_range(0, 15))};
      while (tr.a == tr.b || tr.a == tr.c || tr.b == tr.c);
      lit_vec = '0;
      htest_vec = 16'($urandom);
      if (t % 4 == 0) htest_vec = '0;
      exp_sub = (level != 0) && (htest_vec[tr.a[3:0]] || htest_vec[tr.b[3:0]] || htest_vec[tr.c[3:0]]);
      ns = exp_sub ? (1 << level) : 1;
      outs.delete(); lasts.delete(); rels = 0; sc_reqs = 0;
      @(negedge clk);
      pq_valid = 1; pq_data = tr;
      // light the vertices one by one
      d = $urandom_range(0, 3);
      for (int k = 0; k < 3; k++) begin
        repeat (d) begin
          @(negedge clk);
          checks++;
          if (pq_pop) fail("popped before all vertices were lit");
          n_litwait++;
        end
        lit_vec[(k == 0) ? tr.a[3:0] : (k == 1) ? tr.b[3:0] : tr.c[3:0]] = 1'b1;
      end
      #1;
      while (!pq_pop) @(negedge clk);
      @(negedge clk);
      pq_valid = 0;
      while (busy) @(negedge clk);
      @(negedge clk);
      // compare
      checks += 3;
      if (sc_reqs != exp_sub) fail("subdivision decision");
      if (rels != 1 || rel_seen != ((16'd1 << tr.a[3:0]) | (16'd1 << tr.b[3:0]) | (16'd1 << tr.c[3:0])))
        fail("release");
      if (outs.size() != 3 * ns * ns) fail($sformatf("%0d vertices out, expected %0d", outs.size(), 3 * ns * ns));
      else begin
        pos = 0;
        for (int r = 0; r < ns; r++)
          for (int c = 0; c <= r; c++) begin
            int ex[6];
            automatic int n = (c < r) ? 6 : 3;
            ex = '{gent(tr, r, c, ns), gent(tr, r + 1, c, ns), gent(tr, r + 1, c + 1, ns),
                   gent(tr, r, c, ns), gent(tr, r + 1, c + 1, ns), gent(tr, r, c + 1, ns)};
            for (int i = 0; i < n; i++) begin
              checks += 2;
              if (outs[pos] != ex[i]) fail($sformatf("vertex %0d: entry %0d expected %0d", pos, outs[pos], ex[i]));
              if (lasts[pos] != (i % 3 == 2)) fail("out_last");
              pos++;
            end
          end
      end
      if (level == 0) n_l0++;
      else if (!exp_sub) n_plain++;
      else if (level == 1) n_l1++;
      else n_l2++;
    end
    $display("level0 %0d level1 %0d level2 %0d plain %0d litwait %0d stall %0d", n_l0, n_l1, n_l2, n_plain, n_litwait, n_stall);
    checks += 6;
    if (n_l0 == 0) fail("no level-0 triangle");
    if (n_l1 == 0) fail("no level-1 subdivision");
    if (n_l2 == 0) fail("no level-2 subdivision");
    if (n_plain == 0) fail("no unsubdivided triangle at level > 0");
    if (n_litwait == 0) fail("never waited for lighting");
    if (n_stall == 0) fail("no output back-pressure");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
