// tb_ppu: self-checking testbench for the primitive processing unit.
// A testbench array stands in for the vertex cache (combinational read,
// writes captured at the clock edge).
// CULL: random triangles (coordinates within +-4) and eye positions; the
// decision must match a real-number model of n . (eye - Va) <= 0 wherever
// that product is not within the rounding of the Q8.8 multiplier of zero,
// and resp_valid must come 16 clock edges after the accepting edge (three
// loads, three subtractions, nine multiply steps, one response register).
// SUBDIV: random triangles at level 1 and level 2; every generated grid
// point Va + r*d2 + c*d1 (d1 = (Vc-Vb)/Ns, d2 = (Vb-Va)/Ns) must be written,
// in row order, to entries gen_base, gen_base+1, ..., within r+c+1 LSBs per
// lane (each forward-difference step adds the truncation of d1 or d2),
// and nothing else may be written. Level 0 must answer at once. Both
// backface and front-face outcomes must occur.
module tb_ppu;
  import ge_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic   cmd_valid, cmd_ready, cmd_subdiv, resp_valid, resp_back, wr_en;
  tri_t   cmd_tri;
  word_t  cmd_word;
  level_t cmd_level;
  ent_t   cmd_gen_base;
  vec4_t  eye_pos, rd_data, wr_data;
  caddr_t rd_addr, wr_addr;
  int checks = 0, failures = 0, n_back = 0, n_front = 0;

  ppu dut (.*);

  vec4_t mem [32][NWORDS];
  assign rd_data = mem[rd_addr.ent][rd_addr.word];

  typedef struct { caddr_t a; vec4_t d; } wr_t;
  wr_t writes [$];
  always @(posedge clk) if (wr_en) writes.push_back('{wr_addr, wr_data});

  function automatic fx_t f(real v); return fx_t'($rtoi(v * 65536.0)); endfunction
  function automatic real r(fx_t v); return real'(v) / 65536.0; endfunction
  function automatic real rnd(real lo, real hi);
    return lo + (hi - lo) * real'($urandom_range(0, 100000)) / 100000.0;
  endfunction
  function automatic vec4_t rvec(real lim, real w);
    return '{x: f(rnd(-lim, lim)), y: f(rnd(-lim, lim)), z: f(rnd(-lim, lim)), w: f(w)};
  endfunction

  task automatic issue(logic sub, tri_t t, word_t w, level_t l, ent_t gb, output int lat, output logic back);
    @(negedge clk);
    cmd_valid = 1; cmd_subdiv = sub; cmd_tri = t; cmd_word = w; cmd_level = l; cmd_gen_base = gb;
    while (!cmd_ready) @(negedge clk);
    @(negedge clk);
    cmd_valid = 0; lat = 1;
    while (!resp_valid && lat < 100) begin @(negedge clk); lat++; end
    back = resp_back;
  endtask

  initial begin
    #400000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int lat;
    logic back;
    tri_t t;
    cmd_valid = 0; cmd_subdiv = 0; cmd_tri = '0; cmd_word = W_OBJ; cmd_level = '0; cmd_gen_base = '0;
    eye_pos = '0;
    for (int e = 0; e < 32; e++) for (int w = 0; w < NWORDS; w++) mem[e][w] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    t = '{a: 5'd2, b: 5'd7, c: 5'd11};
    // culling
    for (int k = 0; k < 200; k++) begin
      real e1[3], e2[3], n[3], v[3], d;
      mem[2][W_OBJ] = rvec(4, 1); mem[7][W_OBJ] = rvec(4, 1); mem[11][W_OBJ] = rvec(4, 1);
      eye_pos = rvec(8, 0);
      for (int i = 0; i < 3; i++) begin
        e1[i] = r(mem[7][W_OBJ][32*i +: 32]) - r(mem[2][W_OBJ][32*i +: 32]);
        e2[i] = r(mem[11][W_OBJ][32*i +: 32]) - r(mem[2][W_OBJ][32*i +: 32]);
        v[i]  = r(eye_pos[32*i +: 32]) - r(mem[2][W_OBJ][32*i +: 32]);
      end
      n = '{e1[1]*e2[2] - e1[2]*e2[1], e1[2]*e2[0] - e1[0]*e2[2], e1[0]*e2[1] - e1[1]*e2[0]};
      d = n[0]*v[0] + n[1]*v[1] + n[2]*v[2];
      issue(1'b0, t, W_OBJ, 2'd0, 5'd16, lat, back);
      checks++;
      if (lat != 16) begin failures++; $display("FAIL cull latency %0d", lat); end
      if (d > 0.5 || d < -0.5) begin
        checks++;
        if (back != (d <= 0)) begin failures++; $display("FAIL cull decision, n.v = %f", d); end
        if (back) n_back++; else n_front++;
      end
    end
    // level 0: nothing generated, immediate answer
    writes.delete();
    issue(1'b1, t, W_EYE, 2'd0, 5'd16, lat, back);
    checks += 2;
    if (lat != 1) begin failures++; $display("FAIL level-0 latency %0d", lat); end
    if (writes.size() != 0) begin failures++; $display("FAIL level 0 wrote"); end
    // subdivision
    for (int k = 0; k < 40; k++) begin
      automatic level_t l = level_t'(1 + k % 2);
      int ns, g;
      automatic word_t w = word_t'($urandom_range(0, NWORDS - 1));
      ns = 1 << l;
      mem[2][w] = rvec(50, rnd(-2, 2)); mem[7][w] = rvec(50, rnd(-2, 2)); mem[11][w] = rvec(50, rnd(-2, 2));
      writes.delete();
      issue(1'b1, t, w, l, 5'd16, lat, back);
      checks++;
      if (writes.size() != (ns + 1) * (ns + 2) / 2 - 3) begin
        failures++; $display("FAIL level %0d wrote %0d points", l, writes.size());
      end
      g = 0;
      for (int rr = 1; rr <= ns; rr++)
        for (int cc = 0; cc <= rr; cc++) begin
          if (rr == ns && (cc == 0 || cc == ns)) continue;
          if (g < writes.size()) begin
            checks++;
            if (writes[g].a.ent != ent_t'(16 + g) || writes[g].a.word != w) begin
              failures++; $display("FAIL write address %0d", g);
            end
            for (int i = 0; i < 4; i++) begin
              automatic real va = r(mem[2][w][32*i +: 32]), vb = r(mem[7][w][32*i +: 32]), vc = r(mem[11][w][32*i +: 32]);
              automatic real ex = va + rr * (vb - va) / ns + cc * (vc - vb) / ns;
              automatic real gt = r(writes[g].d[32*i +: 32]);
              checks++;
              if (gt - ex > (rr + cc + 1) / 65536.0 || ex - gt > (rr + cc + 1) / 65536.0) begin
                failures++; $display("FAIL point (%0d,%0d) lane %0d: %f vs %f", rr, cc, i, gt, ex);
              end
            end
          end
          g++;
        end
    end
    checks += 2;
    if (n_back == 0)  begin failures++; $display("FAIL no backface"); end
    if (n_front == 0) begin failures++; $display("FAIL no front face"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
