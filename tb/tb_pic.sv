// tb_pic: self-checking testbench for the primitive input control.
// The PIC works with a VCMU instance (tested on its own); the testbench
// plays the index FIFO, the external memory (random response delay, data
// tagged with the vertex index), the PPU culling test (random ready, random
// latency, backface when the sum of the triangle's indices is divisible by
// five), the primitive queue (random full, popped at random; each pop
// releases the triangle's entries as the output control would) and dispatch
// queue 1 (random ready; each pushed vertex is reported lit some cycles
// later, as the VPU would).
// Checks: each triangle reaching the primitive queue is the next non-culled
// triangle of the stream, and its three entries hold exactly its vertices
// (object word and normal word); an entry is allocated only for an index no
// other entry holds; no vertex is sent to dispatch queue 1 twice after its
// entry was filled (a vertex never sent would never be lit, and its triangle
// would block the queue, which the end-of-stream check catches); the culled
// pulses and released entries match the culled triangles. Triangles repeat
// no index within themselves (the PIC does not handle degenerate ones).
// Mechanisms that must occur: hit, miss, reuse of a lit vertex, cull, stall
// on a full primitive queue, stall on dispatch queue 1.
module tb_pic;
  import ge_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic idx_valid, idx_ready, hit, hit_processed, free, ref_en, alloc_en, pipe_set_en;
  idx_t idx_data, search_idx;
  logic [3:0] hit_ent, free_ent, ref_ent, pipe_set_ent;
  logic [15:0] rel_mask, rel_b, lit_vec, htest_vec, hv, fv;
  logic mem_req_valid, mem_req_ready, mem_rsp_valid, wr_en;
  idx_t mem_req_idx;
  vec4_t mem_rsp_data, wr_data;
  caddr_t wr_addr;
  logic cull_valid, cull_ready, cull_done, cull_back;
  tri_t cull_tri, pq_data;
  logic pq_push, pq_full, dq_push, dq_ready, culled;
  ent_t dq_data;
  logic lit_en;
  logic [3:0] lit_e;

  pic dut (.*);
  vcmu #(.NTAG(16), .CNT_W(5)) u_vcmu (
    .clk, .rst_n, .search_idx, .hit, .hit_ent, .hit_processed, .free, .free_ent,
    .entry_hit_vector(hv), .entry_free_vector(fv), .ref_en, .ref_ent, .alloc_en,
    .alloc_idx(search_idx), .pipe_set_en, .pipe_set_ent, .lit_set_en(lit_en),
    .lit_set_ent(lit_e), .lit_set_htest(1'b0), .rel_a_mask(rel_mask), .rel_b_mask(rel_b),
    .lit_vec, .htest_vec);

  localparam int NTRI = 300;
  int checks = 0, failures = 0;
  int n_hit = 0, n_miss = 0, n_reuse = 0, n_cull = 0, n_pq_stall = 0, n_dq_stall = 0;
  int tri_idx [NTRI][3];
  int exp_q [$];             // indices of triangles expected in the PQ
  int cull_exp = 0;
  int cache_idx [16];        // index held by each entry (from the writes)
  int cache_nrm [16];
  bit sent [16];             // pushed to DQ1 since last fill
  tri_t pq_model [$];

  task automatic fail(string s);
    failures++;
    if (failures < 20) $display("FAIL %s at %0t", s, $time);
  endtask

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // triangle stream: indices from a sliding window so that vertices repeat
  initial begin
    for (int t = 0; t < NTRI; t++)
      for (int k = 0; k < 3; k++)
        do tri_idx[t][k] = (t / 2) + $urandom_range(0, 6);
        while ((k > 0 && tri_idx[t][k] == tri_idx[t][0]) || (k > 1 && tri_idx[t][k] == tri_idx[t][1]));
    for (int t = 0; t < NTRI; t++)
      if ((tri_idx[t][0] + tri_idx[t][1] + tri_idx[t][2]) % 5 == 0) cull_exp++;
      else exp_q.push_back(t);
  end

  // index FIFO
  int ip = 0;
  always @(negedge clk) begin
    idx_valid <= (ip < 3 * NTRI);
    if (ip < 3 * NTRI) idx_data <= idx_t'(tri_idx[ip / 3][ip % 3]);
  end
  always @(posedge clk) if (rst_n && idx_valid && idx_ready) ip <= ip + 1;

  // external memory
  int mq [$];
  int mdelay = 0, mbeat = 0, mcur = 0;
  always @(negedge clk) mem_req_ready <= $urandom_range(0, 1);
  always @(posedge clk) if (mem_req_valid && mem_req_ready) begin
    mq.push_back(int'(mem_req_idx));
    n_miss++;
  end
  // an entry is allocated only for an index that no other entry holds
  always @(posedge clk) if (alloc_en) begin
    checks++;
    for (int i = 0; i < 16; i++)
      if (i != int'(free_ent) && cache_idx[i] == int'(search_idx)) fail("allocation for a cached index");
  end
  always @(negedge clk) begin
    mem_rsp_valid <= 0;
    if (mbeat == 0 && mq.size() > 0) begin
      if (mdelay < 2) mdelay++;
      else begin mdelay = 0; mcur = mq.pop_front(); mbeat = 1; end
    end
    if (mbeat == 1) begin
      mem_rsp_valid <= 1; mem_rsp_data <= '{x: mcur, default: '0}; mbeat = 2;
    end else if (mbeat == 2) begin
      mem_rsp_valid <= 1; mem_rsp_data <= '{y: mcur, default: '0}; mbeat = 0;
    end
  end

  // cache writes
  always @(posedge clk) if (wr_en) begin
    if (wr_addr.word == W_OBJ) begin cache_idx[wr_addr.ent[3:0]] = int'(wr_data.x); sent[wr_addr.ent[3:0]] = 0; end
    else cache_nrm[wr_addr.ent[3:0]] = int'(wr_data.y);
  end

  // PPU culling responder
  int cwait = -1;
  tri_t ctri;
  always @(negedge clk) begin
    cull_ready <= $urandom_range(0, 1);
    cull_done  <= 0;
    if (cwait > 0) cwait--;
    else if (cwait == 0) begin
      cull_done <= 1;
      cull_back <= ((cache_idx[ctri.a[3:0]] + cache_idx[ctri.b[3:0]] + cache_idx[ctri.c[3:0]]) % 5 == 0);
      cwait = -1;
    end
  end
  always @(posedge clk) if (cull_valid && cull_ready) begin ctri = cull_tri; cwait = $urandom_range(1, 6); end
  always @(posedge clk) if (culled) n_cull++;
  always @(posedge clk) if (rst_n && rel_mask != '0) begin
    checks++;
    if (rel_mask != ((16'd1 << ctri.a[3:0]) | (16'd1 << ctri.b[3:0]) | (16'd1 << ctri.c[3:0])))
      fail("released entries differ from the culled triangle");
  end

  // hits
  always @(posedge clk) if (ref_en) begin
    n_hit++;
    if (lit_vec[ref_ent]) n_reuse++;
  end

  // primitive queue (depth 4) with random pops that release entries
  always @(negedge clk) begin
    rel_b <= '0;
    if (pq_model.size() > 0 && $urandom_range(0, 9) == 0 &&
        lit_vec[pq_model[0].a[3:0]] && lit_vec[pq_model[0].b[3:0]] && lit_vec[pq_model[0].c[3:0]]) begin
      automatic tri_t p = pq_model.pop_front();
      rel_b <= (16'd1 << p.a[3:0]) | (16'd1 << p.b[3:0]) | (16'd1 << p.c[3:0]);
    end
    pq_full <= (pq_model.size() >= 4) || ($urandom_range(0, 7) == 0);
  end
  always @(posedge clk) if (pq_push) begin
    int t;
    pq_model.push_back(pq_data);
    checks++;
    if (exp_q.size() == 0) fail("unexpected triangle");
    else begin
      t = exp_q.pop_front();
      if (cache_idx[pq_data.a[3:0]] != tri_idx[t][0] || cache_idx[pq_data.b[3:0]] != tri_idx[t][1] ||
          cache_idx[pq_data.c[3:0]] != tri_idx[t][2] || cache_nrm[pq_data.a[3:0]] != tri_idx[t][0] ||
          cache_nrm[pq_data.b[3:0]] != tri_idx[t][1] || cache_nrm[pq_data.c[3:0]] != tri_idx[t][2])
        fail($sformatf("triangle %0d entries hold the wrong vertices", t));
    end
  end
  always @(posedge clk) if (rst_n && dut.state == dut.S_PQ && pq_full) n_pq_stall++;

  // dispatch queue 1 and the VPU's lit reports
  int litq [$];
  int lcnt = 0;
  always @(negedge clk) dq_ready <= ($urandom_range(0, 3) != 0);
  always @(posedge clk) begin
    lit_en <= 0;
    if (dq_push) begin
      checks++;
      if (sent[dq_data[3:0]]) fail("vertex dispatched twice");
      sent[dq_data[3:0]] = 1;
      litq.push_back(int'(dq_data[3:0]));
    end
    if (rst_n && dut.state == dut.S_DQ && dut.need[dut.k] && !dq_ready) n_dq_stall++;
    if (litq.size() > 0) begin
      if (lcnt < 5) lcnt++;
      else begin lcnt = 0; lit_en <= 1; lit_e <= 4'(litq.pop_front()); end
    end
  end

  initial begin
    idx_valid = 0; idx_data = '0; mem_rsp_valid = 0; mem_rsp_data = '0; mem_req_ready = 0;
    cull_ready = 0; cull_done = 0; cull_back = 0; pq_full = 0; dq_ready = 0; rel_b = '0;
    lit_en = 0; lit_e = '0;
    for (int i = 0; i < 16; i++) begin cache_idx[i] = -1; cache_nrm[i] = -1; sent[i] = 0; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    wait (ip == 3 * NTRI);
    repeat (200) @(negedge clk);
    while (exp_q.size() > 0 && $time < 1900000) @(negedge clk);
    checks += 8;
    if (exp_q.size() != 0) fail($sformatf("%0d triangles never queued", exp_q.size()));
    if (n_cull != cull_exp) fail($sformatf("%0d culled, expected %0d", n_cull, cull_exp));
    $display("hit %0d miss %0d reuse %0d cull %0d pq-stall %0d dq-stall %0d",
             n_hit, n_miss, n_reuse, n_cull, n_pq_stall, n_dq_stall);
    if (n_hit == 0) fail("no hit");
    if (n_miss == 0) fail("no miss");
    if (n_reuse == 0) fail("no reuse of a lit vertex");
    if (n_cull == 0) fail("no cull");
    if (n_pq_stall == 0) fail("no primitive-queue stall");
    if (n_dq_stall == 0) fail("no dispatch-queue stall");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
