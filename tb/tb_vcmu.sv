// tb_vcmu: self-checking testbench for the vertex cache management unit.
// A tag model in the testbench follows random operation streams: each cycle
// an index from a small range is searched; on a hit the entry is referenced,
// on a miss with a free entry it is allocated; random entries are marked in
// pipe and lit (with a random highlight result), and random referenced
// entries are released through both release masks. Every cycle the hit,
// free, encoded entries, hit_processed, lit and Htest vectors are compared
// with the model (lowest entry first). Counted mechanisms that must occur:
// hit, allocation, replacement of an entry that held another index, no free
// entry at all, hit on a lit vertex whose count was zero (reuse), and two
// releases of one entry in the same cycle.
module tb_vcmu;
  import ge_pkg::*;
  localparam int NTAG = 16;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  idx_t search_idx, alloc_idx;
  logic hit, hit_processed, free, ref_en, alloc_en, pipe_set_en, lit_set_en, lit_set_htest;
  logic [3:0] hit_ent, free_ent, ref_ent, pipe_set_ent, lit_set_ent;
  logic [NTAG-1:0] entry_hit_vector, entry_free_vector, rel_a_mask, rel_b_mask, lit_vec, htest_vec;
  int checks = 0, failures = 0;
  int n_hit = 0, n_alloc = 0, n_repl = 0, n_nofree = 0, n_reuse = 0, n_dual = 0;

  vcmu #(.NTAG(NTAG), .CNT_W(5)) dut (.*);

  // model
  int  m_idx [NTAG];
  bit  m_av [NTAG], m_pipe [NTAG], m_lit [NTAG], m_ht [NTAG];
  int  m_cnt [NTAG];

  task automatic chk(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 4) begin
        $display("FAIL %s: got %0d expected %0d at %0t", what, got, exp, $time);
        for (int i = 0; i < 6; i++) $display("  e%0d model av %0d idx %0d cnt %0d | dut av %0d idx %0d cnt %0d", i, m_av[i], m_idx[i], m_cnt[i], dut.tags[i].tag_entry_available, dut.tags[i].vertex_index, dut.tags[i].vertex_count);
      end
    end
  endtask

  initial begin
    #400000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < NTAG; i++) begin m_av[i] = 0; m_cnt[i] = 0; m_pipe[i] = 0; m_lit[i] = 0; m_ht[i] = 0; m_idx[i] = 0; end
    search_idx = '0; alloc_idx = '0; ref_en = 0; alloc_en = 0; pipe_set_en = 0; lit_set_en = 0;
    lit_set_htest = 0; ref_ent = '0; pipe_set_ent = '0; lit_set_ent = '0; rel_a_mask = '0; rel_b_mask = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 5000; t++) begin
      int e_hit, e_free, nfree;
      e_hit = -1; e_free = -1; nfree = 0;
      @(negedge clk);
      ref_en = 0; alloc_en = 0; pipe_set_en = 0; lit_set_en = 0; rel_a_mask = '0; rel_b_mask = '0;
      search_idx = idx_t'($urandom_range(0, 23));
      #1;
      for (int i = NTAG - 1; i >= 0; i--) begin
        if (m_av[i] && m_idx[i] == int'(search_idx)) e_hit = i;
        if (!m_av[i] || m_cnt[i] == 0) begin e_free = i; nfree++; end
      end
      chk("hit", hit, e_hit >= 0);
      if (e_hit >= 0 && m_cnt[e_hit] < 20) begin
        chk("hit_ent", hit_ent, e_hit);
        chk("hit_processed", hit_processed, m_pipe[e_hit] || m_lit[e_hit]);
      end
      chk("free", free, e_free >= 0);
      if (e_free >= 0) chk("free_ent", free_ent, e_free);
      for (int i = 0; i < NTAG; i++) begin
        chk("lit_vec", lit_vec[i], m_lit[i]);
        chk("htest_vec", htest_vec[i], m_ht[i]);
      end
      if (nfree == 0) n_nofree++;
      // choose this cycle's operations
      if (e_hit >= 0 && m_cnt[e_hit] < 20) begin
        ref_en = 1; ref_ent = 4'(e_hit); n_hit++;
        if (m_cnt[e_hit] == 0 && m_lit[e_hit]) n_reuse++;
      end else if (e_hit < 0 && e_free >= 0 && $urandom_range(0, 1)) begin
        alloc_en = 1; alloc_idx = search_idx; n_alloc++;
        if (m_av[e_free]) n_repl++;
      end
      begin
        int p;
        p = $urandom_range(0, NTAG - 1);
        if (m_av[p] && !(alloc_en && p == e_free) && $urandom_range(0, 1)) begin
          pipe_set_en = 1; pipe_set_ent = 4'(p);
        end
        p = $urandom_range(0, NTAG - 1);
        if (m_av[p] && !(alloc_en && p == e_free) && $urandom_range(0, 1)) begin
          lit_set_en = 1; lit_set_ent = 4'(p); lit_set_htest = 1'($urandom);
        end
      end
      // releases: only entries holding a count before this cycle
      for (int i = 0; i < NTAG; i++) begin
        int c;
        c = m_cnt[i];
        if (m_av[i] && !(alloc_en && i == e_free) && c > 0 && $urandom_range(0, 7) < ((t / 500) % 2 ? 0 : 4)) begin
          rel_a_mask[i] = 1; c--;
          if (c > 0 && $urandom_range(0, 1)) begin rel_b_mask[i] = 1; n_dual++; end
        end
      end
      @(posedge clk);
      // update model
      for (int i = 0; i < NTAG; i++) begin
        if (alloc_en && i == e_free) begin
          m_av[i] = 1; m_idx[i] = int'(alloc_idx); m_cnt[i] = 1; m_pipe[i] = 0; m_lit[i] = 0; m_ht[i] = 0;
        end else begin
          if (ref_en && int'(ref_ent) == i) m_cnt[i]++;
          m_cnt[i] -= int'(rel_a_mask[i]) + int'(rel_b_mask[i]);
          if (pipe_set_en && int'(pipe_set_ent) == i) m_pipe[i] = 1;
          if (lit_set_en && int'(lit_set_ent) == i) begin m_lit[i] = 1; m_pipe[i] = 0; m_ht[i] = lit_set_htest; end
        end
      end
    end
    $display("hit %0d alloc %0d repl %0d nofree %0d reuse %0d dual %0d", n_hit, n_alloc, n_repl, n_nofree, n_reuse, n_dual);
    checks += 6;
    if (n_hit == 0)    begin failures++; $display("FAIL no hit"); end
    if (n_alloc == 0)  begin failures++; $display("FAIL no allocation"); end
    if (n_repl == 0)   begin failures++; $display("FAIL no replacement"); end
    if (n_nofree == 0) begin failures++; $display("FAIL never without a free entry"); end
    if (n_reuse == 0)  begin failures++; $display("FAIL no reuse of a processed vertex"); end
    if (n_dual == 0)   begin failures++; $display("FAIL no dual release"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
