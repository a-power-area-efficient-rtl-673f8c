// tb_sc: self-checking testbench for the subdivision control.
// The testbench plays the output control (start requests at levels 0, 1
// and 2), the PPU (random ready, random latency), dispatch queue 2 (random
// ready) and the VPU (each pushed entry reported lit after a random delay,
// mixed with lit reports of original entries, which must be ignored).
// Checks per request: the PPU receives exactly three commands for the given
// triangle and level, in the order normal (W_EYEN), eye coordinate (W_EYE),
// window coordinate (W_WIN); the generated entries GEN_BASE .. GEN_BASE +
// N_GV - 1 are pushed once each in order (N_GV = 0, 3, 12 for levels 0, 1,
// 2); done pulses once, and only after the last of them was lit.
module tb_sc;
  import ge_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start_valid, start_ready, ppu_valid, ppu_ready, ppu_done, dq_push, dq_ready, lit_valid, done;
  tri_t start_tri, ppu_tri;
  level_t level, ppu_level;
  word_t ppu_word;
  ent_t dq_data, lit_ent;
  int checks = 0, failures = 0;

  sc dut (.*);

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

  // PPU
  int pwait = -1;
  word_t cmds [$];
  always @(negedge clk) begin
    ppu_ready <= $urandom_range(0, 1);
    ppu_done  <= 0;
    if (pwait > 0) pwait--;
    else if (pwait == 0) begin ppu_done <= 1; pwait = -1; end
  end
  always @(posedge clk) if (ppu_valid && ppu_ready) begin
    cmds.push_back(ppu_word);
    checks++;
    if (ppu_tri != start_tri || ppu_level != level) fail("PPU command for the wrong triangle or level");
    pwait = $urandom_range(0, 8);
  end

  // dispatch queue 2 and VPU
  int pushed [$];
  int litq [$];
  int n_lit = 0;
  always @(negedge clk) dq_ready <= ($urandom_range(0, 2) != 0);
  always @(posedge clk) if (dq_push) begin pushed.push_back(int'(dq_data)); litq.push_back(int'(dq_data)); end
  always @(negedge clk) begin
    lit_valid <= 0;
    if (litq.size() > 0 && $urandom_range(0, 3) == 0) begin
      lit_valid <= 1; lit_ent <= ent_t'(litq.pop_front()); n_lit++;
    end else if ($urandom_range(0, 5) == 0) begin
      lit_valid <= 1; lit_ent <= ent_t'($urandom_range(0, 15));   // original vertex
    end
  end

  initial begin
    start_valid = 0; start_tri = '0; level = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 60; t++) begin
      int ngv, lat;
      level = level_t'(t % 3);
      ngv = (level == 0) ? 0 : (level == 1) ? 3 : 12;
      start_tri = '{a: ent_t'($urandom_range(0, 15)), b: ent_t'($urandom_range(0, 15)), c: ent_t'($urandom_range(0, 15))};
      cmds.delete(); pushed.delete(); n_lit = 0;
      @(negedge clk);
      start_valid = 1;
      while (!start_ready) @(negedge clk);
      @(negedge clk);
      start_valid = 0;
      lat = 0;
      while (!done && lat < 5000) begin
        @(negedge clk); lat++;
      end
      checks += 4;
      if (!done) fail("no done");
      if (cmds.size() != 3 || cmds[0] != W_EYEN || cmds[1] != W_EYE || cmds[2] != W_WIN)
        fail("PPU command sequence");
      if (pushed.size() != ngv) fail($sformatf("%0d entries pushed, expected %0d", pushed.size(), ngv));
      else for (int i = 0; i < ngv; i++) if (pushed[i] != GEN_BASE + i) fail("pushed entry order");
      if (n_lit != ngv || litq.size() != 0) fail("done before all generated vertices were lit");
      @(negedge clk);
      checks++;
      if (done) fail("done longer than one cycle");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
