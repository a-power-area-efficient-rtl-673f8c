// tb_param_regs: self-checking testbench for the parameter registers.
// Checks the reset values (level 0, threshold 0.7 = 0xB333), that host
// writes to addresses 0..15 are passed on to the constant memory port and
// nowhere else, that the eye position (16) and control word (17) are stored
// and read back, that levels above 2 read as 2, and that other addresses
// read zero.
module tb_param_regs;
  import ge_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic host_we, const_we;
  logic [5:0] host_addr;
  logic [3:0] const_addr;
  vec4_t host_wdata, host_rdata, const_wdata, eye_pos;
  level_t level;
  fx_t h_threshold;
  int checks = 0, failures = 0, n_clamp = 0;

  param_regs dut (.*);

  task automatic chk(string what, logic [127:0] got, logic [127:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %h expected %h", what, got, exp); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    checks++;
    if (n_clamp == 0) begin failures++; $display("FAIL level clamp never exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    vec4_t d, eye;
    host_we = 0; host_addr = '0; host_wdata = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    chk("reset level", 128'(level), 0);
    chk("reset threshold", 128'(h_threshold), 128'h0000_B333);
    eye = '0;
    for (int t = 0; t < 200; t++) begin
      int a;
      a = (t % 5 == 0) ? 17 : $urandom_range(0, 20);
      d = '{x: fx_t'($urandom), y: fx_t'($urandom), z: fx_t'($urandom), w: fx_t'($urandom)};
      if (a == 17) d.x[1:0] = 2'(t / 5);
      @(negedge clk);
      host_we = 1; host_addr = 6'(a); host_wdata = d;
      #1;
      chk("const_we", 128'(const_we), 128'(a < 16));
      if (a < 16) begin
        chk("const_addr", 128'(const_addr), 128'(a));
        chk("const_wdata", const_wdata, d);
      end
      @(negedge clk);
      host_we = 0;
      if (a == 16) eye = d;
      #1;
      chk("eye_pos", eye_pos, eye);
      if (a == 16) chk("read eye", host_rdata, d);
      if (a == 17) begin
        chk("read ctrl", host_rdata, d);
        chk("level", 128'(level), (d.x[1:0] == 2'd3) ? 128'(2) : 128'(d.x[1:0]));
        if (d.x[1:0] == 2'd3) n_clamp++;
        chk("threshold", 128'(h_threshold), 128'(d.y));
      end
      if (a > 17) chk("read other", host_rdata, '0);
    end
    checks++;
    if (n_clamp == 0) begin failures++; $display("FAIL level clamp never exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
