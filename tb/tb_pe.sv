// tb_pe: self-checking testbench for the processing element.
// Runs random operations one at a time and compares Out A with integer
// models: product B*C, multiply-add A + B*C, square D^2, the sum of the four
// external partial-product inputs, and add/subtract of In I and In J. The
// products are checked within 2 LSBs (the two Booth partial products are
// truncated separately); the latency from acceptance to out_valid must be
// three cycles. Out B..Out F are checked against the stage-2 registers.
module tb_pe;
  import ge_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic in_valid, out_valid;
  pe_cfg_t cfg;
  fx_t in_a, in_b, in_c, in_d, in_e, in_f, in_g, in_h, in_i, in_j;
  fx_t out_a, out_b, out_c, out_d, out_e, out_f;
  int checks = 0, failures = 0;

  pe dut (.*);

  function automatic fx_t rnd();
    return fx_t'($urandom_range(0, 32'h0010_0000)) - 32'sh0008_0000;  // -8 .. 8
  endfunction
  function automatic longint qmul(fx_t p, fx_t q);
    return (longint'(p) * longint'(q)) >>> 16;
  endfunction

  task automatic chk(string what, longint got, longint exp, longint tol);
    longint d = got - exp;
    checks++;
    if (d < 0) d = -d;
    if (d > tol) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  // run one op; returns Out A at out_valid, checks latency 3
  task automatic run(pe_cfg_t c, output fx_t res);
    int lat = 0;
    @(negedge clk);
    cfg = c; in_valid = 1;
    @(negedge clk);
    in_valid = 0; lat = 1;
    while (!out_valid && lat < 10) begin @(negedge clk); lat++; end
    checks++;
    if (lat != 3) begin failures++; $display("FAIL latency %0d", lat); end
    res = out_a;
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    fx_t res;
    pe_cfg_t c;
    in_valid = 0; cfg = PE_CFG_MUL;
    {in_a, in_b, in_c, in_d, in_e, in_f, in_g, in_h, in_i, in_j} = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 100; t++) begin
      in_a = rnd(); in_b = rnd(); in_c = rnd(); in_d = rnd();
      in_e = rnd(); in_f = rnd(); in_g = rnd(); in_h = rnd(); in_i = rnd(); in_j = rnd();
      // product
      run(PE_CFG_MUL, res);
      chk("mul", res, qmul(in_b, in_c), 2);
      // Out B / Out C carry the partial products, Out F the addend
      chk("out_b+out_c", longint'(out_b) + longint'(out_c), qmul(in_b, in_c), 2);
      chk("out_f", out_f, in_a, 0);
      // multiply-add
      c = PE_CFG_MUL; c.c0 = CS_E; c.c1 = CS_F; c.c2 = CS_G;
      run(c, res);
      chk("mac", res, qmul(in_b, in_c) + in_a, 2);
      // square via Out B/C selection of REG_H/REG_I
      c = PE_CFG_MUL; c.c0 = CS_H; c.c1 = CS_I; c.ob_h = 1; c.oc_i = 1;
      run(c, res);
      chk("square", res, qmul(in_d, in_d), 2);
      chk("out_b+out_c sq", longint'(out_b) + longint'(out_c), qmul(in_d, in_d), 2);
      // external partial products through the compressor
      c = PE_CFG_MUL; c.c0 = CS_IN_E; c.c1 = CS_IN_F; c.c2 = CS_IN_G; c.c3 = CS_IN_H;
      run(c, res);
      chk("ext sum", res, fx_t'(in_e + in_f + in_g + in_h), 0);
      // add / subtract of In I, In J
      c = PE_CFG_MUL; c.j_ext = 1; c.k_ext = 1; c.sub = 1;
      run(c, res);
      chk("sub", res, fx_t'(in_i - in_j), 0);
      c.sub = 0;
      run(c, res);
      chk("add", res, fx_t'(in_i + in_j), 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
