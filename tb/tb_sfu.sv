// tb_sfu: self-checking testbench for the LNS special function unit.
// Random positive and negative inputs over a wide range: checks the log
// output (log2|m|, within 5e-4) three cycles after the input, inverse
// (cfg 000, |1/m|) and signed inverse (cfg 100) within 0.05 %, inverse
// square root (cfg 010) within 0.05 %, and the antilog of a value fed on the
// multiplier input (cfg 001) within 0.05 %, including underflow saturation.
// Expected values are taken from the input as quantised to Q16.16.
// The result must appear five cycles after the input (out_valid).
module tb_sfu;
  import ge_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic in_valid, log_valid, out_valid;
  logic [2:0] cfg;
  fx_t in_data, mul_in, out_data;
  logic [20:0] log_out;
  int checks = 0, failures = 0;

  sfu dut (.*);

  function automatic real r(fx_t v); return real'(v) / 65536.0; endfunction
  function automatic fx_t f(real v); return fx_t'($rtoi(v * 65536.0)); endfunction

  task automatic chk(string what, real got, real exp, real rel, real absol);
    real err = got - exp;
    if (err < 0) err = -err;
    checks++;
    if (err > absol + rel * ((exp < 0) ? -exp : exp)) begin
      failures++;
      $display("FAIL %s: got %f expected %f", what, got, exp);
    end
  endtask

  // one op: log_out sampled 3 cycles after the input, mul_in driven then
  task automatic run(logic [2:0] c, fx_t d, fx_t mi, output real lg, output real res);
    int lat;
    @(negedge clk);
    cfg = c; in_data = d; in_valid = 1; mul_in = '0;
    @(negedge clk);
    in_valid = 0;
    @(negedge clk);
    @(negedge clk);
    mul_in = mi;                               // cycle t+3
    checks++;
    if (!log_valid) begin failures++; $display("FAIL log_valid timing"); end
    lg = real'($signed(log_out)) / 65536.0;
    lat = 3;
    while (!out_valid && lat < 10) begin @(negedge clk); lat++; end
    checks++;
    if (lat != 5) begin failures++; $display("FAIL latency %0d", lat); end
    res = r(out_data);
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real m, lg, res, e;
    in_valid = 0; cfg = '0; in_data = '0; mul_in = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 60; t++) begin
      m = 2.0 ** (real'($urandom_range(0, 2000)) / 100.0 - 8.0);   // 2^-8 .. 2^12
      if (t % 3 == 0) m = -m;
      m = real'(f(m)) / 65536.0;                                   // value the unit sees
      run(3'b000, f(m), '0, lg, res);
      chk("log", lg, $ln(m < 0 ? -m : m) / $ln(2.0), 0.0, 0.0005);
      chk("inverse", res, 1.0 / (m < 0 ? -m : m), 0.0005, 2.0 / 65536);
      run(3'b100, f(m), '0, lg, res);
      chk("signed inverse", res, 1.0 / m, 0.0005, 2.0 / 65536);
      if (m > 0) begin
        run(3'b010, f(m), '0, lg, res);
        chk("inverse sqrt", res, 1.0 / $sqrt(m), 0.0005, 2.0 / 65536);
      end
      // antilog from the multiplier input: value e in Q5.16
      e = real'($urandom_range(0, 2400)) / 100.0 - 15.0;            // -15 .. 9
      run(3'b001, f(1.0), f(e), lg, res);
      chk("antilog", res, 2.0 ** e, 0.0005, 2.0 / 65536);
    end
    // underflow: exponent far below -16 saturates to the smallest value
    run(3'b001, f(1.0), f(-40.0), lg, res);
    chk("underflow", res, 0.0, 0.0, 2.0 / 65536);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
