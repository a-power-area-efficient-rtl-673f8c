// pe: reconfigurable processing element of the reconfigurable datapath.
//
// Three pipeline stages, all registers loaded every cycle:
//   stage 1  REG_A..REG_D hold the operands. A Booth multiplier forms REG_B x
//            REG_C and a Booth squarer forms REG_D^2, each as two partial
//            products; REG_A is passed on as an addend.
//   stage 2  REG_E (addend), REG_F/REG_G (product) and REG_H/REG_I (square).
//            A 4-2 compressor adds four operands chosen among zero, REG_E..I
//            and the external inputs In E..In H, which carry partial products
//            of neighbouring PEs. Its two outputs leave on Out D / Out E.
//   stage 3  REG_J/REG_K take the compressor outputs or, for add/subtract,
//            the external operands In I / In J. The adder-subtractor adds or
//            subtracts (In MODE) REG_J and REG_K and drives Out A.
// Out B / Out C export REG_F or REG_H and REG_G or REG_I; Out F exports REG_E.
//
// Timing: operands and cfg presented in cycle t reach Out A, combinationally,
// in cycle t+3 (out_valid); In E..In H, In I and In J are sampled in cycle
// t+2, when the op is in stage 2 (for add/subtract present them then). The
// configuration travels down the pipeline with the data.
//
// Register names, the stage contents and the port names follow the document;
// the exact multiplexer inputs are this design's reading (every compressor
// input can pick any of the ten sources). A plain multiplication also passes
// through the compressor (REG_F, REG_G, 0, 0), so every operation has the
// same three-cycle latency instead of bypassing stage 2.
module pe
  import ge_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    in_valid,
  input  pe_cfg_t cfg,
  input  fx_t     in_a, in_b, in_c, in_d,
  input  fx_t     in_e, in_f, in_g, in_h,
  input  fx_t     in_i, in_j,
  output fx_t     out_a, out_b, out_c, out_d, out_e, out_f,
  output logic    out_valid
);
  fx_t reg_a, reg_b, reg_c, reg_d;
  fx_t reg_e, reg_f, reg_g, reg_h, reg_i;
  fx_t reg_j, reg_k;
  fx_t mul0, mul1, sqr0, sqr1;
  fx_t cmp_in [4];
  fx_t cmp_s, cmp_c;
  fx_t as_a, as_b;
  pe_cfg_t cfg1, cfg2, cfg3;
  logic v1, v2, v3;

  booth_mul u_mul (.a(reg_b), .b(reg_c), .pp0(mul0), .pp1(mul1));
  booth_mul u_sqr (.a(reg_d), .b(reg_d), .pp0(sqr0), .pp1(sqr1));

  function automatic fx_t csel(csel_t sel, fx_t e, fx_t f, fx_t g, fx_t h, fx_t i,
                               fx_t ie, fx_t jf, fx_t jg, fx_t jh);
    unique case (sel)
      CS_E:    return e;
      CS_F:    return f;
      CS_G:    return g;
      CS_H:    return h;
      CS_I:    return i;
      CS_IN_E: return ie;
      CS_IN_F: return jf;
      CS_IN_G: return jg;
      CS_IN_H: return jh;
      default: return '0;
    endcase
  endfunction

  always_comb begin
    cmp_in[0] = csel(cfg2.c0, reg_e, reg_f, reg_g, reg_h, reg_i, in_e, in_f, in_g, in_h);
    cmp_in[1] = csel(cfg2.c1, reg_e, reg_f, reg_g, reg_h, reg_i, in_e, in_f, in_g, in_h);
    cmp_in[2] = csel(cfg2.c2, reg_e, reg_f, reg_g, reg_h, reg_i, in_e, in_f, in_g, in_h);
    cmp_in[3] = csel(cfg2.c3, reg_e, reg_f, reg_g, reg_h, reg_i, in_e, in_f, in_g, in_h);
  end

  csa42 u_cmp (.a(cmp_in[0]), .b(cmp_in[1]), .c(cmp_in[2]), .d(cmp_in[3]),
               .s(cmp_s), .co(cmp_c));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      {reg_a, reg_b, reg_c, reg_d} <= '0;
      {reg_e, reg_f, reg_g, reg_h, reg_i} <= '0;
      {reg_j, reg_k} <= '0;
      cfg1 <= PE_CFG_MUL;
      cfg2 <= PE_CFG_MUL;
      cfg3 <= PE_CFG_MUL;
      {v1, v2, v3} <= '0;
    end else begin
      // stage 1 input registers
      reg_a <= in_a;
      reg_b <= in_b;
      reg_c <= in_c;
      reg_d <= in_d;
      cfg1  <= cfg;
      v1    <= in_valid;
      // stage 2 pipeline registers
      reg_e <= reg_a;
      reg_f <= mul0;
      reg_g <= mul1;
      reg_h <= sqr0;
      reg_i <= sqr1;
      cfg2  <= cfg1;
      v2    <= v1;
      // stage 3 pipeline registers
      reg_j <= cfg2.j_ext ? in_i : cmp_s;
      reg_k <= cfg2.k_ext ? in_j : cmp_c;
      cfg3  <= cfg2;
      v3    <= v2;
    end
  end

  always_comb begin
    as_a      = reg_j;
    as_b      = reg_k;
    out_a     = cfg3.sub ? as_a - as_b : as_a + as_b;
    out_valid = v3;
  end

  assign out_b = cfg2.ob_h ? reg_h : reg_f;
  assign out_c = cfg2.oc_i ? reg_i : reg_g;
  assign out_d = cmp_s;
  assign out_e = cmp_c;
  assign out_f = reg_e;

endmodule
