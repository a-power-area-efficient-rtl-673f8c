// rdp: reconfigurable datapath of the vertex processing unit.
//
// Three processing elements (PE3 left / z, PE2 centre / y, PE1 right / x),
// one special function unit, one operand FIFO and the extra length adder are
// reconfigured per operation into one of six modes:
//   TRANS_DP  A.x*B.x + A.y*B.y + A.z*B.z + A.w  (one row of a transform)
//   LIGHT_DP  A.x*B.x + A.y*B.y + A.z*B.z        (dot product for lighting)
//   VEC_NORM  B.xyz / |B.xyz|
//   PD        (B.x/B.w, B.y/B.w, B.z/B.w, 1/B.w)  (perspective division)
//   POW       B.y ^ A.x                           (specular power)
//   VEC_SUB   A.xyz - B.xyz
// Dot products: each PE multiplies one pair; the left PE compresses its
// product with the addend A.w (zero for LIGHT_DP), the right PE compresses
// its product with the centre PE's product, and the centre PE compresses the
// two pairs of partial sums and resolves them in its adder. VEC_NORM squares
// the three components in the PE squarers, sums them through the same
// compressor tree and the extra adder, takes 1/sqrt in the SFU while the
// vector waits in the FIFO, then scales it with the three PE multipliers.
// PD takes 1/w in the SFU and multiplies likewise. POW takes log2 of the base
// in the SFU, multiplies it by the exponent in the centre PE and takes the
// antilog in a second SFU pass. VEC_SUB uses the three adder-subtractors.
//
// Interface: in_valid/in_ready handshake for one operation at a time;
// out_valid pulses for one cycle with the result in out (unused lanes zero).
// The operation runs for 3 cycles after the accepting edge (TRANS_DP,
// LIGHT_DP, VEC_SUB), 8 (PD, POW) or 11 (VEC_NORM); out_valid is registered,
// so it is high 4, 9 or 12 clock edges after the accepting edge.
//
// The units, the six modes and the interconnect of Figs. 3.8 and 3.9 follow
// the document; operations here run one at a time, where the document's
// datapath is pipelined across vertices, and results of a dot product that
// is negative stay negative (clamping is left to the caller).
module rdp
  import ge_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  logic      in_valid,
  output logic      in_ready,
  input  rdp_mode_t mode,
  input  vec4_t     a,
  input  vec4_t     b,
  output logic      out_valid,
  output vec4_t     out
);
  typedef enum logic [1:0] {S_IDLE, S_RUN} state_t;
  state_t    state;
  rdp_mode_t md;
  vec4_t     ra, rb;
  logic [3:0] cyc;

  // PE wiring
  pe_cfg_t pcfg [3];
  logic    pv   [3];
  fx_t     pin_a[3], pin_b[3], pin_c[3], pin_d[3], pin_i[3], pin_j[3];
  fx_t     pout_a[3], pout_b[3], pout_c[3], pout_f[3];
  logic    pout_v[3];
  // index 0 = PE1 (right, x), 1 = PE2 (centre, y), 2 = PE3 (left, z)

  // separate nets for the compressor outputs and exported products keep
  // the inter-PE paths free of false combinational loops
  fx_t d1, e1, d2, e2, d3, e3, ob2, oc2;

  pe u_pe1 (
    .clk, .rst_n, .in_valid(pv[0]), .cfg(pcfg[0]),
    .in_a(pin_a[0]), .in_b(pin_b[0]), .in_c(pin_c[0]), .in_d(pin_d[0]),
    .in_e(ob2), .in_f(oc2), .in_g('0), .in_h('0),
    .in_i(pin_i[0]), .in_j(pin_j[0]),
    .out_a(pout_a[0]), .out_b(pout_b[0]), .out_c(pout_c[0]),
    .out_d(d1), .out_e(e1), .out_f(pout_f[0]), .out_valid(pout_v[0])
  );
  pe u_pe2 (
    .clk, .rst_n, .in_valid(pv[1]), .cfg(pcfg[1]),
    .in_a(pin_a[1]), .in_b(pin_b[1]), .in_c(pin_c[1]), .in_d(pin_d[1]),
    .in_e(d3), .in_f(e3), .in_g(d1), .in_h(e1),
    .in_i(pin_i[1]), .in_j(pin_j[1]),
    .out_a(pout_a[1]), .out_b(ob2), .out_c(oc2),
    .out_d(d2), .out_e(e2), .out_f(pout_f[1]), .out_valid(pout_v[1])
  );
  pe u_pe3 (
    .clk, .rst_n, .in_valid(pv[2]), .cfg(pcfg[2]),
    .in_a(pin_a[2]), .in_b(pin_b[2]), .in_c(pin_c[2]), .in_d(pin_d[2]),
    .in_e('0), .in_f('0), .in_g('0), .in_h('0),
    .in_i(pin_i[2]), .in_j(pin_j[2]),
    .out_a(pout_a[2]), .out_b(pout_b[2]), .out_c(pout_c[2]),
    .out_d(d3), .out_e(e3), .out_f(pout_f[2]), .out_valid(pout_v[2])
  );

  // extra adder for the squared length (centre compressor outputs)
  fx_t len_s, len_c, len2;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      len_s <= '0;
      len_c <= '0;
    end else begin
      len_s <= d2;
      len_c <= e2;
    end
  end
  assign len2 = len_s + len_c;

  // SFU
  logic       sv;
  logic [2:0] scfg;
  fx_t        sdata, smul, sout;
  logic [20:0] slog;
  logic       slog_v, sout_v;
  sfu u_sfu (
    .clk, .rst_n, .in_valid(sv), .cfg(scfg), .in_data(sdata), .mul_in(smul),
    .log_out(slog), .log_valid(slog_v), .out_data(sout), .out_valid(sout_v)
  );
  assign smul = pout_a[1];

  // operand FIFO
  logic        f_push, f_pop, f_full, f_empty;
  logic [95:0] f_wdata, f_rdata;
  logic [2:0]  f_count;
  sync_fifo #(.WIDTH(96), .DEPTH(4)) u_fifo (
    .clk, .rst_n, .push(f_push), .wr_data(f_wdata), .pop(f_pop),
    .rd_data(f_rdata), .full(f_full), .empty(f_empty), .count(f_count)
  );
  fx_t fx_q, fy_q, fz_q;
  assign {fz_q, fy_q, fx_q} = f_rdata;

  function automatic pe_cfg_t mk(csel_t c0, csel_t c1, csel_t c2, csel_t c3,
                                 logic jx, logic kx, logic oh, logic oi, logic s);
    return '{c0: c0, c1: c1, c2: c2, c3: c3, j_ext: jx, k_ext: kx,
             ob_h: oh, oc_i: oi, sub: s};
  endfunction

  logic accept;
  assign in_ready = (state == S_IDLE);
  assign accept   = in_valid && in_ready;

  // control: what each unit does in cycle cyc of the running operation
  always_comb begin
    for (int k = 0; k < 3; k++) begin
      pv[k] = 1'b0; pcfg[k] = PE_CFG_MUL;
      pin_a[k] = '0; pin_b[k] = '0; pin_c[k] = '0; pin_d[k] = '0;
      pin_i[k] = '0; pin_j[k] = '0;
    end
    sv = 1'b0; scfg = '0; sdata = '0;
    f_push = 1'b0; f_wdata = '0; f_pop = 1'b0;

    if (accept) begin
      unique case (mode)
        M_TRANS_DP, M_LIGHT_DP: begin
          for (int k = 0; k < 3; k++) pv[k] = 1'b1;
          pin_a[2] = (mode == M_TRANS_DP) ? a.w : '0;
          pin_b[0] = a.x; pin_c[0] = b.x;
          pin_b[1] = a.y; pin_c[1] = b.y;
          pin_b[2] = a.z; pin_c[2] = b.z;
          pcfg[2] = mk(CS_E, CS_F, CS_G, CS_ZERO, 0, 0, 0, 0, 0);
          pcfg[1] = mk(CS_IN_E, CS_IN_F, CS_IN_G, CS_IN_H, 0, 0, 0, 0, 0);
          pcfg[0] = mk(CS_F, CS_G, CS_IN_E, CS_IN_F, 0, 0, 0, 0, 0);
        end
        M_VEC_NORM: begin
          for (int k = 0; k < 3; k++) pv[k] = 1'b1;
          pin_d[0] = b.x; pin_d[1] = b.y; pin_d[2] = b.z;
          pcfg[2] = mk(CS_ZERO, CS_ZERO, CS_H, CS_I, 0, 0, 0, 0, 0);
          pcfg[1] = mk(CS_IN_E, CS_IN_F, CS_IN_G, CS_IN_H, 0, 0, 1, 1, 0);
          pcfg[0] = mk(CS_H, CS_I, CS_IN_E, CS_IN_F, 0, 0, 0, 0, 0);
          f_push  = 1'b1; f_wdata = {b.z, b.y, b.x};
        end
        M_PD: begin
          sv = 1'b1; scfg = 3'b100; sdata = b.w;
          f_push = 1'b1; f_wdata = {b.z, b.y, b.x};
        end
        M_POW: begin
          sv = 1'b1; scfg = 3'b000; sdata = b.y;
          f_push = 1'b1; f_wdata = {64'd0, a.x};
        end
        default: begin // M_VEC_SUB
          for (int k = 0; k < 3; k++) begin
            pv[k] = 1'b1;
            pcfg[k] = mk(CS_ZERO, CS_ZERO, CS_ZERO, CS_ZERO, 1, 1, 0, 0, 1);
          end
        end
      endcase
    end else if (state == S_RUN) begin
      unique case (md)
        M_VEC_NORM: begin
          if (cyc == 4'd3) begin
            sv = 1'b1; scfg = 3'b010; sdata = len2;
          end
          if (cyc == 4'd8) begin
            f_pop = 1'b1;
            for (int k = 0; k < 3; k++) begin pv[k] = 1'b1; pin_b[k] = sout; end
            pin_c[0] = fx_q; pin_c[1] = fy_q; pin_c[2] = fz_q;
          end
        end
        M_PD: begin
          if (cyc == 4'd5) begin
            f_pop = 1'b1;
            for (int k = 0; k < 3; k++) begin pv[k] = 1'b1; pin_b[k] = sout; end
            pin_c[0] = fx_q; pin_c[1] = fy_q; pin_c[2] = fz_q;
          end
        end
        M_POW: begin
          if (cyc == 4'd3) begin
            f_pop = 1'b1;
            pv[1] = 1'b1; pin_b[1] = fx_q; pin_c[1] = fx_t'($signed(slog));
            sv = 1'b1; scfg = 3'b001;
          end
        end
        M_VEC_SUB: begin
          if (cyc == 4'd2) begin
            pin_i[0] = ra.x; pin_j[0] = rb.x;
            pin_i[1] = ra.y; pin_j[1] = rb.y;
            pin_i[2] = ra.z; pin_j[2] = rb.z;
          end
        end
        default: ;
      endcase
    end
  end

  // completion
  logic  done;
  vec4_t res;
  always_comb begin
    done = 1'b0;
    res  = '0;
    if (state == S_RUN) begin
      unique case (md)
        M_TRANS_DP, M_LIGHT_DP: begin
          done = (cyc == 4'd3); res.x = pout_a[1];
        end
        M_VEC_SUB: begin
          done = (cyc == 4'd3);
          res.x = pout_a[0]; res.y = pout_a[1]; res.z = pout_a[2];
        end
        M_PD: begin
          done = (cyc == 4'd8);
          res.x = pout_a[0]; res.y = pout_a[1]; res.z = pout_a[2]; res.w = rb.w;
        end
        M_POW: begin
          done = (cyc == 4'd8); res.x = sout;
        end
        default: begin // M_VEC_NORM
          done = (cyc == 4'd11);
          res.x = pout_a[0]; res.y = pout_a[1]; res.z = pout_a[2];
        end
      endcase
    end
  end

  // 1/w for PD is kept from the SFU output
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; md <= M_TRANS_DP; ra <= '0; rb <= '0; cyc <= '0;
      out_valid <= 1'b0; out <= '0;
    end else begin
      out_valid <= 1'b0;
      if (accept) begin
        state <= S_RUN; md <= mode; ra <= a; rb <= b; cyc <= 4'd1;
      end else if (state == S_RUN) begin
        cyc <= cyc + 1'b1;
        if (md == M_PD && cyc == 4'd5) rb.w <= sout;
        if (done) begin
          state     <= S_IDLE;
          out_valid <= 1'b1;
          out       <= res;
        end
      end
    end
  end
endmodule
