// vpu: vertex processing unit - transform and lighting of one vertex at a time.
//
// A control unit steps through a micro-program held in a ROM. Each
// micro-operation either loads a 128-bit vertex word from the vertex cache
// into the register file, runs one reconfigurable-datapath (RDP) operation
// on a register or constant-memory operand pair and writes selected lanes of
// the result back to the register file, stores a register to the vertex
// cache, jumps, or ends the vertex.
//
// Original vertices (from dispatch queue 1) run the whole program:
//   modelview (3 TRANS_DP rows), normal transform (3 rows), projection
//   (4 rows), perspective division (PD), viewport (3 rows, 1/w kept in lane
//   w), then the lighting part. Generated vertices (dispatch queue 2, served
//   first) load their subdivided eye coordinate and normal and run only the
//   lighting part, which skips all transforms for them (dual-space
//   subdivision):
//   L = norm(Lpos - P), V' = norm(P), H = norm(L - V'), N = norm(N),
//   N.L and N.H (LIGHT_DP, clamped at 0), (N.H)^n (POW),
//   I = Id*(N.L) + Is*(N.H)^n + Ia (TRANS_DP), written to word W_COL with N.H.
// The highlight test compares N.H with h_threshold; on completion lit_valid
// pulses with the entry and the test result.
//
// Constant memory (16 x 128, written by the host): 0-2 modelview rows,
// 3-5 normal-matrix rows, 6-9 projection rows, 10-12 viewport rows
// (x_scale, 0, 0, x_offset) etc., 13 light position (eye space), 14 (Id, Is,
// 0, Ia), 15 shininess n in lane x. Each row is (m_i1, m_i2, m_i3, m_i4)
// for TRANS_DP. Register file: RF_DEPTH x 128 bits.
//
// The unit list (control unit, constant memory 16x128, register file
// 48x128, RDP, per-mode configuration held as constant logic in the RDP)
// and the operations follow the document; the micro-program, the point-light
// form of Blinn-Phong with a single intensity channel and the one-operation-
// at-a-time schedule (the document calls the datapath pipelined but gives no
// schedule) are this design's.
module vpu
  import ge_pkg::*;
#(
  parameter int unsigned RF_DEPTH = 48
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       dq1_valid,
  input  ent_t       dq1_data,
  output logic       dq1_pop,
  input  logic       dq2_valid,
  input  ent_t       dq2_data,
  output logic       dq2_pop,
  input  logic       const_we,
  input  logic [3:0] const_addr,
  input  vec4_t      const_wdata,
  input  fx_t        h_threshold,
  output caddr_t     rd_addr,
  input  vec4_t      rd_data,
  output logic       wr_en,
  output caddr_t     wr_addr,
  output vec4_t      wr_data,
  output logic       lit_valid,
  output ent_t       lit_ent,
  output logic       lit_htest,
  output logic       busy
);
  typedef enum logic [2:0] {OP_LOAD, OP_RDP, OP_STORE, OP_JMP, OP_END} op_t;
  typedef struct packed {
    op_t        op;
    rdp_mode_t  mode;
    logic       a_const;
    logic [5:0] a;
    logic       b_const;
    logic [5:0] b;
    logic [5:0] dst;       // register (also source of STORE)
    logic [3:0] lanes;     // lanes written (w z y x)
    logic       scalar;    // result lane x copied to the written lanes
    logic       clamp;     // negative results become zero
    logic       htest;     // result is N.H: run the highlight test
    word_t      word;      // LOAD / STORE word
    logic [5:0] target;    // JMP
  } uop_t;

  localparam logic [5:0] R_OBJ = 0, R_OBJN = 1, R_P = 2, R_N = 3, R_CLIP = 4, R_WIN = 5,
                         R_L = 6, R_V = 7, R_H = 8, R_NN = 9, R_LIT = 10, R_COL = 11;
  localparam logic [5:0] PC_LIGHT = 6'd19, PC_GEN = 6'd31;

  function automatic uop_t u_ld(logic [5:0] d, word_t w);
    return '{op: OP_LOAD, mode: M_TRANS_DP, dst: d, word: w, default: '0};
  endfunction
  function automatic uop_t u_st(logic [5:0] d, word_t w);
    return '{op: OP_STORE, mode: M_TRANS_DP, dst: d, word: w, default: '0};
  endfunction
  function automatic uop_t u_rdp(rdp_mode_t m, logic ac, logic [5:0] a, logic [5:0] b,
                                 logic [5:0] d, logic [3:0] ln, logic sc, logic cl, logic ht);
    return '{op: OP_RDP, mode: m, a_const: ac, a: a, b_const: 1'b0, b: b, dst: d,
             lanes: ln, scalar: sc, clamp: cl, htest: ht, word: W_OBJ, target: '0};
  endfunction
  function automatic uop_t u_tdp(logic [5:0] c, logic [5:0] b, logic [5:0] d, logic [3:0] ln);
    return u_rdp(M_TRANS_DP, 1'b1, c, b, d, ln, 1'b1, 1'b0, 1'b0);
  endfunction

  // micro-program ROM
  function automatic uop_t prog(logic [5:0] pc);
    unique case (pc)
      6'd0:  return u_ld(R_OBJ, W_OBJ);
      6'd1:  return u_ld(R_OBJN, W_OBJN);
      6'd2:  return u_tdp(6'd0, R_OBJ, R_P, 4'b0001);        // modelview
      6'd3:  return u_tdp(6'd1, R_OBJ, R_P, 4'b0010);
      6'd4:  return u_tdp(6'd2, R_OBJ, R_P, 4'b0100);
      6'd5:  return u_tdp(6'd3, R_OBJN, R_N, 4'b0001);       // normal transform
      6'd6:  return u_tdp(6'd4, R_OBJN, R_N, 4'b0010);
      6'd7:  return u_tdp(6'd5, R_OBJN, R_N, 4'b0100);
      6'd8:  return u_tdp(6'd6, R_P, R_CLIP, 4'b0001);       // projection
      6'd9:  return u_tdp(6'd7, R_P, R_CLIP, 4'b0010);
      6'd10: return u_tdp(6'd8, R_P, R_CLIP, 4'b0100);
      6'd11: return u_tdp(6'd9, R_P, R_CLIP, 4'b1000);
      6'd12: return u_rdp(M_PD, 1'b0, R_CLIP, R_CLIP, R_WIN, 4'b1111, 1'b0, 1'b0, 1'b0);
      6'd13: return u_tdp(6'd10, R_WIN, R_WIN, 4'b0001);     // viewport
      6'd14: return u_tdp(6'd11, R_WIN, R_WIN, 4'b0010);
      6'd15: return u_tdp(6'd12, R_WIN, R_WIN, 4'b0100);
      6'd16: return u_st(R_P, W_EYE);
      6'd17: return u_st(R_N, W_EYEN);
      6'd18: return u_st(R_WIN, W_WIN);
      // lighting (PC_LIGHT)
      6'd19: return u_rdp(M_VEC_SUB, 1'b1, 6'd13, R_P, R_L, 4'b0111, 1'b0, 1'b0, 1'b0);
      6'd20: return u_rdp(M_VEC_NORM, 1'b0, R_L, R_L, R_L, 4'b0111, 1'b0, 1'b0, 1'b0);
      6'd21: return u_rdp(M_VEC_NORM, 1'b0, R_P, R_P, R_V, 4'b0111, 1'b0, 1'b0, 1'b0);
      6'd22: return u_rdp(M_VEC_SUB, 1'b0, R_L, R_V, R_H, 4'b0111, 1'b0, 1'b0, 1'b0);
      6'd23: return u_rdp(M_VEC_NORM, 1'b0, R_H, R_H, R_H, 4'b0111, 1'b0, 1'b0, 1'b0);
      6'd24: return u_rdp(M_VEC_NORM, 1'b0, R_N, R_N, R_NN, 4'b0111, 1'b0, 1'b0, 1'b0);
      6'd25: return u_rdp(M_LIGHT_DP, 1'b0, R_NN, R_L, R_LIT, 4'b0001, 1'b1, 1'b1, 1'b0);
      6'd26: return u_rdp(M_LIGHT_DP, 1'b0, R_NN, R_H, R_COL, 4'b0010, 1'b1, 1'b1, 1'b1);
      6'd27: return u_rdp(M_POW, 1'b1, 6'd15, R_COL, R_LIT, 4'b0010, 1'b1, 1'b0, 1'b0);
      6'd28: return u_tdp(6'd14, R_LIT, R_COL, 4'b0001);
      6'd29: return u_st(R_COL, W_COL);
      6'd30: return '{op: OP_END, mode: M_TRANS_DP, word: W_OBJ, default: '0};
      // generated vertices (PC_GEN)
      6'd31: return u_ld(R_P, W_EYE);
      6'd32: return u_ld(R_N, W_EYEN);
      6'd33: return '{op: OP_JMP, mode: M_TRANS_DP, target: PC_LIGHT, word: W_OBJ, default: '0};
      default: return '{op: OP_END, mode: M_TRANS_DP, word: W_OBJ, default: '0};
    endcase
  endfunction

  vec4_t cmem [16];
  vec4_t rf   [RF_DEPTH];

  typedef enum logic [1:0] {S_IDLE, S_RUN, S_WAIT} state_t;
  state_t     state;
  logic [5:0] pc;
  ent_t       ent;
  logic       htest_q;
  uop_t       u;
  assign u = prog(pc);

  // RDP
  logic  r_valid, r_ready, r_out_valid;
  vec4_t r_a, r_b, r_out;
  rdp u_dp (.clk, .rst_n, .in_valid(r_valid), .in_ready(r_ready), .mode(u.mode),
             .a(r_a), .b(r_b), .out_valid(r_out_valid), .out(r_out));

  assign r_a     = u.a_const ? cmem[u.a[3:0]] : rf[u.a];
  assign r_b     = u.b_const ? cmem[u.b[3:0]] : rf[u.b];
  assign r_valid = (state == S_RUN) && (u.op == OP_RDP);

  assign dq2_pop = (state == S_IDLE) && dq2_valid;
  assign dq1_pop = (state == S_IDLE) && !dq2_valid && dq1_valid;
  assign busy    = (state != S_IDLE);

  assign rd_addr = '{ent: ent, word: u.word};
  assign wr_en   = (state == S_RUN) && (u.op == OP_STORE);
  assign wr_addr = '{ent: ent, word: u.word};
  assign wr_data = rf[u.dst];

  // result shaping
  vec4_t res;
  fx_t   sres;
  always_comb begin
    sres = r_out.x;
    if (u.clamp && sres < 0) sres = '0;
    res = u.scalar ? '{x: sres, y: sres, z: sres, w: sres} : r_out;
  end

  always_ff @(posedge clk) begin
    if (const_we) cmem[const_addr] <= const_wdata;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; pc <= '0; ent <= '0; htest_q <= 1'b0;
      lit_valid <= 1'b0; lit_ent <= '0; lit_htest <= 1'b0;
      for (int i = 0; i < int'(RF_DEPTH); i++) rf[i] <= '0;
    end else begin
      lit_valid <= 1'b0;
      unique case (state)
        S_IDLE: begin
          if (dq2_valid) begin
            ent <= dq2_data; pc <= PC_GEN; state <= S_RUN; htest_q <= 1'b0;
          end else if (dq1_valid) begin
            ent <= dq1_data; pc <= '0; state <= S_RUN; htest_q <= 1'b0;
          end
        end
        S_RUN: begin
          unique case (u.op)
            OP_LOAD:  begin rf[u.dst] <= rd_data; pc <= pc + 1'b1; end
            OP_STORE: pc <= pc + 1'b1;
            OP_JMP:   pc <= u.target;
            OP_RDP:   if (r_ready) state <= S_WAIT;
            default: begin
              lit_valid <= 1'b1;
              lit_ent   <= ent;
              lit_htest <= htest_q;
              state     <= S_IDLE;
            end
          endcase
        end
        S_WAIT: if (r_out_valid) begin
          if (u.lanes[0]) rf[u.dst].x <= res.x;
          if (u.lanes[1]) rf[u.dst].y <= res.y;
          if (u.lanes[2]) rf[u.dst].z <= res.z;
          if (u.lanes[3]) rf[u.dst].w <= res.w;
          if (u.htest) htest_q <= (sres > h_threshold);
          pc    <= pc + 1'b1;
          state <= S_RUN;
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
