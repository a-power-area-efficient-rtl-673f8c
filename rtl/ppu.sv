// ppu: primitive processing unit - backface culling and triangle subdivision.
//
// Datapath: three 128-bit vertex input buffers loaded from the vertex cache
// read channel, four 32-bit add/subtract units (SUB1..SUB3 and ADD_SUB, one
// per lane of a 128-bit word), one 16x16 multiplier, the intermediate
// registers REG_tmp_1, REG_tmp_2, REG_d1, REG_d2 (128 bits) and REG_0,
// REG_1 (32 bits).
//
// CULL (object space, before transform): e1 = Vb - Va, e2 = Vc - Va and
// v = eye - Va take one cycle each on the subtractors; the face normal
// n = e1 x e2 takes six multiply/subtract steps and n . v three multiply/
// accumulate steps on the single multiplier. The triangle is a backface when
// n . v <= 0 (counter-clockwise front faces). The multiplier takes bits
// [23:8] of its Q16.16 operands (Q8.8) and returns a Q16.16 product, so
// coordinates must stay within +-128 and edges and distances well below.
//
// SUBDIV (one 128-bit attribute word of a triangle, level L, Ns = 2^L):
// the difference vectors d1 = (Vc - Vb) / Ns and d2 = (Vb - Va) / Ns are
// formed by the four subtractors and a shift. The generated vertices are then
// produced by forward difference: each row starts one d2 below the previous
// row start (first row start is Va) and steps along the row by d1; every
// point except Va, Vb and Vc is written to the cache, one per cycle, to
// entries gen_base, gen_base+1, ... in row order. Level 0 generates nothing.
//
// Interface: cmd_valid/cmd_ready accept a command; resp_valid pulses when it
// is finished, with resp_back for CULL. One cache read port (combinational)
// and one write port. Cycles: CULL 3 loads + 3 + 9 = 15, resp_valid in the
// cycle after; SUBDIV 3 loads + 2
// difference cycles + one per row + one per grid point after Va.
// Units, registers, the forward-difference equations and the culling-
// before-subdivision order follow the document; the step schedule, the Q8.8
// multiplier operands and the culling sign convention are this design's.
module ppu
  import ge_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   cmd_valid,
  output logic   cmd_ready,
  input  logic   cmd_subdiv,     // 0 CULL, 1 SUBDIV
  input  tri_t   cmd_tri,
  input  word_t  cmd_word,
  input  level_t cmd_level,
  input  ent_t   cmd_gen_base,
  output logic   resp_valid,
  output logic   resp_back,
  input  vec4_t  eye_pos,
  output caddr_t rd_addr,
  input  vec4_t  rd_data,
  output logic   wr_en,
  output caddr_t wr_addr,
  output vec4_t  wr_data
);
  typedef enum logic [3:0] {S_IDLE, S_LD0, S_LD1, S_LD2, S_E1, S_E2, S_V, S_MUL,
                            S_D1, S_D2, S_ROW, S_PT} state_t;
  state_t state;

  logic   op_sub;
  tri_t   tri_q;
  word_t  word_q;
  level_t lvl;
  ent_t   gen;
  vec4_t  vin [3];
  vec4_t  reg_tmp_1, reg_tmp_2, reg_d1, reg_d2;
  fx_t    reg_0, reg_1;
  logic [3:0] step;
  logic [2:0] row, col, ns;

  // four lane-wise add/subtract units
  function automatic vec4_t vadd(vec4_t p, vec4_t q, logic sub);
    vec4_t o;
    o.x = sub ? p.x - q.x : p.x + q.x;   // SUB1
    o.y = sub ? p.y - q.y : p.y + q.y;   // SUB2
    o.z = sub ? p.z - q.z : p.z + q.z;   // SUB3
    o.w = sub ? p.w - q.w : p.w + q.w;   // ADD_SUB
    return o;
  endfunction

  function automatic vec4_t vshr(vec4_t p, level_t l);
    return '{x: p.x >>> l, y: p.y >>> l, z: p.z >>> l, w: p.w >>> l};
  endfunction

  // 16x16 multiplier on Q8.8 views of Q16.16 operands
  function automatic fx_t mul16(fx_t p, fx_t q);
    logic signed [15:0] ps, qs;
    ps = p[23:8];
    qs = q[23:8];
    return fx_t'(ps * qs);
  endfunction

  // multiply step schedule of the culling test
  fx_t ma, mb, prod;
  always_comb begin
    unique case (step)
      4'd0: begin ma = reg_tmp_1.y; mb = reg_tmp_2.z; end
      4'd1: begin ma = reg_tmp_1.z; mb = reg_tmp_2.y; end
      4'd2: begin ma = reg_tmp_1.z; mb = reg_tmp_2.x; end
      4'd3: begin ma = reg_tmp_1.x; mb = reg_tmp_2.z; end
      4'd4: begin ma = reg_tmp_1.x; mb = reg_tmp_2.y; end
      4'd5: begin ma = reg_tmp_1.y; mb = reg_tmp_2.x; end
      4'd6: begin ma = reg_d2.x;    mb = reg_d1.x;    end
      4'd7: begin ma = reg_d2.y;    mb = reg_d1.y;    end
      default: begin ma = reg_d2.z; mb = reg_d1.z;    end
    endcase
    prod = mul16(ma, mb);
  end

  fx_t dot_final;
  assign dot_final = reg_1 + prod;

  // which grid point is a corner (not generated)
  logic corner;
  assign corner = (row == ns) && (col == 3'd0 || col == ns);

  assign cmd_ready = (state == S_IDLE);

  always_comb begin
    rd_addr = '{ent: tri_q.a, word: op_sub ? word_q : W_OBJ};
    unique case (state)
      S_LD1:   rd_addr.ent = tri_q.b;
      S_LD2:   rd_addr.ent = tri_q.c;
      default: rd_addr.ent = tri_q.a;
    endcase
  end

  always_comb begin
    wr_en   = (state == S_PT) && !corner;
    wr_addr = '{ent: gen, word: word_q};
    wr_data = reg_tmp_2;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; op_sub <= 1'b0; tri_q <= '0; word_q <= W_OBJ; lvl <= '0;
      gen <= '0; step <= '0; row <= '0; col <= '0; ns <= '0;
      for (int i = 0; i < 3; i++) vin[i] <= '0;
      reg_tmp_1 <= '0; reg_tmp_2 <= '0; reg_d1 <= '0; reg_d2 <= '0;
      reg_0 <= '0; reg_1 <= '0;
      resp_valid <= 1'b0; resp_back <= 1'b0;
    end else begin
      resp_valid <= 1'b0;
      unique case (state)
        S_IDLE: if (cmd_valid) begin
          op_sub <= cmd_subdiv;
          tri_q  <= cmd_tri;
          word_q <= cmd_word;
          lvl    <= cmd_level;
          ns     <= 3'd1 << cmd_level;
          gen    <= cmd_gen_base;
          if (cmd_subdiv && cmd_level == '0) resp_valid <= 1'b1;
          else state <= S_LD0;
        end
        S_LD0: begin vin[0] <= rd_data; state <= S_LD1; end
        S_LD1: begin vin[1] <= rd_data; state <= S_LD2; end
        S_LD2: begin vin[2] <= rd_data; state <= op_sub ? S_D1 : S_E1; end
        // culling
        S_E1: begin reg_tmp_1 <= vadd(vin[1], vin[0], 1'b1); state <= S_E2; end
        S_E2: begin reg_tmp_2 <= vadd(vin[2], vin[0], 1'b1); state <= S_V; end
        S_V:  begin reg_d1 <= vadd(eye_pos, vin[0], 1'b1); step <= '0; state <= S_MUL; end
        S_MUL: begin
          step <= step + 1'b1;
          unique case (step)
            4'd0, 4'd2, 4'd4: reg_0 <= prod;
            4'd1: reg_d2.x <= reg_0 - prod;
            4'd3: reg_d2.y <= reg_0 - prod;
            4'd5: reg_d2.z <= reg_0 - prod;
            4'd6: reg_1 <= prod;
            4'd7: reg_1 <= reg_1 + prod;
            default: begin
              reg_1      <= dot_final;
              resp_valid <= 1'b1;
              resp_back  <= (dot_final <= 0);
              state      <= S_IDLE;
            end
          endcase
        end
        // subdivision
        S_D1: begin reg_d1 <= vshr(vadd(vin[2], vin[1], 1'b1), lvl); state <= S_D2; end
        S_D2: begin
          reg_d2    <= vshr(vadd(vin[1], vin[0], 1'b1), lvl);
          reg_tmp_1 <= vin[0];
          row       <= '0;
          state     <= S_ROW;
        end
        S_ROW: begin
          reg_tmp_1 <= vadd(reg_tmp_1, reg_d2, 1'b0);
          reg_tmp_2 <= vadd(reg_tmp_1, reg_d2, 1'b0);
          row       <= row + 1'b1;
          col       <= '0;
          state     <= S_PT;
        end
        S_PT: begin
          if (!corner) gen <= gen + 1'b1;
          if (col == row) begin
            if (row == ns) begin
              resp_valid <= 1'b1;
              state      <= S_IDLE;
            end else begin
              state <= S_ROW;
            end
          end else begin
            reg_tmp_2 <= vadd(reg_tmp_2, reg_d1, 1'b0);
            col       <= col + 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
