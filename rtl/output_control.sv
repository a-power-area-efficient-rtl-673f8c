// output_control: in-order triangle output to the setup engine.
//
// Waits until all three vertices of the triangle at the head of the
// primitive queue are lit (VCMU vertex_lit), then pops it. If the level is
// above 0 and any of its vertices passed the highlight test (vertex_Htest),
// the triangle goes to the subdivision control and, once that reports done,
// the Ns^2 small triangles (Ns = 2^level) are sent; otherwise the original
// triangle is sent as is (Gouraud shading). Each vertex leaves as one 128-bit
// word (window x, y, z and light intensity), read from the vertex cache in
// two cycles (W_WIN then W_COL); out_last marks the third vertex of a
// triangle. Finally the three original vertices are released in the VCMU.
// Small triangles are listed row by row of the subdivision grid: for every
// point (r, c) the upward triangle (r,c) (r+1,c) (r+1,c+1) and, if c < r,
// the downward one (r,c) (r+1,c+1) (r,c+1); for level 1 this gives
// Va Vi Vk, Vi Vb Vj, Vi Vj Vk, Vk Vj Vc. Grid points other than the
// corners are the generated entries GEN_BASE + k in the order the PPU wrote
// them. The flow follows the document; the output word and the grid order
// are this design's.
module output_control
  import ge_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        pq_valid,
  input  tri_t        pq_data,
  output logic        pq_pop,
  input  logic [15:0] lit_vec,
  input  logic [15:0] htest_vec,
  output logic [15:0] rel_mask,
  input  level_t      level,
  output logic        sc_valid,
  output tri_t        sc_tri,
  input  logic        sc_ready,
  input  logic        sc_done,
  output caddr_t      rd_addr,
  input  vec4_t       rd_data,
  output logic        out_valid,
  output vec4_t       out_data,
  output logic        out_last,
  input  logic        out_ready,
  output logic        subdivided,     // pulses per subdivided triangle
  output logic        busy            // a triangle is being handled
);
  typedef enum logic [2:0] {S_HEAD, S_SC, S_SCW, S_RD0, S_RD1, S_OUT, S_REL} state_t;
  state_t     state;
  tri_t       tri_q;
  logic [2:0] ns, r, c;
  logic       down;
  logic [1:0] v;
  fx_t        wx, wy, wz;

  function automatic ent_t ent_of(logic [2:0] rr, logic [2:0] cc, logic [2:0] n, tri_t t);
    logic [4:0] k;
    if (rr == 3'd0) return t.a;
    if (rr == n && cc == 3'd0) return t.b;
    if (rr == n && cc == n) return t.c;
    k = 5'((int'(rr) * (int'(rr) + 1)) / 2 + int'(cc) - 1 - ((rr == n) ? 1 : 0));
    return ent_t'(GEN_BASE) + k;
  endfunction

  logic [2:0] vr, vc;
  always_comb begin
    vr = r; vc = c;
    unique case (v)
      2'd1: begin vr = r + 1'b1; vc = down ? c + 1'b1 : c; end
      2'd2: begin vr = down ? r : r + 1'b1; vc = c + 1'b1; end
      default: ;
    endcase
  end

  logic all_lit, any_h;
  assign all_lit = lit_vec[pq_data.a[3:0]] && lit_vec[pq_data.b[3:0]] && lit_vec[pq_data.c[3:0]];
  assign any_h   = htest_vec[pq_data.a[3:0]] || htest_vec[pq_data.b[3:0]] || htest_vec[pq_data.c[3:0]];

  assign pq_pop    = (state == S_HEAD) && pq_valid && all_lit;
  assign sc_valid  = (state == S_SC);
  assign sc_tri    = tri_q;
  assign rd_addr   = '{ent: ent_of(vr, vc, ns, tri_q), word: (state == S_RD0) ? W_WIN : W_COL};
  assign out_valid = (state == S_OUT);
  assign busy      = (state != S_HEAD);
  assign out_last  = (v == 2'd2);

  always_comb begin
    rel_mask = '0;
    if (state == S_REL) begin
      rel_mask[tri_q.a[3:0]] = 1'b1;
      rel_mask[tri_q.b[3:0]] = 1'b1;
      rel_mask[tri_q.c[3:0]] = 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_HEAD; tri_q <= '0; ns <= 3'd1; r <= '0; c <= '0; down <= 1'b0;
      v <= '0; wx <= '0; wy <= '0; wz <= '0; out_data <= '0; subdivided <= 1'b0;
    end else begin
      subdivided <= 1'b0;
      unique case (state)
        S_HEAD: if (pq_pop) begin
          tri_q <= pq_data;
          r <= '0; c <= '0; down <= 1'b0; v <= '0;
          if (level != 2'd0 && any_h) begin
            ns <= 3'd1 << level;
            state <= S_SC;
          end else begin
            ns <= 3'd1;
            state <= S_RD0;
          end
        end
        S_SC:  if (sc_ready) state <= S_SCW;
        S_SCW: if (sc_done) begin subdivided <= 1'b1; state <= S_RD0; end
        S_RD0: begin wx <= rd_data.x; wy <= rd_data.y; wz <= rd_data.z; state <= S_RD1; end
        S_RD1: begin out_data <= '{x: wx, y: wy, z: wz, w: rd_data.x}; state <= S_OUT; end
        S_OUT: if (out_ready) begin
          state <= S_RD0;
          if (v != 2'd2) v <= v + 1'b1;
          else begin
            v <= '0;
            if (!down && c < r) down <= 1'b1;
            else begin
              down <= 1'b0;
              if (c < r) c <= c + 1'b1;
              else if (r + 1'b1 < ns) begin r <= r + 1'b1; c <= '0; end
              else state <= S_REL;
            end
          end
        end
        S_REL: state <= S_HEAD;
        default: state <= S_HEAD;
      endcase
    end
  end
endmodule
