// sc: subdivision control.
//
// Takes a triangle that passed the highlight test from the output control
// and has it subdivided at the current level in two phases: first the normal
// vector (word W_EYEN), then the two-space coordinates, eye space (W_EYE)
// and window space (W_WIN), each as one PPU command that writes the
// generated vertices to entries GEN_BASE.. of the vertex cache. It then
// pushes the N_GV generated entries to dispatch queue 2 so that the VPU
// lights them, counts their lit reports, and finally pulses done so the
// output control emits the subdivided triangles.
// N_GV = (Ns+1)(Ns+2)/2 - 3 with Ns = 2^level: 3 for level 1, 12 for level 2.
// Handshakes are valid/ready; done is a one-cycle pulse. The two phases and
// the use of DQ2 follow the document; the command encoding is this design's.
module sc
  import ge_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   start_valid,
  input  tri_t   start_tri,
  output logic   start_ready,
  input  level_t level,
  output logic   ppu_valid,
  output tri_t   ppu_tri,
  output word_t  ppu_word,
  output level_t ppu_level,
  input  logic   ppu_ready,
  input  logic   ppu_done,
  output logic   dq_push,
  output ent_t   dq_data,
  input  logic   dq_ready,
  input  logic   lit_valid,
  input  ent_t   lit_ent,
  output logic   done
);
  typedef enum logic [2:0] {S_IDLE, S_CMD, S_WAIT, S_PUSH, S_LIT} state_t;
  state_t     state;
  tri_t       tri_q;
  level_t     lvl;
  logic [1:0] phase;       // 0 normal, 1 eye coordinate, 2 window coordinate
  logic [3:0] n_push, n_lit, n_gv;

  function automatic logic [3:0] ngv(level_t l);
    unique case (l)
      2'd1:    return 4'd3;
      2'd2:    return 4'd12;
      default: return 4'd0;
    endcase
  endfunction

  assign start_ready = (state == S_IDLE);
  assign ppu_valid   = (state == S_CMD);
  assign ppu_tri     = tri_q;
  assign ppu_level   = lvl;
  assign ppu_word    = (phase == 2'd0) ? W_EYEN : (phase == 2'd1) ? W_EYE : W_WIN;
  assign dq_push     = (state == S_PUSH) && dq_ready;
  assign dq_data     = ent_t'(GEN_BASE) + ent_t'(n_push);
  assign n_gv        = ngv(lvl);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; tri_q <= '0; lvl <= '0; phase <= '0;
      n_push <= '0; n_lit <= '0; done <= 1'b0;
    end else begin
      done <= 1'b0;
      if (lit_valid && lit_ent >= ent_t'(GEN_BASE) && state != S_IDLE) n_lit <= n_lit + 1'b1;
      unique case (state)
        S_IDLE: if (start_valid) begin
          tri_q <= start_tri; lvl <= level; phase <= '0;
          n_push <= '0; n_lit <= '0;
          state <= S_CMD;
        end
        S_CMD:  if (ppu_ready) state <= S_WAIT;
        S_WAIT: if (ppu_done) begin
          if (phase == 2'd2) state <= (n_gv == 4'd0) ? S_LIT : S_PUSH;
          else begin phase <= phase + 1'b1; state <= S_CMD; end
        end
        S_PUSH: if (dq_ready) begin
          n_push <= n_push + 1'b1;
          if (n_push + 1'b1 == n_gv) state <= S_LIT;
        end
        S_LIT: if (n_lit == n_gv) begin done <= 1'b1; state <= S_IDLE; end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
