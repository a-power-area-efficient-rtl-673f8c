// pic: primitive input control.
//
// Reads vertex indices one at a time from the index FIFO and assembles them
// into triangles (three consecutive indices). For each index it searches the
// VCMU. On a hit the entry's reference count is raised and the cached vertex
// is reused; it needs processing only if it is neither in the pipeline nor
// lit. On a miss it allocates a free tag entry (waiting while none is free),
// requests the vertex from external memory and writes the two returned
// 128-bit words (object-space coordinate, then normal) into the vertex cache.
// A complete triangle is sent to the PPU for the backface test. A backface
// is dropped and its three references released; otherwise the triangle's
// three entries are pushed to the primitive queue and the vertices that need
// processing are pushed to dispatch queue 1 and marked in-pipe.
// A triangle must not repeat an index (degenerate triangles would be counted
// and dispatched twice): the index stream is expected to be free of them.
// All handshakes are valid/ready; mem_rsp has no back-pressure. The flow
// follows the document; the handshakes and the two-word memory response are
// this design's choices.
module pic
  import ge_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        idx_valid,
  input  idx_t        idx_data,
  output logic        idx_ready,
  // VCMU
  output idx_t        search_idx,
  input  logic        hit,
  input  logic [3:0]  hit_ent,
  input  logic        hit_processed,
  input  logic        free,
  input  logic [3:0]  free_ent,
  output logic        ref_en,
  output logic [3:0]  ref_ent,
  output logic        alloc_en,
  output logic        pipe_set_en,
  output logic [3:0]  pipe_set_ent,
  output logic [15:0] rel_mask,
  // external memory
  output logic        mem_req_valid,
  output idx_t        mem_req_idx,
  input  logic        mem_req_ready,
  input  logic        mem_rsp_valid,
  input  vec4_t       mem_rsp_data,
  // vertex cache write
  output logic        wr_en,
  output caddr_t      wr_addr,
  output vec4_t       wr_data,
  // PPU culling
  output logic        cull_valid,
  output tri_t        cull_tri,
  input  logic        cull_ready,
  input  logic        cull_done,
  input  logic        cull_back,
  // primitive queue and dispatch queue 1
  output logic        pq_push,
  output tri_t        pq_data,
  input  logic        pq_full,
  output logic        dq_push,
  output ent_t        dq_data,
  input  logic        dq_ready,
  output logic        culled          // pulses per dropped triangle
);
  typedef enum logic [3:0] {S_IDX, S_LOOK, S_REQ, S_RSP0, S_RSP1, S_CULL, S_CWAIT,
                            S_PQ, S_DQ} state_t;
  state_t     state;
  idx_t       idx_q;
  logic [1:0] k;
  logic [3:0] ent [3];
  logic [2:0] need;
  tri_t       tri_w;

  assign tri_w      = '{a: {1'b0, ent[0]}, b: {1'b0, ent[1]}, c: {1'b0, ent[2]}};
  assign idx_ready  = (state == S_IDX);
  assign search_idx = idx_q;
  assign ref_en     = (state == S_LOOK) && hit;
  assign ref_ent    = hit_ent;
  assign alloc_en   = (state == S_LOOK) && !hit && free;
  assign mem_req_valid = (state == S_REQ);
  assign mem_req_idx   = idx_q;
  assign wr_en      = (state == S_RSP0 || state == S_RSP1) && mem_rsp_valid;
  assign wr_addr    = '{ent: {1'b0, ent[k]}, word: (state == S_RSP0) ? W_OBJ : W_OBJN};
  assign wr_data    = mem_rsp_data;
  assign cull_valid = (state == S_CULL);
  assign cull_tri   = tri_w;
  assign pq_push    = (state == S_PQ) && !pq_full;
  assign pq_data    = tri_w;
  assign dq_push    = (state == S_DQ) && need[k] && dq_ready;
  assign dq_data    = {1'b0, ent[k]};
  assign pipe_set_en  = dq_push;
  assign pipe_set_ent = ent[k];

  always_comb begin
    rel_mask = '0;
    if (state == S_CWAIT && cull_done && cull_back)
      for (int i = 0; i < 3; i++) rel_mask[ent[i]] = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDX; idx_q <= '0; k <= '0; need <= '0; culled <= 1'b0;
      for (int i = 0; i < 3; i++) ent[i] <= '0;
    end else begin
      culled <= 1'b0;
      unique case (state)
        S_IDX: if (idx_valid) begin idx_q <= idx_data; state <= S_LOOK; end
        S_LOOK: begin
          if (hit) begin
            ent[k]  <= hit_ent;
            need[k] <= !hit_processed;
            if (k == 2'd2) state <= S_CULL;
            else begin k <= k + 1'b1; state <= S_IDX; end
          end else if (free) begin
            ent[k]  <= free_ent;
            need[k] <= 1'b1;
            state   <= S_REQ;
          end
        end
        S_REQ:  if (mem_req_ready) state <= S_RSP0;
        S_RSP0: if (mem_rsp_valid) state <= S_RSP1;
        S_RSP1: if (mem_rsp_valid) begin
          if (k == 2'd2) state <= S_CULL;
          else begin k <= k + 1'b1; state <= S_IDX; end
        end
        S_CULL: if (cull_ready) state <= S_CWAIT;
        S_CWAIT: if (cull_done) begin
          k <= '0;
          if (cull_back) begin culled <= 1'b1; state <= S_IDX; end
          else state <= S_PQ;
        end
        S_PQ: if (!pq_full) begin k <= '0; state <= S_DQ; end
        S_DQ: if (!need[k] || dq_ready) begin
          if (k == 2'd2) begin k <= '0; state <= S_IDX; end
          else k <= k + 1'b1;
        end
        default: state <= S_IDX;
      endcase
    end
  end
endmodule
