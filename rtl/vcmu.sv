// vcmu: vertex cache management unit (tag side of the vertex cache).
//
// TAGS tag entries, each with the seven fields vertex_index,
// tag_entry_available, zero_vertex_count, vertex_count, vertex_in_pipe,
// vertex_lit and vertex_Htest. A search compares the index with every
// entry: entry_hit_i = tag_entry_available_i && (vertex_index_i == index),
// entry_free_i = !tag_entry_available_i || zero_vertex_count_i. The hit and
// free vectors are priority-encoded (lowest entry first) into entry
// addresses. The search is combinational; every update is registered:
//   ref      a triangle refers to a hit entry: vertex_count + 1
//   alloc    claim the encoded free entry for a new index: count = 1,
//            in_pipe, lit and Htest cleared
//   pipe_set the vertex was pushed to a dispatch queue
//   lit_set  the vertex has been transformed and lit; stores the highlight
//            test result
//   rel_*    a triangle left the pipeline (or was culled): vertex_count - 1
//            per set bit; two release masks may act in the same cycle
// An entry whose count is zero keeps its data, lit flag and Htest, so a
// later hit reuses the processed vertex (post-transform cache); it is only
// replaced when allocated again. Fields, the hit/free rules and the count
// behaviour follow the document; the count width and the priority encoding
// are this design's choices.
module vcmu
  import ge_pkg::*;
#(
  parameter int unsigned NTAG  = 16,
  parameter int unsigned CNT_W = 5
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  idx_t                    search_idx,
  output logic                    hit,
  output logic [$clog2(NTAG)-1:0] hit_ent,
  output logic                    hit_processed,   // in pipe or already lit
  output logic                    free,
  output logic [$clog2(NTAG)-1:0] free_ent,
  output logic [NTAG-1:0]         entry_hit_vector,
  output logic [NTAG-1:0]         entry_free_vector,
  input  logic                    ref_en,
  input  logic [$clog2(NTAG)-1:0] ref_ent,
  input  logic                    alloc_en,
  input  idx_t                    alloc_idx,
  input  logic                    pipe_set_en,
  input  logic [$clog2(NTAG)-1:0] pipe_set_ent,
  input  logic                    lit_set_en,
  input  logic [$clog2(NTAG)-1:0] lit_set_ent,
  input  logic                    lit_set_htest,
  input  logic [NTAG-1:0]         rel_a_mask,
  input  logic [NTAG-1:0]         rel_b_mask,
  output logic [NTAG-1:0]         lit_vec,
  output logic [NTAG-1:0]         htest_vec
);
  typedef struct packed {
    idx_t             vertex_index;
    logic             tag_entry_available;
    logic             zero_vertex_count;
    logic [CNT_W-1:0] vertex_count;
    logic             vertex_in_pipe;
    logic             vertex_lit;
    logic             vertex_Htest;
  } tag_t;

  tag_t tags [NTAG];

  always_comb begin
    hit = 1'b0; hit_ent = '0; free = 1'b0; free_ent = '0;
    for (int i = NTAG - 1; i >= 0; i--) begin
      entry_hit_vector[i]  = tags[i].tag_entry_available ? (tags[i].vertex_index == search_idx) : 1'b0;
      entry_free_vector[i] = tags[i].tag_entry_available ? tags[i].zero_vertex_count : 1'b1;
      if (entry_hit_vector[i])  begin hit  = 1'b1; hit_ent  = ($clog2(NTAG))'(i); end
      if (entry_free_vector[i]) begin free = 1'b1; free_ent = ($clog2(NTAG))'(i); end
    end
    hit_processed = tags[hit_ent].vertex_in_pipe | tags[hit_ent].vertex_lit;
    for (int i = 0; i < NTAG; i++) begin
      lit_vec[i]   = tags[i].vertex_lit;
      htest_vec[i] = tags[i].vertex_Htest;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NTAG; i++) tags[i] <= '{zero_vertex_count: 1'b1, default: '0};
    end else begin
      for (int i = 0; i < NTAG; i++) begin
        logic [CNT_W-1:0] cnt;
        cnt = tags[i].vertex_count;
        if (ref_en && ref_ent == ($clog2(NTAG))'(i)) cnt = cnt + 1'b1;
        cnt = cnt - CNT_W'(rel_a_mask[i]) - CNT_W'(rel_b_mask[i]);
        if (alloc_en && free_ent == ($clog2(NTAG))'(i)) begin
          tags[i] <= '{vertex_index: alloc_idx, tag_entry_available: 1'b1,
                       zero_vertex_count: 1'b0, vertex_count: CNT_W'(1), default: '0};
        end else begin
          tags[i].vertex_count      <= cnt;
          tags[i].zero_vertex_count <= (cnt == '0);
          if (pipe_set_en && pipe_set_ent == ($clog2(NTAG))'(i))
            tags[i].vertex_in_pipe <= 1'b1;
          if (lit_set_en && lit_set_ent == ($clog2(NTAG))'(i)) begin
            tags[i].vertex_lit     <= 1'b1;
            tags[i].vertex_in_pipe <= 1'b0;
            tags[i].vertex_Htest   <= lit_set_htest;
          end
        end
      end
    end
  end

  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n)
      ((rel_a_mask | rel_b_mask) & ~entry_free_vector) == (rel_a_mask | rel_b_mask))
    else $error("vcmu: release of an entry whose count is already zero");
endmodule
