// geometry_engine: power-area efficient geometry engine with three-level
// triangle subdivision (level 0, 1, 2) for near-Phong shading.
//
// Indexed triangles enter through the index FIFO interface. The primitive
// input control (PIC) looks each index up in the vertex cache management
// unit (VCMU), fetches missing vertices from external memory into the vertex
// cache, and has the primitive processing unit (PPU) run the backface test
// on each assembled triangle. Surviving triangles go to the primitive queue
// (PQ) and their unprocessed vertices to dispatch queue 1 (DQ1). The vertex
// processing unit (VPU) transforms and lights vertices on its
// reconfigurable datapath and writes them back, together with the highlight
// test result. The output control takes triangles in order from the PQ once
// their vertices are lit: without highlight (or at level 0) it sends the
// triangle as is; otherwise the subdivision control (SC) has the PPU
// subdivide it by forward differences, feeds the generated vertices through
// dispatch queue 2 (DQ2) to the VPU for lighting only, and the output
// control sends the Ns^2 small triangles. Output: one 128-bit word per vertex
// (window x, y, z, intensity), three per triangle, to the setup engine.
//
// Host interface: host_we/host_addr/host_wdata write the VPU constant memory
// (addresses 0-15) and the parameter registers (16 eye position, 17 level
// and highlight threshold); host_rdata reads the parameter registers.
// External memory: a request carries a vertex index; the response is two
// beats, object-space coordinate then normal. ev_* outputs pulse once per
// event (cache hit, cache miss, culled triangle, subdivided triangle).
// The block set and connections follow the block diagram of the document;
// the interfaces at the edge are this design's.
module geometry_engine
  import ge_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  // index FIFO
  input  logic       idx_valid,
  input  idx_t       idx_data,
  output logic       idx_ready,
  // host interface
  input  logic       host_we,
  input  logic [5:0] host_addr,
  input  vec4_t      host_wdata,
  output vec4_t      host_rdata,
  // external memory
  output logic       mem_req_valid,
  output idx_t       mem_req_idx,
  input  logic       mem_req_ready,
  input  logic       mem_rsp_valid,
  input  vec4_t      mem_rsp_data,
  // to setup engine
  output logic       out_valid,
  output vec4_t      out_data,
  output logic       out_last,
  input  logic       out_ready,
  // events
  output logic       ev_hit,
  output logic       ev_miss,
  output logic       ev_cull,
  output logic       ev_subdiv,
  output logic       busy
);
  // parameter registers
  logic       const_we;
  logic [3:0] const_addr;
  vec4_t      const_wdata, eye_pos;
  level_t     level;
  fx_t        h_threshold;
  param_regs u_regs (.clk, .rst_n, .host_we, .host_addr, .host_wdata, .host_rdata,
                     .const_we, .const_addr, .const_wdata, .eye_pos, .level, .h_threshold);

  // vertex cache: read 0 PPU, 1 VPU, 2 output control; write 0 PIC, 1 PPU, 2 VPU
  caddr_t rd_addr [3];
  vec4_t  rd_data [3];
  logic   wr_en   [3];
  caddr_t wr_addr [3];
  vec4_t  wr_data [3];
  vertex_cache #(.NENT(32), .NRD(3), .NWR(3)) u_cache (.clk, .rd_addr, .rd_data,
                                                        .wr_en, .wr_addr, .wr_data);

  // VCMU
  idx_t        search_idx, alloc_idx;
  logic        hit, hit_processed, free, ref_en, alloc_en, pipe_set_en;
  logic [3:0]  hit_ent, free_ent, ref_ent, pipe_set_ent;
  logic [15:0] hit_vec, free_vec, rel_a, rel_b, lit_vec, htest_vec;
  logic        vpu_lit_valid, vpu_lit_htest;
  ent_t        vpu_lit_ent;
  assign alloc_idx = search_idx;
  vcmu #(.NTAG(16)) u_vcmu (
    .clk, .rst_n, .search_idx, .hit, .hit_ent, .hit_processed, .free, .free_ent,
    .entry_hit_vector(hit_vec), .entry_free_vector(free_vec),
    .ref_en, .ref_ent, .alloc_en, .alloc_idx, .pipe_set_en, .pipe_set_ent,
    .lit_set_en(vpu_lit_valid && vpu_lit_ent < ent_t'(GEN_BASE)),
    .lit_set_ent(vpu_lit_ent[3:0]), .lit_set_htest(vpu_lit_htest),
    .rel_a_mask(rel_a), .rel_b_mask(rel_b), .lit_vec, .htest_vec
  );

  // PPU shared by PIC (culling) and SC (subdivision); SC has priority
  logic   ppu_cmd_valid, ppu_cmd_ready, ppu_cmd_subdiv, ppu_resp_valid, ppu_resp_back;
  tri_t   ppu_cmd_tri;
  word_t  ppu_cmd_word;
  level_t ppu_cmd_level;
  logic   owner_sc;
  logic   pic_cull_valid, sc_ppu_valid;
  tri_t   pic_cull_tri, sc_ppu_tri;
  word_t  sc_ppu_word;
  level_t sc_ppu_level;

  assign ppu_cmd_valid  = sc_ppu_valid || pic_cull_valid;
  assign ppu_cmd_subdiv = sc_ppu_valid;
  assign ppu_cmd_tri    = sc_ppu_valid ? sc_ppu_tri : pic_cull_tri;
  assign ppu_cmd_word   = sc_ppu_word;
  assign ppu_cmd_level  = sc_ppu_level;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) owner_sc <= 1'b0;
    else if (ppu_cmd_valid && ppu_cmd_ready) owner_sc <= sc_ppu_valid;
  end

  ppu u_ppu (
    .clk, .rst_n, .cmd_valid(ppu_cmd_valid), .cmd_ready(ppu_cmd_ready),
    .cmd_subdiv(ppu_cmd_subdiv), .cmd_tri(ppu_cmd_tri), .cmd_word(ppu_cmd_word),
    .cmd_level(ppu_cmd_level), .cmd_gen_base(ent_t'(GEN_BASE)),
    .resp_valid(ppu_resp_valid), .resp_back(ppu_resp_back), .eye_pos,
    .rd_addr(rd_addr[0]), .rd_data(rd_data[0]),
    .wr_en(wr_en[1]), .wr_addr(wr_addr[1]), .wr_data(wr_data[1])
  );

  // primitive queue
  logic pq_push, pq_pop, pq_full, pq_empty;
  tri_t pq_wdata, pq_rdata;
  logic [2:0] pq_count;
  sync_fifo #(.WIDTH($bits(tri_t)), .DEPTH(4)) u_pq (
    .clk, .rst_n, .push(pq_push), .wr_data(pq_wdata), .pop(pq_pop),
    .rd_data(pq_rdata), .full(pq_full), .empty(pq_empty), .count(pq_count)
  );

  // dispatch queues
  logic dq1_push, dq1_push_ready, dq1_pop, dq1_valid, dq1_idle;
  logic dq2_push, dq2_push_ready, dq2_pop, dq2_valid, dq2_idle;
  ent_t dq1_wdata, dq1_rdata, dq2_wdata, dq2_rdata;
  dispatch_queue #(.DEPTH(6)) u_dq1 (
    .clk, .rst_n, .push(dq1_push), .push_data(dq1_wdata), .push_ready(dq1_push_ready),
    .pop(dq1_pop), .pop_data(dq1_rdata), .pop_valid(dq1_valid), .idle(dq1_idle));
  dispatch_queue #(.DEPTH(6)) u_dq2 (
    .clk, .rst_n, .push(dq2_push), .push_data(dq2_wdata), .push_ready(dq2_push_ready),
    .pop(dq2_pop), .pop_data(dq2_rdata), .pop_valid(dq2_valid), .idle(dq2_idle));

  // PIC
  logic cull_done;
  assign cull_done = ppu_resp_valid && !owner_sc;
  pic u_pic (
    .clk, .rst_n, .idx_valid, .idx_data, .idx_ready,
    .search_idx, .hit, .hit_ent, .hit_processed, .free, .free_ent,
    .ref_en, .ref_ent, .alloc_en, .pipe_set_en, .pipe_set_ent, .rel_mask(rel_a),
    .mem_req_valid, .mem_req_idx, .mem_req_ready, .mem_rsp_valid, .mem_rsp_data,
    .wr_en(wr_en[0]), .wr_addr(wr_addr[0]), .wr_data(wr_data[0]),
    .cull_valid(pic_cull_valid), .cull_tri(pic_cull_tri),
    .cull_ready(ppu_cmd_ready && !sc_ppu_valid), .cull_done, .cull_back(ppu_resp_back),
    .pq_push, .pq_data(pq_wdata), .pq_full,
    .dq_push(dq1_push), .dq_data(dq1_wdata), .dq_ready(dq1_push_ready),
    .culled(ev_cull)
  );
  assign ev_hit  = ref_en;
  assign ev_miss = alloc_en;

  // VPU
  logic vpu_busy, oc_busy;
  vpu #(.RF_DEPTH(48)) u_vpu (
    .clk, .rst_n,
    .dq1_valid, .dq1_data(dq1_rdata), .dq1_pop,
    .dq2_valid, .dq2_data(dq2_rdata), .dq2_pop,
    .const_we, .const_addr, .const_wdata, .h_threshold,
    .rd_addr(rd_addr[1]), .rd_data(rd_data[1]),
    .wr_en(wr_en[2]), .wr_addr(wr_addr[2]), .wr_data(wr_data[2]),
    .lit_valid(vpu_lit_valid), .lit_ent(vpu_lit_ent), .lit_htest(vpu_lit_htest),
    .busy(vpu_busy)
  );

  // subdivision control and output control
  logic sc_start_valid, sc_start_ready, sc_done;
  tri_t sc_start_tri;
  sc u_sc (
    .clk, .rst_n, .start_valid(sc_start_valid), .start_tri(sc_start_tri),
    .start_ready(sc_start_ready), .level,
    .ppu_valid(sc_ppu_valid), .ppu_tri(sc_ppu_tri), .ppu_word(sc_ppu_word),
    .ppu_level(sc_ppu_level), .ppu_ready(ppu_cmd_ready),
    .ppu_done(ppu_resp_valid && owner_sc),
    .dq_push(dq2_push), .dq_data(dq2_wdata), .dq_ready(dq2_push_ready),
    .lit_valid(vpu_lit_valid), .lit_ent(vpu_lit_ent), .done(sc_done)
  );

  output_control u_oc (
    .clk, .rst_n, .pq_valid(!pq_empty), .pq_data(pq_rdata), .pq_pop,
    .lit_vec, .htest_vec, .rel_mask(rel_b), .level,
    .sc_valid(sc_start_valid), .sc_tri(sc_start_tri), .sc_ready(sc_start_ready),
    .sc_done, .rd_addr(rd_addr[2]), .rd_data(rd_data[2]),
    .out_valid, .out_data, .out_last, .out_ready, .subdivided(ev_subdiv), .busy(oc_busy)
  );

  assign busy = !pq_empty || vpu_busy || oc_busy || !dq1_idle || !dq2_idle || !idx_ready;
endmodule
