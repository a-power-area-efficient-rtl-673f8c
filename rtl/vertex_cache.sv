// vertex_cache: data side of the vertex cache.
//
// NENT entries of NWORDS 128-bit words (see ge_pkg for the word map).
// Entries 0..15 belong to the tag entries of the VCMU; entries 16..31 hold
// the vertices generated by subdivision. NRD read ports with combinational
// read and NWR write ports written at the clock edge; writes of different
// ports to different words in one cycle all take effect, and for the same
// word the highest-numbered port wins. In the engine the ports serve the
// external-memory fill, the PPU, the VPU and the output control, as in the
// four 128-bit channels around the cache in the block diagram.
// The document gives the 16-entry organisation and the 128-bit channels;
// the extra 16 entries for generated vertices, the six-word layout and the
// port counts are this design's choices.
module vertex_cache
  import ge_pkg::*;
#(
  parameter int unsigned NENT = 32,
  parameter int unsigned NRD  = 3,
  parameter int unsigned NWR  = 3
) (
  input  logic   clk,
  input  caddr_t rd_addr [NRD],
  output vec4_t  rd_data [NRD],
  input  logic   wr_en   [NWR],
  input  caddr_t wr_addr [NWR],
  input  vec4_t  wr_data [NWR]
);
  vec4_t mem [NENT][NWORDS];

  always_comb
    for (int p = 0; p < NRD; p++)
      rd_data[p] = (int'(rd_addr[p].word) < NWORDS && int'(rd_addr[p].ent) < NENT)
                   ? mem[rd_addr[p].ent][rd_addr[p].word] : '0;

  always_ff @(posedge clk)
    for (int p = 0; p < NWR; p++)
      if (wr_en[p] && int'(wr_addr[p].word) < NWORDS && int'(wr_addr[p].ent) < NENT)
        mem[wr_addr[p].ent][wr_addr[p].word] <= wr_data[p];
endmodule
