// ge_pkg: types and constants shared by the geometry engine.
//
// Numbers in the vertex datapath are signed Q16.16 fixed point (32 bits). A
// vertex-cache word is 128 bits, four 32-bit lanes (x, y, z, w). Each vertex
// owns six such words in the vertex cache (the word map below). Cache entries
// are 5 bits wide: entries 0..15 are the tag-managed entries of input vertices,
// entries 16..31 hold vertices generated by subdivision.
//
// The widths of the cache entry (5b), of the vertex index (10b), of the cache
// words (128b), the 16 tag entries, the 6-deep dispatch buffers and the six
// RDP configuration modes follow the document; the number format, the word
// map and the micro-operation format are this design's own choices.
package ge_pkg;

  localparam int unsigned DW        = 32;   // scalar width (Q16.16)
  localparam int unsigned FRAC      = 16;   // fraction bits
  localparam int unsigned VW        = 128;  // cache word width
  localparam int unsigned IDX_W     = 10;   // vertex index width
  localparam int unsigned ENT_W     = 5;    // vertex cache entry address width
  localparam int unsigned TAGS      = 16;   // tag entries
  localparam int unsigned GEN_BASE  = 16;   // first entry for generated vertices
  localparam int unsigned NWORDS    = 6;    // 128-bit words per vertex
  localparam int unsigned MAX_LEVEL = 2;    // level-0, level-1, level-2

  typedef logic signed [DW-1:0] fx_t;
  typedef logic [ENT_W-1:0]     ent_t;
  typedef logic [IDX_W-1:0]     idx_t;
  typedef logic [1:0]           level_t;

  typedef struct packed {
    fx_t w;
    fx_t z;
    fx_t y;
    fx_t x;
  } vec4_t;

  // Word map of one vertex in the vertex cache
  typedef enum logic [2:0] {
    W_OBJ   = 3'd0,  // object-space coordinate (x, y, z, 1)
    W_OBJN  = 3'd1,  // object-space normal (x, y, z, 0)
    W_EYE   = 3'd2,  // eye-space coordinate
    W_EYEN  = 3'd3,  // eye-space normal (not normalised)
    W_WIN   = 3'd4,  // window coordinate (x, y, z) and 1/w_clip in lane w
    W_COL   = 3'd5   // light intensity in lane x, N.H in lane y
  } word_t;

  typedef struct packed {
    ent_t   ent;
    word_t  word;
  } caddr_t;

  typedef struct packed {
    ent_t c;
    ent_t b;
    ent_t a;
  } tri_t;

  // RDP configuration modes (Table 3.2)
  typedef enum logic [2:0] {
    M_TRANS_DP = 3'd0,  // A.xyz . B.xyz + A.w
    M_LIGHT_DP = 3'd1,  // A.xyz . B.xyz
    M_VEC_NORM = 3'd2,  // B.xyz / |B.xyz|
    M_PD       = 3'd3,  // (B.xyz / B.w, 1 / B.w)
    M_POW      = 3'd4,  // B.y ^ A.x
    M_VEC_SUB  = 3'd5   // A.xyz - B.xyz
  } rdp_mode_t;

  // Processing-element configuration (selects of the multiplexers of one PE)
  typedef enum logic [3:0] {
    CS_ZERO, CS_E, CS_F, CS_G, CS_H, CS_I, CS_IN_E, CS_IN_F, CS_IN_G, CS_IN_H
  } csel_t;

  typedef struct packed {
    csel_t      c0, c1, c2, c3;   // 4-2 compressor inputs
    logic       j_ext;            // REG_J <- In I (1) or compressor sum (0)
    logic       k_ext;            // REG_K <- In J (1) or compressor carry (0)
    logic       ob_h;             // Out B = REG_H (1) or REG_F (0)
    logic       oc_i;             // Out C = REG_I (1) or REG_G (0)
    logic       sub;              // add-sub: subtract (In MODE)
  } pe_cfg_t;

  localparam pe_cfg_t PE_CFG_MUL = '{c0: CS_F, c1: CS_G, c2: CS_ZERO, c3: CS_ZERO,
                                     j_ext: 1'b0, k_ext: 1'b0,
                                     ob_h: 1'b0, oc_i: 1'b0, sub: 1'b0};

  // Q16.16 helpers
  function automatic fx_t fx_from_int(int v);
    return fx_t'(v <<< FRAC);
  endfunction

endpackage
