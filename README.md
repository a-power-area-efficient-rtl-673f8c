# Geometry engine with low-cost triangle subdivision

This is a fixed-function geometry engine for a 3-D graphics pipeline. It takes
indexed triangle meshes and sends lit, screen-space triangles to a setup
engine. It follows the architecture described in "A Power-Area Efficient
Geometry Engine With Low-Complexity Subdivision Algorithm for 3-D Graphics
System".

The engine aims for smooth, near-Phong highlights without paying for
per-pixel lighting. Every vertex is lit once, with Blinn-Phong (Gouraud
shading). The engine then checks whether the triangle carries a specular
highlight, meaning N·H is above a threshold at one of its vertices. Such a
triangle is cut into 4 smaller triangles (level 1) or 16 (level 2). Only the
new vertices are lit, so the highlight is sampled more finely where it
matters. The subdivision step is also built to be cheap:

- **Subdivide in two spaces at once.** A new vertex is found by interpolating
  the eye-space position, the normal and the window position of the original
  corners. A new vertex therefore never goes through the modelview,
  projection, perspective-division or viewport steps. It only needs lighting.
- **Forward differences.** All points of the subdivision grid come from two
  difference vectors and additions alone:
  - d1 = (Vc − Vb)/Ns and d2 = (Vb − Va)/Ns, where Ns = 2^level.
  - The row starts are Va + k·d2, and each row steps along by d1.
- **Cull first, in object space.** The backface test runs before any vertex is
  transformed: the face normal is compared with the eye position expressed in
  object coordinates. Culled triangles cost no transform or lighting work.
- **Post-transform vertex cache.** A vertex shared by several triangles is
  fetched, transformed and lit once, while it stays in the 16-entry cache.

Clipping is not part of the engine.

## Data flow

```
index FIFO ─► PIC ──► VCMU (16 tags)
               │ miss: fetch from external memory ──► vertex cache
               │ cull request ──► PPU
               ├──► PQ  (triangles: three cache entries)
               └──► DQ1 (vertices still to be lit) ──► VPU ──► vertex cache
PQ ─► output control ── highlighted, level>0 ──► SC ──► PPU (subdivide)
            │                                     └──► DQ2 ──► VPU (light only)
            └──► setup engine: 3 × 128-bit words per triangle
```

| Block | File | Role |
|---|---|---|
| Top level | `geometry_engine.sv` | Wires the blocks. Brings out the index FIFO, host, external memory and setup engine ports. |
| PIC | `pic.sv` | Primitive input control: looks up each index, allocates a cache entry and fetches the vertex on a miss, assembles triangles, requests culling, and pushes to the PQ and DQ1. |
| VCMU | `vcmu.sv` | Cache tags. For each of 16 entries: index, valid, reference count, zero-count flag, in-pipe flag, lit flag and highlight-test flag. Hit and free-entry priority encoders. |
| Vertex cache | `vertex_cache.sv` | 32 entries × 6 words × 128 bits, with three read and three write ports. Entries 0–15 belong to the tags. Entries 16–31 hold generated vertices. |
| PQ | `sync_fifo.sv` | Primitive queue: a FIFO of triangles, each held as three 5-bit cache entries. |
| DQ1, DQ2 | `dispatch_queue.sv` | Two swapping buffers of six entries each. The producer fills one while the VPU drains the other. |
| PPU | `ppu.sv` | Four add/subtract lanes and one 16×16 multiplier. Runs the backface test or the forward-difference subdivision of one 128-bit attribute word. |
| VPU | `vpu.sv` | Microcoded transform and lighting of one vertex at a time, on the reconfigurable datapath. |
| RDP | `rdp.sv` | Three processing elements, a special function unit and a FIFO. Six operating modes. |
| PE | `pe.sv` | Booth multiplier and squarer, 4-2 compressor and adder-subtractor, three pipeline stages. |
| SFU | `sfu.sv` | Logarithmic-number-system unit for inverse, inverse square root and power. |
| SC | `sc.sv` | Subdivision control. Has the PPU subdivide the normal, eye-position and window words, queues the new vertices and waits until they are lit. |
| Output control | `output_control.sv` | Takes triangles in order, sends them or has them subdivided, and releases cache entries. |
| Parameter registers | `param_regs.sv` | Host register map. |
| Types | `ge_pkg.sv` | Number format, vertex word map, RDP modes and PE configurations. |

## Vertex cache and its bookkeeping

This is the part that needs the most care when changing the design.

**Lifetime of an entry.**

- A tag entry belongs to one vertex index.
- Its reference count goes up once for each triangle in the primitive queue
  that uses it.
- The output control lowers the count as it finishes each triangle.
- An entry becomes free when it is invalid or its count is zero. The lowest
  free entry is chosen first.
- A free entry keeps its data and flags until it is reallocated. A later
  triangle can therefore still hit a vertex that is no longer referenced and
  reuse its lit result.

**Flags.**

- *in pipe*: the vertex has been put into DQ1.
- *lit*: the VPU has written its results.
- *Htest*: the vertex passed the highlight test.

The PIC dispatches a vertex only when neither *in pipe* nor *lit* is set. So
each vertex reaches the VPU once, even when several triangles in flight share
it.

**Vertex layout.** Each vertex occupies six 128-bit words, each holding four
Q16.16 lanes (x, y, z, w):

| Word | Content |
|---|---|
| 0 `W_OBJ` | object-space position (x, y, z, 1) |
| 1 `W_OBJN` | object-space normal |
| 2 `W_EYE` | eye-space position |
| 3 `W_EYEN` | eye-space normal |
| 4 `W_WIN` | window x, y, z; 1/w_clip in w |
| 5 `W_COL` | intensity in x, N·H in y |

**Generated vertices.** These live in entries 16–31, outside the tags. One
triangle is subdivided at a time, so a fixed block of entries is enough: 3 at
level 1 and 12 at level 2.

**Restriction.** A triangle that uses the same index twice is not supported.

## Subdivision control

A triangle leaves the output control as it is in two cases: the level is 0,
or none of its vertices passed the highlight test. Otherwise:

1. The SC has the PPU subdivide the eye-space normal word.
2. It then subdivides the eye-space position word and the window word. The
   window word keeps 1/w in lane w.
3. It pushes the generated entries into DQ2. The VPU serves DQ2 before DQ1.
4. It waits for a lit report for every generated entry.

The output control then reads the (Ns+1)(Ns+2)/2 grid points row by row and
sends Ns² small triangles, upward and downward ones in row order. Each output
word holds window x, y, z and the intensity.

Window coordinates are interpolated linearly in screen space. This is exact
for x, y and z after perspective, as long as the triangle is flat in the
window.

## Datapath: PE, SFU and RDP

**PE.** Each processing element holds:

- a radix-4 Booth multiplier and a Booth squarer, each giving two partial
  products;
- a 4-2 compressor whose four inputs pick from local registers, external
  inputs or zero;
- an adder-subtractor.

Every operation takes 3 cycles: multiply, square, multiply-accumulate, or add
and subtract.

**SFU.** The special function unit works in the logarithmic domain:

- A log converter turns |m| into a characteristic and a 16-bit fraction.
- For an inverse, the log is bit-inverted, giving −(M+1).
- For an inverse square root, the log is inverted and shifted right by one.
- For a power, the log M goes out to a PE multiplier. The product n·M comes
  back into the antilog converter.
- A log that falls below the smallest value saturates instead of wrapping.

The converters use Mitchell's approximation (log2(1+f) ≈ f and 2^f ≈ 1+f).
A correction is added, interpolated linearly between 33 knots, one at each
k/32. For the log the knots are log2(1+k/32) − k/32. For the antilog they
are (1+k/32) − 2^(k/32).

**RDP.** The reconfigurable datapath chains the three PEs, the SFU and a FIFO
that holds the vector while the SFU works:

| Mode | Operation | Cycles from accept to result |
|---|---|---|
| `M_TRANS_DP` | 4-term dot product a·b + a.w (matrix row) | 4 |
| `M_LIGHT_DP` | 3-term dot product | 4 |
| `M_VEC_SUB` | vector difference | 4 |
| `M_PD` | x/w, y/w, z/w and 1/w | 9 |
| `M_POW` | b.y ^ a.x | 9 |
| `M_VEC_NORM` | b / \|b\| (squares, sum, inverse square root, scale) | 12 |

## Number format and accuracy

- All arithmetic is signed Q16.16, with 16 integer and 16 fraction bits.
  Matrices and the light set-up must keep intermediate values within ±32768.
  Overflow is not detected.
- The PPU multiplier sees operands in Q8.8. Object coordinates must therefore
  stay within about ±128, and edge vectors well below that.
- The log converter is accurate to about 2·10⁻⁴. Inverse and inverse square
  root are within 0.05 % of the exact result for the quantised input.
  Perspective division and normalisation are within 0.2 %.
- Powers N·H^n with n up to 32 stay within an absolute error of 1.83·10⁻³.
  The relative error grows by about 2·10⁻⁴ for each unit of n.

## Host interface

128-bit writes by address:

| Address | Content |
|---|---|
| 0–2 | modelview rows (m_i1, m_i2, m_i3, m_i4) |
| 3–5 | normal-matrix rows (w = 0) |
| 6–9 | projection rows |
| 10–12 | viewport rows |
| 13 | light position in eye space |
| 14 | (Id, Is, 0, Ia) |
| 15 | shininess n in x |
| 16 | eye position in object coordinates |
| 17 | x[1:0] = subdivision level (0–2; 3 reads as 2), y = N·H threshold (reset: 0.7) |

**External memory.** The engine requests a vertex index
(`mem_req_valid`/`mem_req_ready`). It then takes two response beats on
`mem_rsp_valid`: the object-space position, then the normal.

**Output.** `out_valid`/`out_ready` carry one vertex per word. `out_last`
marks the third word of each triangle.

**Status.** `busy` is high while any work is in flight. The `ev_hit`,
`ev_miss`, `ev_cull` and `ev_subdiv` outputs pulse once per event.

## Timing and throughput

- The VPU works on one vertex at a time: about 170 cycles for an original
  vertex and about 93 for a generated one. At 100 MHz that is roughly
  0.6 M lit vertices/s.
- Cache hits and culling cut the lighting work. On a closed 1024-triangle
  torus streamed row by row, 50.4 % of the indices hit the cache and half of
  the triangles are culled. The engine then takes 3.1 M input vertices/s at
  level 0, 2.0 M at level 1 and 0.9 M at level 2, at 100 MHz.
- The reference architecture reports 50 M vertices/s at level 0 and 25 M at
  level 1, at 100 MHz with a 50 % hit rate. That needs several vertices in
  flight in the pipelined datapath at once. This implementation runs one
  vertex at a time through the datapath and does not overlap them, so it is
  far from that rate.
- A cull takes 16 cycles on the PPU.
- Subdividing one word takes 5 cycles plus one per grid point.

## Departures from the reference architecture

- **Vertex storage.** The cache holds 96 bytes per vertex, plus 16 extra
  entries for generated vertices. The reference quotes 448 bytes for the whole
  16-entry cache, with a tighter packing that is not described.
- **Lighting.** Single-channel intensity, a point light, and the highlight
  test on N·H. Colour channels would repeat the lighting dot products.
- **Microcode.** The VPU micro-program, the RDP wiring of the pd, pow and
  vec_sub modes, the PPU step schedule and all handshakes are choices of this
  implementation.
- **Rate.** As noted above, the throughput is far below the reference rate.
- **Outside the engine.** The setup engine that uses the subdivided triangles
  (edge-function recovery, shared setup coefficients), external memory, the
  index FIFO and the host are not included. Their signals are ports.

## Simulation

Each block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and stops itself with a watchdog.
`tb_geometry_engine` runs the whole engine at its default size:

- A 25-vertex height field with a few back-facing triangles.
- Levels 0, 1 and 2, checked against a floating-point model.
- A memory model with latency and random output back-pressure.
- Counts of cache hits, misses, replacements, reuse of lit vertices, culls,
  level-1 and level-2 subdivisions and stalls. The test fails if any of them
  never happens.

```
verilator --binary --timing --timescale 1ns/1ps -Wno-fatal -Irtl -y rtl +libext+.sv \
          rtl/ge_pkg.sv tb/tb_geometry_engine.sv --top-module tb_geometry_engine
./obj_dir/Vtb_geometry_engine
```

`tb_scene_workload` streams a closed mesh of 1024 triangles (a 32 × 16
torus) at all three levels. It checks the look-up count, a cache hit rate of
at least 50 %, the culled count against a floating-point backface test, the
output triangle count and the number of subdivided triangles. It also prints
the hit rate and the vertex rate. It runs about 590,000 cycles.

Replace the testbench name to run any other test. The package must come
first on the command line.
