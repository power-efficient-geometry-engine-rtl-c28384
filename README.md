# A geometry engine with selectable subdivision shading

Gouraud shading lights a triangle only at its three corners and interpolates the colour across
it. It is cheap, but a specular highlight that falls inside a large triangle is lost or smeared.
Per-pixel (Phong) lighting fixes that, but it costs a full lighting evaluation for every pixel.

This engine takes a middle road. Each triangle that may hold a highlight is cut into smaller
triangles, and their new vertices are lit individually. The rasteriser still does plain Gouraud
shading on the small triangles. The amount of cutting is chosen at run time:

| `lvl` | Triangles out per input triangle | New vertices per triangle |
|-------|----------------------------------|---------------------------|
| 0     | 1 (no subdivision)               | 0                         |
| 1     | 4                                | 3                         |
| 2     | 16                               | 12                        |

Triangles without a highlight are passed through unchanged at every level, and so are back faces,
which are dropped early.

Three ideas keep the cost of subdivision low:

- **Work in two spaces.** Subdivision runs after projection, in window space. There the new
  vertices are simple averages of the corners. Eye-space positions and normals are also
  interpolated, but divided by w first, so that lighting the new vertices stays perspective
  correct. Only the three original corners go through the full matrix transforms.
- **Forward differences.** New vertices on a regular grid are produced by repeated addition of
  two difference vectors.
- **Reuse edge functions.** The edge equations (A·x + B·y + C) of all small triangles are derived
  from those of the original triangle, instead of running a full setup for each.

Everything is fixed point. Words are 32 bits in Q16.16 format. Edge C terms are 64 bits wide.

## Data flow

```
indices ─► index FIFO ─► PIC ─┬─► PQ (triangles) ───────────────► output control ─► triangles
                              │                                   │  ▲     │        + edge
                              │   VCMU tags + vertex cache data ◄─┘  │     │        functions
                              └─► DQ1 ─┐                             │     ▼
                                       ├─► VPU (RDP: 3 PEs + SFU) ───┘    PPU (cull, subdivide)
                        DQ2 (new vertices)                                 │
                                       ▲───────────────────────────────────┘
```

- **PIC** (`ge_pic`, primitive input control)
  - Reads one vertex index at a time and looks it up in the vertex cache tags.
  - On a miss, fetches the object-space position and normal from the external pre-TnL memory.
  - Once three indices are gathered, asks the PPU for the back-face test.
  - A front face goes into the primitive queue. Its vertices that are neither lit nor already in
    flight go into dispatch queue 1.
- **VCMU** (`ge_vcmu`, vertex cache management unit)
  - Holds 16 tags. Each tag has: valid, vertex index, reference count, in-pipe flag, lit flag and
    highlight-test result.
  - The reference count is the number of queued triangles that use an entry. An entry can be
    replaced only when its count is zero, so data still in use are never overwritten.
  - Storing the highlight-test result per vertex means each vertex is tested once, even when many
    triangles share it.
- **Vertex cache data** (`ge_vcache_mem`). Each entry holds:
  - object-space position and normal
  - eye-space position and normal
  - window x, y, z and 1/w
  - intensity

  It has three write ports and seven read ports, and per-field write masks.
- **PQ** (`ge_pq`, primitive queue). Triangles as three cache entry numbers, 8 deep.
- **DQ** (`ge_dq`, dispatch queue). Two 6-entry buffers used ping-pong:
  - The PIC fills one buffer while the VPU works through the other.
  - They swap when both sides are ready.
  - A flush lets a partly filled buffer go when nothing more is coming.

  DQ1 carries vertices from the PIC. DQ2 carries vertices created by subdivision and has
  priority.
- **VPU** (`ge_vpu`, vertex processing unit). Takes a batch of up to six vertices. It runs each
  stage of transform and lighting for the whole batch before moving to the next stage:
  - model-view transform
  - normal transform
  - light vector
  - half vector
  - N·L and N·H
  - specular power
  - projection
  - perspective division
  - viewport

  Intermediate values live in a register file (`ge_regfile`). Matrices and light parameters
  come from a constant memory (`ge_const_mem`) written by the host. Results are written back to
  the vertex cache and the entries are marked lit.
- **RDP** (`ge_rdp`, reconfigurable datapath). Three processing elements (`ge_pe`), a special
  function unit (`ge_sfu`) and an operand FIFO (`ge_fifo`), used in six modes:
  - `trans_dp`: dot products of a matrix row with a vector, for the transforms
  - `light_dp`: dot products for lighting
  - `vec_norm`: vector normalisation
  - `pd`: perspective division
  - `pow`: power, for the specular term
  - `vec_sub`: vector subtraction

  Each mode has a fixed latency. A valid/tag line travels alongside the data, so results come out
  in issue order, also across a mode change.
- **PE** (`ge_pe`, processing element). A three-stage pipeline: multiplier or squarer, a
  carry-save compressor that can take a neighbour's partial sum, and an adder-subtractor. It
  supports MUL, SQR, MAC, ADD and SUB.
- **SFU** (`ge_sfu`, special function unit). Computes 1/x, 1/√x and xⁿ in the logarithmic domain:
  - Mitchell's log/antilog approximation, plus a small correction term.
  - Error is about 0.7 %. See "Accuracy" below.
- **Output control** (`ge_outctl`). Waits until all three vertices of the triangle at the head
  of the PQ are lit.
  - If the level is non-zero and any vertex passed the highlight test, it asks the PPU to
    subdivide. It then waits until the new vertices are lit as well.
  - It emits the small triangles row by row: first the upward one, then the downward one. Each
    comes with its recovered edge functions (`ge_edge_recovery`).
  - Finally it releases the references, both the corners' and the generated vertices'.
- **PPU** (`ge_ppu`, primitive processing unit). One adder/multiplier datapath shared by two
  jobs:
  - Back-face culling in object space: the sign of N·(E − V0), where E is the eye position
    transformed into object space by the host.
  - Forward-difference subdivision: generated vertices get cache entries, their interpolated
    data are written into the cache, and they are pushed into DQ2.

## Keeping the cache from deadlocking

Subdivision needs 3 or 12 free cache entries while the triangle's own three entries are still
referenced. If the PIC filled the cache with new vertices first, the output control could never
subdivide, so the PQ would never drain. Two rules prevent this:

- A lookup that would allocate a new entry is refused unless more than 0, 3 or 12 entries (for
  level 0, 1 or 2) are free. Hits are always accepted.
- An allocation for a generated vertex has priority over a pending lookup.

Both rules are this design's own.

## Interfaces (`ge_top`)

| Port group | Meaning |
|------------|---------|
| `lvl` | Subdivision level. Change it only while `idle`. |
| `idx_valid/idx_data/idx_ready` | Vertex indices, three per triangle. Front faces are counter-clockwise. |
| `cw_en/cw_addr/cw_data` | Constant memory writes: matrices and light parameters. The word map is in the `ge_vpu` header. |
| `eye_we/eye_obj` | Eye position in object space. |
| `f_req_*`, `f_rsp_*` | Fetch from the pre-TnL memory. One request is outstanding at a time, and any latency is allowed. |
| `o_valid/o_ready/o_tri` | Output triangles: window x, y, z, 1/w and intensity of the three vertices, plus three edge functions. |
| `ev` | One-cycle event pulses: hit, miss, cull, subdivide, bypass, DQ swap, PIC stall, VPU full-transform batch, VPU lighting-only batch. |
| `idle` | Nothing is in flight. |

All handshakes are valid/ready. Reset is asynchronous and active low.

## Accuracy

The SFU's 1/x is accurate to about 0.7 %. The perspective divide uses it, so window coordinates
can be off by up to about half a pixel on a 200-pixel viewport. Specular powers follow a relative
error bound of about 2^(0.012·n + 0.03).

The end-to-end testbench therefore compares against a floating-point model with these
tolerances:

| Quantity | Tolerance |
|----------|-----------|
| Grid positions | 1 pixel |
| 1/w | 1.5 % |
| Intensity | 0.03 |
| Edge functions | 2 % of their gradient |

## Where this design departs from the description it follows

- **Highlight test.** The source text tests H·V at the three corners. Its own lighting equation,
  however, uses N·H. The highlight is where N·H is large, so that is what is tested here,
  against a host-supplied threshold.
- **Half vector.** It is normalised, H = norm(L + V), rather than taken as (L + V)/2.
- **Throughput.** The reference implementation reaches 50 Mvertices/s at 200 MHz (4 cycles per
  vertex). This VPU issues one RDP mode at a time for a batch and needs about 270 cycles per
  6 vertices, or about 4.4 Mvertices/s at 200 MHz. The schedule of the original datapath is not
  known in enough detail to copy it.
- **Guessed sizes.** The PQ depth (8), index FIFO depth (16), constant memory size (32 words),
  register file size (12 registers per vertex) and Q16.16 format are this design's choices.
  Documented sizes that are kept: 16 cache tags, 6-entry DQ buffers, 32-bit PEs, 3 PEs and
  levels 0–2.
- **Tag fields.** The original tag has seven fields, but only six can be identified. The missing
  one is left out.
- **Extra hardware.** DQ2, the DQ flush and the cache reservation rule are additions.
- **No clipping.** Triangles are culled against the eye (back faces) but not clipped against the
  view volume. Input geometry must lie in front of the eye, with w > 0.
- **Not included.** The triangle setup engine that consumes the output, the host and the
  pre-TnL vertex memory. The testbench models the last two.

## Simulating

Every block has a self-checking testbench in `tb/`. Each ends with a line
`TB_RESULT checks=N failures=M`. With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal rtl/ge_pkg.sv $(ls rtl/*.sv | grep -v ge_pkg) \
    tb/tb_ge_top.sv --top-module tb_ge_top -Mdir obj && ./obj/Vtb_ge_top
```

`tb_ge_top` runs the whole engine at its default sizes:

- The scene is a 4×4 mesh of 18 front-facing triangles and one back face, seen in perspective.
- It is lit with n = 8, using a threshold that splits the vertices into highlighted and plain.
- It is rendered at levels 0, 1 and 2.
- Every output triangle is checked against a floating-point model.

The testbench also counts each mechanism (cache hit and miss, cull, subdivide, bypass, DQ swap,
stall, full and lighting-only VPU batches) and fails if any of them never happens. The block testbenches
compare against independent models: a tag model for the VCMU, exact arithmetic for the PE and
edge recovery, and floating point with error bounds for the SFU and RDP.
