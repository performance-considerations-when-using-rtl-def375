// rte_pkg: types, sizes and arithmetic shared by the ray traversal engine.
//
// The engine works on threads of four rays that are traversed together
// through a B-KD tree (each inner node holds one split axis and one bounding
// interval per child). Numbers are 32-bit signed fixed point with 16
// fraction bits (Q16.16); near/far values, coordinates and distances all use
// this format, so a stack item is a 4-byte node address plus 4 rays x
// (near, far) x 4 bytes = 36 bytes, as in the source design. The fixed-point
// format, the node and leaf layouts and the token formats are this design's
// own choices.
//
// Memory layout used by the engine (byte addresses):
//   node      32 bytes, 256 bits, see bkd_node_t
//   geometry  three 16-byte rows (row = 4 x Q16.16) per triangle or matrix
//   line      64 bytes, the unit moved between cache levels and memory
// Bit 31 of a node address flags a bottom-level (object space) node of the
// two-level hierarchy; bits 30:0 are the byte address.
package rte_pkg;

  localparam int unsigned RAYS       = 4;    // rays per thread
  localparam int unsigned FX_W       = 32;   // fixed-point word
  localparam int unsigned FX_FRAC    = 16;   // fraction bits
  localparam int unsigned ADDR_W     = 32;
  localparam int unsigned LINE_BITS  = 512;  // 64-byte memory/L2 line
  localparam int unsigned NODE_BITS  = 256;  // one B-KD node
  localparam int unsigned ROW_BITS   = 128;  // one geometry row
  localparam int unsigned TRI_NONE   = 32'hFFFF_FFFF;

  typedef logic signed [FX_W-1:0] fx_t;

  localparam fx_t FX_ONE = 32'sh0001_0000;
  localparam fx_t FX_MAX = 32'sh7FFF_FFFF;
  localparam fx_t FX_MIN = -32'sh7FFF_FFFF;

  typedef logic [ADDR_W-1:0] addr_t;

  typedef struct packed {
    fx_t x;
    fx_t y;
    fx_t z;
  } vec3_t;

  // One ray as stored per lane of a thread: origin, direction and the
  // component-wise reciprocal of the direction.
  typedef struct packed {
    vec3_t org;
    vec3_t dir;
    vec3_t inv;
  } ray_t;

  // Per-ray state: current closest hit.
  typedef struct packed {
    fx_t         t;
    logic [31:0] tri_id;
    fx_t         u;
    fx_t         v;
  } hit_t;

  // B-KD node, 256 bits. Word 0 is the header.
  typedef struct packed {
    logic [31:0] rsvd7;
    fx_t         hi1;
    fx_t         lo1;
    fx_t         hi0;
    fx_t         lo0;
    logic [31:0] w2;        // inner: child 1 address; leaf: triangle ID or subtree root
    logic [31:0] w1;        // inner: child 0 address; leaf: geometry row address
    logic        is_leaf;   // header bit 31
    logic        is_xform;  // header bit 30: leaf holds a matrix and subtree pointer
    logic [1:0]  axis;      // header bits 29:28
    logic [27:0] hdr_rsvd;
  } bkd_node_t;

  // Traversal work item of one thread: the node to visit next and the
  // active parametric interval of every ray.
  typedef struct packed {
    addr_t           addr;
    fx_t [RAYS-1:0]  tnear;
    fx_t [RAYS-1:0]  tfar;
  } trav_item_t;           // 288 bits = 36 bytes, also the stack item

  // Leaf work item handed from the traversal unit to the geometry unit.
  typedef struct packed {
    logic            level;     // 1: leaf lies in a bottom-level tree
    logic            is_xform;
    addr_t           geom_addr; // first of three rows
    logic [31:0]     w2;        // triangle ID or subtree root
    fx_t [RAYS-1:0]  tnear;
    fx_t [RAYS-1:0]  tfar;
  } leaf_item_t;

  // Ray packet as submitted by the shaders.
  typedef struct packed {
    logic [31:0]        tag;
    ray_t [RAYS-1:0]    ray;
    fx_t  [RAYS-1:0]    tmax;
  } ray_packet_t;

  // Result returned to the shaders.
  typedef struct packed {
    logic [31:0]        tag;
    hit_t [RAYS-1:0]    hit;
  } ray_result_t;

  // Event counters brought out of the engine.
  typedef struct packed {
    logic [31:0] node_hits;
    logic [31:0] node_misses;
    logic [31:0] vertex_hits;
    logic [31:0] vertex_misses;
    logic [31:0] l2_hits;
    logic [31:0] l2_misses;
    logic [31:0] inner_visits;
    logic [31:0] leaf_visits;
    logic [31:0] stack_pushes;
    logic [31:0] stack_pops;
    logic [31:0] parks;
    logic [31:0] stall_cycles;
    logic [31:0] tri_tests;
    logic [31:0] tri_hits;
    logic [31:0] xforms;
    logic [31:0] queue_switches;
    logic [31:0] queue_size_sum;
    logic [31:0] packets_in;
    logic [31:0] packets_out;
  } rte_stats_t;

  // Q16.16 multiply with saturation.
  function automatic fx_t fx_mul(input fx_t a, input fx_t b);
    logic signed [63:0] p;
    p = (64'(a) * 64'(b)) >>> FX_FRAC;
    if (p > 64'sh7FFF_FFFF)       return FX_MAX;
    else if (p < -64'sh7FFF_FFFF) return FX_MIN;
    else                          return fx_t'(p);
  endfunction

  // Saturating add and subtract.
  function automatic fx_t fx_add(input fx_t a, input fx_t b);
    logic signed [32:0] s;
    s = 33'(a) + 33'(b);
    if (s > 33'sh0_7FFF_FFFF)       return FX_MAX;
    else if (s < -33'sh0_7FFF_FFFF) return FX_MIN;
    else                            return fx_t'(s);
  endfunction

  function automatic fx_t fx_sub(input fx_t a, input fx_t b);
    logic signed [32:0] s;
    s = 33'(a) - 33'(b);
    if (s > 33'sh0_7FFF_FFFF)       return FX_MAX;
    else if (s < -33'sh0_7FFF_FFFF) return FX_MIN;
    else                            return fx_t'(s);
  endfunction

  function automatic fx_t fx_min(input fx_t a, input fx_t b);
    return (a < b) ? a : b;
  endfunction

  function automatic fx_t fx_max(input fx_t a, input fx_t b);
    return (a > b) ? a : b;
  endfunction

  // Dot product of a geometry row (m0..m3) with (x, y, z, w), w in {0, 1}.
  function automatic fx_t fx_dot4(input logic [ROW_BITS-1:0] row, input vec3_t v, input logic w);
    fx_t acc;
    acc = fx_add(fx_add(fx_mul(fx_t'(row[31:0]), v.x), fx_mul(fx_t'(row[63:32]), v.y)),
                 fx_mul(fx_t'(row[95:64]), v.z));
    if (w) acc = fx_add(acc, fx_t'(row[127:96]));
    return acc;
  endfunction

  // Treelet of a node address: treelets occupy aligned regions of
  // 2**shift bytes.
  function automatic int unsigned treelet_of(input addr_t a, input int unsigned shift,
                                             input int unsigned n);
    return ((a[30:0] >> shift) % n);
  endfunction

endpackage
