// prt_pkg: types and constants shared by the ray-tracing rendering processor.
//
// All geometry is signed integer (fixed-point with the binary point chosen per
// quantity): coordinates are CW-bit signed integers, reciprocal ray directions
// carry FRAC fractional bits. A physical-attribute (PA) record holds the four
// background maps produced by inverse rendering: albedo, normal, lighting and
// depth. OBJMEM entries are 144-bit words that hold either a bounding box
// (BBOX) record or a triangle. The four maps, the EBBOX/TBBOX split and the
// 8/16/32b MAC precisions follow the processor description; the bit widths and
// record layouts are this design's own choices.
package prt_pkg;

  localparam int CW   = 16;   // coordinate width (signed)
  localparam int FRAC = 24;   // fractional bits of reciprocal directions
  localparam int OBJ_AW = 8;  // OBJMEM address width
  localparam int OBJ_DW = 144;

  // Background physical attributes of one pixel (or one cluster).
  typedef struct packed {
    logic [7:0]        albedo;
    logic [7:0]        lighting;
    logic signed [7:0] nx;
    logic signed [7:0] ny;
    logic signed [7:0] nz;
    logic [15:0]       depth;    // z distance of the background surface
  } pa_t;                        // 56 bits

  typedef logic signed [CW-1:0] coord_t;

  typedef struct packed {
    coord_t x;
    coord_t y;
    coord_t z;
  } vec3_t;                      // 48 bits

  typedef enum logic {BB_EMPTY = 1'b0, BB_TARGET = 1'b1} bbkind_e;

  // Bounding box record (stored in the low 137 bits of an OBJMEM word).
  typedef struct packed {
    bbkind_e           kind;     // EBBOX: shadow only, TBBOX: holds triangles
    vec3_t             bmin;
    vec3_t             bmax;
    logic [OBJ_AW-1:0] tri_base; // first triangle entry in OBJMEM
    logic [OBJ_AW-1:0] tri_cnt;  // number of triangles
    logic [7:0]        albedo;   // material reflectance of the objects inside
  } bbox_t;                      // 1+48+48+8+8+8 = 121 bits

  typedef struct packed {
    vec3_t v0;
    vec3_t v1;
    vec3_t v2;
  } tri_t;                       // 144 bits

  // MAC precision modes of the reconfigurable PE.
  typedef enum logic [1:0] {PREC_8 = 2'd0, PREC_16 = 2'd1, PREC_32 = 2'd2} prec_e;

  // PCU operations.
  typedef enum logic [1:0] {OP_MAC = 2'd0, OP_DIV = 2'd1, OP_SQRT = 2'd2, OP_CLR = 2'd3} pcu_op_e;

  // PE operating mode.
  typedef enum logic {MODE_IR = 1'b0, MODE_RT = 1'b1} mode_e;

  function automatic bbox_t word2bbox(input logic [OBJ_DW-1:0] w);
    return bbox_t'(w[$bits(bbox_t)-1:0]);
  endfunction

  function automatic logic [OBJ_DW-1:0] bbox2word(input bbox_t b);
    return {{(OBJ_DW-$bits(bbox_t)){1'b0}}, b};
  endfunction

endpackage
