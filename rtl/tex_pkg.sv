// tex_pkg: types and constants shared by the texture mapping pipeline.
//
// A texel is 32-bit RGBA8888, so a 64-byte cache line holds a 4x4 block of
// texels (this line size follows the design; the texel format is this
// design's choice). Texture coordinates are unsigned fixed point with
// UW/VW integer bits and FW fraction bits. A texture address is the
// concatenation {tid, v, u}: the texture/mip-level identifier, then the
// vertical and horizontal texel coordinates, as in a line-scan image layout.
// Mip level n+1 of a texture has identifier tid+1 and half the size of
// level n.
package tex_pkg;

  localparam int UW    = 10;          // integer bits of u (textures up to 1024 wide)
  localparam int VW    = 10;          // integer bits of v
  localparam int FW    = 4;           // fraction bits of u and v (filter weights)
  localparam int CW    = UW + FW;     // fixed-point coordinate width
  localparam int TIDW  = 8;           // texture / mip-level identifier width
  localparam int SPANW = 16;          // span number width (miss statistics)
  localparam int XYW   = 10;          // screen coordinate width (640x480)
  localparam int BLK   = 2;           // log2 of the block edge (4x4 texels)
  localparam int UBW   = UW - BLK;    // u block coordinate width
  localparam int VBW   = VW - BLK;    // v block coordinate width
  localparam int BLKAW = TIDW + VBW + UBW; // block address {tid, vb, ub}
  localparam int CNTW  = 32;          // statistics counter width

  typedef logic [31:0] texel_t;       // {A, B, G, R}, 8 bits each

  // Index selection: which texel coordinate supplies the cache index.
  typedef enum logic {
    DIR_U = 1'b0,                     // u-major span: u-index
    DIR_V = 1'b1                      // v-major span: v-index
  } dir_e;

  // A rasterized fragment as delivered by the span rasterizer.
  typedef struct packed {
    logic [XYW-1:0]  x;
    logic [XYW-1:0]  y;
    logic [CW-1:0]   u;               // texture coordinate, texels, UW.FW
    logic [CW-1:0]   v;
    logic [TIDW-1:0] tid;             // texture and (finer) mip level
    logic [3:0]      log2w;           // level width  = 2**log2w (<= UW)
    logic [3:0]      log2h;           // level height = 2**log2h (<= VW)
    logic            trilin;          // trilinear: also sample level tid+1
    logic [FW-1:0]   lod_f;           // weight of the coarser level
    texel_t          color;           // interpolated fragment colour
    logic            span_start;      // first fragment of a new span
  } frag_t;

  // The 2x2 bilinear footprint in one mip level.
  typedef struct packed {
    logic [TIDW-1:0] tid;
    logic [UW-1:0]   u0;              // left column
    logic [UW-1:0]   u1;              // right column (wrapped)
    logic [VW-1:0]   v0;              // top row
    logic [VW-1:0]   v1;              // bottom row (wrapped)
    logic [FW-1:0]   fu;              // horizontal weight of the right column
    logic [FW-1:0]   fv;              // vertical weight of the bottom row
  } lvl_t;

  // Output of AddrGen: the footprints of one fragment (lv[1] is used only
  // for trilinear filtering).
  typedef struct packed {
    logic [XYW-1:0]   x;
    logic [XYW-1:0]   y;
    lvl_t [1:0]       lv;             // lv[0]: finer level, lv[1]: coarser
    logic             trilin;
    logic [FW-1:0]    lod_f;
    dir_e             dir;            // index selection for the cache
    logic [SPANW-1:0] span;           // span number
    texel_t           color;
  } foot_t;

  // Output of TexelRead: the texels ready for filtering. Texel k of
  // tx is level k[2], row k[1], column k[0]: tx[0] = (u0,v0), tx[1] = (u1,v0),
  // tx[2] = (u0,v1), tx[3] = (u1,v1) of the finer level, tx[4..7] likewise
  // of the coarser one.
  typedef struct packed {
    logic [XYW-1:0]     x;
    logic [XYW-1:0]     y;
    texel_t [7:0]       tx;
    logic [1:0][FW-1:0] fu;           // per level
    logic [1:0][FW-1:0] fv;
    logic               trilin;
    logic [FW-1:0]      lod_f;
    texel_t             color;
  } quad_t;

  // Output of Filter.
  typedef struct packed {
    logic [XYW-1:0] x;
    logic [XYW-1:0] y;
    texel_t         tex;              // filtered texel
    texel_t         color;            // fragment colour
  } filt_t;

  // A finished pixel.
  typedef struct packed {
    logic [XYW-1:0] x;
    logic [XYW-1:0] y;
    texel_t         color;
  } pix_t;

endpackage
