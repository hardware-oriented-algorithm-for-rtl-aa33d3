// gmm_pkg: sizes, types and small helper functions shared by the
// GMM-MRCoHOG human recognition circuit.
//
// Sizes that follow the reference design: a 32x64 8-bit input image, three
// resolutions (1, 1/2, 1/4), 36 gradient directions, 6 mixture components and
// a 3,024-input binarized network fed 216 features per clock.
// Own choices: the split of the 3,024 features into 14 co-occurrence pair
// types x 36 image cells x 6 components, the 4x9 cell grid, the responsibility
// scale (240 = one whole pair) and the 16-bit feature counters.
package gmm_pkg;

  localparam int PIX_W   = 8;           // luminance bits
  localparam int IMG_W   = 32;          // full-resolution width
  localparam int IMG_H   = 64;          // full-resolution height
  localparam int N_RES   = 3;           // 1, 1/2, 1/4
  localparam int GRAD_W  = PIX_W + 1;   // signed difference -255..255
  localparam int N_DIR   = 36;          // gradient directions (10 degrees each)
  localparam int DIR_W   = 6;

  localparam int N_INTRA = 4;                          // offsets per resolution
  localparam int N_PAIR  = N_RES * N_INTRA + (N_RES - 1); // 14 pair types
  localparam int PAIR_IDX_W = 4;

  localparam int CELL_X  = 4;           // cell columns (8 pixels each)
  localparam int CELL_Y  = 9;           // cell rows (row band = y*9/64)
  localparam int N_CELL  = CELL_X * CELL_Y;            // 36
  localparam int CELL_W  = 6;

  localparam int N_MIX   = 6;           // mixture components
  localparam int MIX_IDX_W = 3;
  localparam int CHUNK   = N_CELL * N_MIX;             // 216 features per clock
  localparam int N_FEAT  = N_PAIR * CHUNK;             // 3,024 features
  localparam int N_STEP  = N_FEAT / CHUNK;             // 14 BNN steps

  localparam int RESP_W   = 8;
  localparam int RESP_ONE = 240;        // divisible by 1..6: exact equal shares
  localparam int HIST_W   = 16;

  // One mixture component: centre (ca, cb) on the 36x36 direction plane and
  // log2 of the half widths of its rectangle along each axis.
  typedef struct packed {
    logic [DIR_W-1:0] ca;
    logic [DIR_W-1:0] cb;
    logic [2:0]       wa;
    logic [2:0]       wb;
  } gauss_t;

  // A co-occurrence pair of gradient directions and the cell it counts in.
  typedef struct packed {
    logic              valid;
    logic [DIR_W-1:0]  a;      // direction of the first gradient
    logic [DIR_W-1:0]  b;      // direction of the second gradient
    logic [CELL_W-1:0] cell_id;
  } pair_t;

  // Responsibilities of all components for one pair.
  typedef struct packed {
    logic              valid;
    logic [CELL_W-1:0] cell_id;
    logic [N_MIX-1:0][RESP_W-1:0] r;
  } resp_t;

  // Cell of a full-resolution pixel position.
  function automatic logic [CELL_W-1:0] cell_of(input int unsigned x, input int unsigned y);
    int unsigned cx, cy;
    cx = x / (IMG_W / CELL_X);
    cy = (y * CELL_Y) / IMG_H;
    return CELL_W'(cy * CELL_X + cx);
  endfunction

endpackage
