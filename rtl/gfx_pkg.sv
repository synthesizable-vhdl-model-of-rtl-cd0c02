// gfx_pkg: shared types and timing constants of the 3D transformation and
// projection pipeline.
//
// A vertex is a homogeneous vector (X, Y, Z, W) of single precision floats.
// The transform matrix is 4x4, indexed [row][column] with rows A..D and
// columns 1..4, so element A4 is m[0][3] (the X translation). The RVST mode
// word picks what the matrix builder combines: RV is the rotation axis
// (00 none, 01 X, 10 Y, 11 Z), S enables scaling and T enables translation.
// The display mode picks the projection: 00 orthographic, 01 perspective;
// 10 and 11 are left free for later projections and give a zero vector.
//
// Latencies follow the cycle counts of the reference design: a 7-cycle
// multiplier and adder, an 8-cycle multiplication stage, a 17-cycle addition
// stage, a 17-cycle Z divider and a 26-cycle perspective unit. The 16-cycle
// divider core is this design's choice, set so the Z divider takes 17.
package gfx_pkg;
  import fp32_pkg::*;

  typedef struct packed {
    fp32_t x;
    fp32_t y;
    fp32_t z;
    fp32_t w;
  } vec4_t;

  // m[r][c]: r = 0..3 for rows A..D, c = 0..3 for columns 1..4
  typedef fp32_t [3:0][3:0] mat4_t;

  typedef enum logic [1:0] {
    ROT_NONE = 2'b00,
    ROT_X    = 2'b01,
    ROT_Y    = 2'b10,
    ROT_Z    = 2'b11
  } rot_axis_e;

  typedef struct packed {
    rot_axis_e rv;
    logic      s;
    logic      t;
  } rvst_t;

  typedef enum logic [1:0] {
    DISP_ORTHO = 2'b00,
    DISP_PERSP = 2'b01
  } disp_mode_e;

  localparam int unsigned ANGLE_W   = 10;  // rotation angle in whole degrees

  localparam int unsigned MUL_LAT   = 7;   // floating point multiplier
  localparam int unsigned ADD_LAT   = 7;   // floating point adder
  localparam int unsigned DIV_LAT   = 16;  // floating point divider core

  localparam int unsigned ROT_LAT   = 1;                  // rotation: LUT + register
  localparam int unsigned MB_LAT    = MUL_LAT + 1;        // matrix builder
  localparam int unsigned MST_LAT   = 1 + MUL_LAT;        // multiplication stage: 8
  localparam int unsigned AST_LAT   = 1 + ADD_LAT + 1 + ADD_LAT + 1; // addition stage: 17
  localparam int unsigned ZDIV_LAT  = 1 + DIV_LAT;        // Z divider: 17
  localparam int unsigned ORTHO_LAT = 1;                  // orthographic unit
  localparam int unsigned PERSP_LAT = 1 + ZDIV_LAT + MUL_LAT + 1; // perspective: 26
  localparam int unsigned DISP_LAT  = PERSP_LAT;          // display stage (both paths aligned)
  localparam int unsigned TOP_LAT   = ROT_LAT + MB_LAT + MST_LAT + AST_LAT + DISP_LAT;

endpackage
