// sp_pkg: number formats and record types shared by the scene processor.
//
// Coordinates are signed integers (COORD_W bits). Angles are unsigned
// binary fractions of a full turn (ANGLE_W bits, 2**ANGLE_W steps per 360
// degrees). Sines, cosines, matrix coefficients and plane normals are signed
// fixed point with FRAC fraction bits (1.0 = 2**FRAC). Window sizes, the
// window distance and the bounding-sphere radius are unsigned WIN_W-bit
// integers in coordinate units. All widths are choices of this design; the
// position vector P = {x, y, z, psi, theta, gamma} and the quantities of the
// visibility test follow the scene-processor description.
package sp_pkg;

  localparam int COORD_W = 32;
  localparam int ANGLE_W = 10;
  localparam int COEF_W  = 16;
  localparam int FRAC    = 14;
  localparam int WIN_W   = 16;
  // pyramid side a_w * x_con / d_w: magnitude up to COORD_W+WIN_W bits, plus sign
  localparam int SIDE_W  = COORD_W + WIN_W + 1;

  typedef logic signed [COORD_W-1:0] coord_t;
  typedef logic        [ANGLE_W-1:0] angle_t;
  typedef logic signed [COEF_W-1:0]  coef_t;
  typedef logic        [WIN_W-1:0]   win_t;
  typedef logic signed [SIDE_W-1:0]  side_t;

  typedef struct packed {
    coord_t x;
    coord_t y;
    coord_t z;
  } vec3_t;

  // unit normal of a subdivision plane, fixed point
  typedef struct packed {
    coef_t x;
    coef_t y;
    coef_t z;
  } nvec_t;

  typedef struct packed {
    angle_t psi;
    angle_t theta;
    angle_t gamma;
  } ang3_t;

  // position vector P = {x, y, z, psi, theta, gamma}
  typedef struct packed {
    vec3_t pos;
    ang3_t ang;
  } posvec_t;

  // 3x3 matrix, m[row][col]
  typedef coef_t [2:0][2:0] mat3_t;

  // one entry of the object table: position vector and bounding-sphere radius
  typedef struct packed {
    posvec_t p;
    win_t    r;
  } obj_rec_t;

  // viewing window: sizes a_w, b_w and distance d_w from the observer
  typedef struct packed {
    win_t a;
    win_t b;
    win_t d;
  } window_t;

endpackage
