// bp_pkg: types and constants shared by the 3PA-PET back-projection design.
//
// The sinogram is addressed as a 3D space per cache: the "angle index"
// a = segment * NPSI + psi, the tangential bin u and the plane v. Because the
// reordered loops run segment then angle, a grows by one at each angle step
// inside a block group, so the three cached axes (a, u, v) follow the 3D
// sinusoid the document describes. Coordinates are carried as signed 12-bit
// integers so that a projection falling left of / below the sinogram can be
// recognised. A memory word holds two neighbouring bins along u (u = 2*up and
// 2*up+1), 16 bits each, which matches the 4 bytes/cycle bus of the FPGA
// prototype. Numbers of the document: 96 angles, 5 segments, 16-bit bins.
// Own choices: 288 tangential bins, 63 planes per segment, the fixed-point
// formats below.
package bp_pkg;

  localparam int CRD_W   = 12;           // signed coordinate width (a, u, v, up)
  localparam int BIN_W   = 16;           // sinogram bin, short int
  localparam int WORD_W  = 2 * BIN_W;    // memory word = 2 bins along u

  localparam int COEF_W  = 24;           // a_ij coefficients, signed
  localparam int COEF_F  = 12;           // fractional bits of a_ij and of u, v
  localparam int WGT_F   = 8;            // interpolation weight precision
  localparam int JAC_W   = 16;           // jacobian, unsigned
  localparam int JAC_F   = 14;           // fractional bits of the jacobian
  localparam int ACC_W   = 32;           // voxel accumulator
  localparam int ACC_F   = 4;            // fractional bits of a voxel value
  localparam int VOX_W   = 8;            // voxel coordinate width (x, y, z < 256)

  typedef logic signed [CRD_W-1:0] crd_t;

  // Coordinate of one memory word: angle index, bin pair, plane.
  typedef struct packed {
    crd_t a;
    crd_t up;
    crd_t v;
  } wcoord_t;

  // Projection coefficients of one (segment, angle), eq. (3):
  //   u = a00*x + a01*y + a03,  v = a10*x + a11*y + a12*z + a13
  // and the jacobian J of eq. (1).
  typedef struct packed {
    logic signed [COEF_W-1:0] a00;
    logic signed [COEF_W-1:0] a01;
    logic signed [COEF_W-1:0] a03;
    logic signed [COEF_W-1:0] a10;
    logic signed [COEF_W-1:0] a11;
    logic signed [COEF_W-1:0] a12;
    logic signed [COEF_W-1:0] a13;
    logic [JAC_W-1:0]         jac;
  } coef_t;

  // A voxel update request travelling down a BP pipeline.
  typedef struct packed {
    logic [VOX_W-1:0]  x;
    logic [VOX_W-1:0]  y;
    logic [VOX_W-1:0]  z;
    logic [15:0]       vidx;   // voxel index inside the block (accumulator address)
    crd_t              a;      // angle index of this update
    logic              first;  // first update of this voxel: overwrite the accumulator
    logic              last;   // last update of this voxel: emit the result
  } vox_req_t;

endpackage
