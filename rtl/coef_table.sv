// coef_table: projection coefficients for every (segment, angle).
//
// The pipeline computes the projection of voxel (x, y, z) with the affine
// form of eq. (3), u = a00*x + a01*y + a03 and v = a10*x + a11*y + a12*z + a13,
// whose coefficients depend on the angle psi and the segment Delta only
// (eq. (2): cos psi, sin psi, Delta/(2 R_a) * sin psi, ...). The host writes
// one coef_t per angle index a = segment*NPSI + psi before a run; the main BP
// FSM reads the entry of the current angle and hands it to every pipeline,
// since all of them share the loop over angles. The table itself, its host
// write port and the jacobian stored beside the coefficients are this
// design's choices: the document only gives the formula.
//
// Timing: writes take effect at the clock edge; the read is combinational.
module coef_table
  import bp_pkg::*;
#(
  parameter int NA = 480            // segments x angles (5 x 96)
) (
  input  logic                  clk,
  input  logic                  wr_en,
  input  logic [$clog2(NA)-1:0] wr_addr,
  input  coef_t                 wr_data,
  input  logic [$clog2(NA)-1:0] rd_addr,
  output coef_t                 rd_data
);
  coef_t tbl [NA];

  always_ff @(posedge clk)
    if (wr_en) tbl[wr_addr] <= wr_data;

  assign rd_data = tbl[rd_addr];
endmodule
