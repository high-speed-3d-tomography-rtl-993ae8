// mem_bridge: the memory bridge between a BP pipeline and its leaf cache.
//
// It receives the projection (u, v) of a voxel in fixed point (COEF_F
// fractional bits) and splits it into the integer corner (u0, v0) = floor and
// the interpolation fractions du, dv (the WGT_F bits below the point). It asks
// the leaf cache for the four bins (u0..u0+1, v0..v0+1) of the current angle
// in one lookup. Bins outside the sinogram (u not in [0, NU), v not in
// [0, NV)) are not needed: they are not waited for and read as zero. When a
// needed bin is missing, stall goes high in the same cycle and freezes the
// whole pipeline until the cache has fetched it; this is the backward flow
// control of the document. Otherwise the bins, fractions and the packet are
// registered into the next stage.
//
// Interface: in_* is the packet of the previous stage, en the pipeline
// enable (low while stalled); out_* is valid one cycle after an accepted
// input. Following the document: four bins per cycle, freeze on missing data.
// This design's choices: zero outside the sinogram, floor rounding.
module mem_bridge
  import bp_pkg::*;
#(
  parameter int NU = 288,
  parameter int NV = 63
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     en,
  input  logic                     in_valid,
  input  vox_req_t                 in_req,
  input  logic signed [31:0]       in_u,
  input  logic signed [31:0]       in_v,
  input  logic [JAC_W-1:0]         in_jac,
  output logic                     stall,
  // leaf cache lookup
  output logic                     lk_valid,
  output crd_t                     lk_a,
  output crd_t                     lk_u0,
  output crd_t                     lk_v0,
  output logic [3:0]               lk_need,
  input  logic [BIN_W-1:0]         lk_bins [4],
  input  logic                     lk_ready,
  // next stage
  output logic                     out_valid,
  output vox_req_t                 out_req,
  output logic signed [BIN_W-1:0]  out_bins [4],
  output logic [WGT_F-1:0]         out_du,
  output logic [WGT_F-1:0]         out_dv,
  output logic [JAC_W-1:0]         out_jac
);
  logic signed [31:0] u_int, v_int;
  assign u_int = in_u >>> COEF_F;
  assign v_int = in_v >>> COEF_F;

  assign lk_valid = in_valid;
  assign lk_a     = in_req.a;
  assign lk_u0    = crd_t'(u_int);
  assign lk_v0    = crd_t'(v_int);

  always_comb begin
    for (int i = 0; i < 4; i++) begin
      logic signed [31:0] ui, vi;
      ui = u_int + 32'(i % 2);
      vi = v_int + 32'(i / 2);
      lk_need[i] = (ui >= 0) && (ui < NU) && (vi >= 0) && (vi < NV);
    end
  end

  assign stall = in_valid && !lk_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_valid <= 1'b0;
    else if (en) out_valid <= in_valid;
  end

  always_ff @(posedge clk) begin
    if (en) begin
      out_req <= in_req;
      out_jac <= in_jac;
      out_du  <= in_u[COEF_F-1 -: WGT_F];
      out_dv  <= in_v[COEF_F-1 -: WGT_F];
      for (int i = 0; i < 4; i++) out_bins[i] <= lk_need[i] ? lk_bins[i] : '0;
    end
  end
endmodule
