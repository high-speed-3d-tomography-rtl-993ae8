// ap_zone_ctrl: the predictive part of a 3D-AP cache.
//
// Three zone_trackers (angle index a, bin u, plane v) follow the mean of the
// served references and place the cached zone around it. Whenever a zone
// moves, the prefetch walker lists, one per cycle, every load
// unit of the new zone: ZP angle planes x ZV planes x ZW units along u, where
// a unit is USTEP memory words (one word for a leaf cache, one memory line
// for the root cache). The angle planes are visited starting at the plane of
// the mean, then ahead of it, so that the next angle is loaded first; words
// of the old zone that are still inside the new one are skipped by the
// parent, which keeps them available while the zone moves, as the document
// requires. The walk order and the restart-on-move policy are this design's.
//
// Handshake: cand_valid/cand is the current unit; the parent pulses
// cand_next when it has dealt with it (loaded it, found it present or out of
// the sinogram). walking is low once the whole zone has been listed.
// Timing: a move of the angle axis restarts the walk on the next cycle; a
// move along u or v makes it run one more full pass from its current place.
module ap_zone_ctrl
  import bp_pkg::*;
#(
  parameter int ZP      = 4,     // zone size along a (angle planes)
  parameter int ZV      = 16,    // zone size along v (planes)
  parameter int ZW      = 8,     // zone size along u, in load units
  parameter int USTEP   = 1,     // memory words per load unit
  parameter int HALF_A  = 1,
  parameter int HALF_U  = 8,     // in bins
  parameter int HALF_V  = 8,
  parameter int GUARD_A = 0,
  parameter int GUARD_U = 2,
  parameter int GUARD_V = 2,
  parameter int SPEED_A = 4,
  parameter int SPEED_U = 16,
  parameter int SPEED_V = 16,
  parameter int K_CUT   = 2,
  parameter int S_LOG2  = 2
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    ref_valid,
  input  crd_t    ref_a,
  input  crd_t    ref_u,
  input  crd_t    ref_v,
  output logic    cand_valid,
  output wcoord_t cand,
  input  logic    cand_next,
  output logic    walking,
  output logic    zone_moved,
  output crd_t    org_a,
  output crd_t    org_u,
  output crd_t    org_v
);
  localparam int ZU_BINS = 2 * ZW * USTEP;

  logic mv_a, mv_u, mv_v;

  zone_tracker #(.ZSIZE(ZP), .HALF(HALF_A), .GUARD(GUARD_A), .SPEED(SPEED_A),
                 .K_CUT(K_CUT), .S_LOG2(S_LOG2)) u_trk_a (
    .clk, .rst_n, .ref_valid, .ref_crd(ref_a), .origin(org_a), .moved(mv_a));
  zone_tracker #(.ZSIZE(ZU_BINS), .HALF(HALF_U), .GUARD(GUARD_U), .SPEED(SPEED_U),
                 .K_CUT(K_CUT), .S_LOG2(S_LOG2)) u_trk_u (
    .clk, .rst_n, .ref_valid, .ref_crd(ref_u), .origin(org_u), .moved(mv_u));
  zone_tracker #(.ZSIZE(ZV), .HALF(HALF_V), .GUARD(GUARD_V), .SPEED(SPEED_V),
                 .K_CUT(K_CUT), .S_LOG2(S_LOG2)) u_trk_v (
    .clk, .rst_n, .ref_valid, .ref_crd(ref_v), .origin(org_v), .moved(mv_v));

  assign zone_moved = mv_a | mv_u | mv_v;

  // walk counters
  logic [$clog2(ZP)-1:0]             k_a;
  logic [$clog2(ZV)-1:0]             k_v;
  logic [(ZW > 1 ? $clog2(ZW) : 1)-1:0] k_u;
  logic                              active;

  crd_t up_base;   // first word of the zone along u, aligned to USTEP
  logic [$clog2(ZP)-1:0] pa;
  always_comb begin
    up_base = (org_u >>> 1) & ~crd_t'(USTEP - 1);
    pa      = k_a + ($clog2(ZP))'(HALF_A);
    cand.a  = org_a + crd_t'(pa);
    cand.v  = org_v + crd_t'(k_v);
    cand.up = up_base + crd_t'(int'(k_u) * USTEP);
  end

  assign cand_valid = active && !zone_moved;
  assign walking    = active;

  // A move along the angle axis restarts the walk at the mean's plane; a
  // move along u or v only extends it by one full pass from where it is, so
  // that frequent small moves cannot keep the walk from reaching the far end
  // of the zone.
  localparam int TOTAL = ZP * ZV * ZW;
  logic [$clog2(TOTAL+1)-1:0] left;
  assign active = (left != '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      left <= ($clog2(TOTAL+1))'(TOTAL);    // load the reset zone
      k_a <= '0; k_v <= '0; k_u <= '0;
    end else if (mv_a) begin
      left <= ($clog2(TOTAL+1))'(TOTAL);
      k_a <= '0; k_v <= '0; k_u <= '0;
    end else begin
      if (zone_moved)                 left <= ($clog2(TOTAL+1))'(TOTAL);
      else if (active && cand_next)   left <= left - 1'b1;
      if (active && cand_next && !zone_moved) begin
        if (int'(k_u) == ZW - 1) begin
          k_u <= '0;
          if (int'(k_v) == ZV - 1) begin
            k_v <= '0;
            k_a <= (int'(k_a) == ZP - 1) ? '0 : k_a + 1'b1;
          end else k_v <= k_v + 1'b1;
        end else k_u <= k_u + 1'b1;
      end
    end
  end
endmodule
