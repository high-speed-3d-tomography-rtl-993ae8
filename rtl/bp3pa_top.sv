// bp3pa_top: pipelined, pre-fetched and parallelized back-projector for 3D PET.
//
// N BP pipelines (bp_unit) each update one voxel per cycle. Each reads its
// bins through its own leaf 3D-AP cache (ap_cache_leaf), which predicts the
// part of the sinogram its block of voxels will need; all leaf caches fetch
// from one root 3D-AP cache (ap_cache_root), which holds the union of their
// zones and reads external memory in lines through the latency/bandwidth
// model of the memory bus (mem_bus_sim). One main BP FSM (bp_fsm) runs the
// reordered loops for all pipelines and one coefficient table (coef_table)
// gives the projection coefficients of the current angle.
//
//   host --coef_*--> coef_table --> bp_fsm --> bp_unit[k] <--> ap_cache_leaf[k]
//                                                                  |
//   ext memory <-- mem_bus_sim <-- ap_cache_root <-----------------+ (N leaves)
//
// Host side: write the coefficients (coef_we/coef_waddr/coef_wdata), put the
// sinogram in external memory, pulse start with the run size (cfg_*), collect
// voxel values from res_* (one per voxel per unit, after its last update) and
// wait for done. External memory: ext_rd/ext_addr, data on ext_rdata the
// next cycle, word address (a*NV + v)*NUP + up, two 16-bit bins per word with
// the even bin in the low half.
// Default sizes: 8 units in groups of 4 x 2 x 1 blocks of 8 x 8 x 9 voxels,
// a 128 x 128 x 63 volume and a 5-segment, 96-angle, 288 x 63 sinogram,
// 2 KB leaf caches, a 16 KB root cache, 5 cycles of memory latency and one
// 4-byte word per cycle.
module bp3pa_top
  import bp_pkg::*;
#(
  parameter int N      = 8,
  parameter int GX     = 4,
  parameter int GY     = 2,
  parameter int GZ     = 1,
  parameter int BX     = 8,
  parameter int BY     = 8,
  parameter int BZ     = 9,
  parameter int VOL_X  = 128,
  parameter int VOL_Y  = 128,
  parameter int VOL_Z  = 63,
  parameter int NPSI   = 96,
  parameter int NSEG   = 5,
  parameter int NU     = 288,
  parameter int NV     = 63,
  parameter int LEAF_ZP = 4,
  parameter int LEAF_ZU = 16,
  parameter int LEAF_ZV = 16,
  parameter int ROOT_ZP = 4,
  parameter int ROOT_ZUP = 32,
  parameter int ROOT_ZV = 32,
  parameter int LINE   = 8,
  parameter int LAT    = 5,
  parameter int BEAT   = 1,
  parameter int ADDR_W = 23,
  localparam int NA    = NSEG * NPSI,
  localparam int NAW   = $clog2(NA)
) (
  input  logic              clk,
  input  logic              rst_n,
  // host
  input  logic              coef_we,
  input  logic [NAW-1:0]    coef_waddr,
  input  coef_t             coef_wdata,
  input  logic              start,
  input  logic [15:0]       cfg_ngroups,
  input  logic [7:0]        cfg_nseg,
  input  logic [7:0]        cfg_npsi,
  output logic              busy,
  output logic              done,
  output logic [N-1:0]      res_valid,
  output logic [VOX_W-1:0]  res_x [N],
  output logic [VOX_W-1:0]  res_y [N],
  output logic [VOX_W-1:0]  res_z [N],
  output logic signed [ACC_W-1:0] res_val [N],
  // external memory
  output logic              ext_rd,
  output logic [ADDR_W-1:0] ext_addr,
  input  logic [WORD_W-1:0] ext_rdata
);
  localparam int BLK = BX * BY * BZ;
  localparam int NUP = NU / 2;

  // ---------------- FSM and coefficients ----------------
  crd_t         coef_a;
  coef_t        coef_cur;
  logic [N-1:0] u_valid, u_ready, u_busy;
  vox_req_t     u_req [N];

  coef_table #(.NA(NA)) u_coef (
    .clk, .wr_en(coef_we), .wr_addr(coef_waddr), .wr_data(coef_wdata),
    .rd_addr(NAW'(coef_a)), .rd_data(coef_cur));

  bp_fsm #(.N(N), .GX(GX), .GY(GY), .GZ(GZ), .BX(BX), .BY(BY), .BZ(BZ),
           .VOL_X(VOL_X), .VOL_Y(VOL_Y), .VOL_Z(VOL_Z), .NPSI(NPSI), .NSEG(NSEG)) u_fsm (
    .clk, .rst_n, .start, .cfg_ngroups, .cfg_nseg, .cfg_npsi, .busy, .done,
    .coef_a, .u_valid, .u_ready, .u_req, .u_busy);

  // ---------------- units and leaf caches ----------------
  logic [N-1:0]      lreq_valid, lreq_ready, lrsp_valid;
  wcoord_t           lreq_crd [N];
  wcoord_t           lrsp_crd;
  logic [WORD_W-1:0] lrsp_data;

  for (genvar k = 0; k < N; k++) begin : g_unit
    logic             lk_valid, lk_ready;
    crd_t             lk_a, lk_u0, lk_v0;
    logic [3:0]       lk_need;
    logic [BIN_W-1:0] lk_bins [4];
    logic             ev_stall, ev_miss, ev_prefetch, ev_move;

    bp_unit #(.BLK(BLK), .NU(NU), .NV(NV)) u_bp (
      .clk, .rst_n,
      .in_valid(u_valid[k]), .in_ready(u_ready[k]), .in_req(u_req[k]), .in_coef(coef_cur),
      .lk_valid, .lk_a, .lk_u0, .lk_v0, .lk_need, .lk_bins, .lk_ready,
      .res_valid(res_valid[k]), .res_x(res_x[k]), .res_y(res_y[k]), .res_z(res_z[k]),
      .res_val(res_val[k]), .busy(u_busy[k]), .ev_stall);

    ap_cache_leaf #(.ZP(LEAF_ZP), .ZU(LEAF_ZU), .ZV(LEAF_ZV),
                    .NA(NA), .NUP(NUP), .NV(NV)) u_leaf (
      .clk, .rst_n,
      .lk_valid, .lk_a, .lk_u0, .lk_v0, .lk_need, .lk_bins, .lk_ready,
      .req_valid(lreq_valid[k]), .req_ready(lreq_ready[k]), .req_crd(lreq_crd[k]),
      .rsp_valid(lrsp_valid[k]), .rsp_crd(lrsp_crd), .rsp_data(lrsp_data),
      .ev_miss, .ev_prefetch, .ev_move);
  end

  // ---------------- root cache and memory bus ----------------
  logic              mreq_valid, mreq_ready, mrsp_valid, mrsp_last;
  wcoord_t           mreq_crd, mrsp_crd;
  logic [WORD_W-1:0] mrsp_data;
  logic              root_miss, root_prefetch, root_move;

  ap_cache_root #(.N(N), .ZP(ROOT_ZP), .ZUP(ROOT_ZUP), .ZV(ROOT_ZV), .LINE(LINE),
                  .NA(NA), .NUP(NUP), .NV(NV)) u_root (
    .clk, .rst_n,
    .lreq_valid, .lreq_ready, .lreq_crd,
    .lrsp_valid, .lrsp_crd, .lrsp_data,
    .mreq_valid, .mreq_ready, .mreq_crd,
    .mrsp_valid, .mrsp_crd, .mrsp_data, .mrsp_last,
    .ev_miss(root_miss), .ev_prefetch(root_prefetch), .ev_move(root_move));

  mem_bus_sim #(.LAT(LAT), .BEAT(BEAT), .LINE(LINE), .NUP(NUP), .NV(NV),
                .ADDR_W(ADDR_W)) u_bus (
    .clk, .rst_n,
    .mreq_valid, .mreq_ready, .mreq_crd,
    .mrsp_valid, .mrsp_crd, .mrsp_data, .mrsp_last,
    .ext_rd, .ext_addr, .ext_rdata);
endmodule
