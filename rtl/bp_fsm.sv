// bp_fsm: main BP FSM, shared by all BP units.
//
// It runs the reordered loops of the back-projection:
//   for each group of neighbouring blocks      (one block per unit)
//     for each segment Delta < cfg_nseg
//       for each angle psi < cfg_npsi
//         every unit, in parallel: for each voxel r of its block
//           f(r) += bin(Delta, psi, u(psi, r), v(psi, Delta, r))
// The volume (VOL_X x VOL_Y x VOL_Z) is cut into blocks of BX x BY x BZ
// voxels, and the N = GX*GY*GZ units of a group take GX x GY x GZ
// neighbouring blocks, so that the bins they need overlap (hierarchical
// cache). The units share the loop over angles: each has its own voxel
// counter (z fastest, then y, then x) and may be stalled by its cache on its
// own, and the angle only advances when every unit has issued its whole
// block; the FSM then spends one cycle moving to the next angle. It reads the
// coefficients of the current angle index a = Delta*NPSI + psi from the
// coefficient table and broadcasts them, and marks the first and last update
// of each voxel. Groups are visited in raster order (x fastest) from group 0,
// cfg_ngroups of them; done pulses once every pipeline has drained.
// Following the document: the loop order of Algorithm 1, one block per
// pipeline, a shared angle loop, one FSM for all units. This design's
// choices: the group shape, the voxel order, the run-time loop bounds.
module bp_fsm
  import bp_pkg::*;
#(
  parameter int N     = 8,
  parameter int GX    = 4,
  parameter int GY    = 2,
  parameter int GZ    = 1,
  parameter int BX    = 8,
  parameter int BY    = 8,
  parameter int BZ    = 9,
  parameter int VOL_X = 128,
  parameter int VOL_Y = 128,
  parameter int VOL_Z = 63,
  parameter int NPSI  = 96,
  parameter int NSEG  = 5
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic [15:0]      cfg_ngroups,
  input  logic [7:0]       cfg_nseg,
  input  logic [7:0]       cfg_npsi,
  output logic             busy,
  output logic             done,
  output crd_t             coef_a,       // angle index to read in the coefficient table
  output logic [N-1:0]     u_valid,
  input  logic [N-1:0]     u_ready,
  output vox_req_t         u_req [N],
  input  logic [N-1:0]     u_busy
);
  localparam int NGX = VOL_X / (BX * GX);
  localparam int NGY = VOL_Y / (BY * GY);
  localparam int NGZ = VOL_Z / (BZ * GZ);

  initial assert (N == GX * GY * GZ && NGX * BX * GX == VOL_X && NGY * BY * GY == VOL_Y &&
                  NGZ * BZ * GZ == VOL_Z)
    else $error("group and block sizes must tile the volume");

  // the run-time loop bounds may not exceed the coefficient table
  always_ff @(posedge clk)
    if (rst_n && start)
      assert (cfg_nseg <= 8'(NSEG) && cfg_npsi <= 8'(NPSI))
        else $error("cfg_nseg/cfg_npsi larger than the coefficient table");

  typedef enum logic [1:0] {S_IDLE, S_RUN, S_NEXT, S_DRAIN} state_t;
  state_t state;

  logic [7:0]  gx, gy, gz, seg, psi;
  logic [15:0] groups_left;
  logic [7:0]  vx [N];
  logic [7:0]  vy [N];
  logic [7:0]  vz [N];
  logic [15:0] vidx [N];
  logic [N-1:0] udone;
  crd_t a_cur;

  assign coef_a = a_cur;
  assign busy   = (state != S_IDLE);

  logic first_ang, last_ang;
  assign first_ang = (seg == 0) && (psi == 0);
  assign last_ang  = (seg == cfg_nseg - 1'b1) && (psi == cfg_npsi - 1'b1);

  always_comb begin
    for (int k = 0; k < N; k++) begin
      int ux, uy, uz;
      ux = k % GX;
      uy = (k / GX) % GY;
      uz = k / (GX * GY);
      u_valid[k]    = (state == S_RUN) && !udone[k];
      u_req[k].x    = VOX_W'((int'(gx) * GX + ux) * BX + int'(vx[k]));
      u_req[k].y    = VOX_W'((int'(gy) * GY + uy) * BY + int'(vy[k]));
      u_req[k].z    = VOX_W'((int'(gz) * GZ + uz) * BZ + int'(vz[k]));
      u_req[k].vidx = vidx[k];
      u_req[k].a    = a_cur;
      u_req[k].first = first_ang;
      u_req[k].last  = last_ang;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      done  <= 1'b0;
      gx <= '0; gy <= '0; gz <= '0; seg <= '0; psi <= '0;
      groups_left <= '0;
      a_cur <= '0;
      udone <= '0;
      for (int k = 0; k < N; k++) begin
        vx[k] <= '0; vy[k] <= '0; vz[k] <= '0; vidx[k] <= '0;
      end
    end else begin
      done <= 1'b0;
      case (state)
        S_IDLE: if (start && cfg_ngroups != 0 && cfg_nseg != 0 && cfg_npsi != 0) begin
          state <= S_RUN;
          gx <= '0; gy <= '0; gz <= '0; seg <= '0; psi <= '0;
          a_cur <= '0;
          groups_left <= cfg_ngroups;
          udone <= '0;
        end
        S_RUN: begin
          for (int k = 0; k < N; k++) begin
            if (u_valid[k] && u_ready[k]) begin
              vidx[k] <= vidx[k] + 1'b1;
              if (int'(vz[k]) == BZ - 1) begin
                vz[k] <= '0;
                if (int'(vy[k]) == BY - 1) begin
                  vy[k] <= '0;
                  if (int'(vx[k]) == BX - 1) begin
                    vx[k]    <= '0;
                    vidx[k]  <= '0;
                    udone[k] <= 1'b1;
                  end else vx[k] <= vx[k] + 1'b1;
                end else vy[k] <= vy[k] + 1'b1;
              end else vz[k] <= vz[k] + 1'b1;
            end
          end
          if (&udone) state <= S_NEXT;
        end
        S_NEXT: begin
          // advance the shared angle loop, then the segment, then the group
          udone <= '0;
          state <= S_RUN;
          if (psi != cfg_npsi - 1'b1) begin
            psi   <= psi + 1'b1;
            a_cur <= a_cur + 1'b1;
          end else begin
            psi <= '0;
            if (seg != cfg_nseg - 1'b1) begin
              seg   <= seg + 1'b1;
              a_cur <= crd_t'((int'(seg) + 1) * NPSI);
            end else begin
              seg   <= '0;
              a_cur <= '0;
              groups_left <= groups_left - 1'b1;
              if (groups_left == 16'd1) state <= S_DRAIN;
              if (int'(gx) != NGX - 1) gx <= gx + 1'b1;
              else begin
                gx <= '0;
                if (int'(gy) != NGY - 1) gy <= gy + 1'b1;
                else begin
                  gy <= '0;
                  gz <= (int'(gz) != NGZ - 1) ? gz + 1'b1 : '0;
                end
              end
            end
          end
        end
        S_DRAIN: if (u_busy == '0) begin
          done  <= 1'b1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
