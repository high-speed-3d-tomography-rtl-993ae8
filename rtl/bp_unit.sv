// bp_unit: one 3D back-projection pipeline (a "BP unit").
//
// It performs one voxel update per cycle, the body of the reordered loops:
//   f(x,y,z) += J * bilinear(bin(a, u, v)),  with (u, v) from eq. (3).
// Packets flow forward through seven stages, each carrying its own valid bit:
//   S1  five products a00*x, a01*y, a10*x, a11*y, a12*z
//   S2  sums u = a00*x + a01*y + a03, v = a10*x + a11*y + a12*z + a13
//   S3  memory bridge: four bins from the leaf cache, fractions du, dv
//   S4  bilinear weights (W-du)(W-dv), du(W-dv), (W-du)dv, du*dv, W = 2**WGT_F
//   S5  sum of the four bins times their weights
//   S6  times the jacobian, scaled to ACC_F fractional bits (floor)
//   S7  accumulation in the block's voxel memory (BLK entries), read-modify-
//       write in one cycle; the first update of a voxel overwrites its entry,
//       the last one also sends the final value out on res_*.
// When the bridge lacks a bin, every stage holds (the pipeline freezes) and
// in_ready is low. The stage split, widths and rounding are this design's;
// the three steps (coordinates, interpolation, accumulation), the fixed-point
// arithmetic, the 16-bit bins and the freeze come from the document, which
// counts 12 multipliers per unit (11 here).
//
// Interface: in_valid/in_ready/in_req/in_coef from the main BP FSM; lk_* to
// the leaf cache; res_valid with the voxel coordinate and value, one cycle
// pulse, no back-pressure. busy is high while any stage holds a packet.
// Latency: 7 cycles plus stalls from acceptance to the accumulator write.
module bp_unit
  import bp_pkg::*;
#(
  parameter int BLK = 576,          // voxels per block (8 x 8 x 9)
  parameter int NU  = 288,
  parameter int NV  = 63
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  output logic              in_ready,
  input  vox_req_t          in_req,
  input  coef_t             in_coef,
  output logic              lk_valid,
  output crd_t              lk_a,
  output crd_t              lk_u0,
  output crd_t              lk_v0,
  output logic [3:0]        lk_need,
  input  logic [BIN_W-1:0]  lk_bins [4],
  input  logic              lk_ready,
  output logic              res_valid,
  output logic [VOX_W-1:0]  res_x,
  output logic [VOX_W-1:0]  res_y,
  output logic [VOX_W-1:0]  res_z,
  output logic signed [ACC_W-1:0] res_val,
  output logic              busy,
  output logic              ev_stall
);
  localparam int WONE = 1 << WGT_F;
  localparam int SH   = 2 * WGT_F + JAC_F - ACC_F;

  logic stall, en;
  assign en       = !stall;
  assign in_ready = en;
  assign ev_stall = stall;

  // ---------------- S1: products ----------------
  logic v1;  vox_req_t r1;  coef_t c1;
  logic signed [31:0] p_ax, p_ay, p_bx, p_by, p_bz;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) v1 <= 1'b0; else if (en) v1 <= in_valid;
  always_ff @(posedge clk)
    if (en) begin
      r1 <= in_req;
      c1 <= in_coef;
      p_ax <= 32'(in_coef.a00) * 32'($signed({1'b0, in_req.x}));
      p_ay <= 32'(in_coef.a01) * 32'($signed({1'b0, in_req.y}));
      p_bx <= 32'(in_coef.a10) * 32'($signed({1'b0, in_req.x}));
      p_by <= 32'(in_coef.a11) * 32'($signed({1'b0, in_req.y}));
      p_bz <= 32'(in_coef.a12) * 32'($signed({1'b0, in_req.z}));
    end

  // ---------------- S2: sums ----------------
  logic v2;  vox_req_t r2;  logic [JAC_W-1:0] j2;
  logic signed [31:0] u2, v2c;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) v2 <= 1'b0; else if (en) v2 <= v1;
  always_ff @(posedge clk)
    if (en) begin
      r2  <= r1;
      j2  <= c1.jac;
      u2  <= p_ax + p_ay + 32'(c1.a03);
      v2c <= p_bx + p_by + p_bz + 32'(c1.a13);
    end

  // ---------------- S3: memory bridge ----------------
  logic v3;  vox_req_t r3;  logic [JAC_W-1:0] j3;
  logic signed [BIN_W-1:0] b3 [4];
  logic [WGT_F-1:0] du3, dv3;

  mem_bridge #(.NU(NU), .NV(NV)) u_bridge (
    .clk, .rst_n, .en,
    .in_valid(v2), .in_req(r2), .in_u(u2), .in_v(v2c), .in_jac(j2),
    .stall,
    .lk_valid, .lk_a, .lk_u0, .lk_v0, .lk_need, .lk_bins, .lk_ready,
    .out_valid(v3), .out_req(r3), .out_bins(b3), .out_du(du3), .out_dv(dv3),
    .out_jac(j3)
  );

  // ---------------- S4: weights ----------------
  logic v4;  vox_req_t r4;  logic [JAC_W-1:0] j4;
  logic signed [BIN_W-1:0] b4 [4];
  logic [2*WGT_F:0] w4 [4];
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) v4 <= 1'b0; else if (en) v4 <= v3;
  always_ff @(posedge clk)
    if (en) begin
      logic [2*WGT_F:0] w11;
      w11 = (2*WGT_F+1)'(du3) * (2*WGT_F+1)'(dv3);
      r4 <= r3;
      j4 <= j3;
      b4 <= b3;
      w4[3] <= w11;
      w4[1] <= ((2*WGT_F+1)'(du3) << WGT_F) - w11;
      w4[2] <= ((2*WGT_F+1)'(dv3) << WGT_F) - w11;
      w4[0] <= (2*WGT_F+1)'(WONE * WONE) - ((2*WGT_F+1)'(du3) << WGT_F)
             - ((2*WGT_F+1)'(dv3) << WGT_F) + w11;
    end

  // ---------------- S5: interpolation ----------------
  logic v5;  vox_req_t r5;  logic [JAC_W-1:0] j5;
  logic signed [39:0] s5;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) v5 <= 1'b0; else if (en) v5 <= v4;
  always_ff @(posedge clk)
    if (en) begin
      logic signed [39:0] acc;
      acc = '0;
      for (int i = 0; i < 4; i++) acc += 40'(b4[i]) * $signed({1'b0, w4[i]});
      r5 <= r4;
      j5 <= j4;
      s5 <= acc;
    end

  // ---------------- S6: jacobian ----------------
  logic v6;  vox_req_t r6;
  logic signed [ACC_W-1:0] d6;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) v6 <= 1'b0; else if (en) v6 <= v5;
  always_ff @(posedge clk)
    if (en) begin
      logic signed [63:0] m;
      m = 64'(s5) * $signed({1'b0, j5});
      r6 <= r5;
      d6 <= ACC_W'(m >>> SH);
    end

  // ---------------- S7: accumulation ----------------
  logic signed [ACC_W-1:0] vox_mem [BLK];
  logic signed [ACC_W-1:0] sum7;
  assign sum7 = r6.first ? d6 : vox_mem[r6.vidx[$clog2(BLK)-1:0]] + d6;

  always_ff @(posedge clk)
    if (en && v6) vox_mem[r6.vidx[$clog2(BLK)-1:0]] <= sum7;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) res_valid <= 1'b0;
    else res_valid <= en && v6 && r6.last;

  always_ff @(posedge clk)
    if (en && v6 && r6.last) begin
      res_x   <= r6.x;
      res_y   <= r6.y;
      res_z   <= r6.z;
      res_val <= sum7;
    end

  assign busy = v1 | v2 | v3 | v4 | v5 | v6;
endmodule
