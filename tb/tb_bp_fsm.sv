// tb_bp_fsm: the main BP FSM at small sizes (2 units of 2x2x3 voxels, a
// volume of 8x4x6, 2 segments of 3 angles). Each unit's ready is random, as
// if its cache stalled it. Every accepted request is compared with a model
// of the loop nest (group raster x-fastest, segment, angle, then z fastest
// inside the block), including the angle index, the first/last flags and the
// block-memory index; the coefficient address must follow the angle. At the
// end the pipelines are held busy for a random time and done must wait for
// them. Two runs are made, the second with more groups than the volume has,
// so the group counters wrap.
// The loop order (blocks, segments, angles, voxels) and the shared angle
// loop follow the document; the voxel order and group shape are this design's.
module tb_bp_fsm;
  import bp_pkg::*;
  localparam int N = 2, GX = 2, GY = 1, GZ = 1, BX = 2, BY = 2, BZ = 3;
  localparam int VOL_X = 8, VOL_Y = 4, VOL_Z = 6, NPSI = 3, NSEG = 2;
  localparam int NGX = 2, NGY = 2, NGZ = 2, BLK = BX * BY * BZ;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic start = 0, busy, done;
  logic [15:0] cfg_ngroups;
  logic [7:0] cfg_nseg, cfg_npsi;
  crd_t coef_a;
  logic [N-1:0] u_valid, u_ready, u_busy = '0;
  vox_req_t u_req [N];

  bp_fsm #(.N(N), .GX(GX), .GY(GY), .GZ(GZ), .BX(BX), .BY(BY), .BZ(BZ),
           .VOL_X(VOL_X), .VOL_Y(VOL_Y), .VOL_Z(VOL_Z), .NPSI(NPSI), .NSEG(NSEG)) dut (.*);

  int checks = 0, failures = 0, n_done = 0;
  vox_req_t expq [N][$];

  task automatic build(int ngroups, int nseg, int npsi);
    for (int k = 0; k < N; k++) expq[k].delete();
    for (int g = 0; g < ngroups; g++) begin
      int gi, gx, gy, gz;
      gi = g % (NGX * NGY * NGZ);
      gx = gi % NGX; gy = (gi / NGX) % NGY; gz = gi / (NGX * NGY);
      for (int s = 0; s < nseg; s++)
        for (int p = 0; p < npsi; p++)
          for (int k = 0; k < N; k++)
            for (int i = 0; i < BLK; i++) begin
              vox_req_t r;
              r.x = VOX_W'((gx * GX + k % GX) * BX + i / (BY * BZ));
              r.y = VOX_W'((gy * GY + (k / GX) % GY) * BY + (i / BZ) % BY);
              r.z = VOX_W'((gz * GZ + k / (GX * GY)) * BZ + i % BZ);
              r.vidx = 16'(i);
              r.a = crd_t'(s * NPSI + p);
              r.first = (s == 0 && p == 0);
              r.last = (s == nseg - 1 && p == npsi - 1);
              expq[k].push_back(r);
            end
    end
  endtask

  always @(negedge clk) u_ready <= N'($urandom);

  always @(posedge clk) if (rst_n) begin
    if (done) n_done++;
    for (int k = 0; k < N; k++) if (u_valid[k]) begin
      checks++;
      if (coef_a !== u_req[k].a) begin
        failures++; $display("coef_a %0d but request angle %0d", coef_a, u_req[k].a);
      end
      if (u_ready[k]) begin
        checks++;
        if (expq[k].size() == 0) begin
          failures++; $display("unit %0d: unexpected request", k);
        end else begin
          vox_req_t e;
          e = expq[k].pop_front();
          if (u_req[k] !== e) begin
            failures++;
            if (failures < 10)
              $display("unit %0d: got (%0d,%0d,%0d) i%0d a%0d f%b l%b, expected (%0d,%0d,%0d) i%0d a%0d f%b l%b",
                       k, u_req[k].x, u_req[k].y, u_req[k].z, u_req[k].vidx, u_req[k].a,
                       u_req[k].first, u_req[k].last, e.x, e.y, e.z, e.vidx, e.a, e.first, e.last);
          end
        end
      end
    end
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(int ngroups, int nseg, int npsi);
    int hold;
    build(ngroups, nseg, npsi);
    cfg_ngroups = 16'(ngroups); cfg_nseg = 8'(nseg); cfg_npsi = 8'(npsi);
    n_done = 0;
    u_busy = 2'b11;
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    checks++;
    if (!busy) begin failures++; $display("busy not raised"); end
    // pipelines report busy until a random time after the last request
    wait (expq[0].size() == 0 && expq[1].size() == 0);
    hold = $urandom_range(1, 20);
    repeat (hold) begin
      @(negedge clk);
      checks++;
      if (n_done != 0) begin failures++; $display("done while pipelines busy"); end
    end
    u_busy = '0;
    repeat (4) @(negedge clk);
    checks += 3;
    if (n_done != 1) begin failures++; $display("done pulsed %0d times", n_done); end
    if (busy) begin failures++; $display("busy still high"); end
    for (int k = 0; k < N; k++)
      if (expq[k].size() != 0) begin
        failures++; $display("unit %0d: %0d requests missing", k, expq[k].size());
      end
  endtask

  initial begin
    cfg_ngroups = 0; cfg_nseg = 0; cfg_npsi = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    run(2, 2, 3);
    run(NGX * NGY * NGZ + 3, 1, 2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
