// tb_bp_unit: one BP pipeline with a model leaf cache (bins from a hash of
// the coordinate, lk_ready low at random to freeze the pipeline). A block of
// 16 voxels is back-projected over 6 angles twice, first without and then
// with cache stalls and input gaps. Every voxel value is compared with a
// reference computed here (eq. (3), bilinear interpolation, jacobian); bins
// outside the sinogram must read as zero; without stalls a result must come
// out 7 cycles after the last update of its voxel entered (one update per
// cycle).
// The stages and the freeze on missing bins follow the document; the
// fixed-point rules and the 7-cycle latency checked are this design's.
module tb_bp_unit;
  import bp_pkg::*;
  localparam int BLK = 16, NANG = 6, NU = 40, NV = 12;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic in_valid = 0, in_ready;
  vox_req_t in_req = '0;
  coef_t in_coef = '0;
  logic lk_valid, lk_ready;
  crd_t lk_a, lk_u0, lk_v0;
  logic [3:0] lk_need;
  logic [BIN_W-1:0] lk_bins [4];
  logic res_valid, busy, ev_stall;
  logic [VOX_W-1:0] res_x, res_y, res_z;
  logic signed [ACC_W-1:0] res_val;
  int checks = 0, failures = 0, n_stall = 0, n_out = 0, cyc = 0;
  bit stall_mode = 0;

  bp_unit #(.BLK(BLK), .NU(NU), .NV(NV)) dut (.*);

  function automatic int bin_of(int a, int u, int v);
    int unsigned h;
    h = (a * 7919 + u * 104729 + v * 1299709) * 32'h9E3779B1;
    return int'($signed(h[31:16]));
  endfunction
  always_comb
    for (int i = 0; i < 4; i++)
      lk_bins[i] = BIN_W'(bin_of(int'(lk_a), int'(lk_u0) + i % 2, int'(lk_v0) + i / 2));
  logic rdy = 1;
  assign lk_ready = rdy;
  always @(negedge clk) rdy <= stall_mode ? ($urandom_range(0, 2) != 0) : 1'b1;
  always @(posedge clk) begin
    cyc++;
    if (rst_n && ev_stall) n_stall++;
    if (rst_n && lk_valid) begin
      checks++;
      if (lk_need != {(int'(lk_u0) + 1 < NU && int'(lk_v0) + 1 < NV && lk_u0 >= 0 && lk_v0 + 1 >= 0),
                      (lk_u0 >= 0 && int'(lk_u0) < NU && int'(lk_v0) + 1 < NV && lk_v0 + 1 >= 0),
                      (int'(lk_u0) + 1 < NU && lk_u0 + 1 >= 0 && lk_v0 >= 0 && int'(lk_v0) < NV),
                      (lk_u0 >= 0 && int'(lk_u0) < NU && lk_v0 >= 0 && int'(lk_v0) < NV)}) begin
        failures++; $display("need mask %b at u0=%0d v0=%0d", lk_need, lk_u0, lk_v0);
      end
    end
  end

  coef_t coefs [NANG];
  function automatic int ref_voxel(int x, int y, int z);
    int acc;
    acc = 0;
    for (int p = 0; p < NANG; p++) begin
      longint uf, vf, sum, m;
      int u0, v0, du, dv, bb [4];
      uf = longint'(coefs[p].a00) * x + longint'(coefs[p].a01) * y + longint'(coefs[p].a03);
      vf = longint'(coefs[p].a10) * x + longint'(coefs[p].a11) * y + longint'(coefs[p].a12) * z
         + longint'(coefs[p].a13);
      u0 = int'(uf >>> 12); du = int'((uf >>> 4) & 255);
      v0 = int'(vf >>> 12); dv = int'((vf >>> 4) & 255);
      for (int i = 0; i < 4; i++) begin
        int u, v;
        u = u0 + i % 2; v = v0 + i / 2;
        bb[i] = (u < 0 || u >= NU || v < 0 || v >= NV) ? 0 : bin_of(p, u, v);
      end
      sum = longint'(bb[0]) * (256 - du) * (256 - dv) + longint'(bb[1]) * du * (256 - dv)
          + longint'(bb[2]) * (256 - du) * dv + longint'(bb[3]) * du * dv;
      m = sum * longint'(coefs[p].jac);
      acc += int'(m >>> 26);
    end
    return acc;
  endfunction

  int last_in_cyc [BLK];
  always @(posedge clk) begin
    if (in_valid && in_ready && in_req.last) last_in_cyc[in_req.vidx] = cyc;
    if (rst_n && res_valid) begin
      int e, vi;
      vi = (int'(res_x) - 1) * 8 + (int'(res_y) - 2) * 2 + (int'(res_z) - 3);
      e = ref_voxel(int'(res_x), int'(res_y), int'(res_z));
      n_out++;
      checks++;
      if (res_val !== e) begin
        failures++;
        $display("voxel (%0d,%0d,%0d) got %0d expected %0d", res_x, res_y, res_z, res_val, e);
      end
      if (!stall_mode) begin
        checks++;
        if (cyc - last_in_cyc[vi] != 7) begin
          failures++; $display("latency %0d cycles", cyc - last_in_cyc[vi]);
        end
      end
    end
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int p = 0; p < NANG; p++) begin
      real c, s, t;
      c = $cos(3.14159265 * p / NANG); s = $sin(3.14159265 * p / NANG); t = 0.3;
      coefs[p].a00 = COEF_W'($rtoi(c * 4096)); coefs[p].a01 = COEF_W'($rtoi(s * 4096));
      coefs[p].a03 = COEF_W'($rtoi((18.3 - 3 * c - 3 * s) * 4096));
      coefs[p].a10 = COEF_W'($rtoi(t * s * 4096)); coefs[p].a11 = COEF_W'($rtoi(-t * c * 4096));
      coefs[p].a12 = COEF_W'(4096 + 700);
      coefs[p].a13 = COEF_W'($rtoi((p % 2 ? 8.6 : -3.4) * 4096));
      coefs[p].jac = JAC_W'(16384 + 1000 * p);
    end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int pass = 0; pass < 2; pass++) begin
      stall_mode = (pass == 1);
      for (int p = 0; p < NANG; p++)
        for (int i = 0; i < BLK; i++) begin
          in_valid = 1;
          in_coef = coefs[p];
          in_req.x = VOX_W'(1 + i / 8); in_req.y = VOX_W'(2 + (i / 2) % 4); in_req.z = VOX_W'(3 + i % 2);
          in_req.vidx = 16'(i); in_req.a = crd_t'(p);
          in_req.first = (p == 0); in_req.last = (p == NANG - 1);
          @(posedge clk);
          while (!in_ready) @(posedge clk);
          @(negedge clk);
          in_valid = 0;
          if (stall_mode && $urandom_range(0, 3) == 0) @(negedge clk);
        end
      wait (!busy);
      repeat (3) @(negedge clk);
    end
    checks++;
    if (n_out != 2 * BLK || n_stall == 0) begin
      failures++; $display("results %0d stalls %0d", n_out, n_stall);
    end
    $display("results %0d, stall cycles %0d", n_out, n_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
