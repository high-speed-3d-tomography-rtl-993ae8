// tb_bp3pa_lat: one BP unit behind a slow memory, the single-unit latency
// experiment of the method: a 30-cycle memory latency (25 ns at 1.2 GHz),
// one 32-bit word per cycle, and one 8 x 8 x 9 block back-projected over the
// whole 5-segment, 96-angle sinogram. Every voxel is checked against a
// reference back-projection as in bp3pa_harness, every cache mechanism must
// occur, and the cycles per update are reported. The method reaches about one
// cycle per update for a single unit even at this latency; this RTL takes
// about 2.8 (1.3 at a 5-cycle latency), so the test only fails above 3.5, as
// a bound against regressions. The top is built with N = 1 (a 1 x 1 x 1 group) and
// LAT = 30; everything else keeps its default. The latency and unit count
// follow the document; the data and the bound are this testbench's choices.
module tb_bp3pa_lat;
  import bp_pkg::*;
  localparam int NGROUPS = 1, RUN_NSEG = 5, RUN_NPSI = 96, WATCHDOG = 2000000, LAT = 30;
  localparam real MAX_CPO = 3.5;
  localparam int N = 1, GX = 1, GY = 1, BX = 8, BY = 8, BZ = 9;
  localparam int VOL_X = 128, VOL_Y = 128, NPSI = 96, NSEG = 5, NU = 288, NV = 63;
  localparam int NUP = NU / 2, BLK = BX * BY * BZ, NA = NSEG * NPSI;
  localparam int NGX = VOL_X / (BX * GX), NGY = VOL_Y / (BY * GY);
  localparam real PI = 3.14159265358979;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic                 coef_we = 1'b0;
  logic [$clog2(NA)-1:0] coef_waddr = '0;
  coef_t                coef_wdata = '0;
  logic                 start = 1'b0;
  logic [15:0]          cfg_ngroups = 16'(NGROUPS);
  logic [7:0]           cfg_nseg = 8'(RUN_NSEG), cfg_npsi = 8'(RUN_NPSI);
  logic                 busy, done;
  logic [N-1:0]         res_valid;
  logic [VOX_W-1:0]     res_x [N];
  logic [VOX_W-1:0]     res_y [N];
  logic [VOX_W-1:0]     res_z [N];
  logic signed [ACC_W-1:0] res_val [N];
  logic                 ext_rd;
  logic [22:0]          ext_addr;
  logic [WORD_W-1:0]    ext_rdata;

  bp3pa_top #(.N(N), .GX(GX), .GY(GY), .LAT(LAT)) dut (.*);

  // ---------------- synthetic sinogram ----------------
  function automatic logic [WORD_W-1:0] word_at(int unsigned addr);
    int unsigned h;
    h = addr * 32'h9E3779B1;
    h = h ^ (h >> 15);
    h = h * 32'h85EBCA77;
    h = h ^ (h >> 13);
    return {4'b0, h[27:16], 4'b0, h[11:0]};   // two bins in 0..4095
  endfunction

  always_ff @(posedge clk) if (ext_rd) ext_rdata <= word_at(32'(ext_addr));

  function automatic int bin_at(int a, int u, int v);
    logic [WORD_W-1:0] w;
    if (u < 0 || u >= NU || v < 0 || v >= NV) return 0;
    w = word_at(32'((a * NV + v) * NUP + u / 2));
    return (u % 2 == 0) ? int'($signed(w[15:0])) : int'($signed(w[31:16]));
  endfunction

  // ---------------- coefficients ----------------
  coef_t coefs [NA];

  function automatic coef_t make_coef(int s, int p);
    real psi, c, sn, t, xc, yc;
    coef_t k;
    psi = PI * real'(p) / real'(NPSI);
    c = $cos(psi); sn = $sin(psi);
    case (s)
      0: t = 0.0;  1: t = 0.04; 2: t = -0.04; 3: t = 0.08; default: t = -0.08;
    endcase
    xc = 64.0; yc = 64.0;
    k.a00 = COEF_W'($rtoi(c * 4096.0));
    k.a01 = COEF_W'($rtoi(sn * 4096.0));
    k.a03 = COEF_W'($rtoi((real'(NU) / 2.0 - (xc * c + yc * sn)) * 4096.0));
    k.a10 = COEF_W'($rtoi(t * sn * 4096.0));
    k.a11 = COEF_W'($rtoi(-t * c * 4096.0));
    k.a12 = COEF_W'(4096);
    k.a13 = COEF_W'($rtoi(-t * (xc * sn - yc * c) * 4096.0));
    k.jac = JAC_W'($rtoi($sqrt(1.0 + t * t) * 16384.0));
    return k;
  endfunction

  // ---------------- reference back-projection ----------------
  function automatic int ref_voxel(int x, int y, int z);
    int acc;
    acc = 0;
    for (int s = 0; s < RUN_NSEG; s++)
      for (int p = 0; p < RUN_NPSI; p++) begin
        coef_t k;
        longint uf, vf, sum, m;
        int u0, v0, du, dv, a;
        a = s * NPSI + p;
        k = coefs[a];
        uf = longint'(k.a00) * x + longint'(k.a01) * y + longint'(k.a03);
        vf = longint'(k.a10) * x + longint'(k.a11) * y + longint'(k.a12) * z + longint'(k.a13);
        u0 = int'(uf >>> 12);  du = int'((uf >>> 4) & 255);
        v0 = int'(vf >>> 12);  dv = int'((vf >>> 4) & 255);
        sum = longint'(bin_at(a, u0, v0)) * ((256 - du) * (256 - dv))
            + longint'(bin_at(a, u0 + 1, v0)) * (du * (256 - dv))
            + longint'(bin_at(a, u0, v0 + 1)) * ((256 - du) * dv)
            + longint'(bin_at(a, u0 + 1, v0 + 1)) * (du * dv);
        m = sum * longint'(k.jac);
        acc = acc + int'(m >>> 26);
      end
    return acc;
  endfunction

  // ---------------- checking ----------------
  int checks = 0, failures = 0;
  longint cycles = 0, run_cycles = 0;
  int results = 0;
  bit seen [VOL_X][VOL_Y][64];

  // mechanism counters
  longint n_stall = 0, n_leaf_miss = 0, n_leaf_pref = 0, n_leaf_move = 0;
  longint n_root_miss = 0, n_root_pref = 0, n_root_move = 0, n_outside = 0;
  longint n_angle = 0, n_group = 0;

  always @(posedge clk) begin
    cycles <= cycles + 1;
    if (busy) run_cycles <= run_cycles + 1;
    if (dut.g_unit[0].ev_stall) n_stall++;
    if (dut.g_unit[0].ev_miss) n_leaf_miss++;
    if (dut.g_unit[0].ev_prefetch) n_leaf_pref++;
    if (dut.g_unit[0].ev_move) n_leaf_move++;
    if (dut.root_miss) n_root_miss++;
    if (dut.root_prefetch) n_root_pref++;
    if (dut.root_move) n_root_move++;
    if (dut.g_unit[0].lk_valid && dut.g_unit[0].lk_ready && dut.g_unit[0].lk_need != 4'hF)
      n_outside++;
    if (dut.u_fsm.state == 2'd2) begin
      n_angle++;
      if (dut.u_fsm.psi == 8'(RUN_NPSI - 1) && dut.u_fsm.seg == 8'(RUN_NSEG - 1)) n_group++;
    end
    for (int k = 0; k < N; k++)
      if (rst_n && res_valid[k]) begin
        int expv;
        expv = ref_voxel(int'(res_x[k]), int'(res_y[k]), int'(res_z[k]));
        checks++;
        results++;
        if (seen[res_x[k]][res_y[k]][res_z[k]]) begin
          failures++;
          $display("voxel (%0d,%0d,%0d) emitted twice", res_x[k], res_y[k], res_z[k]);
        end
        seen[res_x[k]][res_y[k]][res_z[k]] = 1'b1;
        if (res_val[k] !== expv) begin
          failures++;
          if (failures < 10)
            $display("unit %0d voxel (%0d,%0d,%0d): got %0d expected %0d", k,
                     res_x[k], res_y[k], res_z[k], res_val[k], expv);
        end
      end
  end

  task automatic need(string what, longint n);
    checks++;
    $display("  %-34s %0d", what, n);
    if (n == 0) begin
      failures++;
      $display("  mechanism never exercised: %s", what);
    end
  endtask

  initial begin
    repeat (WATCHDOG) @(posedge clk);
    failures++;
    $display("watchdog expired after %0d cycles", WATCHDOG);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real cpo;
    longint ops;
    for (int s = 0; s < NSEG; s++)
      for (int p = 0; p < NPSI; p++) coefs[s * NPSI + p] = make_coef(s, p);
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int a = 0; a < NA; a++) begin
      @(negedge clk);
      coef_we = 1'b1; coef_waddr = $clog2(NA)'(a); coef_wdata = coefs[a];
    end
    @(negedge clk) coef_we = 1'b0;
    start = 1'b1;
    @(negedge clk) start = 1'b0;
    wait (done);
    repeat (3) @(posedge clk);

    // every voxel of every group must have come out once
    checks++;
    if (results != NGROUPS * N * BLK) begin
      failures++;
      $display("got %0d voxel results, expected %0d", results, NGROUPS * N * BLK);
    end
    ops = longint'(NGROUPS) * N * BLK * RUN_NSEG * RUN_NPSI;
    cpo = real'(run_cycles) * N / real'(ops);
    $display("run: %0d cycles for %0d voxel updates on %0d units: %0.3f cycles/update/unit, %0.3f cycles/update overall",
             run_cycles, ops, N, cpo, real'(run_cycles) / real'(ops));
    checks++;
    if (cpo > MAX_CPO) begin
      failures++;
      $display("throughput below the expected bound of %0.2f cycles/update/unit", MAX_CPO);
    end
    $display("mechanisms (unit 0 and root):");
    need("pipeline freeze cycles", n_stall);
    need("leaf demand misses", n_leaf_miss);
    need("leaf prefetched words", n_leaf_pref);
    need("leaf zone moves", n_leaf_move);
    need("root demand misses", n_root_miss);
    need("root prefetched lines", n_root_pref);
    need("root zone moves", n_root_move);
    need("lookups with bins outside sinogram", n_outside);
    need("angle steps", n_angle);
    need("block groups finished", n_group);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
