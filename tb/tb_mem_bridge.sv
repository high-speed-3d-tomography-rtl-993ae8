// tb_mem_bridge: the memory bridge stage with random inputs. Every cycle it
// checks the lookup it sends to the cache (integer part of u and v by floor,
// the in-sinogram mask of the four bins, the angle index), the stall output,
// and that the registered outputs take the previous cycle's values when the
// stage is enabled (weights from the fraction, bins outside the sinogram
// zeroed) and hold them when it is frozen.
// Four bins per cycle and the freeze follow the document; the floor rule, the
// 8-bit weights and the zeroing outside the sinogram are this design's.
module tb_mem_bridge;
  import bp_pkg::*;
  localparam int NU = 40, NV = 12;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic en, in_valid, stall, lk_valid, lk_ready, out_valid;
  vox_req_t in_req, out_req;
  logic signed [31:0] in_u, in_v;
  logic [JAC_W-1:0] in_jac, out_jac;
  crd_t lk_a, lk_u0, lk_v0;
  logic [3:0] lk_need;
  logic [BIN_W-1:0] lk_bins [4];
  logic signed [BIN_W-1:0] out_bins [4];
  logic [WGT_F-1:0] out_du, out_dv;

  mem_bridge #(.NU(NU), .NV(NV)) dut (.*);

  int checks = 0, failures = 0, n_freeze = 0, n_out = 0;

  task automatic randomize_inputs();
    en = ($urandom_range(0, 3) != 0);
    in_valid = $urandom_range(0, 4) != 0;
    lk_ready = $urandom_range(0, 3) != 0;
    in_req = vox_req_t'({$urandom, $urandom, $urandom});
    in_u = $signed($urandom_range(0, (NU + 4) * 4096)) - 2 * 4096;
    in_v = $signed($urandom_range(0, (NV + 4) * 4096)) - 2 * 4096;
    in_jac = JAC_W'($urandom);
    for (int i = 0; i < 4; i++) lk_bins[i] = BIN_W'($urandom);
  endtask

  // values expected on the registered outputs
  logic e_valid = 0;
  vox_req_t e_req;
  logic [JAC_W-1:0] e_jac;
  logic [WGT_F-1:0] e_du, e_dv;
  logic [BIN_W-1:0] e_bins [4];
  bit known = 0;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    randomize_inputs();
    repeat (2) @(negedge clk);
    rst_n = 1;
    repeat (3000) begin
      int u0, v0;
      logic [3:0] need;
      @(negedge clk);
      // registered outputs
      checks++;
      if (out_valid !== e_valid || (known && e_valid &&
          (out_req !== e_req || out_jac !== e_jac || out_du !== e_du || out_dv !== e_dv ||
           out_bins[0] !== e_bins[0] || out_bins[1] !== e_bins[1] ||
           out_bins[2] !== e_bins[2] || out_bins[3] !== e_bins[3]))) begin
        failures++;
        if (failures < 10) $display("registered outputs differ at %0t", $time);
      end
      if (out_valid) n_out++;
      randomize_inputs();
      #1;
      // combinational lookup
      u0 = int'(in_u >>> 12); v0 = int'(in_v >>> 12);
      for (int i = 0; i < 4; i++)
        need[i] = (u0 + i % 2 >= 0) && (u0 + i % 2 < NU) && (v0 + i / 2 >= 0) && (v0 + i / 2 < NV);
      checks++;
      if (lk_valid !== in_valid || lk_a !== in_req.a || int'(lk_u0) != u0 || int'(lk_v0) != v0 ||
          lk_need !== need || stall !== (in_valid && !lk_ready)) begin
        failures++;
        if (failures < 10) $display("lookup u=%0d v=%0d: got u0=%0d v0=%0d need=%b, expected %0d %0d %b",
                                    in_u, in_v, lk_u0, lk_v0, lk_need, u0, v0, need);
      end
      if (en) begin
        e_valid = in_valid; e_req = in_req; e_jac = in_jac;
        e_du = in_u[11:4]; e_dv = in_v[11:4];
        for (int i = 0; i < 4; i++) e_bins[i] = need[i] ? lk_bins[i] : '0;
        known = 1;
      end else n_freeze++;
    end
    checks++;
    if (n_freeze == 0 || n_out == 0) failures++;
    $display("frozen cycles %0d, valid outputs %0d", n_freeze, n_out);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
