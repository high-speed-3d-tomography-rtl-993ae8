// tb_ap_zone_ctrl: holds the references still until the zone settles, then
// checks that one walk lists every load unit of the zone exactly once and
// nothing outside it, with the mean's angle plane first. It then moves the
// references along the angle axis and checks that the walk restarts.
// Keeping shared data while the zone moves follows the document; the walk
// order checked is this design's.
module tb_ap_zone_ctrl;
  import bp_pkg::*;
  localparam int ZP = 4, ZV = 8, ZW = 4, USTEP = 2, HALF_A = 1, HALF_U = 8, HALF_V = 4;
  localparam int TOTAL = ZP * ZV * ZW;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic ref_valid = 0;
  crd_t ref_a = '0, ref_u = '0, ref_v = '0;
  logic cand_valid, cand_next = 0, walking, zone_moved;
  wcoord_t cand;
  crd_t org_a, org_u, org_v;
  int checks = 0, failures = 0;

  ap_zone_ctrl #(.ZP(ZP), .ZV(ZV), .ZW(ZW), .USTEP(USTEP), .HALF_A(HALF_A),
                 .HALF_U(HALF_U), .HALF_V(HALF_V)) dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic walk_and_check(int exp_first_a);
    int seen [string];
    int n;
    n = 0;
    // wait for a quiet zone, then collect one whole walk
    cand_next = 1;
    while (walking) begin
      @(negedge clk);
      if (cand_valid) begin
        string key;
        key = $sformatf("%0d_%0d_%0d", cand.a, cand.up, cand.v);
        if (n == 0) begin
          checks++;
          if (int'(cand.a) != exp_first_a) begin
            failures++;
            $display("walk starts at plane %0d, expected %0d", cand.a, exp_first_a);
          end
        end
        checks++;
        if (seen.exists(key)) begin failures++; $display("listed twice: %s", key); end
        seen[key] = 1;
        checks++;
        if (cand.a < org_a || cand.a >= org_a + ZP || cand.v < org_v || cand.v >= org_v + ZV ||
            cand.up < ((org_u >>> 1) & ~crd_t'(USTEP - 1)) ||
            cand.up >= ((org_u >>> 1) & ~crd_t'(USTEP - 1)) + ZW * USTEP ||
            (int'(cand.up) % USTEP) != 0) begin
          failures++;
          $display("outside zone: %s", key);
        end
        n++;
      end
    end
    checks++;
    if (n != TOTAL) begin failures++; $display("walk listed %0d units, expected %0d", n, TOTAL); end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    // settle on (a=10, u=50, v=20)
    ref_valid = 1; ref_a = 10; ref_u = 50; ref_v = 20;
    repeat (600) @(negedge clk);
    ref_valid = 0;
    @(negedge clk);
    checks++;
    // within the guard zones (0 along a, 2 along u and v)
    if (org_a != 10 - HALF_A || (50 - HALF_U - org_u) > 2 || (50 - HALF_U - org_u) < -2 ||
        (20 - HALF_V - org_v) > 2 || (20 - HALF_V - org_v) < -2) begin
      failures++;
      $display("zone origin (%0d,%0d,%0d)", org_a, org_u, org_v);
    end
    // the walk may still be running from the moves: restart it by one angle step
    ref_valid = 1; ref_a = 11;
    wait (zone_moved);
    ref_valid = 0;
    @(negedge clk);
    walk_and_check(11);
    checks++;
    if (walking) begin failures++; $display("walk did not stop"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
