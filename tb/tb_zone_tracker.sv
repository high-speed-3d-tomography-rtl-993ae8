// tb_zone_tracker: drives references that jump between targets and compares
// the zone origin, cycle by cycle, with a behavioural model of the sampled
// first-order low-pass mean, the guard zone and the speed limit.
// The five tracking parameters come from the document; the exact filter and
// move rule checked here are this design's (see zone_tracker).
module tb_zone_tracker;
  import bp_pkg::*;
  localparam int HALF = 8, GUARD = 2, SPEED = 3, K = 2, S = 2;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic ref_valid = 0;
  crd_t ref_crd = '0, origin;
  logic moved;
  int checks = 0, failures = 0, n_moves = 0, n_clamped = 0;

  zone_tracker #(.ZSIZE(16), .HALF(HALF), .GUARD(GUARD), .SPEED(SPEED),
                 .K_CUT(K), .S_LOG2(S)) dut (.*);

  // model state
  longint m_mean;   // 8 fractional bits
  int m_org, m_cnt;
  bit m_moved;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int targets [4] = '{40, -20, 100, 97};
    m_mean = HALF * 256; m_org = 0; m_cnt = 0; m_moved = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 4; t++)
      for (int i = 0; i < 300; i++) begin
        @(negedge clk);
        // compare with the model state reached at the previous edge
        checks++;
        if (int'(origin) != m_org || moved != m_moved) begin
          failures++;
          if (failures < 5) $display("t=%0d i=%0d origin %0d model %0d moved %0d/%0d",
                                     t, i, origin, m_org, moved, m_moved);
        end
        ref_valid = ($urandom_range(0, 3) != 0);
        ref_crd   = crd_t'(targets[t] + $urandom_range(0, 2) - 1);
        // model the next edge
        begin
          longint mi, diff, step, nmean;
          mi = (m_mean + 128) >>> 8;
          diff = mi - m_org - HALF;
          step = diff > SPEED ? SPEED : (diff < -SPEED ? -SPEED : diff);
          nmean = m_mean;
          if (ref_valid && (m_cnt % 4 == 0))
            nmean = m_mean + (((longint'(ref_crd) <<< 8) - m_mean) >>> K);
          if (ref_valid) m_cnt++;
          m_moved = 0;
          if (diff > GUARD || diff < -GUARD) begin
            m_org = m_org + int'(step);
            m_moved = 1;
            n_moves++;
            if (step != diff) n_clamped++;
          end
          m_mean = nmean;
        end
      end
    // after the last target the zone must hold it near its middle
    @(negedge clk);
    checks++;
    if (97 - int'(origin) - HALF > GUARD + 1 || 97 - int'(origin) - HALF < -GUARD - 1) begin
      failures++;
      $display("zone did not settle: origin %0d", origin);
    end
    checks++;
    if (n_moves == 0 || n_clamped == 0) begin
      failures++;
      $display("moves %0d clamped %0d", n_moves, n_clamped);
    end
    $display("moves %0d, speed-limited moves %0d", n_moves, n_clamped);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
