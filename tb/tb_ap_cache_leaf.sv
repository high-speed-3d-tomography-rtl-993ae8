// tb_ap_cache_leaf: the leaf cache against a model of the next level that
// answers word requests in order after 1 to 4 cycles with a hash of the word
// coordinate. Lookups walk a drifting 2x2 window through several angle
// planes, as a BP block does; each lookup is held until lk_ready and its
// needed bins are compared with the hash. Misses, prefetches and zone moves
// must all occur, and at least half the lookups must hit at once.
// Four concurrent bins per lookup and the prefetch-on-move behaviour follow the
// document; the access pattern, the next-level model and the hit-rate bound
// are this testbench's choices.
module tb_ap_cache_leaf;
  import bp_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic lk_valid = 0, lk_ready;
  crd_t lk_a = '0, lk_u0 = '0, lk_v0 = '0;
  logic [3:0] lk_need = '0;
  logic [BIN_W-1:0] lk_bins [4];
  logic req_valid, req_ready, rsp_valid = 0;
  wcoord_t req_crd, rsp_crd = '0;
  logic [WORD_W-1:0] rsp_data = '0;
  logic ev_miss, ev_prefetch, ev_move;
  int checks = 0, failures = 0;
  int n_miss = 0, n_pref = 0, n_move = 0, n_first_hit = 0, n_lookups = 0;

  ap_cache_leaf dut (.*);

  function automatic logic [WORD_W-1:0] word_of(wcoord_t w);
    int unsigned h;
    h = (int'(w.a) * 7919 + int'(w.up) * 104729 + int'(w.v) * 1299709) * 32'h9E3779B1;
    return h ^ (h >> 16);
  endfunction

  // next level: in-order responses after a random delay
  wcoord_t q_crd [$];
  int      q_due [$];
  int      cyc = 0;
  logic rdy = 1;
  assign req_ready = rdy;
  always @(negedge clk) rdy <= ($urandom_range(0, 3) != 0);
  always @(posedge clk) begin
    cyc++;
    if (req_valid && req_ready) begin
      q_crd.push_back(req_crd);
      q_due.push_back(cyc + $urandom_range(1, 4));
    end
    rsp_valid <= 0;
    if (q_due.size() > 0 && q_due[0] <= cyc) begin
      rsp_valid <= 1;
      rsp_crd   <= q_crd[0];
      rsp_data  <= word_of(q_crd[0]);
      void'(q_crd.pop_front());
      void'(q_due.pop_front());
    end
    if (ev_miss) n_miss++;
    if (ev_prefetch) n_pref++;
    if (ev_move) n_move++;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int a = 3; a < 9; a++)
      for (int i = 0; i < 300; i++) begin
        int wait_cycles;
        @(negedge clk);
        lk_valid = 1;
        lk_a  = crd_t'(a);
        lk_u0 = crd_t'(60 + 2 * a + $urandom_range(0, 9));
        lk_v0 = crd_t'(30 - a + $urandom_range(0, 7));
        lk_need = ($urandom_range(0, 9) == 0) ? 4'($urandom_range(0, 15)) : 4'hF;
        wait_cycles = 0;
        #1;
        while (!lk_ready) begin
          @(negedge clk);
          #1;
          wait_cycles++;
        end
        n_lookups++;
        if (wait_cycles == 0) n_first_hit++;
        for (int b = 0; b < 4; b++)
          if (lk_need[b]) begin
            wcoord_t w;
            logic [WORD_W-1:0] d;
            int u, v;
            u = int'(lk_u0) + b % 2;
            v = int'(lk_v0) + b / 2;
            w.a = lk_a; w.up = crd_t'(u >>> 1); w.v = crd_t'(v);
            d = word_of(w);
            checks++;
            if (lk_bins[b] !== (u % 2 == 0 ? d[15:0] : d[31:16])) begin
              failures++;
              if (failures < 6) $display("a=%0d u=%0d v=%0d: got %h", a, u, v, lk_bins[b]);
            end
          end
      end
    @(negedge clk) lk_valid = 0;
    $display("lookups %0d, hit at once %0d, misses %0d, prefetches %0d, zone moves %0d",
             n_lookups, n_first_hit, n_miss, n_pref, n_move);
    checks++;
    if (n_miss == 0 || n_pref == 0 || n_move == 0 || n_first_hit * 2 < n_lookups) begin
      failures++;
      $display("a mechanism did not occur or the hit rate is too low");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
