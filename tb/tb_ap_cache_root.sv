// tb_ap_cache_root: the root cache with eight leaf ports, five of them
// active, against a line memory model (one line at a time, 3 to 6 cycles of
// latency, then one word per cycle, data a hash of the word coordinate).
// Every request must be answered exactly one cycle after it is accepted, on
// its own port, with the right coordinate and data. Misses, line prefetches
// and zone moves must all occur, and the round-robin must serve every
// active port.
// That a root cache feeds every leaf follows the document; the port count
// used, the line memory model and the timing checked are this design's.
module tb_ap_cache_root;
  import bp_pkg::*;
  localparam int N = 8, LINE = 8, NACT = 5;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [N-1:0] lreq_valid = '0, lreq_ready, lrsp_valid;
  wcoord_t lreq_crd [N];
  wcoord_t lrsp_crd;
  logic [WORD_W-1:0] lrsp_data;
  logic mreq_valid, mreq_ready, mrsp_valid = 0, mrsp_last = 0;
  wcoord_t mreq_crd, mrsp_crd = '0;
  logic [WORD_W-1:0] mrsp_data = '0;
  logic ev_miss, ev_prefetch, ev_move;
  int checks = 0, failures = 0, n_miss = 0, n_pref = 0, n_move = 0;
  int served [N];

  ap_cache_root #(.N(N), .LINE(LINE)) dut (.*);

  function automatic logic [WORD_W-1:0] word_of(wcoord_t w);
    int unsigned h;
    h = (int'(w.a) * 7919 + int'(w.up) * 104729 + int'(w.v) * 1299709) * 32'h9E3779B1;
    return h ^ (h >> 16);
  endfunction

  // line memory model
  typedef enum {M_IDLE, M_LAT, M_BURST} mst_t;
  mst_t mst = M_IDLE;
  int mcnt;
  wcoord_t mline;
  assign mreq_ready = (mst == M_IDLE);
  always @(posedge clk) begin
    mrsp_valid <= 0;
    mrsp_last  <= 0;
    case (mst)
      M_IDLE: if (rst_n && mreq_valid) begin
        mline <= mreq_crd; mcnt <= $urandom_range(3, 6); mst <= M_LAT;
        checks++;
        if (int'(mreq_crd.up) % LINE != 0) begin failures++; $display("unaligned line"); end
      end
      M_LAT: begin
        mcnt <= mcnt - 1;
        if (mcnt == 1) begin mcnt <= 0; mst <= M_BURST; end
      end
      M_BURST: begin
        wcoord_t w;
        w = mline; w.up = mline.up + crd_t'(mcnt);
        mrsp_valid <= 1; mrsp_crd <= w; mrsp_data <= word_of(w);
        mrsp_last <= (mcnt == LINE - 1);
        mcnt <= mcnt + 1;
        if (mcnt == LINE - 1) mst <= M_IDLE;
      end
    endcase
    if (ev_miss) n_miss++;
    if (ev_prefetch) n_pref++;
    if (ev_move) n_move++;
  end

  // leaf ports
  wcoord_t pend [N];
  bit      wait_rsp [N];
  int      a_now = 2;
  always @(posedge clk) begin
    for (int k = 0; k < N; k++) begin
      if (wait_rsp[k]) begin
        checks++;
        if (!lrsp_valid[k] || lrsp_crd != pend[k] || lrsp_data != word_of(pend[k])) begin
          failures++;
          if (failures < 6) $display("port %0d: bad response", k);
        end
        wait_rsp[k] = 0;
      end else if (rst_n && lrsp_valid[k]) begin
        failures++; $display("port %0d: response without request", k);
      end
      if (lreq_valid[k] && lreq_ready[k]) begin
        lreq_valid[k] = 0;
        wait_rsp[k] = 1;
        pend[k] = lreq_crd[k];
        served[k]++;
      end
    end
  end

  always @(negedge clk) if (rst_n)
    for (int k = 0; k < NACT; k++)
      if (!lreq_valid[k]) begin
        // once the previous word has been answered, maybe ask for another
        lreq_valid[k] = (wait_rsp[k] == 0) && ($urandom_range(0, 1) == 1);
        lreq_crd[k].a  = crd_t'(a_now + $urandom_range(0, 1));
        lreq_crd[k].up = crd_t'(40 + 3 * k + a_now + $urandom_range(0, 7));
        lreq_crd[k].v  = crd_t'(20 + $urandom_range(0, 9));
      end

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < N; k++) begin lreq_crd[k] = '0; served[k] = 0; wait_rsp[k] = 0; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int s = 0; s < 12; s++) begin
      repeat (1500) @(negedge clk);
      a_now++;
    end
    lreq_valid = '0;
    repeat (5) @(negedge clk);
    $display("misses %0d, line prefetches %0d, zone moves %0d", n_miss, n_pref, n_move);
    for (int k = 0; k < NACT; k++) begin
      checks++;
      if (served[k] == 0) begin failures++; $display("port %0d never served", k); end
    end
    checks++;
    if (n_miss == 0 || n_pref == 0 || n_move == 0) begin
      failures++; $display("a mechanism did not occur");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
