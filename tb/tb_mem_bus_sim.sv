// tb_mem_bus_sim: issues line requests back to back and with gaps, serves the
// external port from a hash of the address, and checks every word's data,
// coordinate and arrival cycle: the first word LAT+1 cycles after the
// request is accepted, then one word every BEAT cycles, and the bus busy for
// 1 + LAT + (LINE-1)*BEAT cycles per line (eq. (8) rounded up).
// The timing rule is the document's eq. (8); the line size and the word
// address layout checked are this design's.
module tb_mem_bus_sim;
  import bp_pkg::*;
  localparam int LAT = 5, BEAT = 2, LINE = 4, NUP = 144, NV = 63;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic mreq_valid = 0, mreq_ready, mrsp_valid, mrsp_last, ext_rd;
  wcoord_t mreq_crd = '0, mrsp_crd;
  logic [WORD_W-1:0] mrsp_data, ext_rdata = '0;
  logic [22:0] ext_addr;
  int checks = 0, failures = 0;

  mem_bus_sim #(.LAT(LAT), .BEAT(BEAT), .LINE(LINE), .NUP(NUP), .NV(NV)) dut (.*);

  function automatic logic [WORD_W-1:0] h(int unsigned x);
    return x * 32'h9E3779B1 ^ 32'h5bd1e995;
  endfunction
  always @(posedge clk) if (ext_rd) ext_rdata <= h(ext_addr);

  int cyc = 0;
  always @(posedge clk) cyc++;

  // expected word stream
  int exp_cyc [$];
  wcoord_t exp_crd [$];
  always @(posedge clk) if (rst_n) begin
    if (mreq_valid && mreq_ready)
      for (int i = 0; i < LINE; i++) begin
        wcoord_t w;
        w = mreq_crd; w.up = mreq_crd.up + crd_t'(i);
        exp_cyc.push_back(cyc + 1 + LAT + i * BEAT);
        exp_crd.push_back(w);
      end
    if (mrsp_valid) begin
      checks++;
      if (exp_cyc.size() == 0) begin failures++; $display("unexpected word"); end
      else begin
        int ad;
        ad = (int'(exp_crd[0].a) * NV + int'(exp_crd[0].v)) * NUP + int'(exp_crd[0].up);
        if (cyc != exp_cyc[0] || mrsp_crd != exp_crd[0] || mrsp_data != h(ad) ||
            mrsp_last != (exp_cyc.size() % LINE == 1)) begin
          failures++;
          $display("word at cycle %0d (expected %0d) crd ok %0d data ok %0d", cyc, exp_cyc[0],
                   mrsp_crd == exp_crd[0], mrsp_data == h(ad));
        end
        void'(exp_cyc.pop_front());
        void'(exp_crd.pop_front());
      end
    end
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t0, busy_cycles;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 20; n++) begin
      mreq_valid = 1;
      mreq_crd.a = crd_t'($urandom_range(0, 479));
      mreq_crd.v = crd_t'($urandom_range(0, 62));
      mreq_crd.up = crd_t'(4 * $urandom_range(0, 35));
      t0 = cyc;
      @(posedge clk);
      while (!mreq_ready) @(posedge clk);
      @(negedge clk);
      mreq_valid = 0;
      busy_cycles = 0;
      while (!mreq_ready) begin @(negedge clk); busy_cycles++; end
      checks++;
      if (busy_cycles != LAT + (LINE - 1) * BEAT) begin   // plus the request cycle
        failures++;
        $display("line kept the bus %0d cycles", busy_cycles);
      end
      if (n % 3 == 0) repeat ($urandom_range(0, 4)) @(negedge clk);
    end
    repeat (30) @(negedge clk);
    checks++;
    if (exp_cyc.size() != 0) begin failures++; $display("words missing"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
