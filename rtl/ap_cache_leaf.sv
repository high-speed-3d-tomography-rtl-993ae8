// ap_cache_leaf: the 3D-AP cache that sits next to one BP pipeline.
//
// It holds a zone of the sinogram of ZP angle planes x ZU bins x ZV planes
// and serves the four bins of a bilinear interpolation in the same cycle.
// Following the document's bin-to-buffer mapping, the zone is split into four
// banks by the parity of the bin coordinates: bank = {v[0], u[0]}. Any 2x2
// square of bins then touches every bank exactly once, so the four reads
// never conflict. Inside a bank the entry is chosen modulo the zone size
// (a mod ZP, (v>>1) mod ZV/2, (u>>1) mod ZU/2), so when the zone slides only
// the entries that leave it are overwritten and the bins shared by the old
// and the new zone stay readable. Each entry keeps the full word coordinate
// as its tag, which makes a hit exact whatever the history of the zone.
//
// Prediction is done by ap_zone_ctrl from the served references; the walker's
// words that are not yet present are requested from the next level (the root
// cache). A lookup that misses needed bins starts the demand path: prefetch
// pauses, the missing words (at most four, fewer when two bins share a word)
// are requested, and the cache waits until every outstanding word has come
// back, after which the lookup hits. This keeps a late prefetch from
// overwriting a demand word before it is used.
//
// Interfaces: lookup is combinational (lk_* in, lk_bins/lk_ready out in the
// same cycle); lk_need marks the bins that lie inside the sinogram. Lower
// port: req_valid/req_ready/req_crd, responses rsp_valid/rsp_crd/rsp_data,
// in order, always accepted; a word holds bins u=2*up (low half) and 2*up+1.
// Following the document: 4 concurrent accesses, parity banking, 2 KB of
// bins (4 x 16 x 16 x 16 bit). This design's choices: tags, modulo placement,
// the blocking demand path.
module ap_cache_leaf
  import bp_pkg::*;
#(
  parameter int ZP     = 4,
  parameter int ZU     = 16,      // bins along u (even)
  parameter int ZV     = 16,      // planes along v (even)
  parameter int NA     = 480,     // angle indices in the sinogram (segments x angles)
  parameter int NUP    = 144,     // words along u (bins / 2)
  parameter int NV     = 63,      // planes
  parameter int K_CUT  = 4,
  parameter int S_LOG2 = 2
) (
  input  logic              clk,
  input  logic              rst_n,
  // lookup from the memory bridge
  input  logic              lk_valid,
  input  crd_t              lk_a,
  input  crd_t              lk_u0,
  input  crd_t              lk_v0,
  input  logic [3:0]        lk_need,
  output logic [BIN_W-1:0]  lk_bins [4],   // (u0,v0) (u0+1,v0) (u0,v0+1) (u0+1,v0+1)
  output logic              lk_ready,
  // next level
  output logic              req_valid,
  input  logic              req_ready,
  output wcoord_t           req_crd,
  input  logic              rsp_valid,
  input  wcoord_t           rsp_crd,
  input  logic [WORD_W-1:0] rsp_data,
  // events
  output logic              ev_miss,
  output logic              ev_prefetch,
  output logic              ev_move
);
  localparam int IA = $clog2(ZP);
  localparam int IV = $clog2(ZV / 2);
  localparam int IU = $clog2(ZU / 2);
  localparam int NE = ZP * (ZV / 2) * (ZU / 2);
  localparam int IW = IA + IV + IU;

  function automatic logic [IW-1:0] idx_of(wcoord_t w);
    logic [CRD_W-1:0] a, vh, up;
    a  = w.a;
    vh = w.v >>> 1;
    up = w.up;
    return {a[IA-1:0], vh[IV-1:0], up[IU-1:0]};
  endfunction

  function automatic logic in_range(wcoord_t w);
    return (w.a >= 0) && (w.a < crd_t'(NA)) && (w.up >= 0) && (w.up < crd_t'(NUP)) &&
           (w.v >= 0) && (w.v < crd_t'(NV));
  endfunction

  // ---------------- storage: four bin banks ----------------
  logic [BIN_W-1:0] bank_data [4][NE];
  wcoord_t          bank_tag  [4][NE];
  logic [NE-1:0]    bank_vld  [4];

  // ---------------- lookup ----------------
  wcoord_t    bw [4];      // word coordinate read from each bank
  logic [3:0] bhit;
  logic [3:0] bneed;
  logic [BIN_W-1:0] bdat [4];

  always_comb begin
    for (int b = 0; b < 4; b++) begin
      logic [1:0] off;
      crd_t ub, vb;
      off[0] = b[0] ^ lk_u0[0];
      off[1] = b[1] ^ lk_v0[0];
      ub = lk_u0 + crd_t'(off[0]);
      vb = lk_v0 + crd_t'(off[1]);
      bw[b].a  = lk_a;
      bw[b].up = ub >>> 1;
      bw[b].v  = vb;
      bneed[b] = lk_need[off];
      bdat[b]  = bank_data[b][idx_of(bw[b])];
      bhit[b]  = bank_vld[b][idx_of(bw[b])] && (bank_tag[b][idx_of(bw[b])] == bw[b]);
    end
    for (int i = 0; i < 4; i++) begin
      logic [1:0] bsel;
      bsel[0] = i[0] ^ lk_u0[0];
      bsel[1] = i[1] ^ lk_v0[0];
      lk_bins[i] = bdat[bsel];
    end
  end

  assign lk_ready = &(bhit | ~bneed);

  // ---------------- prediction ----------------
  logic    cand_valid, cand_next, walking;
  wcoord_t cand;
  crd_t    org_a, org_u, org_v;
  logic    cand_present;

  ap_zone_ctrl #(.ZP(ZP), .ZV(ZV), .ZW(ZU / 2), .USTEP(1),
                 .HALF_A(1), .HALF_U(ZU / 2), .HALF_V(ZV / 2),
                 .GUARD_A(0), .GUARD_U(2), .GUARD_V(2),
                 .SPEED_A(ZP), .SPEED_U(ZU), .SPEED_V(ZV),
                 .K_CUT(K_CUT), .S_LOG2(S_LOG2)) u_zone (
    .clk, .rst_n,
    .ref_valid (lk_valid && lk_ready),
    .ref_a     (lk_a),
    .ref_u     (lk_u0),
    .ref_v     (lk_v0),
    .cand_valid, .cand, .cand_next, .walking,
    .zone_moved(ev_move),
    .org_a, .org_u, .org_v
  );

  assign cand_present = bank_vld[{cand.v[0], 1'b0}][idx_of(cand)] &&
                        (bank_tag[{cand.v[0], 1'b0}][idx_of(cand)] == cand);

  // ---------------- demand miss and request control ----------------
  typedef enum logic [1:0] {S_RUN, S_ISSUE, S_WAIT} state_t;
  state_t     state;
  logic [3:0] dm_mask;
  wcoord_t    dm_crd [4];
  logic [7:0] outstanding;
  logic [3:0] miss_now;
  logic [1:0] dm_sel;
  logic       req_fire;

  always_comb begin
    miss_now = bneed & ~bhit;
    // two bins of one row share a word when u0 is even: fetch it once
    if (bw[0] == bw[1] && miss_now[0]) miss_now[1] = 1'b0;
    if (bw[2] == bw[3] && miss_now[2]) miss_now[3] = 1'b0;
    dm_sel = 2'd0;
    for (int i = 3; i >= 0; i--) if (dm_mask[i]) dm_sel = 2'(i);
  end

  always_comb begin
    req_valid   = 1'b0;
    req_crd     = cand;
    cand_next   = 1'b0;
    ev_prefetch = 1'b0;
    if (state == S_ISSUE) begin
      req_valid = |dm_mask;
      req_crd   = dm_crd[dm_sel];
    end else if (state == S_RUN && cand_valid && !(lk_valid && !lk_ready)) begin
      if (cand_present || !in_range(cand)) cand_next = 1'b1;
      else begin
        req_valid   = 1'b1;
        cand_next   = req_ready;
        ev_prefetch = req_ready;
      end
    end
  end

  assign req_fire = req_valid && req_ready;
  assign ev_miss  = (state == S_RUN) && lk_valid && !lk_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= S_RUN;
      dm_mask     <= '0;
      outstanding <= '0;
      for (int b = 0; b < 4; b++) bank_vld[b] <= '0;
    end else begin
      outstanding <= outstanding + 8'(req_fire) - 8'(rsp_valid);
      case (state)
        S_RUN: if (lk_valid && !lk_ready) begin
          state   <= S_ISSUE;
          dm_mask <= miss_now;
          for (int b = 0; b < 4; b++) dm_crd[b] <= bw[b];
        end
        S_ISSUE: begin
          if (req_fire) dm_mask[dm_sel] <= 1'b0;
          if (dm_mask == '0 || (req_fire && (dm_mask & ~(4'b1 << dm_sel)) == '0))
            state <= S_WAIT;
        end
        S_WAIT: if (outstanding == 8'(rsp_valid)) state <= S_RUN;
        default: state <= S_RUN;
      endcase
      if (rsp_valid) begin
        bank_vld[{rsp_crd.v[0], 1'b0}][idx_of(rsp_crd)] <= 1'b1;
        bank_vld[{rsp_crd.v[0], 1'b1}][idx_of(rsp_crd)] <= 1'b1;
      end
    end
  end

  // bank contents (no reset: an entry is read only once its valid bit is set)
  always_ff @(posedge clk) begin
    if (rsp_valid) begin
      bank_data[{rsp_crd.v[0], 1'b0}][idx_of(rsp_crd)] <= rsp_data[BIN_W-1:0];
      bank_data[{rsp_crd.v[0], 1'b1}][idx_of(rsp_crd)] <= rsp_data[WORD_W-1:BIN_W];
      bank_tag [{rsp_crd.v[0], 1'b0}][idx_of(rsp_crd)] <= rsp_crd;
      bank_tag [{rsp_crd.v[0], 1'b1}][idx_of(rsp_crd)] <= rsp_crd;
    end
  end
endmodule
