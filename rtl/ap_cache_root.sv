// ap_cache_root: the root level of the hierarchical 3D-AP cache.
//
// All leaf caches fetch from this cache instead of from external memory.
// Because the pipelines reconstruct neighbouring blocks and share the loop
// over angles, the words they need overlap, and the root zone holds their
// union: ZP angle planes x 2*ZUP bins x ZV planes, stored one memory word per
// entry at index (a mod ZP, v mod ZV, up mod ZUP) with the full word
// coordinate as tag. Its own zone_trackers follow the mean of the words the
// leaves ask for, and its walker loads whole memory lines of LINE words, so
// external memory is read in bursts as the document's memory model assumes.
//
// One leaf request is served per cycle, chosen round-robin. A hit answers the
// next cycle. A miss blocks the root: it requests the missing line ahead of
// any prefetch, waits until every line in flight has arrived and then serves
// the request again, which now hits.
//
// Interfaces: per leaf lreq_valid/lreq_ready/lreq_crd; responses lrsp_valid
// (one bit per leaf) with a shared lrsp_crd/lrsp_data. Memory side: line
// requests mreq_valid/mreq_ready/mreq_crd (first word of the line) and word
// responses mrsp_valid/mrsp_crd/mrsp_data/mrsp_last, in order.
// Following the document: a root cache feeding every leaf, sized near its
// 18 KB (16 KB of words here, powers of two). This design's choices: tags,
// round-robin, blocking miss, line size.
module ap_cache_root
  import bp_pkg::*;
#(
  parameter int N      = 8,       // number of leaf caches
  parameter int ZP     = 4,
  parameter int ZUP    = 32,      // words along u (64 bins)
  parameter int ZV     = 32,
  parameter int LINE   = 8,       // words per memory line
  parameter int NA     = 480,
  parameter int NUP    = 144,
  parameter int NV     = 63,
  parameter int K_CUT  = 4,
  parameter int S_LOG2 = 2
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [N-1:0]      lreq_valid,
  output logic [N-1:0]      lreq_ready,
  input  wcoord_t           lreq_crd [N],
  output logic [N-1:0]      lrsp_valid,
  output wcoord_t           lrsp_crd,
  output logic [WORD_W-1:0] lrsp_data,
  output logic              mreq_valid,
  input  logic              mreq_ready,
  output wcoord_t           mreq_crd,
  input  logic              mrsp_valid,
  input  wcoord_t           mrsp_crd,
  input  logic [WORD_W-1:0] mrsp_data,
  input  logic              mrsp_last,
  output logic              ev_miss,
  output logic              ev_prefetch,
  output logic              ev_move
);
  localparam int IA = $clog2(ZP);
  localparam int IV = $clog2(ZV);
  localparam int IU = $clog2(ZUP);
  localparam int NE = ZP * ZV * ZUP;
  localparam int IW = IA + IV + IU;
  localparam int GW = (N > 1) ? $clog2(N) : 1;

  initial assert (ZUP % LINE == 0 && NUP % LINE == 0)
    else $error("zone width and sinogram width must hold whole lines");

  function automatic logic [IW-1:0] idx_of(wcoord_t w);
    logic [CRD_W-1:0] a, v, up;
    a = w.a; v = w.v; up = w.up;
    return {a[IA-1:0], v[IV-1:0], up[IU-1:0]};
  endfunction

  function automatic logic in_range(wcoord_t w);
    return (w.a >= 0) && (w.a < crd_t'(NA)) && (w.up >= 0) && (w.up < crd_t'(NUP)) &&
           (w.v >= 0) && (w.v < crd_t'(NV));
  endfunction

  function automatic wcoord_t line_of(wcoord_t w);
    wcoord_t l;
    l    = w;
    l.up = w.up & ~crd_t'(LINE - 1);
    return l;
  endfunction

  logic [WORD_W-1:0] mem_data [NE];
  wcoord_t           mem_tag  [NE];
  logic [NE-1:0]     mem_vld;

  // ---------------- arbitration and lookup ----------------
  logic [GW-1:0] rr, gnt;
  logic          any_req;
  wcoord_t       gcrd;
  logic          ghit;

  always_comb begin
    any_req = 1'b0;
    gnt     = rr;
    for (int k = N - 1; k >= 0; k--)
      if (lreq_valid[(int'(rr) + k) % N]) begin
        any_req = 1'b1;
        gnt     = GW'((int'(rr) + k) % N);
      end
    gcrd = lreq_crd[gnt];
    ghit = mem_vld[idx_of(gcrd)] && (mem_tag[idx_of(gcrd)] == gcrd);
  end

  typedef enum logic [1:0] {S_SERVE, S_ISSUE, S_WAIT} state_t;
  state_t     state;
  wcoord_t    miss_line;
  logic [3:0] lines_out;
  logic       serve_hit;

  assign serve_hit = (state == S_SERVE) && any_req && ghit;
  assign ev_miss   = (state == S_SERVE) && any_req && !ghit;

  always_comb begin
    lreq_ready = '0;
    if (serve_hit) lreq_ready[gnt] = 1'b1;
  end

  // ---------------- prediction ----------------
  logic    cand_valid, cand_next, walking;
  wcoord_t cand;
  crd_t    org_a, org_u, org_v;
  logic    cand_present;

  ap_zone_ctrl #(.ZP(ZP), .ZV(ZV), .ZW(ZUP / LINE), .USTEP(LINE),
                 .HALF_A(1), .HALF_U(ZUP), .HALF_V(ZV / 2),
                 .GUARD_A(0), .GUARD_U(4), .GUARD_V(4),
                 .SPEED_A(ZP), .SPEED_U(2 * ZUP), .SPEED_V(ZV),
                 .K_CUT(K_CUT), .S_LOG2(S_LOG2)) u_zone (
    .clk, .rst_n,
    .ref_valid (serve_hit),
    .ref_a     (gcrd.a),
    .ref_u     (crd_t'(gcrd.up <<< 1)),
    .ref_v     (gcrd.v),
    .cand_valid, .cand, .cand_next, .walking,
    .zone_moved(ev_move),
    .org_a, .org_u, .org_v
  );

  assign cand_present = mem_vld[idx_of(cand)] && (mem_tag[idx_of(cand)] == cand);

  always_comb begin
    mreq_valid  = 1'b0;
    mreq_crd    = cand;
    cand_next   = 1'b0;
    ev_prefetch = 1'b0;
    if (state == S_ISSUE) begin
      mreq_valid = 1'b1;
      mreq_crd   = miss_line;
    end else if (state == S_SERVE && cand_valid && !ev_miss) begin
      if (cand_present || !in_range(cand)) cand_next = 1'b1;
      else begin
        mreq_valid  = 1'b1;
        cand_next   = mreq_ready;
        ev_prefetch = mreq_ready;
      end
    end
  end

  logic mreq_fire, line_done;
  assign mreq_fire = mreq_valid && mreq_ready;
  assign line_done = mrsp_valid && mrsp_last;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_SERVE;
      rr         <= '0;
      lines_out  <= '0;
      mem_vld    <= '0;
      lrsp_valid <= '0;
      miss_line  <= '0;
    end else begin
      lines_out  <= lines_out + 4'(mreq_fire) - 4'(line_done);
      lrsp_valid <= '0;
      case (state)
        S_SERVE: begin
          if (serve_hit) begin
            lrsp_valid[gnt] <= 1'b1;
            rr <= (int'(gnt) == N - 1) ? '0 : gnt + 1'b1;
          end else if (ev_miss) begin
            miss_line <= line_of(gcrd);
            state     <= S_ISSUE;
          end
        end
        S_ISSUE: if (mreq_ready) state <= S_WAIT;
        S_WAIT:  if (lines_out == 4'(line_done)) state <= S_SERVE;
        default: state <= S_SERVE;
      endcase
      if (mrsp_valid) mem_vld[idx_of(mrsp_crd)] <= 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (serve_hit) begin
      lrsp_crd  <= gcrd;
      lrsp_data <= mem_data[idx_of(gcrd)];
    end
    if (mrsp_valid) begin
      mem_data[idx_of(mrsp_crd)] <= mrsp_data;
      mem_tag [idx_of(mrsp_crd)] <= mrsp_crd;
    end
  end
endmodule
