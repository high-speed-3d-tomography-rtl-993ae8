// zone_tracker: prediction along one axis of a 3D-AP cache.
//
// The cache keeps a zone of ZSIZE coordinates [origin, origin+ZSIZE) of one
// axis on chip and tries to keep the mean of the referenced coordinates at
// position HALF inside it. As in the document, the mean is a first-order
// low-pass IIR filter over the references, set by a sampling and a cut-off
// frequency: one reference out of every 2**S_LOG2 is sampled, and each sample
// moves the mean by (coord - mean) / 2**K_CUT. When the mean leaves the guard
// zone (|mean - (origin+HALF)| > GUARD) the zone is moved towards the mean,
// by at most SPEED coordinates per move (the "cache speed"). The filter
// arithmetic, the power-of-two coefficients and the speed clamp are this
// design's choices; the document names the five parameters only.
//
// Interface: ref_valid/ref_crd give one served reference per cycle. origin is
// the zone's first coordinate; moved pulses for one cycle after each move.
// Timing: the mean updates the cycle after a sampled reference, the zone one
// cycle after that. Reset: mean and origin at INIT_ORIGIN+HALF / INIT_ORIGIN.
module zone_tracker
  import bp_pkg::*;
#(
  parameter int ZSIZE       = 16,
  parameter int HALF        = 8,
  parameter int GUARD       = 2,
  parameter int SPEED       = 16,
  parameter int K_CUT       = 2,
  parameter int S_LOG2      = 2,
  parameter int INIT_ORIGIN = 0
) (
  input  logic clk,
  input  logic rst_n,
  input  logic ref_valid,
  input  crd_t ref_crd,
  output crd_t origin,
  output logic moved
);
  initial assert (HALF >= 0 && HALF < ZSIZE && GUARD >= 0 && GUARD < ZSIZE && SPEED > 0)
    else $error("the mean's place and the guard zone must lie inside the zone");

  localparam int MF = 8;                  // fractional bits of the mean
  localparam int MW = CRD_W + MF + 1;

  logic signed [MW-1:0] mean_q;
  logic [(S_LOG2 > 0 ? S_LOG2 : 1)-1:0] samp_cnt;
  logic sample;
  logic signed [MW-1:0] target, delta;
  crd_t mean_int;
  logic signed [CRD_W:0] diff, step;

  assign sample = ref_valid && (S_LOG2 == 0 || samp_cnt == '0);
  assign target = MW'(ref_crd) <<< MF;
  assign delta  = (target - mean_q) >>> K_CUT;
  assign mean_int = crd_t'((mean_q + (MW'(1) <<< (MF - 1))) >>> MF);   // rounded
  assign diff = (CRD_W+1)'(mean_int) - (CRD_W+1)'(origin) - (CRD_W+1)'(HALF);

  always_comb begin
    step = diff;
    if (diff > (CRD_W+1)'(SPEED))       step = (CRD_W+1)'(SPEED);
    else if (diff < -(CRD_W+1)'(SPEED)) step = -(CRD_W+1)'(SPEED);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mean_q   <= MW'(INIT_ORIGIN + HALF) <<< MF;
      samp_cnt <= '0;
      origin   <= crd_t'(INIT_ORIGIN);
      moved    <= 1'b0;
    end else begin
      if (ref_valid) samp_cnt <= samp_cnt + 1'b1;
      if (sample) mean_q <= mean_q + delta;
      moved <= 1'b0;
      if (diff > (CRD_W+1)'(GUARD) || diff < -(CRD_W+1)'(GUARD)) begin
        origin <= crd_t'((CRD_W+1)'(origin) + step);
        moved  <= 1'b1;
      end
    end
  end
endmodule
