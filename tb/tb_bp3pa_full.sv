// tb_bp3pa_full: one complete back-projection of a block group at the default
// sizes: the 8 pipelines reconstruct their 8 x 8 x 9 blocks over the whole
// sinogram (5 segments x 96 angles), every voxel checked against a reference
// back-projection (see bp3pa_harness).
// The sizes are the document's (128 x 128 x 63 volume, 5 segments, 96
// angles); the synthetic sinogram and the 288 x 63 view size are this design's.
module tb_bp3pa_full;
  bp3pa_harness #(.NGROUPS(1), .RUN_NSEG(5), .RUN_NPSI(96), .WATCHDOG(8000000)) h ();
endmodule
