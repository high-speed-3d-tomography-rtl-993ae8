// tb_bp3pa_top: end-to-end run of the whole design at its default sizes on a
// short job: two block groups (so the block group changes once), two segments
// and twelve angles, every voxel checked against a reference back-projection
// and every cache and pipeline mechanism required to occur (see bp3pa_harness).
// The architecture exercised follows the document; the job size and the
// synthetic data are this testbench's.
module tb_bp3pa_top;
  bp3pa_harness #(.NGROUPS(2), .RUN_NSEG(2), .RUN_NPSI(12)) h ();
endmodule
