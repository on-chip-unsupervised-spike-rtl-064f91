// GRIDFIND: grid cell of a spike in the two-dimensional feature space.
//
// Two region_find units, one per feature, give the 3-bit region indexes of the
// peak and the hyperpolarisation voltage, packed as grid_idx = {p, h}. Both
// features use the same boundary set, since they share one distribution memory.
// Combinational. The structure follows the original design.
module gridfind
#(
  parameter int unsigned NB = spks_pkg::NB,
  parameter int unsigned AW = spks_pkg::FEAT_W
) (
  input  logic [NB-1:0][AW-1:0] boundary,
  input  logic [NB-1:0]         bvalid,
  input  logic [AW-1:0]         feat_p,
  input  logic [AW-1:0]         feat_h,
  output spks_pkg::grid_t                 grid_idx
);

  region_find #(.NB(NB), .AW(AW)) u_peak (
    .boundary, .valid(bvalid), .feature(feat_p), .idx(grid_idx.p)
  );
  region_find #(.NB(NB), .AW(AW)) u_hyp (
    .boundary, .valid(bvalid), .feature(feat_h), .idx(grid_idx.h)
  );

endmodule
