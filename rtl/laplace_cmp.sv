// Laplacian curvature test for one histogram bin.
//
// The histogram is convolved with the kernel [-1, 2, -1]; a bin is marked
// informative when the result exceeds a small offset, i.e. when
//   2*F(i) > F(i-1) + F(i+1) + LAP_OFFSET.
// Bins inside a mode (concave part of the distribution) pass, bins in the
// valleys between modes fail. Purely combinational; the sums are widened so
// nothing overflows. The formula is the original design's; the offset value
// 8 follows its implementation.
module laplace_cmp #(
  parameter int unsigned CNT_W      = spks_pkg::CNT_W,
  parameter int unsigned LAP_OFFSET = spks_pkg::LAP_OFFSET
) (
  input  logic [CNT_W-1:0] f_prev,   // F(i-1)
  input  logic [CNT_W-1:0] f_cur,    // F(i)
  input  logic [CNT_W-1:0] f_next,   // F(i+1)
  output logic             informative
);

  logic [CNT_W+1:0] lhs, rhs;

  always_comb begin
    lhs = {1'b0, f_cur, 1'b0};
    rhs = (CNT_W+2)'(f_prev) + (CNT_W+2)'(f_next) + (CNT_W+2)'(LAP_OFFSET);
    informative = lhs > rhs;
  end

endmodule
