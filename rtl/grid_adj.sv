// ATTR: proximity of a spike's grid cell to one cluster's grid cell.
//
// Per axis the two 3-bit region indexes are subtracted; an axis is "near" when
// the difference is 0 (match) or +-1 (adjacent). The cluster is a candidate
// (is_near high) only when both axes are near; its distance is then the number of
// adjacent axes (0, 1 or 2), and hit is high for an exact match on both axes.
// Cells further away are simply not candidates, which keeps the distance at two
// bits. Combinational. The subtract/add/match structure and the restriction to
// adjacent cells follow the original design.
module grid_adj
  import spks_pkg::*;
(
  input  grid_t       a,        // spike's grid cell
  input  grid_t       b,        // cluster's grid cell
  output logic        hit,
  output logic        is_near,
  output logic [1:0]  gdist
);

  function automatic logic [1:0] axis(input logic [IDX_W-1:0] x, input logic [IDX_W-1:0] y);
    // returns {is_near, adjacent}
    logic [IDX_W:0] d;
    d = {1'b0, x} - {1'b0, y};
    if (d == '0)                              return 2'b10;
    if (d == (IDX_W+1)'(1) || d == '1)        return 2'b11;
    return 2'b00;
  endfunction

  logic [1:0] ap, ah;

  always_comb begin
    ap   = axis(a.p, b.p);
    ah   = axis(a.h, b.h);
    is_near = ap[1] & ah[1];
    hit  = is_near & ~ap[0] & ~ah[0];
    gdist = is_near ? 2'(ap[0]) + 2'(ah[0]) : 2'd0;
  end

endmodule
