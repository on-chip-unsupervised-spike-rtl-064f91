// Region index of one feature on its axis.
//
// CAM-style lookup: the feature is compared with every boundary at once
// (feature >= boundary), comparator outputs of entries without a valid bit are
// masked, and the remaining ones are summed. Because valid boundaries are
// sorted, the sum is the number of boundaries at or below the feature, i.e. the
// index of the region the feature lies in (0 .. NB). Combinational. The
// comparators, the valid masking and the summation follow the original
// design; counting a feature equal to a boundary into the upper region is
// this implementation's choice.
module region_find #(
  parameter int unsigned NB = spks_pkg::NB,
  parameter int unsigned AW = spks_pkg::FEAT_W,
  localparam int unsigned IW = $clog2(NB + 1)
) (
  input  logic [NB-1:0][AW-1:0] boundary,
  input  logic [NB-1:0]         valid,
  input  logic [AW-1:0]         feature,
  output logic [IW-1:0]         idx
);

  always_comb begin
    idx = '0;
    for (int i = 0; i < NB; i++)
      idx += IW'(valid[i] && (feature >= boundary[i]));
  end

endmodule
