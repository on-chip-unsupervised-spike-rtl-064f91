// Vacancy tracker of the cluster CAM.
//
// When a new cluster must be created (req), grants the lowest-numbered free
// entry: alloc is one-hot, or all zero when req is low or every entry is
// occupied. Combinational priority chain, as in the original design.
module vac #(
  parameter int unsigned NC = spks_pkg::NC
) (
  input  logic          req,
  input  logic [NC-1:0] occupied,
  output logic [NC-1:0] alloc
);

  always_comb begin
    logic taken;
    taken = 1'b0;
    alloc = '0;
    for (int i = 0; i < NC; i++) begin
      if (req && !occupied[i] && !taken) begin
        alloc[i] = 1'b1;
        taken    = 1'b1;
      end
    end
  end

endmodule
