// W: one winner-take-all cell.
//
// Chooses between two candidates A and B, each with a valid bit and a 2-bit
// distance. When both are valid the one with the smaller distance wins (A on a
// tie); when only one is valid it wins. sel is 1 when B wins, v is the OR of
// the two valid bits and d the winner's distance. Combinational. Comparator,
// AND/OR of the valid bits and the multiplexers follow the original design;
// the tie rule is this implementation's choice.
module wta_node (
  input  logic       va,
  input  logic       vb,
  input  logic [1:0] da,
  input  logic [1:0] db,
  output logic       v,
  output logic [1:0] d,
  output logic       sel
);

  assign sel = vb & (~va | (db < da));
  assign v   = va | vb;
  assign d   = sel ? db : da;

endmodule
