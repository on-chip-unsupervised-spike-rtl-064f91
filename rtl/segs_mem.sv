// Boundary registers: NB entries of AW bits with one valid bit each.
//
// A CAM-style shift register. Each push shifts the new boundary in at the top
// entry (NB-1) and moves every entry one place down; a 1 is shifted into the
// valid vector at the same time, so after k pushes the top k entries are valid
// and, because boundaries are found in increasing order, they are sorted with
// the lowest one in the lowest valid entry. When more than NB boundaries are
// pushed the oldest (lowest) one drops out. clear drops all valid bits (used at
// the start of each Laplace pass). Shift-register storage with valid bits
// follows the original design; clear is this implementation's addition.
module segs_mem #(
  parameter int unsigned NB = spks_pkg::NB,
  parameter int unsigned AW = spks_pkg::FEAT_W
) (
  input  logic                 clk,
  input  logic                 reset,
  input  logic                 clear,
  input  logic                 push,
  input  logic [AW-1:0]        in,
  output logic [NB-1:0][AW-1:0] boundary,
  output logic [NB-1:0]        valid
);

  always_ff @(posedge clk) begin
    if (reset || clear) begin
      boundary <= '0;
      valid    <= '0;
    end else if (push) begin
      boundary <= {in, boundary[NB-1:1]};
      valid    <= {1'b1, valid[NB-1:1]};
    end
  end

endmodule
