// Informative-sample mask: a DEPTH-bit shift register with two read ports.
//
// During the Laplace traversal one bit per histogram bin is shifted in at the
// top (push/in), bin 0 first; after DEPTH pushes bit i belongs to bin i. The two
// asynchronous DEPTH:1 read multiplexers look up the peak and hyperpolarisation
// feature of the current spike, and infm is high only when both fall in an
// informative bin. The mask is cleared by reset. Structure (shift register,
// 64:1 muxes, AND of the two lookups) follows the original design.
module fis_mem #(
  parameter int unsigned DEPTH = spks_pkg::DEPTH,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          reset,
  input  logic          push,
  input  logic          in,
  input  logic [AW-1:0] addr_p,   // peak feature
  input  logic [AW-1:0] addr_h,   // hyperpolarisation feature
  output logic          infm,
  output logic [DEPTH-1:0] mask
);

  always_ff @(posedge clk) begin
    if (reset)     mask <= '0;
    else if (push) mask <= {in, mask[DEPTH-1:1]};
  end

  assign infm = mask[addr_p] & mask[addr_h];

endmodule
