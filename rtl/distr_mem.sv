// Histogram memory: DEPTH words of CNT_W bits (64 x 16 by default).
//
// A plain single-port RAM with a registered read: when rd is high the word at
// addr appears on rd_data after the next rising edge and is held until the next
// read. A write stores wr_data at addr on the rising edge. A read and a write of
// the same address in one cycle return the old word. The size is the one the original
// design gives; the single clock edge and the read-before-write
// order are this implementation's choice.
module distr_mem #(
  parameter int unsigned DEPTH = spks_pkg::DEPTH,
  parameter int unsigned CNT_W = spks_pkg::CNT_W,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             rd,
  input  logic             wr,
  input  logic [AW-1:0]    addr,
  input  logic [CNT_W-1:0] wr_data,
  output logic [CNT_W-1:0] rd_data
);

  logic [CNT_W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (rd) rd_data <= mem[addr];
    if (wr) mem[addr] <= wr_data;
  end

endmodule
