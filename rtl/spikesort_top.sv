// Spike-sorting accelerator, bus-slave top level.
//
// A host streams spike features and commands over a 16-bit memory-mapped bus.
// A write carries the features in writedata (peak voltage in bits 13:8,
// hyperpolarisation voltage in bits 5:0) and the command in the word address:
//   address[0] clear    zero the histogram
//   address[1] laplace  find informative bins and boundaries
//   address[2] update   train the cluster CAM with this spike
//   address[3] leak     with update: weaken all clusters
//   address[4] ker      add this spike to the histogram
//   address[4:0] = 0    sort this spike
// The features are registered on every write and the command bits become
// one-cycle strobes in the next cycle. DISTR runs clear/ker/laplace and raises
// fin, which stays up until the next bus read. Every write also enters the
// spike into the GC pipeline; its index appears 3 cycles after the write
// strobe cycle and, for a sort with a matching or adjacent cluster, valid
// follows one cycle later. Training needs no flag: the next spike can be
// written at once.
//
// readdata (combinational from registers):
//   [2:0]  cluster index       [3] fin       [4] valid
//   [15:8] address[5] ? CAM occupancy mask : number of valid boundaries
// Command bits, feature packing, the read fields and the debug select follow
// the original design; the positions of fin and valid and the binary
// boundary count are this implementation's choice. Synchronous active-high
// reset, one clock edge.
module spikesort_top
#(
  parameter int unsigned DEPTH      = spks_pkg::DEPTH,
  parameter int unsigned CNT_W      = spks_pkg::CNT_W,
  parameter int unsigned NB         = spks_pkg::NB,
  parameter int unsigned NC         = spks_pkg::NC,
  parameter int unsigned LAP_OFFSET = spks_pkg::LAP_OFFSET
) (
  input  logic        clk,
  input  logic        reset,
  input  logic        chipselect,
  input  logic        write,
  input  logic        read,
  input  logic [5:0]  address,
  input  logic [15:0] writedata,
  output logic [15:0] readdata
);

  localparam int unsigned AW = $clog2(DEPTH);
  localparam int unsigned CW = $clog2(NC);

  logic [AW-1:0]         feat_p, feat_h;
  spks_pkg::cmd_t                cmd;
  logic                  spk_valid, sort;
  logic                  fin, busy, overflow, infm;
  logic [DEPTH-1:0]      mask;
  logic [NB-1:0][AW-1:0] boundary;
  logic [NB-1:0]         bvalid;
  logic [CW-1:0]         spk_idx;
  logic                  v_output;
  logic [NC-1:0]         occupied;
  logic [3:0]            bcount;
  logic                  bus_wr, bus_rd;

  assign bus_wr = chipselect & write;
  assign bus_rd = chipselect & read;

  always_ff @(posedge clk) begin
    if (reset) begin
      feat_p    <= '0;
      feat_h    <= '0;
      cmd       <= '0;
      spk_valid <= 1'b0;
      sort      <= 1'b0;
    end else begin
      spk_valid <= bus_wr;
      cmd       <= '0;
      sort      <= 1'b0;
      if (bus_wr) begin
        feat_p      <= writedata[8 +: AW];
        feat_h      <= writedata[0 +: AW];
        cmd.clear   <= address[spks_pkg::CMD_CLEAR];
        cmd.laplace <= address[spks_pkg::CMD_LAPLACE];
        cmd.update  <= address[spks_pkg::CMD_UPDATE];
        cmd.leak    <= address[spks_pkg::CMD_LEAK];
        cmd.ker     <= address[spks_pkg::CMD_KER];
        sort        <= (address[4:0] == 5'd0);
      end
    end
  end

  distr #(.DEPTH(DEPTH), .CNT_W(CNT_W), .NB(NB), .LAP_OFFSET(LAP_OFFSET)) u_distr (
    .clk, .reset, .clear(cmd.clear), .ker(cmd.ker), .laplace(cmd.laplace), .read(bus_rd),
    .feat_p, .feat_h, .fin, .busy, .overflow, .infm, .mask, .boundary, .bvalid
  );

  gc #(.NB(NB), .NC(NC), .AW(AW)) u_gc (
    .clk, .reset, .spk_valid, .feat_p, .feat_h, .update(cmd.update), .leak(cmd.leak),
    .sort, .infm, .boundary, .bvalid, .spk_idx, .v_output, .occupied, .grid_q(),
    .alloc_evt(), .hit_evt(), .full_drop()
  );

  always_comb begin
    bcount = '0;
    for (int i = 0; i < NB; i++) bcount += 4'(bvalid[i]);
  end

  always_comb begin
    readdata        = '0;
    readdata[2:0]   = 3'(spk_idx);
    readdata[3]     = fin;
    readdata[4]     = v_output;
    readdata[15:8]  = address[spks_pkg::ADDR_SEL] ? 8'(occupied) : 8'(bcount);
  end

endmodule
