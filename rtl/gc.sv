// GC (Grid_Cluster): from a spike's two features to its cluster index.
//
// A three-stage pipeline, one register rank between the functional blocks:
//   stage A  GRIDFIND turns the features into a grid cell; the cell, the
//            informative flag and the spike's command bits are registered.
//   stage B  CAM_CLUSTER compares the registered cell with the learnt clusters.
//            On a training spike the CAM is updated at the end of this stage;
//            the per-entry candidate bits and distances are registered.
//   stage C  WTA picks the closest candidate; index and winner flag are
//            registered.
// A spike entered with spk_valid in cycle 0 updates the CAM at the end of
// cycle 1, its index is on spk_idx from cycle 3 and, for a sorting spike with a
// candidate, v_output rises in cycle 4, one cycle after the index. Index and
// valid are held until the next spike; v_output falls when the next spike is
// entered, and stays low for training spikes. One spike may be entered every
// cycle. The blocks and the registers between them follow the original
// design; the exact stage boundaries are this implementation's choice.
module gc
#(
  parameter int unsigned NB = spks_pkg::NB,
  parameter int unsigned NC = spks_pkg::NC,
  parameter int unsigned AW = spks_pkg::FEAT_W,
  localparam int unsigned CW = $clog2(NC)
) (
  input  logic                  clk,
  input  logic                  reset,
  input  logic                  spk_valid,
  input  logic [AW-1:0]         feat_p,
  input  logic [AW-1:0]         feat_h,
  input  logic                  update,
  input  logic                  leak,
  input  logic                  sort,
  input  logic                  infm,
  input  logic [NB-1:0][AW-1:0] boundary,
  input  logic [NB-1:0]         bvalid,
  output logic [CW-1:0]         spk_idx,
  output logic                  v_output,
  output logic [NC-1:0]         occupied,
  output spks_pkg::grid_t                 grid_q,
  output logic                  alloc_evt,
  output logic                  hit_evt,
  output logic                  full_drop
);

  // stage A
  spks_pkg::grid_t grid_a;
  logic  s1_v, s1_upd, s1_leak, s1_sort, infm_q;
  // stage B
  logic [NC-1:0]      cand, cand_q, hits;
  logic [NC-1:0][1:0] gdist, gdist_q;
  logic               s2_v, s2_sort;
  // stage C
  logic               win, win_q, s3_v, s3_sort;
  logic [CW-1:0]      idx;

  gridfind #(.NB(NB), .AW(AW)) u_grid (
    .boundary, .bvalid, .feat_p, .feat_h, .grid_idx(grid_a)
  );

  cam_cluster #(.NC(NC)) u_cam (
    .clk, .reset, .grid(grid_q), .update(s1_v & s1_upd), .leak(s1_leak), .infm(infm_q),
    .cand, .gdist, .occupied, .hits, .alloc_evt, .full_drop
  );

  wta #(.NC(NC)) u_wta (
    .cand(cand_q), .gdist(gdist_q), .valid(win), .idx, .win_dist()
  );

  assign hit_evt = s1_v & s1_upd & infm_q & (|hits);

  always_ff @(posedge clk) begin
    if (reset) begin
      grid_q   <= '0;
      infm_q   <= 1'b0;
      s1_v     <= 1'b0;
      s1_upd   <= 1'b0;
      s1_leak  <= 1'b0;
      s1_sort  <= 1'b0;
      cand_q   <= '0;
      gdist_q   <= '0;
      s2_v     <= 1'b0;
      s2_sort  <= 1'b0;
      win_q    <= 1'b0;
      s3_v     <= 1'b0;
      s3_sort  <= 1'b0;
      spk_idx  <= '0;
      v_output <= 1'b0;
    end else begin
      // stage A
      s1_v <= spk_valid;
      if (spk_valid) begin
        grid_q  <= grid_a;
        infm_q  <= infm;
        s1_upd  <= update;
        s1_leak <= leak;
        s1_sort <= sort;
      end
      // stage B
      s2_v <= s1_v;
      if (s1_v) begin
        cand_q  <= cand;
        gdist_q  <= gdist;
        s2_sort <= s1_sort;
      end
      // stage C
      s3_v <= s2_v;
      if (s2_v) begin
        spk_idx <= idx;
        win_q   <= win;
        s3_sort <= s2_sort;
      end
      // registered valid, one cycle behind the index
      if (s3_v)           v_output <= s3_sort & win_q;
      else if (spk_valid) v_output <= 1'b0;
    end
  end

endmodule
