// Boundary finder (the secondary Laplace FSM).
//
// During the Laplace traversal it receives, one bin per cycle in increasing bin
// order, the bin's informative bit, its count and its address (sample_valid
// high). It walks through the regions of the distribution:
//   FT  - before the first informative region,
//   PK  - inside an informative region (a mode),
//   TR  - in a gap between modes, tracking the bin with the lowest count.
// When a gap ends at the start of the next informative region, the address of
// the gap's lowest bin (the first one on a tie) is emitted as a boundary with
// push_seg high for one cycle, one cycle after that bin's sample. A gap that
// runs to the last bin is not a boundary. start resets the walk; after the last
// sample it returns to STANDBY. The states and the lowest-point rule follow the original
// design; merging its crossing state into the PK transition, and
// the tie rule, are this implementation's choices.
module boundary_fsm #(
  parameter int unsigned CNT_W = spks_pkg::CNT_W,
  parameter int unsigned AW    = spks_pkg::FEAT_W
) (
  input  logic             clk,
  input  logic             reset,
  input  logic             start,
  input  logic             sample_valid,
  input  logic             sample_last,
  input  logic             in_is,
  input  logic [CNT_W-1:0] count,
  input  logic [AW-1:0]    loc,
  output logic             push_seg,
  output logic [AW-1:0]    bound,
  output logic             busy
);

  typedef enum logic [1:0] {STANDBY, FT, PK, TR} lp_state_t;

  lp_state_t        state, state_n;
  logic [CNT_W-1:0] min_cnt, min_cnt_n;
  logic [AW-1:0]    min_loc, min_loc_n;
  logic             push_n;

  always_comb begin
    state_n   = state;
    min_cnt_n = min_cnt;
    min_loc_n = min_loc;
    push_n    = 1'b0;
    if (start) begin
      state_n = FT;
    end else if (sample_valid && state != STANDBY) begin
      unique case (state)
        FT: if (in_is) state_n = PK;
        PK: if (!in_is) begin
              state_n   = TR;
              min_cnt_n = count;
              min_loc_n = loc;
            end
        TR: if (in_is) begin
              state_n = PK;
              push_n  = 1'b1;
            end else if (count < min_cnt) begin
              min_cnt_n = count;
              min_loc_n = loc;
            end
        default: state_n = STANDBY;
      endcase
      if (sample_last) state_n = STANDBY;
    end
  end

  always_ff @(posedge clk) begin
    if (reset) begin
      state    <= STANDBY;
      min_cnt  <= '1;
      min_loc  <= '0;
      push_seg <= 1'b0;
      bound    <= '0;
    end else begin
      state    <= state_n;
      min_cnt  <= min_cnt_n;
      min_loc  <= min_loc_n;
      push_seg <= push_n;
      if (push_n) bound <= min_loc;
    end
  end

  assign busy = (state != STANDBY);

endmodule
