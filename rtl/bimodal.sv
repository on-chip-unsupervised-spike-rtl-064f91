// Usefulness state machine of one cluster, next-state logic.
//
// Four states: Free, Outlier, Weak, Strong. On an update cycle a hit moves the
// cluster one state up (Strong stays Strong) and a leak moves it one state down
// (Free stays Free); a miss keeps the state. Leak wins over hit. Outside update
// cycles the state is kept. A free entry becomes an Outlier when it is
// allocated to a new grid cell, which the CAM entry handles. The states and
// transitions follow the original design's state diagram; the leak-over-hit
// priority is this implementation's choice. Combinational.
module bimodal
  import spks_pkg::*;
(
  input  use_t cur,
  input  logic update,
  input  logic hit,
  input  logic leak,
  output use_t nxt
);

  always_comb begin
    nxt = cur;
    if (update) begin
      if (leak) begin
        if (cur != U_FREE) nxt = use_t'(cur - 2'd1);
      end else if (hit) begin
        if (cur != U_STRONG) nxt = use_t'(cur + 2'd1);
      end
    end
  end

endmodule
