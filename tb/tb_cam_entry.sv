// Self-checking testbench of cam_entry: allocation, hits by informative and
// non-informative spikes, leak down to Free, and the compare outputs.
module tb_cam_entry;
  import spks_pkg::*;
  import tb_ref_pkg::*;
  logic clk = 0, reset = 1, update = 0, leak = 0, alloc = 0, infm = 0;
  grid_t grid = '0, cl;
  logic hit, cand, occ;
  logic [1:0] d;
  use_t st;
  int checks = 0, failures = 0;

  cam_entry dut (.clk, .reset, .grid, .update, .leak, .alloc, .infm, .hit, .cand,
                 .gdist(d), .occupied(occ), .state(st), .cl_cell(cl));

  always #5 clk = ~clk;
  initial begin repeat (100000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  task automatic expect_state(input int e, input string what);
    checks++;
    if (st !== use_t'(e)) begin failures++; $display("FAIL %s: state %0d exp %0d", what, st, e); end
  endtask

  task automatic step(input int g, input bit u, l, a, i);
    @(negedge clk); grid = grid_t'(g); update = u; leak = l; alloc = a; infm = i;
    @(negedge clk); update = 0; leak = 0; alloc = 0;
  endtask

  initial begin
    int c;
    @(negedge clk); @(negedge clk); reset = 0;
    expect_state(0, "reset");
    grid = grid_t'(6'o33); #1;
    checks++; if (hit || cand || occ) begin failures++; $display("FAIL free entry compares"); end
    step(6'o33, 1, 0, 1, 1); expect_state(1, "alloc");
    checks++; if (cl !== grid_t'(6'o33)) begin failures++; $display("FAIL stored cell"); end
    step(6'o33, 1, 0, 0, 0); expect_state(1, "non-informative hit");
    step(6'o33, 0, 0, 0, 1); expect_state(1, "no update");
    step(6'o33, 1, 0, 0, 1); expect_state(2, "hit 1");
    step(6'o33, 1, 0, 0, 1); expect_state(3, "hit 2");
    step(6'o33, 1, 0, 0, 1); expect_state(3, "hit saturate");
    step(6'o11, 1, 0, 0, 1); expect_state(3, "miss");
    step(6'o33, 1, 1, 0, 1); expect_state(2, "leak beats hit");
    // compare outputs against every cell
    for (int g = 0; g < 64; g++) begin
      grid = grid_t'(g); #1;
      c = grid_dist(g >> 3, g & 7, 3, 3);
      checks++;
      if (hit !== (c == 0) || cand !== (c >= 0) || (c >= 0 && d !== 2'(c))) begin
        failures++; $display("FAIL compare %0o", g);
      end
    end
    step(6'o00, 1, 1, 0, 0); expect_state(1, "leak");
    step(6'o00, 1, 1, 0, 0); expect_state(0, "vacated");
    step(6'o00, 1, 1, 0, 0); expect_state(0, "free stays");
    grid = grid_t'(6'o33); #1;
    checks++; if (hit || cand) begin failures++; $display("FAIL vacated entry compares"); end
    step(6'o52, 1, 1, 1, 1); expect_state(1, "realloc");
    checks++; if (cl !== grid_t'(6'o52)) begin failures++; $display("FAIL realloc cell"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
