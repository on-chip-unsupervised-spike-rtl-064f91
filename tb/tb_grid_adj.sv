// Self-checking testbench of grid_adj: all 4096 pairs of grid cells against
// the reference distance rule.
module tb_grid_adj;
  import tb_ref_pkg::*;
  import spks_pkg::*;
  grid_t a, b;
  logic hit, nr;
  logic [1:0] d;
  int checks = 0, failures = 0;

  grid_adj dut (.a, .b, .hit, .is_near(nr), .gdist(d));

  initial begin #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    for (int x = 0; x < 64; x++)
      for (int y = 0; y < 64; y++) begin
        int e;
        a = grid_t'(x); b = grid_t'(y); #1;
        e = grid_dist(x >> 3, x & 7, y >> 3, y & 7);
        checks++;
        if (nr !== (e >= 0) || hit !== (e == 0) || (e >= 0 && d !== 2'(e))) begin
          failures++; $display("FAIL %0d %0d: near %b hit %b d %0d exp %0d", x, y, nr, hit, d, e);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
