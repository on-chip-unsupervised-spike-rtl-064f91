// Self-checking testbench of cam_cluster: random training streams drawn
// around a few grid cells, with periodic leaks, against the reference CAM
// model; after each step the candidate set is checked for a random cell.
module tb_cam_cluster;
  import spks_pkg::*;
  import tb_ref_pkg::*;
  logic clk = 0, reset = 1, update = 0, leak = 0, infm = 0;
  grid_t grid = '0;
  logic [7:0] cand, occ, hits;
  logic [7:0][1:0] d;
  logic alloc_evt, full_drop;
  cam_model m;
  int checks = 0, failures = 0, n_alloc = 0, n_drop = 0;

  cam_cluster dut (.clk, .reset, .grid, .update, .leak, .infm, .cand, .gdist(d),
                   .occupied(occ), .hits, .alloc_evt, .full_drop);

  always #5 clk = ~clk;
  initial begin repeat (200000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    m = new();
    @(negedge clk); @(negedge clk); reset = 0;
    for (int n = 0; n < 20000; n++) begin
      int g, e, p, h;
      bit l, i;
      g = (n % 2000 < 1000) ? $urandom_range(0, 11) * 5 : $urandom_range(0, 63);
      l = (n % 16 == 15);
      i = ($urandom_range(0, 9) != 0);
      grid = grid_t'(g); infm = i; leak = l; update = 1;
      #1;
      begin
        automatic bit hi = 0;
        for (int k = 0; k < 8; k++)
          if (m.st[k] != 0 && m.cp[k] == (g >> 3) && m.ch[k] == (g & 7)) hi = 1;
        checks++;
        if (full_drop !== (i && !hi && m.occ() == 255)) begin
          failures++; $display("FAIL full_drop step %0d", n);
        end
      end
      e = m.train(g >> 3, g & 7, i, l);
      checks++;
      if (alloc_evt !== e[0]) begin failures++; $display("FAIL alloc_evt step %0d", n); end
      n_alloc += alloc_evt; n_drop += full_drop;
      @(negedge clk); update = 0; leak = 0;
      checks++;
      if (occ !== 8'(m.occ())) begin failures++; $display("FAIL occupancy %b exp %b", occ, m.occ()); end
      p = $urandom_range(0, 7); h = $urandom_range(0, 7);
      grid = grid_t'({3'(p), 3'(h)}); #1;
      for (int k = 0; k < 8; k++) begin
        automatic int c = (m.st[k] != 0) ? grid_dist(p, h, m.cp[k], m.ch[k]) : -1;
        checks++;
        if (cand[k] !== (c >= 0) || (c >= 0 && d[k] !== 2'(c))) begin
          failures++; $display("FAIL cand %0d step %0d", k, n);
        end
      end
    end
    checks++;
    if (n_alloc == 0 || n_drop == 0) begin failures++; $display("FAIL coverage alloc %0d drop %0d", n_alloc, n_drop); end
    $display("allocations %0d, drops on full CAM %0d", n_alloc, n_drop);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
