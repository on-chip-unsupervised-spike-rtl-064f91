// Self-checking testbench of gc: a fixed boundary set, then training spikes
// (periodic leaks, random informative flag) and sorting spikes, sometimes
// back to back, against the reference region function and CAM model. The
// index of the spike entered in cycle t is checked after edge t+3 and its
// valid bit after edge t+4; valid must fall when a new spike is entered.
module tb_gc;
  import spks_pkg::*;
  import tb_ref_pkg::*;
  logic clk = 0, reset = 1, spk_valid = 0, update = 0, leak = 0, sort = 0, infm = 0;
  logic [5:0] fp = '0, fh = '0;
  logic [6:0][5:0] boundary;
  logic [6:0] bvalid;
  logic [2:0] spk_idx;
  logic v_output, alloc_evt, hit_evt, full_drop;
  logic [7:0] occ;
  grid_t grid_q;
  cam_model m;
  int bq[$];
  int cyc = 0;
  int exp_idx [int], exp_v [int];
  bit spike_at [int];
  int checks = 0, failures = 0, n_sorted_valid = 0, n_sorted_none = 0, n_adj = 0;

  gc dut (.clk, .reset, .spk_valid, .feat_p(fp), .feat_h(fh), .update, .leak, .sort, .infm,
          .boundary, .bvalid, .spk_idx, .v_output, .occupied(occ), .grid_q, .alloc_evt,
          .hit_evt, .full_drop);

  always #5 clk = ~clk;
  initial begin repeat (200000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  always @(posedge clk) cyc <= cyc + 1;

  // checker, sampled after each rising edge
  always @(negedge clk) if (!reset) begin
    if (spike_at.exists(cyc - 3)) begin
      checks++;
      if (spk_idx !== 3'(exp_idx[cyc - 3])) begin
        failures++; $display("FAIL idx of spike @%0d: %0d exp %0d", cyc - 3, spk_idx, exp_idx[cyc - 3]);
      end
    end
    if (spike_at.exists(cyc - 4)) begin
      checks++;
      if (v_output !== exp_v[cyc - 4][0]) begin
        failures++; $display("FAIL valid of spike @%0d: %b", cyc - 4, v_output);
      end
    end else if (spike_at.exists(cyc - 1)) begin
      checks++;
      if (v_output !== 1'b0) begin failures++; $display("FAIL valid not cleared @%0d", cyc); end
    end
  end

  task automatic spike(input int p, h, input bit u, l, i);
    int gp, gh, s, e;
    gp = region(p, bq, 7); gh = region(h, bq, 7);
    s = m.sort(gp, gh);
    if (u) void'(m.train(gp, gh, i, l));
    else begin
      if (s >= 0) begin
        n_sorted_valid++;
        if (grid_dist(gp, gh, m.cp[s], m.ch[s]) > 0) n_adj++;
      end else n_sorted_none++;
    end
    e = (s >= 0) ? s : 0;
    fp = 6'(p); fh = 6'(h); update = u; leak = l; infm = i; sort = !u; spk_valid = 1;
    spike_at[cyc] = 1;
    exp_v[cyc] = (!u && s >= 0);
    exp_idx[cyc] = e;   // no candidate: the tree defaults to entry 0
  endtask

  initial begin
    m = new();
    bq = '{9, 20, 31, 44, 52};
    boundary = '0; bvalid = '0;
    for (int k = 0; k < 5; k++) begin boundary[2 + k] = 6'(bq[k]); bvalid[2 + k] = 1; end
    repeat (3) @(negedge clk); reset = 0;
    for (int n = 0; n < 6000; n++) begin
      automatic bit train = (n < 4000) || (n % 7 == 0);
      automatic int ctr = $urandom_range(0, 3) * 13 + 4;
      @(negedge clk);
      if (!train && n % 3 == 0)   // anywhere in the feature space
        spike($urandom_range(0, 63), $urandom_range(0, 63), 1'b0, 1'b0, 1'b1);
      else
        spike(ctr + $urandom_range(0, 6), ctr + $urandom_range(0, 6) + ((n % 5 == 0) ? 11 : 0),
              train, train && (n % 64 == 63), $urandom_range(0, 9) != 0);
      if ($urandom_range(0, 2) == 0) begin
        @(negedge clk); spk_valid = 0;
        repeat ($urandom_range(0, 5)) @(negedge clk);
      end
    end
    @(negedge clk); spk_valid = 0;
    repeat (8) @(negedge clk);
    checks++;
    if (n_sorted_valid == 0 || n_sorted_none == 0 || n_adj == 0) begin
      failures++; $display("FAIL coverage: sorted %0d none %0d adjacent %0d", n_sorted_valid, n_sorted_none, n_adj);
    end
    $display("sorted to a cluster %0d (adjacent %0d), no cluster %0d", n_sorted_valid, n_adj, n_sorted_none);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
