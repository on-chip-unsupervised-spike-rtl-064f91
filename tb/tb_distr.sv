// Self-checking testbench of distr with a 6-bit histogram word, so that
// overflow halving happens often. Checks clear, every ker update against a
// histogram model (contents and cycle count: 4 memory cycles, plus 2 per bin
// on overflow), fin held until read, commands ignored while busy, and the
// Laplace pass (mask, boundaries, valid bits, cycle count, infm lookup)
// against the reference functions.
module tb_distr;
  import tb_ref_pkg::*;
  localparam int W = 6, DEPTH = 64, MAXV = (1 << W) - 1;
  logic clk = 0, reset = 1, clear = 0, ker = 0, laplace = 0, read = 0;
  logic [5:0] fp = '0, fh = '0;
  logic fin, busy, overflow, infm;
  logic [63:0] mask;
  logic [6:0][5:0] boundary;
  logic [6:0] bvalid;
  int unsigned h[] = new[DEPTH];
  int checks = 0, failures = 0, n_ovf = 0;

  distr #(.CNT_W(W)) dut (.clk, .reset, .clear, .ker, .laplace, .read, .feat_p(fp), .feat_h(fh),
    .fin, .busy, .overflow, .infm, .mask, .boundary, .bvalid);

  always #5 clk = ~clk;
  initial begin repeat (400000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  always @(posedge clk) if (overflow) n_ovf++;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // pulse a command, return the number of rising edges until fin is seen
  task automatic run(input int which, output int cyc);
    @(negedge clk);
    clear = (which == 0); ker = (which == 1); laplace = (which == 2);
    @(negedge clk); clear = 0; ker = 0; laplace = 0;
    cyc = 1;
    while (!fin) begin @(negedge clk); cyc++; end
    // fin must stay until read; other commands ignored meanwhile
    repeat (3) @(negedge clk);
    ker = 1; @(negedge clk); ker = 0;
    chk(fin, "fin held until read");
    read = 1; @(negedge clk); read = 0;
    chk(!fin && !busy, "idle after read");
  endtask

  task automatic model_inc(input int a);
    automatic bit ov = (h[a] >= MAXV - 1);
    h[a] = h[a] + 1;
    if (ov) foreach (h[i]) h[i] = h[i] >> 1;
  endtask

  task automatic cmp_mem(input string what);
    automatic bit ok = 1;
    for (int i = 0; i < DEPTH; i++) if (dut.u_mem.mem[i] !== W'(h[i])) ok = 0;
    chk(ok, what);
  endtask

  initial begin
    int cyc, ovf_before, exp_cyc;
    automatic bit inf[] = new[DEPTH];
    int bq[$];
    @(negedge clk); @(negedge clk); reset = 0;
    foreach (h[i]) h[i] = 0;
    run(0, cyc);
    chk(cyc == DEPTH + 1, $sformatf("clear cycles %0d", cyc));
    cmp_mem("clear");
    for (int r = 0; r < 3; r++) begin
      // three modes on the shared axis
      for (int n = 0; n < 400; n++) begin
        automatic int c0 = (r == 1) ? 10 : 8, pk, hy;
        pk = c0 + 20 * $urandom_range(0, 2) + $urandom_range(0, 2) + $urandom_range(0, 2);
        hy = c0 + 20 * $urandom_range(0, 2) + $urandom_range(0, 3);
        fp = 6'(pk); fh = 6'(hy);
        ovf_before = n_ovf;
        exp_cyc = 5;
        if (h[pk] >= MAXV - 1) exp_cyc += 2 * DEPTH;
        model_inc(pk);
        if (h[hy] >= MAXV - 1) exp_cyc += 2 * DEPTH;
        model_inc(hy);
        run(1, cyc);
        chk(cyc == exp_cyc, $sformatf("ker cycles %0d exp %0d", cyc, exp_cyc));
        cmp_mem($sformatf("histogram after ker %0d", n));
      end
      run(2, cyc);
      chk(cyc == DEPTH + 3, $sformatf("laplace cycles %0d", cyc));
      foreach (inf[i]) inf[i] = lap_inf(h, i, 8);
      for (int i = 0; i < DEPTH; i++) chk(mask[i] == inf[i], $sformatf("mask bit %0d", i));
      find_bounds(h, inf, bq);
      $display("pass %0d: boundaries %p", r, bq);
      for (int k = 0; k < 7; k++) begin
        automatic int n = (bq.size() > 7) ? 7 : bq.size();
        chk(bvalid[k] == (k >= 7 - n), $sformatf("bvalid %0d", k));
        if (k >= 7 - n) chk(int'(boundary[k]) == bq[bq.size() - 7 + k], $sformatf("boundary %0d", k));
      end
      for (int n = 0; n < 100; n++) begin
        automatic int a = $urandom_range(0, 63), b = $urandom_range(0, 63);
        fp = 6'(a); fh = 6'(b); #1;
        chk(infm == (inf[a] & inf[b]), "infm");
      end
      if (r == 1) begin
        foreach (h[i]) h[i] = 0;
        run(0, cyc);
        cmp_mem("clear again");
      end
    end
    chk(n_ovf > 0, "overflow happened");
    $display("overflow passes: %0d", n_ovf);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
