// End-to-end testbench of spikesort_top at its default parameters, driven
// only through the bus, the way host software uses the accelerator:
//   1. histogram overflow: one bin is driven to full scale with repeated ker
//      commands, the halving pass is checked against a model;
//   2. clear;
//   3. kernel density estimation over a synthetic recording of 14822 spikes
//      (the recording length the original host program was written for) from three neurons
//      plus background spikes (ker, polling fin, one cycle count checked);
//   4. Laplace pass: informative mask, boundaries and the boundary count read
//      back are checked against the reference functions;
//   5. training with a leak every 128 spikes; CAM occupancy read back through
//      the debug select and compared with the reference CAM model;
//   6. sorting: index and valid bit of every spike checked, with the latency
//      (index 3 cycles and valid 4 cycles after the write is registered).
// Each mechanism is counted and a mechanism that never happened is a failure.
module tb_spikesort_top;
  import tb_ref_pkg::*;
  localparam int DEPTH = 64, MAXV = 65535, NSPK = 14822;
  localparam int A_KER = 16, A_LAP = 2, A_UPD = 4, A_LEAK = 12, A_CLR = 1, A_SORT = 0, A_OCC = 32;

  logic clk = 0, reset = 1, chipselect = 0, write = 0, read = 0;
  logic [5:0] address = '0;
  logic [15:0] writedata = '0, readdata;

  int unsigned h[] = new[DEPTH];
  bit inf[] = new[DEPTH];
  int bq[$];
  int sp[NSPK], sh[NSPK];
  cam_model m;
  int checks = 0, failures = 0;
  // mechanism counters
  int n_ker = 0, n_ovf = 0, n_clear = 0, n_lap = 0, n_bound = 0, n_fin_wait = 0, n_alloc = 0,
      n_hit = 0, n_leak = 0, n_vacate = 0, n_reject = 0, n_sort_exact = 0, n_sort_adj = 0,
      n_sort_none = 0, n_occ_read = 0;

  spikesort_top dut (.clk, .reset, .chipselect, .write, .read, .address, .writedata, .readdata);

  always #5 clk = ~clk;
  initial begin repeat (3000000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  always @(posedge clk) if (!reset && dut.u_distr.overflow) n_ovf++;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  task automatic bus_write(input int a, input int p, input int hy);
    @(negedge clk);
    chipselect = 1; write = 1; address = 6'(a); writedata = {2'b00, 6'(p), 2'b00, 6'(hy)};
    @(negedge clk);
    chipselect = 0; write = 0;
  endtask

  // combinational read; the strobe also acknowledges fin at the next edge
  task automatic bus_read(input int a, output logic [15:0] d);
    chipselect = 1; read = 1; address = 6'(a); #1;
    d = readdata;
    @(negedge clk);
    chipselect = 0; read = 0;
  endtask

  // poll until fin, return the number of cycles since the write was registered
  task automatic wait_fin(output int cyc);
    logic [15:0] d;
    cyc = 0;
    do begin bus_read(A_SORT, d); cyc++; end while (!d[3]);
    if (cyc > 1) n_fin_wait++;
  endtask

  task automatic model_inc(input int a);
    bit ov = (h[a] >= MAXV - 1);
    h[a] = h[a] + 1;
    if (ov) foreach (h[i]) h[i] = h[i] >> 1;
  endtask

  task automatic ker(input int p, input int hy, output int cyc);
    bus_write(A_KER, p, hy);
    model_inc(p); model_inc(hy);
    n_ker++;
    wait_fin(cyc);
  endtask

  task automatic cmp_mem(input string what);
    bit ok = 1;
    for (int i = 0; i < DEPTH; i++) if (dut.u_distr.u_mem.mem[i] !== 16'(h[i])) ok = 0;
    chk(ok, what);
  endtask

  function automatic int noise();
    return $urandom_range(0, 2) + $urandom_range(0, 2) + $urandom_range(0, 2)
         + $urandom_range(0, 2) - 4;
  endfunction

  initial begin
    int cyc, occ_prev;
    logic [15:0] d;
    int P[3] = '{36, 46, 56}, H[3] = '{6, 17, 28};
    m = new();
    foreach (h[i]) h[i] = 0;
    repeat (3) @(negedge clk); reset = 0;

    // 1. overflow on one bin (the memory starts cleared by a clear command)
    bus_write(A_CLR, 0, 0); n_clear++; wait_fin(cyc);
    cmp_mem("initial clear");
    for (int n = 0; n < 32768 + 10; n++) ker(20, 20, cyc);
    cmp_mem("after overflow");
    chk(n_ovf == 1, $sformatf("one overflow pass (%0d)", n_ovf));

    // 2. clear
    bus_write(A_CLR, 0, 0); n_clear++; wait_fin(cyc);
    chk(cyc == 64 + 2, $sformatf("clear cycles %0d", cyc));
    foreach (h[i]) h[i] = 0;
    cmp_mem("clear");

    // 3. kernel density estimation
    for (int n = 0; n < NSPK; n++) begin
      if (n % 25 == 24) begin sp[n] = $urandom_range(32, 63); sh[n] = $urandom_range(0, 31); end
      else begin
        automatic int k = $urandom_range(0, 2);
        sp[n] = P[k] + noise(); sh[n] = H[k] + noise();
      end
      ker(sp[n], sh[n], cyc);
      if (n == 0) chk(cyc == 6, $sformatf("ker latency %0d", cyc));
    end
    cmp_mem("histogram");

    // 4. Laplace
    bus_write(A_LAP, 0, 0); n_lap++; wait_fin(cyc);
    chk(cyc == 66 + 2, $sformatf("laplace cycles %0d", cyc));
    foreach (inf[i]) inf[i] = lap_inf(h, i, 8);
    find_bounds(h, inf, bq);
    $display("boundaries %p", bq);
    for (int i = 0; i < DEPTH; i++) chk(dut.u_distr.mask[i] == inf[i], $sformatf("mask %0d", i));
    n_bound = (bq.size() > 7) ? 7 : bq.size();
    bus_read(A_SORT, d);
    chk(int'(d[15:8]) == n_bound, $sformatf("boundary count %0d", d[15:8]));

    // 5. training
    occ_prev = 0;
    for (int n = 0; n < NSPK; n++) begin
      automatic int j = (n * 7) % NSPK;
      automatic int gp = region(sp[j], bq, 7), gh = region(sh[j], bq, 7);
      automatic bit lk = (n % 128 == 0);
      automatic bit im = inf[sp[j]] & inf[sh[j]];
      automatic int hit_before = 0;
      for (int k = 0; k < 8; k++)
        if (m.st[k] != 0 && m.cp[k] == gp && m.ch[k] == gh) hit_before = 1;
      bus_write(lk ? A_LEAK : A_UPD, sp[j], sh[j]);
      if (!im) n_reject++;
      else if (hit_before && !lk) n_hit++;
      if (lk) n_leak++;
      n_alloc += m.train(gp, gh, im, lk);
      if ((occ_prev & ~m.occ()) != 0) n_vacate++;
      occ_prev = m.occ();
    end
    repeat (4) @(negedge clk);
    bus_read(A_OCC, d); n_occ_read++;
    chk(int'(d[15:8]) == m.occ(), $sformatf("occupancy %b exp %b", d[15:8], m.occ()));

    // 6. sorting
    for (int n = 0; n < NSPK + 300; n++) begin
      automatic int p = (n < NSPK) ? sp[n] : $urandom_range(0, 63);
      automatic int hy = (n < NSPK) ? sh[n] : $urandom_range(0, 63);
      automatic int gp = region(p, bq, 7), gh = region(hy, bq, 7);
      automatic int s = m.sort(gp, gh);
      bus_write(A_SORT, p, hy);
      repeat (3) @(negedge clk);
      bus_read(A_SORT, d);            // index registered, valid not yet
      chk(d[4] == 1'b0, "valid low before its cycle");
      if (s >= 0) chk(int'(d[2:0]) == s, $sformatf("sort idx %0d exp %0d", d[2:0], s));
      bus_read(A_SORT, d);
      chk(d[4] == (s >= 0), $sformatf("sort valid %b", d[4]));
      if (s >= 0) chk(int'(d[2:0]) == s, "sort idx held");
      if (s < 0) n_sort_none++;
      else if (grid_dist(gp, gh, m.cp[s], m.ch[s]) == 0) n_sort_exact++;
      else n_sort_adj++;
    end

    $display("ker %0d overflow %0d clear %0d laplace %0d boundaries %0d fin-waits %0d",
             n_ker, n_ovf, n_clear, n_lap, n_bound, n_fin_wait);
    $display("train: new clusters %0d hits %0d leaks %0d vacated %0d rejected %0d",
             n_alloc, n_hit, n_leak, n_vacate, n_reject);
    $display("sort: exact %0d adjacent %0d none %0d, occupancy reads %0d, final occupancy %b",
             n_sort_exact, n_sort_adj, n_sort_none, n_occ_read, m.occ());
    chk(n_ker > 0 && n_ovf > 0 && n_clear > 0 && n_lap > 0 && n_bound > 0 && n_fin_wait > 0,
        "distribution mechanisms all happened");
    chk(n_alloc > 0 && n_hit > 0 && n_leak > 0 && n_vacate > 0 && n_reject > 0,
        "training mechanisms all happened");
    chk(n_sort_exact > 0 && n_sort_adj > 0 && n_sort_none > 0 && n_occ_read > 0,
        "sorting mechanisms all happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
