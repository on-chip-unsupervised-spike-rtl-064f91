// Self-checking testbench of gridfind: random sorted boundary sets with a
// valid thermometer, every feature pair against the reference region count.
module tb_gridfind;
  import tb_ref_pkg::*;
  import spks_pkg::*;
  logic [6:0][5:0] boundary;
  logic [6:0] bvalid;
  logic [5:0] fp, fh;
  grid_t g;
  int checks = 0, failures = 0;

  gridfind dut (.boundary, .bvalid, .feat_p(fp), .feat_h(fh), .grid_idx(g));

  initial begin #10000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    for (int r = 0; r < 60; r++) begin
      automatic int n = r % 8;
      int bq[$];
      automatic int v = 0;
      bq = {};
      for (int k = 0; k < n; k++) begin
        v = v + $urandom_range(1, 7); if (v > 63) v = 63;
        bq.push_back(v);
      end
      boundary = '0; bvalid = '0;
      for (int k = 0; k < 7; k++) boundary[k] = 6'($urandom);   // junk in invalid slots
      for (int k = 0; k < n; k++) begin
        boundary[7 - n + k] = 6'(bq[k]); bvalid[7 - n + k] = 1'b1;
      end
      for (int p = 0; p < 64; p++) begin
        fp = 6'(p); fh = 6'($urandom_range(0, 63)); #1;
        checks += 2;
        if (g.p !== 3'(region(p, bq, 7))) begin failures++; $display("FAIL p %0d", p); end
        if (g.h !== 3'(region(int'(fh), bq, 7))) begin failures++; $display("FAIL h %0d", fh); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
