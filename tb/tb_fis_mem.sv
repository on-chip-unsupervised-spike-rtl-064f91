// Self-checking testbench of fis_mem: shifts random masks in and checks the
// stored bits and the two-port informative lookup.
module tb_fis_mem;
  logic clk = 0, reset = 1, push = 0, in = 0;
  logic [5:0] ap = '0, ah = '0;
  logic infm;
  logic [63:0] mask;
  bit ref_m [64];
  int checks = 0, failures = 0;

  fis_mem dut (.clk, .reset, .push, .in, .addr_p(ap), .addr_h(ah), .infm, .mask);

  always #5 clk = ~clk;
  initial begin repeat (100000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    @(negedge clk); @(negedge clk); reset = 0;
    checks++; if (mask !== '0) begin failures++; $display("FAIL reset"); end
    for (int r = 0; r < 20; r++) begin
      for (int i = 0; i < 64; i++) begin
        ref_m[i] = ($urandom_range(0, 99) < 40);
        @(negedge clk); push = 1; in = ref_m[i];
      end
      @(negedge clk); push = 0; in = ~in;
      @(negedge clk);   // no push: must hold
      for (int i = 0; i < 64; i++) begin
        checks++; if (mask[i] !== ref_m[i]) begin failures++; $display("FAIL bit %0d", i); end
      end
      for (int n = 0; n < 200; n++) begin
        automatic int p = $urandom_range(0, 63), h = $urandom_range(0, 63);
        ap = 6'(p); ah = 6'(h); #1;
        checks++;
        if (infm !== (ref_m[p] & ref_m[h])) begin failures++; $display("FAIL infm %0d %0d", p, h); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
