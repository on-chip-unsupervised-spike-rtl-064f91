// Self-checking testbench of segs_mem: pushes up to and beyond seven
// boundaries, checks order, valid bits, overflow of the oldest entry and clear.
module tb_segs_mem;
  logic clk = 0, reset = 1, clear = 0, push = 0;
  logic [5:0] in = '0;
  logic [6:0][5:0] boundary;
  logic [6:0] valid;
  int q[$];
  int checks = 0, failures = 0;

  segs_mem dut (.clk, .reset, .clear, .push, .in, .boundary, .valid);

  always #5 clk = ~clk;
  initial begin repeat (20000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  task automatic compare();
    automatic int n = (q.size() > 7) ? 7 : q.size();
    for (int k = 0; k < 7; k++) begin
      automatic bit ev = (k >= 7 - n);
      checks++;
      if (valid[k] !== ev) begin failures++; $display("FAIL valid %0d", k); end
      if (ev) begin
        checks++;
        if (boundary[k] !== 6'(q[q.size() - 7 + k])) begin
          failures++; $display("FAIL entry %0d got %0d", k, boundary[k]); end
      end
    end
  endtask

  initial begin
    @(negedge clk); @(negedge clk); reset = 0;
    for (int r = 0; r < 30; r++) begin
      automatic int n = $urandom_range(0, 10);
      q = {};
      @(negedge clk); clear = 1; @(negedge clk); clear = 0;
      compare();
      for (int i = 0; i < n; i++) begin
        automatic int v = $urandom_range(0, 63);
        @(negedge clk); push = 1; in = 6'(v); q.push_back(v);
        @(negedge clk); push = 0; in = 6'($urandom);
        @(negedge clk); compare();
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
