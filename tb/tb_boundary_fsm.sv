// Self-checking testbench of boundary_fsm: random informative patterns and
// counts, one sample per cycle (with random idle cycles), compared with the
// reference gap/minimum search.
module tb_boundary_fsm;
  import tb_ref_pkg::*;
  logic clk = 0, reset = 1, start = 0, sv = 0, last = 0, in_is = 0;
  logic [15:0] count = '0;
  logic [5:0] loc = '0, bound;
  logic push_seg, busy;
  int got[$], exp_q[$];
  int checks = 0, failures = 0;

  boundary_fsm dut (.clk, .reset, .start, .sample_valid(sv), .sample_last(last), .in_is,
                    .count, .loc, .push_seg, .bound, .busy);

  always #5 clk = ~clk;
  initial begin repeat (200000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  always @(posedge clk) if (push_seg) got.push_back(int'(bound));

  initial begin
    automatic int unsigned h[] = new[64];
    automatic bit inf[] = new[64];
    @(negedge clk); @(negedge clk); reset = 0;
    for (int r = 0; r < 300; r++) begin
      automatic bit cur = $urandom_range(0, 1);
      for (int i = 0; i < 64; i++) begin
        if ($urandom_range(0, 99) < 15) cur = ~cur;
        inf[i] = (r == 0) ? 1'b0 : cur;
        h[i] = (r % 3 == 0) ? $urandom_range(0, 3) : $urandom_range(0, 65535);
      end
      got = {};
      @(negedge clk); start = 1; @(negedge clk); start = 0;
      checks++; if (!busy) begin failures++; $display("FAIL busy after start"); end
      for (int i = 0; i < 64; i++) begin
        if ($urandom_range(0, 3) == 0) begin @(negedge clk); sv = 0; end
        @(negedge clk); sv = 1; in_is = inf[i]; count = 16'(h[i]); loc = 6'(i); last = (i == 63);
      end
      @(negedge clk); sv = 0; last = 0;
      @(negedge clk);
      checks++; if (busy) begin failures++; $display("FAIL busy after last"); end
      find_bounds(h, inf, exp_q);
      checks++;
      if (got != exp_q) begin
        failures++; $display("FAIL run %0d: got %p exp %p", r, got, exp_q);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
