// Self-checking testbench of wta: random candidate sets against a linear
// search for the smallest distance (lowest index on ties).
module tb_wta;
  logic [7:0] cand;
  logic [7:0][1:0] dist_v;
  logic valid;
  logic [2:0] idx;
  logic [1:0] wd;
  int checks = 0, failures = 0;

  wta dut (.cand, .gdist(dist_v), .valid, .idx, .win_dist(wd));

  initial begin #10000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    for (int n = 0; n < 30000; n++) begin
      automatic int best = -1;
      cand = 8'($urandom); dist_v = 16'($urandom);
      if (n < 256) cand = 8'(n);
      #1;
      for (int i = 0; i < 8; i++)
        if (cand[i] && (best < 0 || dist_v[i] < dist_v[best])) best = i;
      checks++;
      if (valid !== (best >= 0) || (best >= 0 && (idx !== 3'(best) || wd !== dist_v[best]))) begin
        failures++; $display("FAIL cand %b dist_v %h -> %b %0d exp %0d", cand, dist_v, valid, idx, best);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
