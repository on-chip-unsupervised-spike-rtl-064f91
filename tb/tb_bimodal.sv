// Self-checking testbench of bimodal: every state and input combination
// against the state diagram (hit moves up, leak moves down, miss holds).
module tb_bimodal;
  import spks_pkg::*;
  use_t cur, nxt;
  logic update, hit, leak;
  int checks = 0, failures = 0;

  bimodal dut (.cur, .update, .hit, .leak, .nxt);

  initial begin #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    // expected next state, indexed [cur][update][hit][leak]
    int e;
    for (int s = 0; s < 4; s++)
      for (int u = 0; u < 2; u++)
        for (int h = 0; h < 2; h++)
          for (int l = 0; l < 2; l++) begin
            cur = use_t'(s); update = u[0]; hit = h[0]; leak = l[0]; #1;
            if (!u)      e = s;
            else if (l)  e = (s == 0) ? 0 : s - 1;
            else if (h)  e = (s == 3) ? 3 : s + 1;
            else         e = s;
            checks++;
            if (nxt !== use_t'(e)) begin
              failures++; $display("FAIL s=%0d u=%0d h=%0d l=%0d -> %0d exp %0d", s, u, h, l, nxt, e);
            end
          end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
