// Self-checking testbench of laplace_cmp: corner values and random triples
// against the integer formula 2F(i) > F(i-1)+F(i+1)+8.
module tb_laplace_cmp;
  logic [15:0] a, b, c;
  logic inf;
  int checks = 0, failures = 0;

  laplace_cmp dut (.f_prev(a), .f_cur(b), .f_next(c), .informative(inf));

  initial begin #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  task automatic t(input int unsigned x, y, z);
    bit exp;
    a = 16'(x); b = 16'(y); c = 16'(z); #1;
    exp = (longint'(2) * y) > (longint'(x) + z + 8);
    checks++;
    if (inf !== exp) begin failures++; $display("FAIL %0d %0d %0d -> %b", x, y, z, inf); end
  endtask

  initial begin
    t(0, 0, 0); t(0, 4, 0); t(0, 5, 0); t(1, 5, 1); t(0, 5, 1);
    t(65535, 65535, 65535); t(0, 65535, 65535); t(65535, 65535, 0);
    t(65535, 32771, 0); t(65535, 32772, 0); t(10, 14, 10); t(10, 15, 10);
    for (int n = 0; n < 20000; n++) begin
      if (n % 2) t($urandom_range(0, 65535), $urandom_range(0, 65535), $urandom_range(0, 65535));
      else begin
        automatic int unsigned m = $urandom_range(0, 60000);
        t(m + $urandom_range(0, 20), m + $urandom_range(0, 20), m + $urandom_range(0, 20));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
