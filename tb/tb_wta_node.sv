// Self-checking testbench of wta_node: all 64 input combinations.
module tb_wta_node;
  logic va, vb, v, sel;
  logic [1:0] da, db, d;
  int checks = 0, failures = 0;

  wta_node dut (.va, .vb, .da, .db, .v, .d, .sel);

  initial begin #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    for (int n = 0; n < 64; n++) begin
      bit es; int ed;
      {va, vb, da, db} = 6'(n); #1;
      if (va && vb) es = (db < da); else es = vb;
      ed = es ? db : da;
      checks++;
      if (sel !== es || v !== (va | vb) || ((va | vb) && d !== 2'(ed))) begin
        failures++; $display("FAIL %b%b %0d %0d -> sel %b v %b d %0d", va, vb, da, db, sel, v, d);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
