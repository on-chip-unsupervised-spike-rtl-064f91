// Self-checking testbench of distr_mem: random reads and writes against an
// array model, including the registered-read latency and read-before-write.
module tb_distr_mem;
  localparam int DEPTH = 64, W = 16;
  logic clk = 0, rd = 0, wr = 0;
  logic [5:0] addr = '0;
  logic [W-1:0] wdata = '0, rdata;
  int checks = 0, failures = 0;
  int unsigned model [DEPTH];

  distr_mem dut (.clk, .rd, .wr, .addr, .wr_data(wdata), .rd_data(rdata));

  always #5 clk = ~clk;
  initial begin repeat (20000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  task automatic check(input int unsigned exp, input string what);
    checks++;
    if (rdata !== W'(exp)) begin failures++; $display("FAIL %s: got %h exp %h", what, rdata, exp); end
  endtask

  initial begin
    // fill
    for (int i = 0; i < DEPTH; i++) begin
      model[i] = $urandom_range(0, 65535);
      @(negedge clk); wr = 1; rd = 0; addr = 6'(i); wdata = W'(model[i]);
    end
    @(negedge clk); wr = 0;
    // read back
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk); rd = 1; addr = 6'(i);
      @(negedge clk); rd = 0; check(model[i], "readback");
    end
    // read holds when rd is low
    @(negedge clk); check(model[DEPTH-1], "hold");
    // random mix, read and write same address returns old value
    for (int n = 0; n < 2000; n++) begin
      int a, v; bit w;
      a = $urandom_range(0, DEPTH-1); v = $urandom_range(0, 65535); w = $urandom_range(0, 1);
      @(negedge clk); rd = 1; wr = w; addr = 6'(a); wdata = W'(v);
      @(negedge clk); rd = 0; wr = 0;
      check(model[a], "mixed");
      if (w) model[a] = v;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
