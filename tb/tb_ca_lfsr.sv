// tb_ca_lfsr: checks the rule-90 CA register against an independent model.
// Covers the reset value, holding while trg is low, 40 steps from the
// default seed, the cycle length of 14 from seed 8'h01, and a second seed.
module tb_ca_lfsr;
  logic clk = 1'b0, rst_n = 1'b1, trg = 1'b0;
  logic [7:0] q, q2;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  initial #1 rst_n = 1'b0;   // asynchronous reset from the start

  ca_lfsr dut (.clk, .rst_n, .trg, .q);
  ca_lfsr #(.SEED(8'h5A)) dut2 (.clk, .rst_n, .trg, .q(q2));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // Rule 90, null boundaries, written out cell by cell.
  function automatic logic [7:0] model(input logic [7:0] s);
    logic [7:0] n;
    n[0] = s[1];
    for (int i = 1; i < 7; i++) n[i] = s[i-1] ^ s[i+1];
    n[7] = s[6];
    return n;
  endfunction

  initial begin
    logic [7:0] m, m2;
    int period;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    check(q == 8'h01, "reset value");
    check(q2 == 8'h5A, "reset value, second seed");
    repeat (3) @(negedge clk);
    check(q == 8'h01, "holds without trg");
    m = 8'h01; m2 = 8'h5A; period = 0;
    for (int k = 1; k <= 40; k++) begin
      trg = 1'b1; @(negedge clk); trg = 1'b0;
      m = model(m); m2 = model(m2);
      check(q == m, $sformatf("step %0d: %02x want %02x", k, q, m));
      check(q2 == m2, $sformatf("seed 2 step %0d: %02x want %02x", k, q2, m2));
      if (period == 0 && q == 8'h01) period = k;
      @(negedge clk);
      check(q == m, "changed without trg");
    end
    check(period == 14, $sformatf("cycle length %0d, expected 14", period));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
