// tb_baud_gen: checks that the tick is one cycle wide and comes every CLK_DIV
// cycles, for the default divider (27) and for 5.
module tb_baud_gen;
  logic clk = 1'b0, rst_n = 1'b1;
  logic t27, t5;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  initial #1 rst_n = 1'b0;   // asynchronous reset from the start

  baud_gen dut27 (.clk, .rst_n, .tick(t27));
  baud_gen #(.CLK_DIV(5)) dut5 (.clk, .rst_n, .tick(t5));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  int last27 = -1, last5 = -1, cyc = 0, n27 = 0, n5 = 0;
  always @(posedge clk) if (rst_n) begin
    cyc <= cyc + 1;
    if (t27) begin
      if (last27 >= 0) begin
        check(cyc - last27 == 27, $sformatf("27: spacing %0d", cyc - last27));
        n27 <= n27 + 1;
      end
      last27 <= cyc;
    end
    if (t5) begin
      if (last5 >= 0) begin
        check(cyc - last5 == 5, $sformatf("5: spacing %0d", cyc - last5));
        n5 <= n5 + 1;
      end
      last5 <= cyc;
    end
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    repeat (27 * 30) @(negedge clk);
    check(n27 >= 28, $sformatf("only %0d ticks of 27", n27));
    check(n5 >= 150, $sformatf("only %0d ticks of 5", n5));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
