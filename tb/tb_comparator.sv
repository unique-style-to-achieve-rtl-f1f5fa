// tb_comparator: random and directed cases. rslt must be 1 exactly when both
// sipo_op and rop equal romd, tx_ok/rx_ok must show each side, valid must
// follow en by one cycle, and the outputs must hold while en is low.
module tb_comparator;
  logic clk = 1'b0, rst_n = 1'b1, en = 1'b0;
  logic [7:0] sipo_op = '0, rop = '0, romd = '0;
  logic rslt, tx_ok, rx_ok, valid;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  initial #1 rst_n = 1'b0;   // asynchronous reset from the start

  comparator dut (.clk, .rst_n, .en, .sipo_op, .rop, .romd, .rslt, .tx_ok, .rx_ok, .valid);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    bit ea, eb;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < 200; k++) begin
      romd    = 8'($urandom);
      sipo_op = ($urandom_range(0, 1) != 0) ? romd : romd ^ (8'd1 << $urandom_range(0, 7));
      rop     = ($urandom_range(0, 1) != 0) ? romd : romd ^ (8'd1 << $urandom_range(0, 7));
      ea = (sipo_op == romd);
      eb = (rop == romd);
      en = 1'b1; @(negedge clk); en = 1'b0;
      check(valid, "valid after en");
      check(rslt == (ea && eb), $sformatf("rslt %b for %02x %02x %02x", rslt, sipo_op, rop, romd));
      check(tx_ok == ea && rx_ok == eb, "tx_ok/rx_ok");
      sipo_op = ~sipo_op; rop = ~rop;
      @(negedge clk);
      check(!valid && rslt == (ea && eb), "outputs changed without en");
    end
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
