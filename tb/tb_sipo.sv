// tb_sipo: shifts frames into the SIPO with irregular gaps between shift
// strobes and checks the data bits, the valid pulse after exactly 10 shifts,
// and that clr restarts the count in the middle of a frame.
module tb_sipo;
  logic clk = 1'b0, rst_n = 1'b1, clr = 1'b0, shift = 1'b0, sin = 1'b0;
  logic [7:0] q;
  logic valid;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  initial #1 rst_n = 1'b0;   // asynchronous reset from the start

  sipo dut (.clk, .rst_n, .clr, .shift, .sin, .q, .valid);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  int nvalid = 0;
  always @(posedge clk) if (valid) nvalid <= nvalid + 1;

  task automatic shift_in(input logic [9:0] f, input int nbits);
    for (int i = 0; i < nbits; i++) begin
      sin = f[i]; shift = 1'b1; @(negedge clk); shift = 1'b0;
      repeat ($urandom_range(0, 3)) @(negedge clk);
    end
  endtask

  initial begin
    int n0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < 12; k++) begin
      logic [7:0] b;
      b  = (k == 0) ? 8'hA5 : 8'($urandom);
      n0 = nvalid;
      clr = 1'b1; @(negedge clk); clr = 1'b0;
      if (k == 3) shift_in({1'b1, ~b, 1'b0}, 6);   // partial frame, then clr
      if (k == 3) begin clr = 1'b1; @(negedge clk); clr = 1'b0; end
      shift_in({1'b1, b, 1'b0}, 9);
      @(negedge clk);
      check(nvalid == n0, "valid before the 10th bit");
      shift_in({1'b1, b, 1'b0} >> 9, 1);
      @(negedge clk);
      check(nvalid == n0 + 1, "no valid after 10 bits");
      check(q == b, $sformatf("q %02x want %02x", q, b));
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
