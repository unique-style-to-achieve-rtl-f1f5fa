// tb_piso: checks the PISO's serial frame bit by bit. The bench makes its own
// baud tick (every 3 cycles), counts ticks from the load and samples sout in
// the middle of each 16-tick bit: start bit 0, data LSB first, stop bit 1,
// then idle high. It also checks busy, the done pulse and that a load while
// busy is ignored.
module tb_piso;
  logic clk = 1'b0, rst_n = 1'b1, tick = 1'b0, load = 1'b0;
  logic [7:0] din = '0;
  logic sout, busy, done;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  initial #1 rst_n = 1'b0;   // asynchronous reset from the start

  piso dut (.clk, .rst_n, .tick, .load, .din, .sout, .busy, .done);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  int div = 0;
  always @(posedge clk) begin
    div  <= (div == 2) ? 0 : div + 1;
    tick <= (div == 2);
  end

  int ndone = 0;
  always @(posedge clk) if (done) ndone <= ndone + 1;

  task automatic send(input logic [7:0] b);
    logic [9:0] f;
    int nt;
    f = {1'b1, b, 1'b0};
    @(negedge clk); din = b; load = 1'b1;
    @(negedge clk); load = 1'b0; din = ~b;
    check(busy, "busy after load");
    nt = 0;
    for (int i = 0; i < 10; i++) begin
      while (nt < 16 * i + 8) begin
        @(negedge clk);
        if (tick) nt++;
      end
      check(sout == f[i], $sformatf("byte %02x bit %0d: %b", b, i, sout));
      if (i == 4) begin   // load while busy must be ignored
        load = 1'b1; @(negedge clk); load = 1'b0;
        if (tick) nt++;
      end
    end
    while (busy) @(negedge clk);
    @(negedge clk);
    check(sout == 1'b1, "idle high after frame");
  endtask

  initial begin
    int d0;
    check(1, "start");
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(sout == 1'b1 && !busy, "idle after reset");
    d0 = ndone;
    send(8'hA5);
    send(8'h00);
    send(8'hFF);
    for (int k = 0; k < 5; k++) send(8'($urandom));
    check(ndone - d0 == 8, $sformatf("done pulses %0d", ndone - d0));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
