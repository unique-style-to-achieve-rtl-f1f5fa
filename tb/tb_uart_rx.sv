// tb_uart_rx: drives serial frames into the receiver and checks the RBR.
// The bench makes a baud tick every CD = 4 cycles (a 64-cycle bit) and sends
// frames with bit periods of 64 cycles and of 62 and 66 cycles (about 3 %
// off). It checks the data, the rdy pulse and its latency (about 9.5 bits
// after the start edge), rbr_full and its clearing by rd, a framing error
// for a stop bit of 0, and that a short low glitch is not taken as a frame.
module tb_uart_rx;
  localparam int CD = 4;
  logic clk = 1'b0, rst_n = 1'b1, tick = 1'b0, rxd = 1'b1, rd = 1'b0;
  logic [7:0] dout;
  logic rdy, rbr_full, frame_err;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  initial #1 rst_n = 1'b0;   // asynchronous reset from the start

  uart_rx dut (.clk, .rst_n, .tick, .rxd, .rd, .dout, .rdy, .rbr_full, .frame_err);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  int div = 0, cyc = 0;
  always @(posedge clk) begin
    cyc  <= cyc + 1;
    div  <= (div == CD - 1) ? 0 : div + 1;
    tick <= (div == CD - 1);
  end

  int nrdy = 0, rdy_cyc = 0;
  always @(posedge clk) if (rdy) begin
    nrdy    <= nrdy + 1;
    rdy_cyc <= cyc;
  end

  // Sends one frame with the given bit period; stop is the stop-bit level.
  task automatic send(input logic [7:0] b, input int per, input logic stop);
    logic [9:0] f;
    int n0, c0;
    f  = {stop, b, 1'b0};
    n0 = nrdy;
    @(negedge clk);
    c0 = cyc;
    for (int i = 0; i < 10; i++) begin
      rxd = f[i];
      repeat (per) @(negedge clk);
    end
    rxd = 1'b1;
    repeat (2 * per) @(negedge clk);
    check(nrdy == n0 + 1, $sformatf("byte %02x: %0d rdy pulses", b, nrdy - n0));
    check(dout == b, $sformatf("got %02x want %02x", dout, b));
    check(frame_err == !stop, "frame_err");
    check(rbr_full, "rbr_full not set");
    if (per == 16 * CD) begin
      int lat;
      lat = rdy_cyc - c0;
      check(lat >= 9 * per + per / 2 - CD && lat <= 9 * per + per / 2 + 2 * CD + 4,
            $sformatf("rdy latency %0d cycles", lat));
    end
    rd = 1'b1; @(negedge clk); rd = 1'b0;
    check(!rbr_full, "rd does not clear rbr_full");
  endtask

  initial begin
    int n0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (10) @(negedge clk);
    check(!rbr_full && nrdy == 0, "idle after reset");
    send(8'hA5, 16 * CD, 1'b1);
    send(8'h00, 16 * CD, 1'b1);
    send(8'hFF, 16 * CD, 1'b1);
    send(8'h81, 16 * CD, 1'b0);     // framing error
    send(8'h3C, 16 * CD - 2, 1'b1); // fast sender
    send(8'hC3, 16 * CD + 2, 1'b1); // slow sender
    for (int k = 0; k < 6; k++) send(8'($urandom), 16 * CD, 1'b1);
    // glitch shorter than half a bit: no frame
    n0 = nrdy;
    @(negedge clk); rxd = 1'b0;
    repeat (3 * CD) @(negedge clk);
    rxd = 1'b1;
    repeat (12 * 16 * CD) @(negedge clk);
    check(nrdy == n0, "glitch received as a frame");
    send(8'h5A, 16 * CD, 1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
