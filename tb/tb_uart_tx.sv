// tb_uart_tx: checks the transmitter's frames, its TBR/TSR buffering and its
// status. The bench makes its own baud tick (every 2 cycles) and samples txd
// at the middle of each 16-tick bit, counted from the cycle the TSR is loaded
// (the cycle after the TBR is written while the TSR is idle). It writes two
// bytes back to back (the second waits in the TBR), checks that a third write
// to a full TBR is ignored, that mid strobes come once per bit in the middle
// of the bit, and that done pulses once per frame.
module tb_uart_tx;
  logic clk = 1'b0, rst_n = 1'b1, tick = 1'b0, wr = 1'b0;
  logic [7:0] din = '0;
  logic txd, tbr_empty, busy, done, mid;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  initial #1 rst_n = 1'b0;   // asynchronous reset from the start

  uart_tx dut (.clk, .rst_n, .tick, .wr, .din, .txd, .tbr_empty, .busy, .done, .mid);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  always @(posedge clk) tick <= ~tick;

  // Tick counter; fbase is its value when the current frame started.
  int nt = 0, nmid = 0, ndone = 0, fbase = 0;
  always @(posedge clk) begin
    if (tick) nt <= nt + 1;
    if (mid) begin
      nmid <= nmid + 1;
      check(((nt - fbase) % 16) == 7,
            $sformatf("mid strobe after %0d ticks of the bit", (nt - fbase) % 16));
    end
    if (done) ndone <= ndone + 1;
  end

  // Frame starts: the line falls to a start bit once the previous frame's
  // 160 ticks have passed.
  int nstart = 0, nexp = 0;
  logic txd_n = 1'b1;
  always @(negedge clk) begin
    if (txd_n && !txd && (nstart == 0 || nt - fbase >= 160)) begin
      fbase = nt;
      nstart++;
    end
    txd_n = txd;
  end

  task automatic expect_frame(input logic [7:0] b);
    logic [9:0] f;
    int base;
    f = {1'b1, b, 1'b0};
    nexp++;
    while (nstart < nexp) @(negedge clk);
    base = fbase;
    for (int i = 0; i < 10; i++) begin
      while (nt - base < 16 * i + 8) @(negedge clk);
      check(txd == f[i], $sformatf("byte %02x bit %0d: %b", b, i, txd));
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(txd && tbr_empty && !busy, "idle after reset");
    // first byte
    din = 8'h96; wr = 1'b1; @(negedge clk); wr = 1'b0;
    check(busy, "busy after write");
    @(negedge clk);
    check(tbr_empty, "TBR freed when the TSR took the byte");
    // second byte waits in the TBR
    din = 8'h3B; wr = 1'b1; @(negedge clk); wr = 1'b0;
    check(!tbr_empty, "TBR full with second byte");
    // third write to a full TBR: ignored
    din = 8'hEE; wr = 1'b1; @(negedge clk); wr = 1'b0;
    expect_frame(8'h96);
    expect_frame(8'h3B);
    while (busy) @(negedge clk);
    repeat (40) @(negedge clk);
    check(txd, "line idle after two frames");
    check(ndone == 2, $sformatf("done pulses %0d", ndone));
    check(nmid == 20, $sformatf("mid strobes %0d", nmid));
    // a few random bytes one at a time
    for (int k = 0; k < 4; k++) begin
      logic [7:0] b;
      b = 8'($urandom);
      din = b; wr = 1'b1; @(negedge clk); wr = 1'b0;
      expect_frame(b);
      while (busy) @(negedge clk);
    end
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
