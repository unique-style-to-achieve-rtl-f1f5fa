// tb_uart: the UART with its serial output looped back to its input. Bytes
// written on the parallel port must come back on it in order, with no
// framing error; the bit period (16 * CLK_DIV cycles) is checked from the
// spacing of back-to-back frames.
module tb_uart;
  localparam int CD = 3;
  logic clk = 1'b0, rst_n = 1'b1, wr = 1'b0, rd = 1'b0;
  logic [7:0] din = '0, dout;
  logic txd, tbr_empty, tx_busy, tx_done, tx_mid, rdy, rbr_full, frame_err;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  initial #1 rst_n = 1'b0;   // asynchronous reset from the start

  uart #(.CLK_DIV(CD)) dut (
    .clk, .rst_n, .wr, .din, .txd, .tbr_empty, .tx_busy, .tx_done, .tx_mid,
    .rxd(txd), .rd, .dout, .rdy, .rbr_full, .frame_err
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  logic [7:0] sent [$];
  int nrx = 0, last_rdy = -1;
  always @(posedge clk) if (rdy) begin
    if (sent.size() == 0) check(0, "unexpected byte");
    else begin
      logic [7:0] e;
      e = sent.pop_front();
      check(dout == e, $sformatf("got %02x want %02x", dout, e));
      check(!frame_err, "frame error");
      if (last_rdy >= 0)
        check(cyc - last_rdy >= 10 * 16 * CD && cyc - last_rdy <= 10 * 16 * CD + 2,
              $sformatf("frames %0d cycles apart", cyc - last_rdy));
    end
    last_rdy <= cyc;
    nrx <= nrx + 1;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (5) @(negedge clk);
    for (int k = 0; k < 20; k++) begin
      logic [7:0] b;
      b = (k == 0) ? 8'h55 : 8'($urandom);
      while (!tbr_empty) @(negedge clk);
      din = b; wr = 1'b1; sent.push_back(b);
      @(negedge clk); wr = 1'b0;
    end
    while (tx_busy) @(negedge clk);
    repeat (16 * CD * 2) @(negedge clk);
    check(nrx == 20, $sformatf("received %0d of 20", nrx));
    check(rbr_full, "rbr_full");
    rd = 1'b1; @(negedge clk); rd = 1'b0;
    check(!rbr_full, "rd");
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
