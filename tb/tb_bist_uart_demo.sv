// tb_bist_uart_demo: the classic demonstration of this self-test at full
// length. The top runs with its default bit period and 255 patterns, but with
// the last ROM word (address 254) deliberately stored wrong. Every comparison
// before it must give rslt = 1 with both UART sides matching; the last one
// must give rslt = 0 with both sides mismatching, and the test must stop there
// and report the UART as faulty (not by time-out).
module tb_bist_uart_demo;
  localparam int NP = 255;

  logic clk = 1'b0, rst_n = 1'b1;
  always #5 clk = ~clk;
  initial #1 rst_n = 1'b0;   // asynchronous reset from the start

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic       start = 0;
  logic [7:0] dout;
  logic       tbr_empty, rdy, rbr_full, ferr, txd;
  logic       busy, done, fail, to, rslt, txok, rxok;
  logic [7:0] addr;

  bist_uart_top #(.CORRUPT_ADDR(NP - 1)) dut (
    .clk, .rst_n,
    .host_wr(1'b0), .host_din(8'h00), .host_tbr_empty(tbr_empty),
    .host_rd(1'b0), .host_dout(dout), .host_rdy(rdy),
    .host_rbr_full(rbr_full), .host_frame_err(ferr),
    .txd, .rxd(1'b1),
    .bist_start(start), .bist_busy(busy), .bist_done(done),
    .bist_fail(fail), .bist_timeout(to), .bist_rslt(rslt),
    .bist_tx_ok(txok), .bist_rx_ok(rxok), .bist_addr(addr)
  );

  // Result of every comparison, one cycle after the compare strobe.
  int nres = 0, ngood = 0;
  logic cmp_q = 1'b0;
  always @(posedge clk) begin
    cmp_q <= dut.cmp_en;
    if (cmp_q) begin
      nres <= nres + 1;
      if (addr != 8'(NP - 1)) begin
        check(rslt && txok && rxok, $sformatf("pattern %0d: rslt %b", addr, rslt));
        if (rslt) ngood <= ngood + 1;
      end else begin
        check(!rslt && !txok && !rxok, "last pattern: rslt not 0");
      end
    end
  end

  initial begin
    repeat (4) @(negedge clk);
    rst_n = 1;
    repeat (4) @(negedge clk);
    start = 1; @(negedge clk); start = 0;
    wait (done);
    @(negedge clk);
    check(fail && !to, "UART not reported faulty at the wrong ROM word");
    check(addr == 8'(NP - 1), $sformatf("stopped at %0d", addr));
    check(nres == NP, $sformatf("%0d comparisons", nres));
    check(ngood == NP - 1, $sformatf("%0d passing comparisons", ngood));
    $display("demo: %0d comparisons, %0d passed, stopped at %0d", nres, ngood, addr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1500000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
