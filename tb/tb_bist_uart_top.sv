// tb_bist_uart_top: end-to-end test of the BIST-enabled UART at a short bit
// period (CLK_DIV = 2) and a 20-pattern ROM.
//
// Two copies of the design run side by side: "good" with a correct ROM and
// "demo" whose last ROM word is deliberately wrong. The bench checks, against
// its own rule-90 model of the pattern sequence:
//   * normal mode: bytes written by the processor come back through a txd->rxd
//     loop, including a second byte buffered in the TBR while the first is
//     being shifted out;
//   * self-test on "good": every comparison sees the model's pattern on both
//     the SIPO and the ROM, the test passes after 20 patterns, the processor
//     sees no receive strobes meanwhile, and the run takes the expected number
//     of bit periods;
//   * self-test on "demo": the test stops at the last pattern with a failure;
//   * a receiver input held high during a self-test (forced inside "good")
//     ends the test by time-out;
//   * normal mode works again after the tests.
// Each mechanism is counted and one that never happened is a failure.
module tb_bist_uart_top;
  import bist_pkg::*;

  localparam int unsigned CD = 2;
  localparam int unsigned NP = 20;
  localparam int unsigned BIT = 16 * CD;

  logic clk = 1'b0;
  logic rst_n = 1'b1;
  always #5 clk = ~clk;
  initial #1 rst_n = 1'b0;   // asynchronous reset from the start

  int checks = 0, failures = 0;
  int n_normal = 0, n_buffered = 0, n_pass = 0, n_fail_stop = 0, n_timeout = 0;
  int n_compares = 0, n_mode_switch = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Independent reference: rule 90, null boundaries, bit 0 leftmost.
  function automatic logic [7:0] ref_step(input logic [7:0] s);
    return {s[6], s[7] ^ s[5], s[6] ^ s[4], s[5] ^ s[3],
            s[4] ^ s[2], s[3] ^ s[1], s[2] ^ s[0], s[1]};
  endfunction
  logic [7:0] expected [NP];
  initial begin
    logic [7:0] s;
    s = 8'h01;
    for (int k = 0; k < NP; k++) begin
      s = ref_step(s);
      expected[k] = s;
    end
  end

  // ---- good copy -------------------------------------------------------
  logic       g_wr = 0, g_rd = 0, g_start = 0;
  logic [7:0] g_din = 0, g_dout;
  logic       g_tbr_empty, g_rdy, g_rbr_full, g_ferr, g_txd, g_rxd;
  logic       g_busy, g_done, g_fail, g_to, g_rslt, g_txok, g_rxok;
  logic [4:0] g_addr;
  assign g_rxd = g_txd;   // line loop-back

  bist_uart_top #(.CLK_DIV(CD), .NUM_PATTERNS(NP)) good (
    .clk, .rst_n,
    .host_wr(g_wr), .host_din(g_din), .host_tbr_empty(g_tbr_empty),
    .host_rd(g_rd), .host_dout(g_dout), .host_rdy(g_rdy),
    .host_rbr_full(g_rbr_full), .host_frame_err(g_ferr),
    .txd(g_txd), .rxd(g_rxd),
    .bist_start(g_start), .bist_busy(g_busy), .bist_done(g_done),
    .bist_fail(g_fail), .bist_timeout(g_to), .bist_rslt(g_rslt),
    .bist_tx_ok(g_txok), .bist_rx_ok(g_rxok), .bist_addr(g_addr)
  );

  // ---- demo copy: last ROM word wrong ------------------------------------
  logic       d_start = 0, d_txd;
  logic [7:0] d_dout;
  logic       d_tbr_empty, d_rdy, d_rbr_full, d_ferr;
  logic       d_busy, d_done, d_fail, d_to, d_rslt, d_txok, d_rxok;
  logic [4:0] d_addr;

  bist_uart_top #(.CLK_DIV(CD), .NUM_PATTERNS(NP), .CORRUPT_ADDR(NP - 1)) demo (
    .clk, .rst_n,
    .host_wr(1'b0), .host_din(8'h00), .host_tbr_empty(d_tbr_empty),
    .host_rd(1'b0), .host_dout(d_dout), .host_rdy(d_rdy),
    .host_rbr_full(d_rbr_full), .host_frame_err(d_ferr),
    .txd(d_txd), .rxd(1'b1),
    .bist_start(d_start), .bist_busy(d_busy), .bist_done(d_done),
    .bist_fail(d_fail), .bist_timeout(d_to), .bist_rslt(d_rslt),
    .bist_tx_ok(d_txok), .bist_rx_ok(d_rxok), .bist_addr(d_addr)
  );

  // Every comparison in the good copy must see the model's pattern.
  bit check_compares = 0;
  always @(posedge clk) begin
    if (check_compares && good.cmp_en) begin
      n_compares++;
      check(good.romd == expected[good.bist_addr], "ROM word differs from model");
      check(good.sipo_op == expected[good.bist_addr], "SIPO byte differs from model");
      check(good.host_dout == expected[good.bist_addr], "receiver byte differs from model");
    end
  end

  // The processor must see no receive strobes while the test runs.
  always @(posedge clk) if (g_busy && g_rdy) check(0, "host_rdy during self-test");

  // Processor write then wait for the looped-back byte.
  task automatic host_send(input logic [7:0] b0, input logic [7:0] b1, input bit two);
    @(negedge clk); g_din = b0; g_wr = 1;
    @(negedge clk); g_wr = 0;
    if (two) begin
      wait (g_tbr_empty);          // first byte moved into the TSR
      @(negedge clk); g_din = b1; g_wr = 1;
      @(negedge clk); g_wr = 0;
      check(!g_tbr_empty, "second byte not held in TBR");
      n_buffered++;
    end
    @(posedge g_rdy); @(negedge clk);
    check(g_dout == b0, $sformatf("loop-back got %02x want %02x", g_dout, b0));
    check(!g_ferr, "frame error in normal mode");
    n_normal++;
    g_rd = 1; @(negedge clk); g_rd = 0;
    if (two) begin
      @(posedge g_rdy); @(negedge clk);
      check(g_dout == b1, $sformatf("loop-back got %02x want %02x", g_dout, b1));
      n_normal++;
      g_rd = 1; @(negedge clk); g_rd = 0;
    end
  endtask

  initial begin
    int t0, t1, lo, hi;
    repeat (4) @(negedge clk);
    rst_n = 1;
    repeat (4) @(negedge clk);

    // Normal mode.
    host_send(8'hA5, 8'h3C, 1);
    host_send(8'h00, 8'h00, 0);
    host_send(8'hFF, 8'h00, 0);

    // Self-test, good copy.
    check_compares = 1;
    t0 = $time / 10;
    @(negedge clk); g_start = 1; @(negedge clk); g_start = 0;
    check(g_busy, "good: not in test mode after start");
    if (g_busy) n_mode_switch++;
    wait (g_done);
    t1 = $time / 10;
    check_compares = 0;
    check(!g_fail && !g_to, "good: self-test failed");
    check(g_addr == 5'(NP - 1), "good: did not run all patterns");
    check(!g_busy, "good: still in test mode after done");
    // each step: 10 bit periods of the frame plus its start and hand-shake
    lo = NP * 10 * BIT;
    hi = NP * (11 * BIT + 20);
    check(t1 - t0 >= lo && t1 - t0 <= hi,
          $sformatf("good: test took %0d cycles, expected %0d..%0d", t1 - t0, lo, hi));
    if (g_done && !g_fail) n_pass++;

    // Self-test, demo copy with a wrong last ROM word.
    @(negedge clk); d_start = 1; @(negedge clk); d_start = 0;
    wait (d_done);
    check(d_fail && !d_to, "demo: wrong ROM word not reported");
    check(d_addr == 5'(NP - 1), $sformatf("demo: stopped at %0d", d_addr));
    check(!d_rslt && !d_txok && !d_rxok, "demo: rslt/tx_ok/rx_ok not 0");
    if (d_fail) n_fail_stop++;

    // Self-test with the receiver's test input stuck high: time-out.
    force good.tpg_serial = 1'b1;
    @(negedge clk); g_start = 1; @(negedge clk); g_start = 0;
    wait (g_done);
    release good.tpg_serial;
    check(g_fail && g_to, "stuck receiver input not reported");
    check(g_addr == 0, "time-out not at the first pattern");
    if (g_to) n_timeout++;
    repeat (2 * 10 * BIT) @(negedge clk);   // let the transmitter finish

    // Back to normal mode.
    host_send(8'h5A, 8'h00, 0);

    check(n_normal >= 5, "normal-mode transfers missing");
    check(n_buffered > 0, "TBR buffering never exercised");
    check(n_pass > 0, "no passing self-test");
    check(n_fail_stop > 0, "no failing self-test");
    check(n_timeout > 0, "no time-out");
    check(n_compares == NP, $sformatf("compares %0d, expected %0d", n_compares, NP));
    check(n_mode_switch > 0, "no mode switch");
    $display("mechanisms: normal=%0d buffered=%0d pass=%0d fail_stop=%0d timeout=%0d compares=%0d mode_switch=%0d",
             n_normal, n_buffered, n_pass, n_fail_stop, n_timeout, n_compares, n_mode_switch);
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
