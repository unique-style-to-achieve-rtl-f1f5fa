// tb_bist_uart_full: the BIST-enabled UART at its default parameters (bit
// period 16*27 clock cycles, 255 test patterns). It sends two bytes through a
// txd->rxd loop in normal mode, runs the complete self-test, checks that it
// passes after all 255 patterns in the expected time (10 to 11 bit periods per
// pattern), checks every comparison against an independent rule-90 model, and
// sends one more byte in normal mode afterwards.
module tb_bist_uart_full;
  localparam int NP  = 255;
  localparam int BIT = 16 * 27;

  logic clk = 1'b0, rst_n = 1'b1;
  always #5 clk = ~clk;
  initial #1 rst_n = 1'b0;   // asynchronous reset from the start

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic logic [7:0] model(input logic [7:0] s);
    logic [7:0] n;
    n[0] = s[1];
    for (int i = 1; i < 7; i++) n[i] = s[i-1] ^ s[i+1];
    n[7] = s[6];
    return n;
  endfunction
  logic [7:0] expected [NP];
  initial begin
    logic [7:0] s;
    s = 8'h01;
    for (int k = 0; k < NP; k++) begin
      s = model(s);
      expected[k] = s;
    end
  end

  logic       wr = 0, rd = 0, start = 0;
  logic [7:0] din = 0, dout;
  logic       tbr_empty, rdy, rbr_full, ferr, txd;
  logic       busy, done, fail, to, rslt, txok, rxok;
  logic [7:0] addr;

  bist_uart_top dut (
    .clk, .rst_n,
    .host_wr(wr), .host_din(din), .host_tbr_empty(tbr_empty),
    .host_rd(rd), .host_dout(dout), .host_rdy(rdy),
    .host_rbr_full(rbr_full), .host_frame_err(ferr),
    .txd, .rxd(txd),
    .bist_start(start), .bist_busy(busy), .bist_done(done),
    .bist_fail(fail), .bist_timeout(to), .bist_rslt(rslt),
    .bist_tx_ok(txok), .bist_rx_ok(rxok), .bist_addr(addr)
  );

  int cyc = 0, ncmp = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (dut.cmp_en) begin
      ncmp <= ncmp + 1;
      check(dut.romd == expected[addr] && dut.sipo_op == expected[addr]
            && dut.host_dout == expected[addr],
            $sformatf("pattern %0d differs from model", addr));
    end
  end

  task automatic host_send(input logic [7:0] b);
    @(negedge clk); din = b; wr = 1; @(negedge clk); wr = 0;
    @(posedge rdy); @(negedge clk);
    check(dout == b && !ferr, $sformatf("loop-back %02x want %02x", dout, b));
    rd = 1; @(negedge clk); rd = 0;
  endtask

  initial begin
    int t0;
    repeat (4) @(negedge clk);
    rst_n = 1;
    host_send(8'hC9);
    host_send(8'h36);
    t0 = cyc;
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    wait (done);
    check(!fail && !to && rslt, "self-test did not pass");
    check(addr == 8'(NP - 1), "not all patterns run");
    check(ncmp == NP, $sformatf("%0d comparisons", ncmp));
    check(cyc - t0 >= NP * 10 * BIT && cyc - t0 <= NP * 11 * BIT,
          $sformatf("self-test took %0d cycles", cyc - t0));
    $display("self-test: %0d patterns in %0d cycles", ncmp, cyc - t0);
    repeat (2 * BIT) @(negedge clk);
    host_send(8'hE7);
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
