// tb_bcu: the BIST controller against a bench model of the TPG, UART and TRA.
// The model answers each trg after a random delay with sipo_valid and rx_rdy
// (in either order), keeps tx_busy/tpg_busy high for a while, and answers
// each cmp_en one cycle later with rslt taken from a list of good/bad
// patterns. Runs: all 8 patterns good (pass); pattern 5 bad (fail at 5, no
// further trg); the UART never answering (time-out after WAIT_LIMIT cycles).
// test_mode, trg and cmp_en counts and the addresses are checked.
module tb_bcu;
  localparam int NP = 8;
  localparam int WL = 100;
  logic clk = 1'b0, rst_n = 1'b1, start = 1'b0;
  logic sipo_valid = 1'b0, rx_rdy = 1'b0, tx_busy = 1'b0, tpg_busy = 1'b0;
  logic rslt = 1'b0, rslt_valid = 1'b0;
  logic test_mode, trg, sipo_clr, cmp_en, busy, done, fail, timeout;
  logic [2:0] addr;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  initial #1 rst_n = 1'b0;   // asynchronous reset from the start

  bcu #(.NUM_PATTERNS(NP), .WAIT_LIMIT(WL)) dut (
    .clk, .rst_n, .start, .sipo_valid, .rx_rdy, .tx_busy, .tpg_busy, .rslt, .rslt_valid,
    .test_mode, .trg, .sipo_clr, .cmp_en, .addr, .busy, .done, .fail, .timeout
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  int bad_at = -1;      // pattern whose comparison fails
  bit mute = 0;         // UART never answers
  int ntrg = 0, ncmp = 0;

  // Environment model.
  always @(posedge clk) begin
    if (trg) begin
      ntrg <= ntrg + 1;
      check(sipo_clr, "sipo_clr with trg");
      check(test_mode, "trg outside test mode");
      if (!mute) fork
        begin
          int d1, d2;
          d1 = $urandom_range(5, 30);
          d2 = $urandom_range(5, 30);
          tx_busy <= 1'b1; tpg_busy <= 1'b1;
          fork
            begin repeat (d1) @(posedge clk); sipo_valid <= 1'b1; @(posedge clk); sipo_valid <= 1'b0; end
            begin repeat (d2) @(posedge clk); rx_rdy <= 1'b1; @(posedge clk); rx_rdy <= 1'b0; end
          join
          repeat ($urandom_range(0, 5)) @(posedge clk);
          tx_busy <= 1'b0; tpg_busy <= 1'b0;
        end
      join_none
    end
    rslt_valid <= cmp_en;
    if (cmp_en) begin
      ncmp <= ncmp + 1;
      check(!tx_busy && !tpg_busy, "compare while busy");
      rslt <= (int'(addr) != bad_at);
    end
  end

  task automatic run();
    @(negedge clk); start = 1'b1; @(negedge clk); start = 1'b0;
    check(test_mode && busy, "test mode after start");
    while (!done) @(negedge clk);
    check(!test_mode, "test mode after done");
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(!test_mode && !done, "idle after reset");
    // all good
    ntrg = 0; ncmp = 0; bad_at = -1;
    run();
    check(!fail && !timeout, "pass run failed");
    check(addr == 3'(NP - 1), "pass run address");
    check(ntrg == NP && ncmp == NP, $sformatf("pass run: %0d trg %0d cmp", ntrg, ncmp));
    // pattern 5 bad
    repeat (40) @(negedge clk);
    ntrg = 0; ncmp = 0; bad_at = 5;
    run();
    check(fail && !timeout, "bad pattern not reported");
    check(addr == 3'd5, $sformatf("stopped at %0d", addr));
    check(ntrg == 6 && ncmp == 6, $sformatf("fail run: %0d trg %0d cmp", ntrg, ncmp));
    // no answer
    repeat (40) @(negedge clk);
    ntrg = 0; ncmp = 0; bad_at = -1; mute = 1;
    run();
    check(fail && timeout, "time-out not reported");
    check(ntrg == 1 && ncmp == 0, "time-out run counts");
    repeat (5) @(negedge clk);
    check(done && fail, "result not held");
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
