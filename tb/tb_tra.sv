// tb_tra: the test response analyser with a 12-word ROM. For each address the
// bench shifts a frame into the SIPO through txd/tx_mid, sets rop, and asks
// for a comparison. The bytes are the rule-90 patterns of an independent
// model, or that pattern with one bit flipped on the transmitter side, the
// receiver side or both; rslt, tx_ok and rx_ok must follow.
module tb_tra;
  localparam int NP = 12;
  logic clk = 1'b0, rst_n = 1'b1, txd = 1'b1, tx_mid = 1'b0, sipo_clr = 1'b0, cmp_en = 1'b0;
  logic [7:0] rop = '0, sipo_op, romd;
  logic [3:0] addr = '0;
  logic sipo_valid, rslt, tx_ok, rx_ok, rslt_valid;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  initial #1 rst_n = 1'b0;   // asynchronous reset from the start

  tra #(.DEPTH(NP)) dut (
    .clk, .rst_n, .txd, .tx_mid, .sipo_clr, .sipo_valid, .rop, .addr, .cmp_en,
    .sipo_op, .romd, .rslt, .tx_ok, .rx_ok, .rslt_valid
  );

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

  int nsv = 0;
  always @(posedge clk) if (sipo_valid) nsv <= nsv + 1;

  initial begin
    logic [7:0] m, tb_, rb_;
    logic [9:0] f;
    int n0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    m = 8'h01;
    for (int k = 0; k < NP; k++) begin
      int mode;
      m = model(m);
      mode = k % 4;            // 0 good, 1 tx bad, 2 rx bad, 3 both bad
      tb_ = (mode == 1 || mode == 3) ? m ^ 8'h10 : m;
      rb_ = (mode == 2 || mode == 3) ? m ^ 8'h02 : m;
      addr = 4'(k);
      n0 = nsv;
      sipo_clr = 1'b1; @(negedge clk); sipo_clr = 1'b0;
      f = {1'b1, tb_, 1'b0};
      for (int i = 0; i < 10; i++) begin
        txd = f[i];
        repeat (3) @(negedge clk);
        tx_mid = 1'b1; @(negedge clk); tx_mid = 1'b0;
      end
      txd = 1'b1;
      rop = rb_;
      @(negedge clk);
      check(nsv == n0 + 1, "sipo_valid");
      check(sipo_op == tb_, "sipo_op");
      check(romd == m, $sformatf("romd %02x want %02x", romd, m));
      cmp_en = 1'b1; @(negedge clk); cmp_en = 1'b0;
      check(rslt_valid, "rslt_valid");
      check(rslt == (mode == 0), $sformatf("pattern %0d mode %0d: rslt %b", k, mode, rslt));
      check(tx_ok == (mode == 0 || mode == 2), "tx_ok");
      check(rx_ok == (mode == 0 || mode == 1), "rx_ok");
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
