// tb_tpg: checks the test pattern generator. After each trg pulse tx_ip must
// hold the next rule-90 pattern (independent model) one cycle later, with a
// valid pulse, and rx_ip must carry the same byte as a UART frame at 16*CD
// cycles per bit, which the bench decodes by sampling mid-bit from the start
// edge.
module tb_tpg;
  localparam int CD = 2;
  localparam int BIT = 16 * CD;
  logic clk = 1'b0, rst_n = 1'b1, trg = 1'b0;
  logic [7:0] tx_ip;
  logic valid, rx_ip, busy;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  initial #1 rst_n = 1'b0;   // asynchronous reset from the start

  tpg #(.CLK_DIV(CD)) dut (.clk, .rst_n, .trg, .tx_ip, .valid, .rx_ip, .busy);

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

  initial begin
    logic [7:0] m, r;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(tx_ip == 8'h01 && rx_ip == 1'b1 && !busy, "reset state");
    m = 8'h01;
    for (int k = 0; k < 16; k++) begin
      trg = 1'b1; @(negedge clk); trg = 1'b0;
      m = model(m);
      check(valid, "valid pulse");
      check(tx_ip == m, $sformatf("pattern %0d: %02x want %02x", k, tx_ip, m));
      // decode the serial frame
      while (rx_ip) @(negedge clk);
      repeat (BIT / 2) @(negedge clk);
      check(rx_ip == 1'b0, "start bit");
      for (int i = 0; i < 8; i++) begin
        repeat (BIT) @(negedge clk);
        r[i] = rx_ip;
      end
      repeat (BIT) @(negedge clk);
      check(rx_ip == 1'b1, "stop bit");
      check(r == m, $sformatf("serial %0d: %02x want %02x", k, r, m));
      while (busy) @(negedge clk);
      check(tx_ip == m, "pattern changed without trg");
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
