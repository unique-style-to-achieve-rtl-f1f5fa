// tb_pattern_rom: reads every word of the default 255-entry ROM and compares
// it with an independent rule-90 model started from 8'h01 (entry k is the
// pattern after k+1 steps), with the one-cycle read latency. A second ROM of
// 10 words with CORRUPT_ADDR = 9 must hold the inverted pattern in its last
// word only, and an address past the end must read 0.
module tb_pattern_rom;
  logic clk = 1'b0;
  logic [7:0] addr = '0;
  logic [3:0] addr2 = '0;
  logic [7:0] romd, romd2;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  pattern_rom dut (.clk, .addr, .romd);
  pattern_rom #(.DEPTH(10), .CORRUPT_ADDR(9)) dut2 (.clk, .addr(addr2), .romd(romd2));

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
    logic [7:0] m;
    m = 8'h01;
    for (int k = 0; k < 255; k++) begin
      m = model(m);
      @(negedge clk); addr = 8'(k); addr2 = 4'(k % 10);
      @(negedge clk);
      check(romd == m, $sformatf("word %0d: %02x want %02x", k, romd, m));
      if (k < 10)
        check(romd2 == ((k == 9) ? ~m : m), $sformatf("small ROM word %0d: %02x", k, romd2));
    end
    @(negedge clk); addr = 8'd255; addr2 = 4'd12;
    @(negedge clk);
    check(romd == 8'h00, "past the end not 0");
    check(romd2 == 8'h00, "small ROM past the end not 0");
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
