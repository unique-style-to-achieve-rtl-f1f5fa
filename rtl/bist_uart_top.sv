// bist_uart_top: UART with built-in self-test driven by a cellular-automaton
// pattern generator.
//
// Normal mode: the processor writes bytes to the transmitter (host_wr,
// host_din) and reads bytes from the receiver (host_rd, host_dout); the UART
// talks to the line on txd and rxd. Self-test: a pulse on bist_start makes the
// controller (bcu) take over the UART. The test pattern generator (tpg) steps
// its rule-90 CA register for each pattern; the new byte is written in
// parallel into the transmitter, and the same byte, framed by the TPG's PISO,
// is fed serially into the receiver instead of rxd. The test response analyser
// (tra) captures the transmitter's serial output in its SIPO and compares it,
// and the receiver's parallel output, with the ROM word for that pattern. The
// test stops at the first mismatch (bist_fail = 1, bist_addr = failing
// pattern number, bist_tx_ok/bist_rx_ok = which UART side matched) or after
// NUM_PATTERNS matches (bist_fail = 0); bist_done then stays high and the
// UART returns to normal mode. While the test runs the processor's writes and
// reads are ignored and txd carries the test frames.
//
// One pattern takes about 10 bit periods (10*16*CLK_DIV clock cycles) plus a
// few cycles, so the full test of 255 patterns at CLK_DIV = 27 takes about
// 1.1 million clock cycles. The structure TPG -> UART -> TRA with a BIST
// controller, the CA register and the 255-entry ROM follow the design
// description; the mode multiplexers, handshakes, bit rate and time-out are
// this design's choices.
module bist_uart_top
  import bist_pkg::*;
#(
  parameter int unsigned CLK_DIV      = 27,
  parameter int unsigned NUM_PATTERNS = 255,
  parameter data_t       SEED         = data_t'(8'h01),
  parameter int          CORRUPT_ADDR = -1,
  localparam int unsigned AW          = (NUM_PATTERNS > 1) ? $clog2(NUM_PATTERNS) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  // processor side (8-bit parallel port)
  input  logic          host_wr,
  input  data_t         host_din,
  output logic          host_tbr_empty,
  input  logic          host_rd,
  output data_t         host_dout,
  output logic          host_rdy,
  output logic          host_rbr_full,
  output logic          host_frame_err,
  // serial line
  output logic          txd,
  input  logic          rxd,
  // self-test
  input  logic          bist_start,
  output logic          bist_busy,
  output logic          bist_done,
  output logic          bist_fail,
  output logic          bist_timeout,
  output logic          bist_rslt,
  output logic          bist_tx_ok,
  output logic          bist_rx_ok,
  output logic [AW-1:0] bist_addr
);

  // Four frame times: generous bound for one test step.
  localparam int unsigned WAIT_LIMIT = 4 * FRAME_W * OVERSAMPLE * CLK_DIV;

  logic  test_mode, trg, sipo_clr, cmp_en;
  logic  tpg_valid, tpg_serial, tpg_busy;
  data_t tpg_data;
  logic  u_wr, u_rxd, u_rd;
  data_t u_din;
  logic  tx_busy, tx_done, tx_mid, rdy;
  logic  sipo_valid, rslt_valid;
  data_t sipo_op, romd;

  tpg #(.SEED(SEED), .CLK_DIV(CLK_DIV)) u_tpg (
    .clk, .rst_n, .trg, .tx_ip(tpg_data), .valid(tpg_valid),
    .rx_ip(tpg_serial), .busy(tpg_busy)
  );

  // Mode multiplexers in front of the UART.
  always_comb begin
    if (test_mode) begin
      u_wr  = tpg_valid;
      u_din = tpg_data;
      u_rxd = tpg_serial;
      u_rd  = cmp_en;
    end else begin
      u_wr  = host_wr;
      u_din = host_din;
      u_rxd = rxd;
      u_rd  = host_rd;
    end
  end

  uart #(.CLK_DIV(CLK_DIV)) u_uart (
    .clk, .rst_n,
    .wr(u_wr), .din(u_din), .txd, .tbr_empty(host_tbr_empty),
    .tx_busy, .tx_done, .tx_mid,
    .rxd(u_rxd), .rd(u_rd), .dout(host_dout), .rdy,
    .rbr_full(host_rbr_full), .frame_err(host_frame_err)
  );

  assign host_rdy = rdy && !test_mode;

  tra #(
    .DEPTH(NUM_PATTERNS), .SEED(SEED), .CORRUPT_ADDR(CORRUPT_ADDR)
  ) u_tra (
    .clk, .rst_n, .txd, .tx_mid, .sipo_clr, .sipo_valid,
    .rop(host_dout), .addr(bist_addr), .cmp_en,
    .sipo_op, .romd, .rslt(bist_rslt), .tx_ok(bist_tx_ok), .rx_ok(bist_rx_ok),
    .rslt_valid
  );

  bcu #(.NUM_PATTERNS(NUM_PATTERNS), .WAIT_LIMIT(WAIT_LIMIT)) u_bcu (
    .clk, .rst_n, .start(bist_start), .sipo_valid, .rx_rdy(rdy),
    .tx_busy, .tpg_busy, .rslt(bist_rslt), .rslt_valid,
    .test_mode, .trg, .sipo_clr, .cmp_en, .addr(bist_addr),
    .busy(bist_busy), .done(bist_done), .fail(bist_fail),
    .timeout(bist_timeout)
  );

endmodule
