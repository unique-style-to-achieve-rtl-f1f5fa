// tra: test response analyser of the BIST-enabled UART.
//
// The transmitter's serial output txd is shifted into a SIPO at the
// transmitter's mid-bit strobes (tx_mid), giving sipo_op. The receiver's
// parallel output rop needs no conversion. The ROM is read at addr, the
// number of the pattern under test, and a comparison request (cmp_en) checks
// sipo_op and rop against that ROM word: rslt is 1 if both match. sipo_valid
// tells the controller that the transmitter's frame has been captured;
// sipo_clr empties the SIPO before the next pattern.
//
// Timing: romd follows addr by one cycle; rslt and rslt_valid follow cmp_en by
// one cycle; addr must be stable at least one cycle before cmp_en. The
// SIPO/ROM/comparator structure follows the design description.
module tra
  import bist_pkg::*;
#(
  parameter int unsigned DEPTH        = 255,
  parameter data_t       SEED         = data_t'(8'h01),
  parameter int          CORRUPT_ADDR = -1,
  localparam int unsigned AW          = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          txd,
  input  logic          tx_mid,
  input  logic          sipo_clr,
  output logic          sipo_valid,
  input  data_t         rop,
  input  logic [AW-1:0] addr,
  input  logic          cmp_en,
  output data_t         sipo_op,
  output data_t         romd,
  output logic          rslt,
  output logic          tx_ok,
  output logic          rx_ok,
  output logic          rslt_valid
);

  sipo u_sipo (
    .clk, .rst_n, .clr(sipo_clr), .shift(tx_mid), .sin(txd),
    .q(sipo_op), .valid(sipo_valid)
  );

  pattern_rom #(
    .DEPTH(DEPTH), .SEED(SEED), .CORRUPT_ADDR(CORRUPT_ADDR)
  ) u_rom (
    .clk, .addr, .romd
  );

  comparator u_cmp (
    .clk, .rst_n, .en(cmp_en), .sipo_op, .rop, .romd,
    .rslt, .tx_ok, .rx_ok, .valid(rslt_valid)
  );

endmodule
