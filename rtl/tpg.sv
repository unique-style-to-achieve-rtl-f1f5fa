// tpg: test pattern generator of the BIST-enabled UART.
//
// A rule-90 CA register (ca_lfsr) makes the patterns. Each trg pulse steps it
// once; one cycle later the new value is on tx_ip, the parallel input for the
// UART transmitter, and valid pulses so that the transmitter's buffer can be
// written. In the same cycle the PISO captures the value and sends it as a
// UART frame on rx_ip, the serial input for the UART receiver. The PISO has
// its own baud generator with the UART's divider, so the frame arrives at the
// bit rate the receiver expects and a receiver running at the wrong rate is
// caught. busy is high while the PISO is sending.
//
// The CA register feeding both the transmitter (parallel) and, through the
// PISO, the receiver (serial) follows the design description; the valid
// strobe and the separate baud generator are this design's choices.
module tpg
  import bist_pkg::*;
#(
  parameter data_t       SEED    = data_t'(8'h01),
  parameter int unsigned CLK_DIV = 27
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  trg,     // new pattern
  output data_t tx_ip,   // parallel pattern for the transmitter
  output logic  valid,   // tx_ip has just changed
  output logic  rx_ip,   // serial frame for the receiver
  output logic  busy
);

  logic tick;

  ca_lfsr #(.SEED(SEED)) u_ca (
    .clk, .rst_n, .trg, .q(tx_ip)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) valid <= 1'b0;
    else        valid <= trg;
  end

  baud_gen #(.CLK_DIV(CLK_DIV)) u_baud (
    .clk, .rst_n, .tick
  );

  piso u_piso (
    .clk, .rst_n, .tick, .load(valid), .din(tx_ip),
    .sout(rx_ip), .busy, .done()
  );

endmodule
