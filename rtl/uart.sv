// uart: the UART that the BIST logic tests (the circuit under test).
//
// It holds a baud generator, the transmitter (TBR + TSR) and the receiver
// (RSR + RBR). Towards the processor it looks like an 8-bit parallel
// read/write port: wr/din write the transmit buffer, rd/dout read the receive
// buffer, and the status bits tell when each may be used. Towards the line it
// has txd and rxd, both idle high. tx_mid marks the middle of each bit period
// of the transmitter so that on-chip test logic can sample txd; tx_done marks
// the end of a transmitted frame.
//
// Splitting the UART into transmitter and receiver, and the 8-bit parallel
// port, follow the design description. The bit rate is f_clk/(CLK_DIV*16);
// the divider is this design's choice (no bit rate is given).
module uart
  import bist_pkg::*;
#(
  parameter int unsigned CLK_DIV = 27
) (
  input  logic  clk,
  input  logic  rst_n,
  // transmit side
  input  logic  wr,
  input  data_t din,
  output logic  txd,
  output logic  tbr_empty,
  output logic  tx_busy,
  output logic  tx_done,
  output logic  tx_mid,
  // receive side
  input  logic  rxd,
  input  logic  rd,
  output data_t dout,
  output logic  rdy,
  output logic  rbr_full,
  output logic  frame_err
);

  logic tick;

  baud_gen #(.CLK_DIV(CLK_DIV)) u_baud (
    .clk, .rst_n, .tick
  );

  uart_tx u_tx (
    .clk, .rst_n, .tick, .wr, .din, .txd, .tbr_empty,
    .busy(tx_busy), .done(tx_done), .mid(tx_mid)
  );

  uart_rx u_rx (
    .clk, .rst_n, .tick, .rxd, .rd, .dout, .rdy, .rbr_full, .frame_err
  );

endmodule
