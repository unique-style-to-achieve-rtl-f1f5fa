// comparator: compares both outputs of the UART under test with the ROM.
//
// When en is high, the transmitter's byte (sipo_op, from the SIPO) and the
// receiver's byte (rop, from the receive buffer) are each compared with the
// expected byte romd. One cycle later valid pulses and rslt is 1 only if both
// match, 0 otherwise; tx_ok and rx_ok tell which side matched. The outputs
// hold until the next comparison. rslt = 1 for a match of both outputs with
// the ROM word follows the design description; the separate tx_ok/rx_ok flags
// and the registered outputs are this design's choices.
module comparator
  import bist_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  en,
  input  data_t sipo_op,
  input  data_t rop,
  input  data_t romd,
  output logic  rslt,
  output logic  tx_ok,
  output logic  rx_ok,
  output logic  valid
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rslt  <= 1'b0;
      tx_ok <= 1'b0;
      rx_ok <= 1'b0;
      valid <= 1'b0;
    end else begin
      valid <= en;
      if (en) begin
        tx_ok <= (sipo_op == romd);
        rx_ok <= (rop == romd);
        rslt  <= (sipo_op == romd) && (rop == romd);
      end
    end
  end

endmodule
