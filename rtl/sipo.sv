// sipo: serial-in parallel-out register of the comparator, which turns the
// transmitter's serial output back into a byte (sipo_op) for comparison.
//
// Because the transmitter is on the same chip, the register does not hunt for
// a start bit: it shifts sin in, LSB first, at each shift strobe, which the
// transmitter gives in the middle of every bit period of its frame. After
// FRAME_W (10) shifts the register holds start bit, data and stop bit; valid
// pulses in the next cycle and q presents the 8 data bits until clr or the
// next frame. clr empties the register and restarts the count; it is given
// before each new pattern.
//
// The design description says only that the transmitter's serial output is
// shifted into the SIPO of the comparator; the shift strobe and the frame
// count are this design's choices.
module sipo
  import bist_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  clr,
  input  logic  shift,   // sample sin
  input  logic  sin,
  output data_t q,       // sipo_op: data bits of the last frame
  output logic  valid    // one-cycle pulse: a whole frame has been shifted in
);

  frame_t                     shreg;
  logic [$clog2(FRAME_W)-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      shreg <= '0;
      cnt   <= '0;
      valid <= 1'b0;
    end else begin
      valid <= 1'b0;
      if (clr) begin
        shreg <= '0;
        cnt   <= '0;
      end else if (shift) begin
        shreg <= {sin, shreg[FRAME_W-1:1]};
        if (cnt == $bits(cnt)'(FRAME_W - 1)) begin
          cnt   <= '0;
          valid <= 1'b1;
        end else begin
          cnt <= cnt + 1'b1;
        end
      end
    end
  end

  assign q = shreg[FRAME_W-2:1];

endmodule
