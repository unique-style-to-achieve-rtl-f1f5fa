// uart_rx: UART receiver with a receive shift register (RSR), a receive
// buffer register (RBR) and its control unit.
//
// rxd passes through a two-flip-flop synchroniser. In the idle state a low
// level on the synchronised line starts a frame, provided the line has been
// seen high since the previous frame (so a line held low after a framing
// error, or from reset, does not start frame after frame); the control unit then samples
// the line in the middle of each bit period, the first sample OVERSAMPLE/2
// ticks after the falling edge and the next ones every OVERSAMPLE (16) baud
// ticks. Each sample is shifted into the 10-bit RSR, which therefore holds
// start bit, data bits and stop bit. A start bit that reads high at its middle
// is taken as a glitch and the receiver returns to idle. After the stop-bit
// sample the 8 data bits move from the RSR to the RBR, rdy pulses for one
// cycle, frame_err records whether the stop bit was low, and rbr_full stays
// set until the data bus reads the RBR (rd).
//
// Latency: rdy comes about 9.5 bit periods plus 3 clock cycles after the
// falling edge of the start bit. The RSR/RBR structure and an RSR sized for
// start, data and stop bits follow the design description; mid-bit sampling,
// the synchroniser, the status signals and 16x timing are this design's
// choices.
module uart_rx
  import bist_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  tick,       // baud tick, OVERSAMPLE per bit
  input  logic  rxd,        // serial input, idle high
  input  logic  rd,         // data bus read of the RBR
  output data_t dout,       // RBR
  output logic  rdy,        // one-cycle pulse: new character in the RBR
  output logic  rbr_full,
  output logic  frame_err   // stop bit of the last character was 0
);

  logic                       rx_meta, rx_s;
  logic                       active;
  logic                       armed;   // line seen high since the last frame
  frame_t                     rsr;
  logic [OS_W-1:0]            os_cnt;
  logic [$clog2(FRAME_W)-1:0] bit_cnt;

  // Synchroniser.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rx_meta <= 1'b1;
      rx_s    <= 1'b1;
    end else begin
      rx_meta <= rxd;
      rx_s    <= rx_meta;
    end
  end

  // Control unit, RSR and RBR.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active    <= 1'b0;
      armed     <= 1'b0;
      rsr       <= '1;
      os_cnt    <= '0;
      bit_cnt   <= '0;
      dout      <= '0;
      rdy       <= 1'b0;
      rbr_full  <= 1'b0;
      frame_err <= 1'b0;
    end else begin
      rdy <= 1'b0;
      if (rd) rbr_full <= 1'b0;
      if (!active) begin
        if (rx_s) armed <= 1'b1;
        if (!rx_s && armed) begin
          armed   <= 1'b0;
          active  <= 1'b1;
          os_cnt  <= OS_W'(OVERSAMPLE / 2);
          bit_cnt <= '0;
        end
      end else if (tick) begin
        if (os_cnt == OS_W'(OVERSAMPLE - 1)) begin
          os_cnt <= '0;
          rsr    <= {rx_s, rsr[FRAME_W-1:1]};
          if (bit_cnt == '0 && rx_s) begin
            active <= 1'b0;                 // false start bit
          end else if (bit_cnt == $bits(bit_cnt)'(FRAME_W - 1)) begin
            active    <= 1'b0;
            dout      <= rsr[FRAME_W-1:2];  // data bits, stop bit is rx_s
            rdy       <= 1'b1;
            rbr_full  <= 1'b1;
            frame_err <= !rx_s;
          end else begin
            bit_cnt <= bit_cnt + 1'b1;
          end
        end else begin
          os_cnt <= os_cnt + 1'b1;
        end
      end
    end
  end

endmodule
