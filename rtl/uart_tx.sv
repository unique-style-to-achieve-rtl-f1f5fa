// uart_tx: UART transmitter with a transmit buffer register (TBR), a transmit
// shift register (TSR) and its control unit.
//
// A write strobe (wr) on the data bus loads din into the TBR and marks it
// full. Whenever the TSR is idle and the TBR is full, the control unit moves
// the character into the TSR together with its start bit (0) and stop bit (1),
// so the 10-bit TSR holds the whole frame, and frees the TBR for the next
// character. The TSR shifts right, LSB first, once every OVERSAMPLE (16) baud
// ticks; txd idles high. Status: tbr_empty (the TBR may be written), busy
// (a character is buffered or being sent), done (one-cycle pulse after a stop
// bit has been sent) and mid (one-cycle pulse in the middle of every bit
// period, at which an on-chip observer can sample txd). A write while the TBR
// is full is ignored.
//
// The TBR/TSR structure and a TSR sized for start, data and stop bits follow
// the design description; bit order, one stop bit, 16x bit timing, the status
// signals and the write-while-full rule are this design's choices.
module uart_tx
  import bist_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  tick,       // baud tick, OVERSAMPLE per bit
  input  logic  wr,         // data bus write into the TBR
  input  data_t din,
  output logic  txd,        // serial output, idle high
  output logic  tbr_empty,
  output logic  busy,
  output logic  done,       // stop bit sent
  output logic  mid         // middle of a bit period of an active frame
);

  data_t                      tbr;
  logic                       tbr_full;
  frame_t                     tsr;
  logic                       tsr_busy;
  logic [OS_W-1:0]            os_cnt;
  logic [$clog2(FRAME_W)-1:0] bit_cnt;

  // Transmit buffer register.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tbr      <= '0;
      tbr_full <= 1'b0;
    end else if (wr && !tbr_full) begin
      tbr      <= din;
      tbr_full <= 1'b1;
    end else if (!tsr_busy && tbr_full) begin
      tbr_full <= 1'b0;     // moved into the TSR
    end
  end

  // Control unit and transmit shift register.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tsr      <= '1;
      tsr_busy <= 1'b0;
      os_cnt   <= '0;
      bit_cnt  <= '0;
      done     <= 1'b0;
    end else begin
      done <= 1'b0;
      if (!tsr_busy) begin
        if (tbr_full) begin
          tsr      <= make_frame(tbr);
          tsr_busy <= 1'b1;
          os_cnt   <= '0;
          bit_cnt  <= '0;
        end
      end else if (tick) begin
        os_cnt <= os_cnt + 1'b1;
        if (os_cnt == OS_W'(OVERSAMPLE - 1)) begin
          tsr <= {1'b1, tsr[FRAME_W-1:1]};
          if (bit_cnt == $bits(bit_cnt)'(FRAME_W - 1)) begin
            tsr_busy <= 1'b0;
            done     <= 1'b1;
          end else begin
            bit_cnt <= bit_cnt + 1'b1;
          end
        end
      end
    end
  end

  assign txd       = tsr_busy ? tsr[0] : 1'b1;
  assign tbr_empty = !tbr_full;
  assign busy      = tbr_full || tsr_busy;
  assign mid       = tsr_busy && tick && (os_cnt == OS_W'(OVERSAMPLE / 2 - 1));

endmodule
