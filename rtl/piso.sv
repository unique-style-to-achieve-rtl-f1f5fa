// piso: parallel-in serial-out register of the test pattern generator.
//
// On load the 8-bit CA value is captured together with a start bit (0) and a
// stop bit (1) into a 10-bit shift register, which is then shifted out LSB
// first, one bit per OVERSAMPLE (16) baud ticks, on sout. sout idles high
// (the UART line's idle level) while nothing is being sent, so the stream is a
// UART frame that the receiver under test can take in. busy is high from the
// cycle after load until the stop bit has been sent; done pulses for one cycle
// at that point. A load while busy is ignored.
//
// The design description says only that the PISO turns the CA output into the
// serial input of the UART receiver; framing it as a UART character at the
// UART's own bit rate is this design's reading of that.
module piso
  import bist_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  tick,   // baud tick, OVERSAMPLE per bit
  input  logic  load,   // capture din and start sending
  input  data_t din,
  output logic  sout,   // serial frame, idle high
  output logic  busy,
  output logic  done    // one-cycle pulse after the stop bit
);

  frame_t                     shreg;
  logic [OS_W-1:0]            os_cnt;
  logic [$clog2(FRAME_W)-1:0] bit_cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      shreg   <= '1;
      os_cnt  <= '0;
      bit_cnt <= '0;
      busy    <= 1'b0;
      done    <= 1'b0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (load) begin
          shreg   <= make_frame(din);
          os_cnt  <= '0;
          bit_cnt <= '0;
          busy    <= 1'b1;
        end
      end else if (tick) begin
        os_cnt <= os_cnt + 1'b1;
        if (os_cnt == OS_W'(OVERSAMPLE - 1)) begin
          shreg <= {1'b1, shreg[FRAME_W-1:1]};
          if (bit_cnt == $bits(bit_cnt)'(FRAME_W - 1)) begin
            busy <= 1'b0;
            done <= 1'b1;
          end else begin
            bit_cnt <= bit_cnt + 1'b1;
          end
        end
      end
    end
  end

  assign sout = busy ? shreg[0] : 1'b1;

endmodule
