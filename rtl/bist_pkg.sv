// bist_pkg: types, constants and the cellular-automaton next-state function
// shared by the BIST-enabled UART.
//
// The UART carries 8-bit characters framed by one start bit (0) and one stop
// bit (1), sent least significant bit first, so a frame is 10 bits. The
// transmit and receive shift registers hold a whole frame, start and stop bits
// included. Bit timing is counted in ticks of a baud generator that runs at
// OVERSAMPLE ticks per bit. The data width of 8 bits follows the design
// description; framing order, one stop bit and 16x oversampling are this
// design's choices (the usual UART conventions).
//
// ca90_step() is the rule-90 update of an n-cell one-dimensional cellular
// automaton with null boundaries: x_i(t+1) = x_(i-1)(t) xor x_(i+1)(t), with
// cells outside the register read as 0. Bit 0 is the leftmost cell.
package bist_pkg;

  localparam int unsigned DATA_W     = 8;
  localparam int unsigned FRAME_W    = DATA_W + 2;  // start + data + stop
  localparam int unsigned OVERSAMPLE = 16;          // baud ticks per bit
  localparam int unsigned OS_W       = $clog2(OVERSAMPLE);

  typedef logic [DATA_W-1:0]  data_t;
  typedef logic [FRAME_W-1:0] frame_t;

  // Builds a frame, LSB first on the line: start bit, data, stop bit.
  function automatic frame_t make_frame(data_t d);
    return {1'b1, d, 1'b0};
  endfunction

  // One rule-90 step of a null-boundary cellular automaton.
  function automatic data_t ca90_step(data_t s);
    data_t n;
    for (int i = 0; i < DATA_W; i++) begin
      logic l, r;
      l    = (i > 0)          ? s[i-1] : 1'b0;
      r    = (i < DATA_W - 1) ? s[i+1] : 1'b0;
      n[i] = l ^ r;
    end
    return n;
  endfunction

endpackage
