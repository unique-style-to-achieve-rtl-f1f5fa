// pattern_rom: ROM of the expected test responses.
//
// Entry k holds the pattern the CA register produces at its (k+1)-th step
// from SEED, which is the byte that the transmitter and the receiver must
// deliver for the k-th test pattern. The contents are worked out at
// elaboration by iterating the rule-90 step function of bist_pkg, so they
// always match the CA register for the chosen SEED. Entry CORRUPT_ADDR, if it
// lies in the ROM, is stored inverted on purpose: the design description
// demonstrates the BIST with a deliberately wrong last ROM word, which makes
// the test stop and report the circuit as faulty there. The default (-1)
// stores every entry correctly.
//
// The read is synchronous: romd shows entry addr one clock after addr is
// applied. An address beyond DEPTH-1 reads 0. DEPTH = 255 is the 2^8-1
// patterns of the description.
module pattern_rom
  import bist_pkg::*;
#(
  parameter int unsigned DEPTH        = 255,
  parameter data_t       SEED         = data_t'(8'h01),
  parameter int          CORRUPT_ADDR = -1,
  localparam int unsigned AW          = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic          clk,
  input  logic [AW-1:0] addr,
  output data_t         romd
);

  typedef data_t rom_t [DEPTH];

  function automatic rom_t build_rom();
    rom_t  r;
    data_t s;
    s = SEED;
    for (int k = 0; k < int'(DEPTH); k++) begin
      s    = ca90_step(s);
      r[k] = (k == CORRUPT_ADDR) ? ~s : s;
    end
    return r;
  endfunction

  localparam rom_t ROM = build_rom();

  always_ff @(posedge clk) begin
    if (32'(addr) < DEPTH) romd <= ROM[addr];
    else                   romd <= '0;
  end

endmodule
