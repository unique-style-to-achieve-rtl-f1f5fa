// ca_lfsr: 8-cell cellular-automaton pattern generator (the "CA LFSR").
//
// Each cell is a flip-flop whose next value is the XOR of its two nearest
// neighbours (rule 90); the two end cells see a constant 0 beyond the
// register (null boundary), so the first cell copies its right neighbour and
// the last cell copies its left neighbour. This is the rule-90 register of the
// design description: one XOR in front of every cell but the last.
//
// The register advances by one step in each clock cycle in which trg is high
// and holds otherwise. Reset loads SEED, which must be non-zero (the all-zero
// state is a fixed point). The value is available on q one cycle after trg.
//
// Note on sequence length: a pure rule-90 register of 8 cells with null
// boundaries repeats after at most 14 steps (14 from SEED = 8'h01), not after
// 2^8-1 steps; the register is kept as described, and the test sequence simply
// repeats this cycle.
module ca_lfsr
  import bist_pkg::*;
#(
  parameter data_t SEED = data_t'(8'h01)
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  trg,    // advance one step
  output data_t q       // current CA state
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)   q <= SEED;
    else if (trg) q <= ca90_step(q);
  end

endmodule
