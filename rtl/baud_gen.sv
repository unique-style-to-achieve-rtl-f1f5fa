// baud_gen: baud-rate tick generator shared by the transmitter, the receiver
// and the TPG's PISO.
//
// A counter divides the system clock by CLK_DIV and emits a one-cycle tick
// each time it wraps, giving OVERSAMPLE (16) ticks per bit period: the bit
// rate is f_clk / (CLK_DIV * 16). The default CLK_DIV = 27 gives about
// 115 200 bit/s from a 50 MHz clock. The design description only names a
// baud clock; the divider, its default and the use of a clock-enable tick
// instead of a derived clock are this design's choices. The counter is
// cleared by reset, so the first tick comes CLK_DIV cycles after reset.
module baud_gen #(
  parameter int unsigned CLK_DIV = 27
) (
  input  logic clk,
  input  logic rst_n,
  output logic tick   // one-cycle pulse, OVERSAMPLE per bit period
);

  localparam int unsigned CW = (CLK_DIV > 1) ? $clog2(CLK_DIV) : 1;
  logic [CW-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt  <= '0;
      tick <= 1'b0;
    end else if (cnt == CW'(CLK_DIV - 1)) begin
      cnt  <= '0;
      tick <= 1'b1;
    end else begin
      cnt  <= cnt + 1'b1;
      tick <= 1'b0;
    end
  end

endmodule
