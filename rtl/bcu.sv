// bcu: BIST controller unit.
//
// A start pulse puts the UART in test mode (test_mode = 1, which switches the
// UART's inputs from the processor and the line to the TPG) and runs
// NUM_PATTERNS test steps. In each step the controller pulses trg so that the
// TPG produces the next pattern and clears the SIPO, then waits until the
// transmitter's frame has been captured (sipo_valid), the receiver has
// delivered its byte (rx_rdy) and both the transmitter and the TPG's PISO are
// idle. It then requests a comparison (cmp_en) and looks at rslt. A match moves
// on to the next ROM address; a mismatch stops the test at once with
// fail = 1, leaving addr at the failing pattern. If a step does not complete
// within WAIT_LIMIT cycles (a UART that never answers) the test also stops
// with fail = 1 and timeout = 1. When the test ends, done is set and
// test_mode returns to 0; the outputs hold until the next start.
//
// Issuing trg, comparing both UART outputs with the ROM, stopping at the first
// mismatch and switching the UART into test mode follow the design
// description; the state sequence and the time-out are this design's choices.
module bcu #(
  parameter int unsigned NUM_PATTERNS = 255,
  parameter int unsigned WAIT_LIMIT   = 17280,
  localparam int unsigned AW          = (NUM_PATTERNS > 1) ? $clog2(NUM_PATTERNS) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic          sipo_valid,
  input  logic          rx_rdy,
  input  logic          tx_busy,
  input  logic          tpg_busy,
  input  logic          rslt,
  input  logic          rslt_valid,
  output logic          test_mode,
  output logic          trg,
  output logic          sipo_clr,
  output logic          cmp_en,
  output logic [AW-1:0] addr,
  output logic          busy,
  output logic          done,
  output logic          fail,
  output logic          timeout
);

  typedef enum logic [2:0] {
    S_IDLE, S_TRIG, S_WAIT, S_CMP, S_CHECK, S_END
  } state_t;

  state_t      state;
  logic        tx_seen, rx_seen;
  logic [31:0] wait_cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      addr     <= '0;
      tx_seen  <= 1'b0;
      rx_seen  <= 1'b0;
      wait_cnt <= '0;
      done     <= 1'b0;
      fail     <= 1'b0;
      timeout  <= 1'b0;
    end else begin
      unique case (state)
        S_IDLE, S_END: begin
          if (start) begin
            state   <= S_TRIG;
            addr    <= '0;
            done    <= 1'b0;
            fail    <= 1'b0;
            timeout <= 1'b0;
          end
        end
        S_TRIG: begin
          state    <= S_WAIT;
          tx_seen  <= 1'b0;
          rx_seen  <= 1'b0;
          wait_cnt <= '0;
        end
        S_WAIT: begin
          if (sipo_valid) tx_seen <= 1'b1;
          if (rx_rdy)     rx_seen <= 1'b1;
          wait_cnt <= wait_cnt + 1'b1;
          if (tx_seen && rx_seen && !tx_busy && !tpg_busy) begin
            state <= S_CMP;
          end else if (wait_cnt == 32'(WAIT_LIMIT - 1)) begin
            state   <= S_END;
            done    <= 1'b1;
            fail    <= 1'b1;
            timeout <= 1'b1;
          end
        end
        S_CMP: state <= S_CHECK;
        S_CHECK: begin
          if (rslt_valid) begin
            if (!rslt) begin
              state <= S_END;
              done  <= 1'b1;
              fail  <= 1'b1;
            end else if (32'(addr) == NUM_PATTERNS - 1) begin
              state <= S_END;
              done  <= 1'b1;
            end else begin
              state <= S_TRIG;
              addr  <= addr + 1'b1;
            end
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign test_mode = (state != S_IDLE) && (state != S_END);
  assign busy      = test_mode;
  assign trg       = (state == S_TRIG);
  assign sipo_clr  = (state == S_TRIG);
  assign cmp_en    = (state == S_CMP);

  // A comparison result is only expected while one has been requested.
  a_rslt_in_check: assert property (@(posedge clk) disable iff (!rst_n)
    rslt_valid |-> state == S_CHECK);

endmodule
