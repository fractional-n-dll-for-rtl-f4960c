`timescale 1ns/1ps
// Coarse-loop FSM: walks the coarse phase select until the coarse clock
// sits just ahead of the reference, then hands over to the fine loop.
//
// mux[9:0] is a one-hot ring (bit i selects tap P(4+i)); reset selects P4.
// While hold is low the ring is rotated one place every STEP_WAIT clocks:
// towards more delay (P4 -> P5 ...) when updn is 0 (coarse clock leads by
// more than T/10) and towards less delay when updn is 1 (coarse clock lags).
// The ring wraps from P13 to P4 and back, since P4..P13 span one full
// period. The wait between steps lets the new phase reach the detector and
// the synchroniser. While hold is high the ring is frozen; after hold has
// been high for HOLD_WAIT consecutive clocks, en rises and stays high (the
// coarse loop stays frozen) until reset. The one-hot shift register, its
// direction from updn, the freeze on hold and the counter that delays en
// follow the design; the wrap-around, the two wait lengths and the
// direction convention are this implementation's reading.
// One clock domain (the reference clock, 5 ns at 200 MHz); asynchronous
// active-low reset.
module fsm_coarse #(
  parameter int unsigned TAPS      = 10,
  parameter int unsigned STEP_WAIT = 4,
  parameter int unsigned HOLD_WAIT = 16
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            updn,  // synchronised: 1 = coarse clock lags
  input  logic            hold,  // synchronised: 1 = within T/10 ahead
  output logic [TAPS-1:0] mux,   // one-hot coarse phase select
  output logic            en,    // fine loop enable
  output logic            step   // one-clock pulse on every ring move
);

  typedef enum logic [1:0] {SEARCH, HOLDING, DONE} state_t;

  state_t state;
  logic [$clog2(STEP_WAIT+1)-1:0] wait_cnt;
  logic [$clog2(HOLD_WAIT+1)-1:0] hold_cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= SEARCH;
      mux      <= TAPS'(1);
      en       <= 1'b0;
      step     <= 1'b0;
      wait_cnt <= '0;
      hold_cnt <= '0;
    end else begin
      step <= 1'b0;
      unique case (state)
        SEARCH: begin
          hold_cnt <= '0;
          if (hold) begin
            state    <= HOLDING;
            wait_cnt <= '0;
          end else if (wait_cnt == $bits(wait_cnt)'(STEP_WAIT - 1)) begin
            wait_cnt <= '0;
            step     <= 1'b1;
            if (updn) mux <= {mux[0], mux[TAPS-1:1]};   // less delay
            else      mux <= {mux[TAPS-2:0], mux[TAPS-1]}; // more delay
          end else begin
            wait_cnt <= wait_cnt + 1'b1;
          end
        end
        HOLDING: begin
          if (!hold) begin
            state    <= SEARCH;
            hold_cnt <= '0;
          end else if (hold_cnt == $bits(hold_cnt)'(HOLD_WAIT - 1)) begin
            state <= DONE;
            en    <= 1'b1;
          end else begin
            hold_cnt <= hold_cnt + 1'b1;
          end
        end
        default: en <= 1'b1;  // DONE: frozen until reset
      endcase
    end
  end

endmodule
