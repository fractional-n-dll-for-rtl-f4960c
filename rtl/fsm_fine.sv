`timescale 1ns/1ps
// Fine-loop FSM: lengthens the coarse clock delay in steps of T/(10*N)
// until the coarse clock stops leading the reference, then watches it.
//
// delay_step is the modulator input, -N/2..+N/2. Lowering it lowers the
// average feedback tap, so every delay cell, and the coarse clock with it,
// gets slower. The FSM advances only on clocks where tick is high (the slow
// fine-loop clock, 50 ns at 200 MHz, so the analog loop can settle).
//   IDLE : delay_step = +N/2, adr_ctrl = trgr_ctrl = 1 (feedback P8..P11,
//          average P10: the plain one-period DLL). Leaves when en is high.
//   TUNE : on each tick, if hold is still high, delay_step is lowered by
//          one. At -N/2 in group 1 it jumps back to +N/2 and adr_ctrl and
//          trgr_ctrl fall to 0 (group P7..P10; both settings give the same
//          average ratio). At -N/2 in group 0 it stays (end of range).
//          When hold falls (coarse clock no longer within T/10 ahead) the
//          value is kept and the FSM goes to LOCK.
//   LOCK : a timer counts M_TIMER ticks. At its end hold and updn are
//          looked at again: hold high, or updn low (coarse clock leads by
//          more than T/10), resumes TUNE; updn high (coarse clock lags)
//          raises delay_step by one (crossing back to group 1 at +N/2) and
//          restarts the timer.
// The start value, the direction, the group switch at -N/2, the stop on the
// falling hold and the periodic re-check follow the design; the way a
// lagging clock is corrected after the timer and the saturation at the end
// of the range are this implementation's choices.
// Asynchronous active-low reset.
module fsm_fine
  import fracn_dll_pkg::*;
#(
  parameter int unsigned M_TIMER = 100
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              tick,       // fine-loop update strobe
  input  logic              en,         // from the coarse FSM
  input  logic              hold,
  input  logic              updn,
  input  logic [HALF_W-1:0] n_half,     // N/2
  output step_t             delay_step,
  output logic              adr_ctrl,   // 1: P8..P11, 0: P7..P10
  output logic              trgr_ctrl,  // 1: modulator clocked by P7, 0: by P6
  output logic              locked,
  output logic              recheck     // one-clock pulse at each timer end
);

  typedef enum logic [1:0] {IDLE, TUNE, LOCK} state_t;

  state_t state;
  logic [$clog2(M_TIMER+1)-1:0] timer;
  step_t hi, lo;

  always_comb begin
    hi = step_t'(n_half);
    lo = -step_t'(n_half);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= IDLE;
      delay_step <= step_t'(N_STEPS / 2);
      adr_ctrl   <= 1'b1;
      trgr_ctrl  <= 1'b1;
      timer      <= '0;
      recheck    <= 1'b0;
    end else begin
      recheck <= 1'b0;
      if (tick) begin
        unique case (state)
          IDLE: begin
            delay_step <= hi;
            adr_ctrl   <= 1'b1;
            trgr_ctrl  <= 1'b1;
            if (en) state <= TUNE;
          end
          TUNE: begin
            if (!hold) begin
              state <= LOCK;
              timer <= '0;
            end else if (delay_step == lo) begin
              if (adr_ctrl) begin
                delay_step <= hi;
                adr_ctrl   <= 1'b0;
                trgr_ctrl  <= 1'b0;
              end
            end else begin
              delay_step <= delay_step - 1'b1;
            end
          end
          default: begin  // LOCK
            if (timer == $bits(timer)'(M_TIMER - 1)) begin
              timer   <= '0;
              recheck <= 1'b1;
              if (hold || !updn) begin
                state <= TUNE;
              end else if (delay_step == hi) begin
                if (!adr_ctrl) begin
                  delay_step <= lo + 1'b1;
                  adr_ctrl   <= 1'b1;
                  trgr_ctrl  <= 1'b1;
                end
              end else begin
                delay_step <= delay_step + 1'b1;
              end
            end else begin
              timer <= timer + 1'b1;
            end
          end
        endcase
      end
    end
  end

  always_comb locked = (state == LOCK);

endmodule
