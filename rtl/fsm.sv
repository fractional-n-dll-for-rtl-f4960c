`timescale 1ns/1ps
// Digital controller of the DLL: the coarse and fine FSMs under one top.
//
// The phase-detector outputs updn and hold come from the delayed coarse
// clock domain and pass through two-flop synchronisers into this block's
// clock (the reference clock). The coarse FSM runs every clock (5 ns at
// 200 MHz). The fine FSM acts once every FINE_DIV clocks (a strobe, giving
// the 50 ns fine-loop period of the design with FINE_DIV = 10) so the
// analog loop settles between delay_step changes. Outputs: mux[9:0] from
// the coarse FSM; delay_step, adr_ctrl and trgr_ctrl from the fine FSM.
// The split into the two FSMs and their two clock rates follow the design;
// the synchroniser and the use of a strobe instead of a second clock are
// this implementation's choices. Asynchronous active-low reset.
module fsm
  import fracn_dll_pkg::*;
#(
  parameter int unsigned STEP_WAIT = 4,
  parameter int unsigned HOLD_WAIT = 16,
  parameter int unsigned FINE_DIV  = 10,
  parameter int unsigned M_TIMER   = 100
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   updn_in,   // from the coarse PD, asynchronous
  input  logic                   hold_in,   // from the coarse PD, asynchronous
  input  logic [HALF_W-1:0]      n_half,    // N/2
  output logic [COARSE_TAPS-1:0] mux,
  output logic                   en,
  output step_t                  delay_step,
  output logic                   adr_ctrl,
  output logic                   trgr_ctrl,
  output logic                   locked,
  output logic                   coarse_step,
  output logic                   recheck
);

  logic [1:0] updn_sync, hold_sync;
  logic [$clog2(FINE_DIV+1)-1:0] div_cnt;
  logic tick;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      updn_sync <= '0;
      hold_sync <= '0;
      div_cnt   <= '0;
      tick      <= 1'b0;
    end else begin
      updn_sync <= {updn_sync[0], updn_in};
      hold_sync <= {hold_sync[0], hold_in};
      tick      <= (div_cnt == $bits(div_cnt)'(FINE_DIV - 1));
      div_cnt   <= (div_cnt == $bits(div_cnt)'(FINE_DIV - 1)) ? '0 : div_cnt + 1'b1;
    end
  end

  fsm_coarse #(
    .TAPS     (COARSE_TAPS),
    .STEP_WAIT(STEP_WAIT),
    .HOLD_WAIT(HOLD_WAIT)
  ) u_coarse (
    .clk  (clk),
    .rst_n(rst_n),
    .updn (updn_sync[1]),
    .hold (hold_sync[1]),
    .mux  (mux),
    .en   (en),
    .step (coarse_step)
  );

  fsm_fine #(.M_TIMER(M_TIMER)) u_fine (
    .clk       (clk),
    .rst_n     (rst_n),
    .tick      (tick),
    .en        (en),
    .hold      (hold_sync[1]),
    .updn      (updn_sync[1]),
    .n_half    (n_half),
    .delay_step(delay_step),
    .adr_ctrl  (adr_ctrl),
    .trgr_ctrl (trgr_ctrl),
    .locked    (locked),
    .recheck   (recheck)
  );

endmodule
