`timescale 1ns/1ps
// Fractional-N delay-locked loop for clock synchronisation (top level).
// Contains behavioural models of the analog parts, so the top as a whole
// is a simulation model; the digital blocks below it are synthesizable.
//
// Goal: delay the external clock ext_clk so that its delayed copy, the
// coarse clock (output coarse_clk), has its rising edge aligned with the
// rising edge of ref_clk (same frequency, unknown phase). One 13-cell delay
// line (taps P0..P13) serves both loops:
//  * Core loop: the phase-frequency detector compares the line input P0
//    with a feedback tap DLL_CLK and the charge pump / filter set the cell
//    delay so that DLL_CLK is one period behind P0. After reset the
//    feedback is P10, so each cell is T/10.
//  * Coarse loop: a 10:1 multiplexer picks the coarse clock among P4..P13.
//    The coarse phase detector (3-cell replica lines and three flip-flops)
//    reports whether it lags (updn) or leads by less than T/10 (hold);
//    the coarse FSM rotates the selection until hold, then raises en.
//  * Fine loop: the fine FSM lowers delay_step from +N/2 step by step. The
//    second-order delta-sigma modulator turns delay_step into a sequence of
//    feedback taps among P7..P11 whose average is X = P_B + 0.5 +
//    delay_step/N cells (P_B = 8 for group P7..P10, 9 for P8..P11); the
//    core loop then makes every cell T/X long, which stretches the coarse
//    clock in steps of about T/(10 N). The fine FSM stops when hold falls
//    (the coarse clock no longer leads) and re-checks every M_TIMER fine
//    updates. The modulator is clocked by P6 (group P7..P10) or P7 (group
//    P8..P11), one cell ahead of its earliest selectable tap.
// Defaults are the 200 MHz operating point; the analog parameters of other
// reference frequencies (replica current, filter resistor, delay gain and
// the charge-pump code s_code) are set from outside.
// The modulator stays reset, pointing at P10, until the fine loop is
// enabled; this and the 2-flop synchronisers are this design's choices.
// All digital blocks are clocked by ref_clk except the coarse PD (delayed
// coarse clock) and the modulator (its trigger tap).
// Left unconnected on purpose: taps P1..P3 (only delay, never selected),
// the replicas' own inputs and intermediate coarse-replica taps, the PD's
// RDY, the modulator's level and the filter's node voltage (observation
// outputs of the sub-blocks). The reference replica vector carries ref_clk
// itself at bit 0, which clocks the FSM, next to delayed copies that the
// coarse PD samples as data; lint reports this mix, which is intended.
module fracn_dll
  import fracn_dll_pkg::*;
#(
  parameter real         T_REF_NS  = 5.0,   // 200 MHz
  parameter real         ISS_UA    = 198.0, // replica-bias current at T_REF
  parameter real         R_KOHM    = 11.4,  // adaptive filter resistor
  parameter real         KDL_NS_V  = 1.0,   // cell delay gain, ns/V
  parameter int unsigned STEP_WAIT = 4,
  parameter int unsigned HOLD_WAIT = 16,
  parameter int unsigned FINE_DIV  = 10,
  parameter int unsigned M_TIMER   = 100
) (
  input  logic                   ext_clk,     // clock to be delayed (P0)
  input  logic                   ref_clk,     // clock to align to
  input  logic                   rst_n,       // asynchronous, active low
  input  logic [HALF_W-1:0]      n_half,      // N/2 (5 for N = 10)
  input  logic [2:0]             s_code,      // charge-pump current code S
  output logic                   coarse_clk,  // synchronised output clock
  output logic                   dll_clk,     // core-loop feedback clock
  output logic [COARSE_TAPS-1:0] mux,
  output logic                   en,
  output step_t                  delay_step,
  output logic                   adr_ctrl,
  output logic                   trgr_ctrl,
  output logic                   locked,
  output logic                   updn,
  output logic                   hold,
  output logic                   up,
  output logic                   dn,
  output logic [FINE_TAPS-1:0]   mod_out,
  output logic                   coarse_step, // coarse selection moved
  output logic                   recheck,     // fine timer expired
  output real                    vc           // normalised control value
);

  logic [VCDL_CELLS:0] p;
  logic [3:0]          ref_rep, crs_rep;
  logic                dsm_clk, dsm_arst_n, dsm_rst_n, rdy;
  logic [1:0]          level;
  real                 v2_v;

  // ---- delay line and its replicas for the coarse PD ----
  vcdl #(.CELLS(VCDL_CELLS), .T_REF_NS(T_REF_NS)) u_vcdl (
    .clk_in(ext_clk), .vc(vc), .p(p)
  );
  vcdl #(.CELLS(3), .T_REF_NS(T_REF_NS)) u_ref_rep (
    .clk_in(ref_clk), .vc(vc), .p(ref_rep)
  );
  vcdl #(.CELLS(3), .T_REF_NS(T_REF_NS)) u_crs_rep (
    .clk_in(coarse_clk), .vc(vc), .p(crs_rep)
  );

  // ---- coarse loop ----
  phase_mux #(.N(COARSE_TAPS)) u_coarse_mux (
    .sel(mux), .phases(p[COARSE_BASE +: COARSE_TAPS]), .clk_out(coarse_clk)
  );

  coarse_pd u_coarse_pd (
    .coarse_d3(crs_rep[3]), .rst_n(rst_n),
    .ref_d1(ref_rep[1]), .ref_d2(ref_rep[2]), .ref_d3(ref_rep[3]),
    .updn(updn), .hold(hold)
  );

  fsm #(
    .STEP_WAIT(STEP_WAIT), .HOLD_WAIT(HOLD_WAIT),
    .FINE_DIV(FINE_DIV), .M_TIMER(M_TIMER)
  ) u_fsm (
    .clk(ref_clk), .rst_n(rst_n), .updn_in(updn), .hold_in(hold),
    .n_half(n_half), .mux(mux), .en(en), .delay_step(delay_step),
    .adr_ctrl(adr_ctrl), .trgr_ctrl(trgr_ctrl), .locked(locked),
    .coarse_step(coarse_step), .recheck(recheck)
  );

  // ---- fine loop ----
  phase_mux #(.N(2)) u_trig_mux (
    .sel({trgr_ctrl, ~trgr_ctrl}), .phases(p[7:6]), .clk_out(dsm_clk)
  );

  always_comb dsm_arst_n = rst_n & en;

  reset_sync u_dsm_rst (.clk(dsm_clk), .arst_n(dsm_arst_n), .rst_n(dsm_rst_n));

  dsm_modulator u_dsm (
    .clk(dsm_clk), .rst_n(dsm_rst_n), .mod_in(delay_step),
    .adr_ctrl(adr_ctrl), .n_half(n_half), .mod_out(mod_out), .level(level)
  );

  phase_mux #(.N(FINE_TAPS)) u_fine_mux (
    .sel(mod_out), .phases(p[FINE_BASE +: FINE_TAPS]), .clk_out(dll_clk)
  );

  fine_pd #(.RST_DELAY_NS(T_REF_NS / 5.0)) u_fine_pd (
    .ref_clk(p[0]), .dll_clk(dll_clk), .start(rst_n),
    .up(up), .dn(dn), .rdy(rdy)
  );

  charge_pump_filter #(
    .T_REF_NS(T_REF_NS), .ISS_UA(ISS_UA), .R_KOHM(R_KOHM), .KDL_NS_V(KDL_NS_V)
  ) u_cp (
    .rst_n(rst_n), .up(up), .dn(dn), .s_code(s_code), .vc(vc), .v2_v(v2_v)
  );

endmodule
