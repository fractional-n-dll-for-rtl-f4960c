`timescale 1ns/1ps
// Behavioural model (not synthesizable) of the programmable charge pump and
// the second-order loop filter, producing the delay line's control value.
//
// Charge pump: I_CP = ALPHA * S * I_SS, with S the 3-bit switch code
// s_code (S2 S1 S0) of the current generator; the pump sources I_CP while
// up is high and sinks it while dn is high. Filter: the pump drives node
// v1 on C1; node v2 on C2 is joined to it by R and is the control node, so
// the transfer from pump current to control voltage is
// 1/(s^2 C1 C2 R + s (C1 + C2)) (an integrator followed by the pole
// 1/(R C2), which smooths the ripple caused by the switching feedback tap). The model is event driven: at every edge
// of up, dn or the reset it integrates the pump current of the interval
// just ended onto C1 and lets the charge relax between C1 and C2 with the
// time constant R*C1*C2/(C1+C2). Between events nothing is updated.
//
// The control voltage v2 (V) is converted to the delay line's normalised
// control value with the delay-line gain KDL (ns per V of cell delay):
//     vc = v2 * KDL / (T_REF/20),  clamped to -1..+1,
// so UP (reference first, delay too long) raises vc and shortens the cells.
// Defaults are the 200 MHz operating point: I_SS = 198 uA, ALPHA = 0.2,
// S = 3 gives 119 uA, C1 = 5 pF, R = 11.4 kOhm, KDL = 1 ns/V. C2 = 1.95 pF
// places the second pole 1/(R C2) at 45 Mrad/s; that reading of the
// pole frequency is this model's choice. Reset (active low) empties both
// capacitors, i.e. vc = 0 and nominal cell delay T_REF/10.
module charge_pump_filter #(
  parameter real ALPHA    = 0.2,
  parameter real ISS_UA   = 198.0,
  parameter real C1_PF    = 5.0,
  parameter real C2_PF    = 1.95,
  parameter real R_KOHM   = 11.4,
  parameter real KDL_NS_V = 1.0,
  parameter real T_REF_NS = 5.0
) (
  input  logic       rst_n,
  input  logic       up,
  input  logic       dn,
  input  logic [2:0] s_code,  // current multiplier S (S2 S1 S0)
  output real        vc,      // normalised control value -1..+1
  output real        v2_v     // control-node voltage, V
);

  real v1, v2, t_last, icp_ua, tau_ns;
  logic up_q, dn_q;

  initial begin
    v1 = 0.0; v2 = 0.0; t_last = 0.0; up_q = 1'b0; dn_q = 1'b0;
  end

  always @(up, dn, rst_n) begin : integrate
    real dt, q_fc, veq, k;
    dt     = $realtime - t_last;
    t_last = $realtime;
    icp_ua = ALPHA * real'(s_code) * ISS_UA;
    tau_ns = R_KOHM * C1_PF * C2_PF / (C1_PF + C2_PF);
    if (!rst_n) begin
      v1 = 0.0;
      v2 = 0.0;
    end else begin
      // uA * ns = fC; fC / pF = mV
      q_fc = icp_ua * dt * (real'(up_q) - real'(dn_q));
      v1   = v1 + q_fc / C1_PF * 1.0e-3;
      veq  = (C1_PF * v1 + C2_PF * v2) / (C1_PF + C2_PF);
      k    = $exp(-dt / tau_ns);
      v1   = veq + (v1 - veq) * k;
      v2   = veq + (v2 - veq) * k;
    end
    up_q = up;
    dn_q = dn;
  end

  always_comb begin
    v2_v = v2;
    vc   = v2 * KDL_NS_V / (T_REF_NS / 20.0);
    if (vc > 1.0)  vc = 1.0;
    if (vc < -1.0) vc = -1.0;
  end

endmodule
