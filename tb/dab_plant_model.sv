// dab_plant_model: behavioural model of the DAB power stage, for
// testbenches only (not synthesizable: real arithmetic).
//
// It answers every control cycle (`tick`) with the output current that the
// phase shift `phi` (phi/pi, Q24) produces, by the SPS power equation
//   I = U_p / (2 pi^2 f_sw L) * phi_e * (pi - |phi_e|)
// with a nonlinearity of the kind the blocking time and the MOSFET
// capacitances cause: the effective phase phi_e loses a dead zone
// PHI_DZ0 * (1 + DZ_SLOPE * |U_s - U_p| / U_p) around zero (a plateau of
// output current that grows when the two DC voltages differ) and the
// result is scaled by GAIN. The current appears on i_meas one clock after
// the tick, so the controller samples it at the next tick: a one-period
// delay, as a measurement of the previous period would have.
module dab_plant_model
  import esbol_pkg::*;
#(
  parameter real F_SW     = 50_000.0,
  parameter real L_SIGMA  = 11e-6,
  parameter real PHI_DZ0  = 0.0069,   // rad, about 1.5 A at U_s = U_p
  parameter real DZ_SLOPE = 20.0,
  parameter real GAIN     = 0.97
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     tick,
  input  phase_t   phi,
  input  voltage_t u_p,
  input  voltage_t u_s,
  output current_t i_meas
);
  localparam real PI = 3.14159265358979;

  function automatic int current_ma(input phase_t p, input int up, input int us);
    real ph, pe, dz, ia, dv;
    ph = real'(p) / 16777216.0 * PI;
    dv = real'(us - up); if (dv < 0) dv = -dv;
    dz = PHI_DZ0 * (1.0 + DZ_SLOPE * dv / (up > 0 ? real'(up) : 1.0));
    if (ph > dz)       pe = ph - dz;
    else if (ph < -dz) pe = ph + dz;
    else               pe = 0.0;
    ia = GAIN * (real'(up) / 10.0) / (2.0 * PI * PI * F_SW * L_SIGMA) * pe * (PI - (pe < 0 ? -pe : pe));
    return int'(ia * 1000.0);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    i_meas <= '0;
    else if (tick) i_meas <= current_t'(current_ma(phi, int'(u_p), int'(u_s)));
  end
endmodule
