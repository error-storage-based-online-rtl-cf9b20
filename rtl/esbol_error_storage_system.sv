// esbol_error_storage_system: the adaptive error storage system (ESBOL).
//
// It learns the inverse of the nonlinear current transfer function of the
// DAB and applies it as a feed-forward term. Three parts, as in the
// document's structure:
//   * input limiting: I_sp is clamped to +/-I_max;
//   * write/store:    N breakpoint entries (esbol_error_storage). When the
//                     learning strobe w_active is high and the limited
//                     setpoint lies within the update window of its nearest
//                     breakpoint, the entry grows by I_u, the integral
//                     controller output passed through the dead band and
//                     step limit of esbol_update_limiter;
//   * read:           linear interpolation between the two entries around
//                     the setpoint gives I_inv,tf,ip (output i_ff).
// The readout is combinational from i_sp and the stored values; an update
// is written on the clock edge at which w_active is high, so it shows in
// i_ff from the next clock on. Status outputs report each event for
// monitoring. All currents in mA.
module esbol_error_storage_system
  import esbol_pkg::*;
#(
  parameter int unsigned N             = 41,
  parameter int unsigned I_MAX_MA      = 50_000,
  parameter int unsigned I_TOL_MA      = 100,
  parameter int unsigned I_MAX_STEP_MA = 50,
  parameter int unsigned WINDOW_PCT    = 5,
  parameter int unsigned S_LIM_MA      = 100_000,
  localparam int unsigned IDX_W        = $clog2(N)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             init,        // reload the ideal characteristic
  input  logic             w_active,    // learning strobe
  input  current_t         i_sp,        // current setpoint
  input  current_t         i_i,         // integral controller output
  input  logic             ld_en,       // preload one entry
  input  logic [IDX_W-1:0] ld_idx,
  input  current_t         ld_val,
  output current_t         i_ff,        // I_inv,tf,ip
  output logic             sp_limited,  // setpoint was clamped
  output logic             sp_near,     // setpoint inside an update window
  output logic             upd_fire,    // an update is written this clock
  output logic             upd_clipped, // ... and it was step limited
  output logic [IDX_W-1:0] upd_idx,
  output current_t         upd_val
);
  current_t         sp_lim;
  logic [IDX_W-1:0] seg_idx;
  current_t         seg_off;
  logic [IDX_W-1:0] near_idx;
  current_t         s_lo, s_hi;
  logic             u_nonzero;

  esbol_input_limiter #(.I_MAX_MA(I_MAX_MA)) u_lim (
    .i_in(i_sp), .i_out(sp_lim), .limited(sp_limited)
  );

  esbol_breakpoint_locator #(.N(N), .I_MAX_MA(I_MAX_MA), .WINDOW_PCT(WINDOW_PCT)) u_loc (
    .i_sp(sp_lim), .seg_idx(seg_idx), .seg_off(seg_off),
    .near_idx(near_idx), .in_window(sp_near)
  );

  esbol_update_limiter #(.I_TOL_MA(I_TOL_MA), .I_MAX_STEP_MA(I_MAX_STEP_MA)) u_upd (
    .i_i(i_i), .i_u(upd_val), .nonzero(u_nonzero), .clipped(upd_clipped)
  );

  assign upd_fire = w_active && sp_near && u_nonzero && !init && !ld_en;
  assign upd_idx  = near_idx;

  esbol_error_storage #(.N(N), .I_MAX_MA(I_MAX_MA), .S_LIM_MA(S_LIM_MA)) u_mem (
    .clk, .rst_n, .init,
    .upd_en(upd_fire), .upd_idx(near_idx), .upd_val(upd_val),
    .ld_en, .ld_idx, .ld_val,
    .rd_idx(seg_idx), .rd_lo(s_lo), .rd_hi(s_hi)
  );

  esbol_interpolator #(.N(N), .I_MAX_MA(I_MAX_MA)) u_ip (
    .s_lo(s_lo), .s_hi(s_hi), .seg_off(seg_off), .i_ff(i_ff)
  );
endmodule
