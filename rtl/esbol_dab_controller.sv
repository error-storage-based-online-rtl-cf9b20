// esbol_dab_controller: output-current controller of a dual active bridge
// (DAB) with error-storage-based online linearisation (ESBOL).
//
// The DAB's current transfer function is nonlinear (blocking time and
// MOSFET capacitances distort the commutation), so an ideal modulator
// delivers a current that differs from the one asked for. This controller
// learns the inverse of that characteristic online and applies it as a
// feed-forward term:
//   I_sp,mod = I_inv,tf,ip(I_sp) + I_i
// where I_inv,tf,ip is read from the error storage (N breakpoints,
// linearly interpolated) and I_i is a slow integral controller that
// removes what the storage does not yet know. Every UPDATE_RATE control
// cycles, while `learn_en` is high, the learning strobe w_active lets the
// storage entry at the setpoint's breakpoint absorb I_i (dead band I_tol,
// step limit I_max,step). The modulator turns I_sp,mod into an SPS phase
// shift (the inverted SPS power equation) and gate signals with blocking time.
//
// Timing: one control cycle per switching period. `ctrl_tick` pulses at
// the start of each period (clock 0); the inputs i_sp, i_meas and u_p are
// sampled then. Clock 1: the integral controller steps. Clock 2: the
// storage is read, I_sp,mod is registered and, on a learning cycle, the
// storage entry is updated. Clock 3: the phase calculation starts; it ends
// about 85 clocks later and the gate generator applies the new phase from
// the next period on. The period must thus exceed about 100 clocks.
//
// Controls: ctrl_en switches the integral controller on (off: I_i = 0,
// pure feed-forward), learn_en enables learning, init reloads the ideal
// linear characteristic, ld_* preloads one entry, pwm_en enables the
// gates. All currents are in mA, u_p in 0.1 V, phi is phi/pi in Q24.
// The integral gain (1/64 per control cycle) is deliberately slow against
// the two-cycle delay from setpoint to measured current: the learned
// feed-forward provides the speed, the integrator only the accuracy.
// The structure, the setpoint sum, the storage and its update follow the document;
// the sampling schedule, number formats, integral gain and the gate
// generator are this design's choices.
module esbol_dab_controller
  import esbol_pkg::*;
#(
  parameter int unsigned N             = 41,           // breakpoints
  parameter int unsigned I_MAX_MA      = 50_000,       // 50 A
  parameter int unsigned I_TOL_MA      = 100,          // 100 mA
  parameter int unsigned I_MAX_STEP_MA = 50,           // 50 mA
  parameter int unsigned WINDOW_PCT    = 5,            // 5 % of spacing
  parameter int unsigned UPDATE_RATE   = 10,           // w_active every 10 cycles
  parameter int unsigned KI_SHIFT      = 6,            // I gain 1/64 per cycle
  parameter int unsigned CLK_HZ        = 100_000_000,
  parameter int unsigned F_SW_HZ       = 50_000,       // 50 kHz
  parameter int unsigned T_BT_NS       = 200,          // 200 ns
  parameter int unsigned L_SIGMA_NH    = 11_000,       // 11 uH
  parameter int unsigned N_TR          = 1,            // 1:1
  localparam int unsigned IDX_W        = $clog2(N)
) (
  input  logic             clk,
  input  logic             rst_n,
  // setpoint, measurements
  input  current_t         i_sp,
  input  current_t         i_meas,
  input  voltage_t         u_p,
  // operating mode
  input  logic             ctrl_en,
  input  logic             learn_en,
  input  logic             init,
  input  logic             pwm_en,
  input  logic             ld_en,
  input  logic [IDX_W-1:0] ld_idx,
  input  current_t         ld_val,
  // modulator outputs
  output logic [3:0]       gate_p,
  output logic [3:0]       gate_s,
  output logic             ctrl_tick,
  output phase_t           phi,
  output logic             phi_sat,
  output logic             phi_valid,     // pulse: new phi computed
  output logic signed [31:0] shift,       // phase shift in use, clocks
  // observation
  output current_t         i_ff,
  output current_t         i_i,
  output current_t         i_sp_mod,
  output logic             w_active,
  output logic             sp_limited,
  output logic             upd_fire,
  output logic             upd_clipped,
  output logic             sp_near,
  output logic [IDX_W-1:0] upd_idx,
  output current_t         upd_val
);
  localparam int unsigned S_LIM_MA = 2 * I_MAX_MA;

  current_t i_sp_r, i_meas_r;
  voltage_t u_p_r;
  logic     st1, st2, st3;
  logic [$clog2(UPDATE_RATE+1)-1:0] rate_cnt;
  logic     ph_busy;

  // ---- sampling and control-cycle schedule ----
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      i_sp_r   <= '0;
      i_meas_r <= '0;
      u_p_r    <= '0;
      st1      <= 1'b0;
      st2      <= 1'b0;
      st3      <= 1'b0;
    end else begin
      if (ctrl_tick) begin
        i_sp_r   <= i_sp;
        i_meas_r <= i_meas;
        u_p_r    <= u_p;
      end
      st1 <= ctrl_tick;
      st2 <= st1;
      st3 <= st2;
    end
  end

  // ---- learning strobe: every UPDATE_RATE-th control cycle ----
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                rate_cnt <= '0;
    else if (!learn_en)        rate_cnt <= '0;
    else if (st2) begin
      if (rate_cnt == ($bits(rate_cnt))'(UPDATE_RATE - 1)) rate_cnt <= '0;
      else                                                 rate_cnt <= rate_cnt + 1'b1;
    end
  end
  assign w_active = st2 && learn_en && (rate_cnt == ($bits(rate_cnt))'(UPDATE_RATE - 1));

  // ---- integral controller ----
  esbol_i_controller #(.KI_SHIFT(KI_SHIFT), .I_LIM_MA(I_MAX_MA)) u_ictl (
    .clk, .rst_n, .tick(st1), .active(ctrl_en),
    .i_sp(i_sp_r), .i_meas(i_meas_r), .i_i(i_i)
  );

  // ---- error storage system ----
  esbol_error_storage_system #(
    .N(N), .I_MAX_MA(I_MAX_MA), .I_TOL_MA(I_TOL_MA),
    .I_MAX_STEP_MA(I_MAX_STEP_MA), .WINDOW_PCT(WINDOW_PCT), .S_LIM_MA(S_LIM_MA)
  ) u_ess (
    .clk, .rst_n, .init, .w_active, .i_sp(i_sp_r), .i_i(i_i),
    .ld_en, .ld_idx, .ld_val,
    .i_ff(i_ff), .sp_limited(sp_limited), .sp_near(sp_near),
    .upd_fire(upd_fire), .upd_clipped(upd_clipped),
    .upd_idx(upd_idx), .upd_val(upd_val)
  );

  // ---- modulator setpoint: feed-forward plus integral part ----
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)   i_sp_mod <= '0;
    else if (st2) i_sp_mod <= sat_current(48'(i_ff) + 48'(i_i), S_LIM_MA);
  end

  // ---- SPS modulator ----
  dab_sps_phase #(.F_SW_HZ(64'(F_SW_HZ)), .L_SIGMA_NH(64'(L_SIGMA_NH)), .N_TR(64'(N_TR))) u_phase (
    .clk, .rst_n, .start(st3), .i_set(i_sp_mod), .u_p(u_p_r),
    .busy(ph_busy), .done(phi_valid), .phi(phi), .sat(phi_sat)
  );

  dab_sps_gate_gen #(.CLK_HZ(CLK_HZ), .F_SW_HZ(F_SW_HZ), .T_BT_NS(T_BT_NS)) u_gate (
    .clk, .rst_n, .enable(pwm_en), .phi(phi),
    .gate_p, .gate_s, .period_start(ctrl_tick), .shift(shift)
  );

  // The phase calculation must finish within one switching period.
  a_phase_in_time: assert property (@(posedge clk) disable iff (!rst_n) !(ctrl_tick && ph_busy))
    else $error("phase calculation still busy at period start");
endmodule
