// tb_esbol_dab_controller: end-to-end test of the controller at its
// default parameters (N = 41, +/-50 A, 100 mA / 50 mA, update every 10th
// cycle, 100 MHz clock, 50 kHz switching).
//
// The testbench closes the loop with the behavioural DAB model
// dab_plant_model (SPS power equation plus a dead zone of about 1.5 A
// around zero current and a gain of 0.97). The measured current of one
// control cycle is the response to the phase computed in the cycle before.
//
// Sequence: open loop with unity feed-forward (large error), learning with
// the I-controller on at several breakpoints, open loop again with only
// the learned feed-forward (error must have shrunk), interpolation between
// learned breakpoints, learning strobes outside an update window, input
// limiting, phase saturation at low U_p, preload and re-initialisation.
// Each mechanism is counted and must have occurred.
module tb_esbol_dab_controller;
  import esbol_pkg::*;

  logic clk = 0, rst_n = 0;
  current_t i_sp = 0, i_meas, ld_val = 0;
  voltage_t u_p = voltage_t'(7500);
  logic ctrl_en = 0, learn_en = 0, init = 0, pwm_en = 1, ld_en = 0;
  logic [5:0] ld_idx = 0, upd_idx;
  logic [3:0] gate_p, gate_s;
  logic ctrl_tick, phi_sat, phi_valid, w_active, sp_limited, upd_fire, upd_clipped, sp_near;
  phase_t phi;
  logic signed [31:0] shift;
  current_t i_ff, i_i, i_sp_mod, upd_val;

  int checks = 0, failures = 0;
  int n_tick = 0, n_wact = 0, n_upd = 0, n_clip = 0, n_dead = 0, n_outwin = 0;
  int n_lim = 0, n_sat = 0, n_shoot = 0;

  esbol_dab_controller dut (.*);

  always #5 clk = ~clk;

  // behavioural DAB; U_s = U_p
  dab_plant_model plant (.clk, .rst_n, .tick(ctrl_tick), .phi, .u_p, .u_s(u_p), .i_meas);

  // event counters
  always @(posedge clk) if (rst_n) begin
    if (ctrl_tick) n_tick++;
    if (w_active) begin
      n_wact++;
      if (!sp_near) n_outwin++;
      else if (!upd_fire) n_dead++;
    end
    if (upd_fire) n_upd++;
    if (upd_fire && upd_clipped) n_clip++;
    if (phi_valid && phi_sat) n_sat++;
    if (ctrl_tick && sp_limited) n_lim++;
    if ((gate_p[0] && gate_p[1]) || (gate_p[2] && gate_p[3]) ||
        (gate_s[0] && gate_s[1]) || (gate_s[2] && gate_s[3])) n_shoot++;
  end

  task automatic cycles(input int n);
    repeat (n) @(posedge clk iff ctrl_tick);
  endtask

  task automatic expect_true(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic int iabs(input int v);
    return v < 0 ? -v : v;
  endfunction

  localparam int NSP = 6;
  int sps[NSP] = '{-10_000, -5_000, -2_500, 2_500, 5_000, 10_000};
  int err_before[NSP], err_after[NSP], ff_learned[NSP];

  initial begin
    // the sequence takes about 5000 control cycles, 10 M clocks
    repeat (20_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t0, w0;
    repeat (3) @(posedge clk);
    rst_n = 1;

    // ---- open loop, unity feed-forward ----
    for (int k = 0; k < NSP; k++) begin
      i_sp = current_t'(sps[k]);
      cycles(4);
      err_before[k] = iabs(int'(i_meas) - sps[k]);
      expect_true(i_sp_mod == i_sp && i_i == 0, "unity feed-forward before learning");
    end
    expect_true(err_before[2] > 1000, "plant model shows the nonlinearity");

    // ---- learning with the I-controller ----
    ctrl_en = 1; learn_en = 1;
    t0 = n_tick; w0 = n_wact;
    for (int k = 0; k < NSP; k++) begin
      i_sp = current_t'(sps[k]);
      cycles(800);
    end
    // w_active comes once per UPDATE_RATE = 10 control cycles
    expect_true((n_wact - w0) == (n_tick - t0) / 10 || (n_wact - w0) == (n_tick - t0) / 10 + 1,
                $sformatf("learning strobe rate: %0d strobes in %0d cycles", n_wact - w0, n_tick - t0));

    // ---- learning strobes outside an update window ----
    i_sp = current_t'(3_750);
    cycles(40);
    learn_en = 0; ctrl_en = 0;
    cycles(2);

    // ---- open loop, learned feed-forward only ----
    for (int k = 0; k < NSP; k++) begin
      i_sp = current_t'(sps[k]);
      cycles(4);
      err_after[k]  = iabs(int'(i_meas) - sps[k]);
      ff_learned[k] = int'(i_ff);
      expect_true(i_i == 0 && i_sp_mod == i_ff, "pure feed-forward after learning");
      expect_true(err_after[k] <= 250 && err_after[k] * 4 < err_before[k] + 100,
                  $sformatf("sp %0d: open-loop error %0d mA before, %0d mA after learning",
                            sps[k], err_before[k], err_after[k]));
      $display("setpoint %0d mA: error %0d -> %0d mA, stored %0d mA",
               sps[k], err_before[k], err_after[k], ff_learned[k]);
    end

    // ---- interpolation between two learned breakpoints ----
    i_sp = current_t'(3_750);
    cycles(2);
    expect_true(iabs(int'(i_ff) - (ff_learned[3] + ff_learned[4]) / 2) <= 1, "interpolation midway");
    // phase shift in use matches the phase result
    cycles(2);
    expect_true(shift == 32'((64'(phi) * 1000 + (64'sd1 <<< 23)) >>> 24), "gate shift follows phi");

    // ---- input limiting ----
    i_sp = current_t'(65_000);
    cycles(3);
    expect_true(i_ff == current_t'(50_000), "setpoint above range is limited");

    // ---- phase saturation at low primary voltage ----
    u_p = voltage_t'(2000);
    cycles(3);
    u_p = voltage_t'(7500);
    i_sp = 0;
    cycles(3);

    // ---- preload and re-initialisation ----
    @(negedge clk); ld_en = 1; ld_idx = 6'd24; ld_val = current_t'(12_345); @(negedge clk); ld_en = 0;
    i_sp = current_t'(10_000);   // breakpoint index 24
    cycles(2);
    expect_true(i_ff == current_t'(12_345), "preloaded entry is read");
    @(negedge clk); init = 1; @(negedge clk); init = 0;
    cycles(2);
    expect_true(i_ff == current_t'(10_000), "init restores unity characteristic");

    // ---- mechanism coverage ----
    expect_true(n_upd > 0,    "storage updates");
    expect_true(n_clip > 0,   "step-limited updates");
    expect_true(n_dead > 0,   "strobes inside the dead band");
    expect_true(n_outwin > 0, "strobes outside an update window");
    expect_true(n_lim > 0,    "input limiting");
    expect_true(n_sat > 0,    "phase saturation");
    expect_true(n_shoot == 0, "no shoot-through");
    $display("ticks=%0d strobes=%0d updates=%0d clipped=%0d deadband=%0d outside=%0d limited=%0d sat=%0d",
             n_tick, n_wact, n_upd, n_clip, n_dead, n_outwin, n_lim, n_sat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
