// tb_esbol_sweep: the stationary transfer-function experiment, on the
// controller at its default parameters and the behavioural DAB model.
//
// For each secondary voltage U_s = 720, 750 and 780 V (U_p = 750 V):
//  1. open loop with the identity table: sweep I_sp from -45 A to +45 A in
//     0.5 A steps and record |I_meas - I_sp|;
//  2. training: the same sweep in closed loop with learning on, HOLD_BP
//     control cycles on setpoints that fall on a breakpoint (only there is
//     anything learned) and HOLD cycles on the others;
//  3. open loop again with the learned table and the I-controller off,
//     same sweep.
// Checks: after training the largest error over the sweep is below 4 % of
// 50 A and smaller than err0, and the error at every breakpoint in the
// sweep is at most 250 mA. The table is re-initialised between voltages.
module tb_esbol_sweep;
  import esbol_pkg::*;
  localparam int HOLD_BP = 800, HOLD = 4;
  localparam int NSTEP = 181;                 // -45 A .. 45 A, 0.5 A

  logic clk = 0, rst_n = 0;
  current_t i_sp = 0, i_meas;
  voltage_t u_p = voltage_t'(7500), u_s = voltage_t'(7500);
  logic ctrl_en = 0, learn_en = 0, init = 0;
  logic [3:0] gate_p, gate_s;
  logic ctrl_tick, phi_sat, phi_valid, w_active, sp_limited, upd_fire, upd_clipped, sp_near;
  logic [5:0] upd_idx;
  phase_t phi;
  logic signed [31:0] shift;
  current_t i_ff, i_i, i_sp_mod, upd_val;
  int checks = 0, failures = 0, n_upd = 0;

  esbol_dab_controller dut (
    .clk, .rst_n, .i_sp, .i_meas, .u_p, .ctrl_en, .learn_en, .init, .pwm_en(1'b1),
    .ld_en(1'b0), .ld_idx(6'd0), .ld_val(current_t'(0)),
    .gate_p, .gate_s, .ctrl_tick, .phi, .phi_sat, .phi_valid, .shift,
    .i_ff, .i_i, .i_sp_mod, .w_active, .sp_limited, .upd_fire, .upd_clipped,
    .sp_near, .upd_idx, .upd_val);

  dab_plant_model plant (.clk, .rst_n, .tick(ctrl_tick), .phi, .u_p, .u_s, .i_meas);

  always #5 clk = ~clk;
  always @(posedge clk) if (upd_fire) n_upd++;

  task automatic cycles(input int n);
    repeat (n) @(posedge clk iff ctrl_tick);
  endtask

  function automatic int sp_of(input int k);
    return -45_000 + 500 * k;
  endfunction

  // open-loop sweep: largest error overall and at breakpoints
  task automatic open_sweep(output int max_err, output int max_bp_err);
    int e;
    max_err = 0; max_bp_err = 0;
    for (int k = 0; k < NSTEP; k++) begin
      i_sp = current_t'(sp_of(k));
      cycles(3);
      e = int'(i_meas) - sp_of(k); if (e < 0) e = -e;
      if (e > max_err) max_err = e;
      if ((sp_of(k) % 2500) == 0 && e > max_bp_err) max_bp_err = e;
    end
  endtask

  initial begin
    // 3 voltages x (37 x 800 + 144 x 4 + 2 x 181 x 3) control cycles of 2000 clocks
    repeat (250_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int us_list[3] = '{7200, 7500, 7800};
    int err0, err0_bp, err1, err1_bp;
    repeat (3) @(posedge clk);
    rst_n = 1;
    foreach (us_list[v]) begin
      u_s = voltage_t'(us_list[v]);
      @(negedge clk); init = 1; @(negedge clk); init = 0;
      ctrl_en = 0; learn_en = 0;
      open_sweep(err0, err0_bp);
      ctrl_en = 1; learn_en = 1;
      for (int k = 0; k < NSTEP; k++) begin
        i_sp = current_t'(sp_of(k));
        cycles((sp_of(k) % 2500 == 0) ? HOLD_BP : HOLD);
      end
      ctrl_en = 0; learn_en = 0;
      cycles(2);
      open_sweep(err1, err1_bp);
      $display("U_s = %0d V: max error %0d mA -> %0d mA (%0d.%02d %% of 50 A); at breakpoints %0d -> %0d mA",
               us_list[v] / 10, err0, err1, err1 / 500, (err1 % 500) / 5, err0_bp, err1_bp);
      checks++;
      if (!(err1 < 2000 && err1 < err0 && err1_bp <= 250)) begin
        failures++;
        $display("FAIL U_s = %0d: err1 %0d, err0 %0d, at breakpoints %0d", us_list[v], err1, err0, err1_bp);
      end
    end
    checks++;
    if (n_upd == 0) begin failures++; $display("FAIL no updates"); end
    $display("updates=%0d", n_upd);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
