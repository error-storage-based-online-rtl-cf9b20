// tb_esbol_step: the dynamic experiment, setpoint steps -10 A -> +10 A and
// +10 A -> -10 A at U_p = U_s = 750 V, on the controller at its default
// parameters and the behavioural DAB model.
//
// The I-controller is on in both cases compared:
//   static feed-forward - identity table (learning never enabled);
//   ESBOL               - table trained beforehand at -10 A and +10 A.
// Before each step the setpoint is held long enough for the I-controller
// to settle. The settling time is the number of control cycles after the
// step until |I_meas - I_sp| stays within 200 mA for 5 cycles. Checks: with
// ESBOL each step settles in at most half the cycles of the static case.
module tb_esbol_step;
  import esbol_pkg::*;
  localparam int TOL_MA = 200, STAY = 5, PRE = 150, MAXC = 400;

  logic clk = 0, rst_n = 0;
  current_t i_sp = 0, i_meas;
  voltage_t u_p = voltage_t'(7500);
  logic ctrl_en = 0, learn_en = 0;
  logic [3:0] gate_p, gate_s;
  logic ctrl_tick, phi_sat, phi_valid, w_active, sp_limited, upd_fire, upd_clipped, sp_near;
  logic [5:0] upd_idx;
  phase_t phi;
  logic signed [31:0] shift;
  current_t i_ff, i_i, i_sp_mod, upd_val;
  int checks = 0, failures = 0;

  esbol_dab_controller dut (
    .clk, .rst_n, .i_sp, .i_meas, .u_p, .ctrl_en, .learn_en, .init(1'b0), .pwm_en(1'b1),
    .ld_en(1'b0), .ld_idx(6'd0), .ld_val(current_t'(0)),
    .gate_p, .gate_s, .ctrl_tick, .phi, .phi_sat, .phi_valid, .shift,
    .i_ff, .i_i, .i_sp_mod, .w_active, .sp_limited, .upd_fire, .upd_clipped,
    .sp_near, .upd_idx, .upd_val);

  dab_plant_model plant (.clk, .rst_n, .tick(ctrl_tick), .phi, .u_p, .u_s(u_p), .i_meas);

  always #5 clk = ~clk;

  task automatic cycles(input int n);
    repeat (n) @(posedge clk iff ctrl_tick);
  endtask

  // hold `from`, step to `to`, return the settling time in control cycles
  task automatic step(input int from, input int to, output int settle);
    int stay, e;
    i_sp = current_t'(from);
    cycles(PRE);
    i_sp = current_t'(to);
    settle = MAXC; stay = 0;
    for (int c = 1; c <= MAXC; c++) begin
      cycles(1);
      #1;
      e = int'(i_meas) - to; if (e < 0) e = -e;

      if (e <= TOL_MA) begin
        stay++;
        if (stay == STAY) begin settle = c - STAY + 1; break; end
      end else stay = 0;
    end
  endtask

  initial begin
    // about 3000 control cycles of 2000 clocks
    repeat (10_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int s_up, s_dn, e_up, e_dn;
    repeat (3) @(posedge clk);
    rst_n = 1;
    ctrl_en = 1;
    // static feed-forward
    step(-10_000, 10_000, s_up);
    step(10_000, -10_000, s_dn);
    // train at both setpoints
    learn_en = 1;
    i_sp = current_t'(-10_000); cycles(800);
    i_sp = current_t'(10_000);  cycles(800);
    learn_en = 0;
    // ESBOL
    step(-10_000, 10_000, e_up);
    step(10_000, -10_000, e_dn);
    $display("-10 A -> +10 A: settling %0d cycles static, %0d cycles ESBOL", s_up, e_up);
    $display("+10 A -> -10 A: settling %0d cycles static, %0d cycles ESBOL", s_dn, e_dn);
    checks++;
    if (!(2 * e_up <= s_up)) begin failures++; $display("FAIL step up"); end
    checks++;
    if (!(2 * e_dn <= s_dn)) begin failures++; $display("FAIL step down"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
