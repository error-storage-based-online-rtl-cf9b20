// tb_dab_sps_phase: compares the SPS phase shift with the SPS phase equation evaluated in
// real arithmetic, for both current directions, several primary voltages
// and currents up to and beyond the limit where the root has no real value
// (saturation to pi/2). Checks that `done` comes within the stated latency.
module tb_dab_sps_phase;
  import esbol_pkg::*;
  localparam real F_SW = 50_000.0, L = 11e-6;
  localparam int  MAX_LAT = 90;
  logic clk = 0, rst_n = 0, start = 0;
  current_t i_set = 0;
  voltage_t u_p = 0;
  logic busy, done, sat;
  phase_t phi;
  int checks = 0, failures = 0, n_sat = 0;

  dab_sps_phase #(.F_SW_HZ(50_000), .L_SIGMA_NH(11_000), .N_TR(1)) dut (.*);

  always #5 clk = ~clk;

  task automatic run(input int i_ma, input int u_dv);
    real x, ph; int lat; longint expq; bit esat;
    @(negedge clk);
    i_set = current_t'(i_ma); u_p = voltage_t'(u_dv); start = 1;
    @(negedge clk);
    start = 0;
    lat = 1;
    while (!done && lat < 1000) begin @(negedge clk); lat++; end
    x = (u_dv == 0) ? 2.0 : 8.0 * F_SW * L * ((i_ma < 0 ? -real'(i_ma) : real'(i_ma)) / 1000.0) / (real'(u_dv) / 10.0);
    esat = (x >= 1.0);
    ph = esat ? 0.5 : 0.5 * (1.0 - $sqrt(1.0 - x));    // phi/pi
    if (i_ma < 0) ph = -ph;
    expq = longint'(ph * 16777216.0);
    checks++;
    if (lat > MAX_LAT || sat != esat || (longint'(phi) - expq > 4) || (expq - longint'(phi) > 4)) begin
      failures++;
      $display("FAIL I=%0d U=%0d phi=%0d exp=%0d sat=%0b/%0b lat=%0d", i_ma, u_dv, phi, expq, sat, esat, lat);
    end
    if (sat) n_sat++;
  endtask

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #12 rst_n = 1;
    run(0, 7500);
    run(50_000, 7500);      // 50 A at 750 V: x = 0.293
    run(-50_000, 7500);
    run(2_500, 7500);
    run(-10_000, 7500);
    run(170_000, 7500);     // just below the limit
    run(171_000, 7500);     // beyond it
    run(50_000, 2000);      // low U_p: saturates
    run(1_000, 0);          // zero voltage
    for (int i = 0; i < 300; i++)
      run(int'($urandom_range(0, 200_000)) - 100_000, int'($urandom_range(3000, 9000)));
    checks++;
    if (n_sat < 3) begin failures++; $display("FAIL no saturation seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
