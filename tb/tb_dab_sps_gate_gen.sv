// tb_dab_sps_gate_gen: runs several switching periods at the default
// 100 MHz / 50 kHz / 200 ns and checks, per period: its length, that the
// high and low switch of a leg never conduct together, the blocking gap
// between them, the 50 % pattern of the diagonals, and that the secondary
// lags the primary by round(phi/pi * PERIOD/2) clocks, for positive and
// negative phi. Also checks that disabling turns every gate off.
module tb_dab_sps_gate_gen;
  import esbol_pkg::*;
  localparam int PERIOD = 2000, HALF = 1000, DT = 20;
  logic clk = 0, rst_n = 0, enable = 0;
  phase_t phi = 0;
  logic [3:0] gate_p, gate_s;
  logic period_start;
  logic signed [31:0] shift;
  int checks = 0, failures = 0;

  dab_sps_gate_gen #(.CLK_HZ(100_000_000), .F_SW_HZ(50_000), .T_BT_NS(200)) dut (.*);

  always #5 clk = ~clk;

  // never both switches of a leg on
  always @(posedge clk) if (rst_n) begin
    if ((gate_p[0] && gate_p[1]) || (gate_p[2] && gate_p[3]) ||
        (gate_s[0] && gate_s[1]) || (gate_s[2] && gate_s[3])) begin
      failures++;
      $display("FAIL shoot-through %b %b", gate_p, gate_s);
    end
  end

  // Sample the gates over one period starting at a period_start pulse.
  logic [3:0] sp_p [PERIOD];
  logic [3:0] sp_s [PERIOD];

  function automatic int rise(input logic [3:0] w [PERIOD], input int bitn);
    for (int k = 0; k < PERIOD; k++)
      if (w[k][bitn] && !w[(k + PERIOD - 1) % PERIOD][bitn]) return k;
    return -1;
  endfunction

  task automatic measure(output int p_rise, output int s_rise, output int t1_on,
                         output int len, output int gap);
    int t2_fall;
    @(posedge clk iff period_start);
    // period_start is seen again PERIOD clocks after the first one
    len = -1;
    for (int k = 0; k < PERIOD; k++) begin
      @(posedge clk); #1;
      sp_p[k] = gate_p; sp_s[k] = gate_s;
      if (period_start && len < 0) len = k + 2;
    end
    p_rise = rise(sp_p, 0);
    s_rise = rise(sp_s, 0);
    // every switch of both bridges conducts HALF-DT clocks; t1_on is
    // set to -1 if any of them differs
    t1_on = 0;
    foreach (sp_p[k]) if (sp_p[k][0]) t1_on++;
    for (int g = 0; g < 4; g++) begin
      int on_p, on_s;
      on_p = 0; on_s = 0;
      foreach (sp_p[k]) begin
        if (sp_p[k][g]) on_p++;
        if (sp_s[k][g]) on_s++;
      end
      if (on_p != HALF - DT || on_s != HALF - DT) t1_on = -1;
    end
    t2_fall = -1;
    for (int k = 0; k < PERIOD; k++)
      if (!sp_p[k][1] && sp_p[(k + PERIOD - 1) % PERIOD][1]) t2_fall = k;
    gap = (p_rise - t2_fall + PERIOD) % PERIOD;
  endtask

  task automatic try_phi(input real ph);
    int pr, sr, on, len, gap, exp_sh, lag;
    phi = phase_t'(longint'(ph * 16777216.0));
    measure(pr, sr, on, len, gap);      // phi taken over at the end of this period
    measure(pr, sr, on, len, gap);
    exp_sh = int'($floor(ph * HALF + 0.5));
    if (ph < 0) exp_sh = -int'($floor(-ph * HALF + 0.5));
    lag = sr - pr;
    if (lag < -HALF) lag += PERIOD;
    if (lag >= HALF) lag -= PERIOD;
    checks++;
    if (len != PERIOD || on != HALF - DT || int'(shift) != exp_sh || lag != exp_sh || gap < DT) begin
      failures++;
      $display("FAIL phi=%f len=%0d on=%0d shift=%0d lag=%0d exp=%0d gap=%0d", ph, len, on, shift, lag, exp_sh, gap);
    end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #12 rst_n = 1;
    enable = 1;
    try_phi(0.0);
    try_phi(0.1);
    try_phi(-0.1);
    try_phi(0.5);
    try_phi(-0.5);
    try_phi(0.0123);
    try_phi(-0.3337);
    enable = 0;
    repeat (3) @(posedge clk);
    checks++;
    repeat (2500) begin
      @(posedge clk);
      if (gate_p != 0 || gate_s != 0) begin failures++; break; end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
