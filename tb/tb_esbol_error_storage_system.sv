// tb_esbol_error_storage_system: random setpoints (inside, at the edges of
// and beyond the range, and close to breakpoints), controller values and
// learning strobes. A reference model (array, grid, update rule, interpolation) is
// kept in the testbench; the feed-forward output and every update are
// compared with it each clock. Also checks that a learned entry shows in
// the readout and that init restores the unity characteristic.
module tb_esbol_error_storage_system;
  import esbol_pkg::*;
  localparam int N = 41, IMAX = 50_000, SP = 2500, WIN = 125, TOL = 100, STEP = 50, SLIM = 100_000;
  logic clk = 0, rst_n = 0, init = 0, w_active = 0, ld_en = 0;
  logic [5:0] ld_idx = 0, upd_idx;
  current_t i_sp = 0, i_i = 0, ld_val = 0, i_ff, upd_val;
  logic sp_limited, sp_near, upd_fire, upd_clipped;
  int checks = 0, failures = 0, n_upd = 0, n_lim = 0, n_clip = 0;
  int m[N];

  esbol_error_storage_system #(.N(N), .I_MAX_MA(IMAX), .I_TOL_MA(TOL), .I_MAX_STEP_MA(STEP),
                               .WINDOW_PCT(5), .S_LIM_MA(SLIM)) dut (.*);

  always #5 clk = ~clk;

  function automatic int ideal(int k);
    return -IMAX + (k * 2 * IMAX) / (N - 1);
  endfunction

  function automatic int upd_rule(int v);
    if (v >= TOL)  return (v - TOL > STEP) ? STEP : v - TOL;
    if (v <= -TOL) return (v + TOL < -STEP) ? -STEP : v + TOL;
    return 0;
  endfunction

  // reference readout and update decision for the present inputs
  task automatic ref_step(output int ff, output bit fire, output int idx, output int val);
    int s, lo, off; longint d; int nn; int dst;
    s = int'(i_sp);
    if (s > IMAX) s = IMAX; if (s < -IMAX) s = -IMAX;
    lo = (s + IMAX) / SP; if (lo > N - 2) lo = N - 2;
    off = s + IMAX - lo * SP;
    d = longint'(m[lo + 1] - m[lo]) * off;
    ff = m[lo] + int'((d >= 0) ? d / SP : -((-d) / SP));
    nn = int'($floor(real'(s) / IMAX * (N - 1) / 2.0 + (N + 1) / 2.0 + 0.5)) - 1;  // nearest breakpoint
    dst = s + IMAX - nn * SP; if (dst < 0) dst = -dst;
    val = upd_rule(int'(i_i));
    idx = nn;
    fire = w_active && (dst <= WIN) && (val != 0);
  endtask

  task automatic cycle();
    int ff, idx, val; bit fire;
    #1;
    ref_step(ff, fire, idx, val);
    checks++;
    if (int'(i_ff) != ff || upd_fire != fire || (fire && (int'(upd_idx) != idx || int'(upd_val) != val))) begin
      failures++;
      $display("FAIL sp=%0d i_i=%0d ff=%0d/%0d fire=%0b/%0b idx=%0d/%0d val=%0d/%0d",
               i_sp, i_i, i_ff, ff, upd_fire, fire, upd_idx, idx, upd_val, val);
    end
    if (fire) begin
      n_upd++;
      if (upd_clipped) n_clip++;
      m[idx] = m[idx] + val;
      if (m[idx] > SLIM) m[idx] = SLIM; if (m[idx] < -SLIM) m[idx] = -SLIM;
    end
    if (sp_limited) n_lim++;
    @(negedge clk);
  endtask

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < N; k++) m[k] = ideal(k);
    #12 rst_n = 1;
    @(negedge clk);
    // unlearned storage: output equals the setpoint inside the range
    for (int v = -IMAX; v <= IMAX; v += 997) begin
      i_sp = current_t'(v); #1;
      checks++;
      if (int'(i_ff) != v) begin failures++; $display("FAIL unity %0d -> %0d", v, i_ff); end
    end
    // learning at one breakpoint: the readout follows
    i_sp = current_t'(5000); i_i = current_t'(400); w_active = 1;
    repeat (10) cycle();
    w_active = 0;
    #1 checks++;
    if (int'(i_ff) != 5000 + 10 * STEP) begin failures++; $display("FAIL learned %0d", i_ff); end
    // random traffic
    repeat (5000) begin
      int k;
      case ($urandom_range(0, 3))
        0: i_sp = current_t'(int'($urandom_range(0, 120_000)) - 60_000);
        default: begin
          k = $urandom_range(0, N - 1);
          i_sp = current_t'(-IMAX + k * SP + int'($urandom_range(0, 300)) - 150);
        end
      endcase
      i_i = current_t'(int'($urandom_range(0, 600)) - 300);
      w_active = ($urandom_range(0, 2) == 0);
      cycle();
    end
    w_active = 0;
    // init restores the unity characteristic
    init = 1; @(negedge clk); init = 0;
    for (int k = 0; k < N; k++) m[k] = ideal(k);
    i_sp = current_t'(5000); #1;
    checks++;
    if (int'(i_ff) != 5000) begin failures++; $display("FAIL init %0d", i_ff); end
    // preload an entry with prior knowledge
    ld_en = 1; ld_idx = 6'd22; ld_val = current_t'(6000); @(negedge clk); ld_en = 0;
    m[22] = 6000;
    cycle();
    checks++;
    if (n_upd < 100 || n_lim < 50 || n_clip < 20) begin
      failures++; $display("FAIL coverage upd=%0d lim=%0d clip=%0d", n_upd, n_lim, n_clip);
    end
    $display("updates=%0d clipped=%0d limited=%0d", n_upd, n_clip, n_lim);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
