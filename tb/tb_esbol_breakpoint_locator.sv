// tb_esbol_breakpoint_locator: sweeps the setpoint over the whole range and
// compares segment, offset, nearest breakpoint (rounded grid formula) and the
// 5 % update window with values computed in real arithmetic.
module tb_esbol_breakpoint_locator;
  import esbol_pkg::*;
  localparam int N = 41, IMAX = 50_000, SP = 2500, WIN = 125;
  current_t i_sp, seg_off;
  logic [5:0] seg_idx, near_idx;
  logic in_window;
  int checks = 0, failures = 0;

  esbol_breakpoint_locator #(.N(N), .I_MAX_MA(IMAX), .WINDOW_PCT(5)) dut (
    .i_sp, .seg_idx, .seg_off, .near_idx, .in_window);

  task automatic check(input int v);
    real pos, n1;
    int es, eo, en; logic ew; int d;
    i_sp = current_t'(v);
    #1;
    pos = (real'(v) + IMAX) / SP;          // 0..N-1
    es  = $floor(pos);
    if (es > N - 2) es = N - 2;
    eo  = v + IMAX - es * SP;
    n1  = real'(v) / IMAX * (N - 1) / 2.0 + (N + 1) / 2.0;   // grid position, 1-based
    en  = int'($floor(n1 + 0.5)) - 1;
    if (en > N - 1) en = N - 1;
    d   = v + IMAX - en * SP; if (d < 0) d = -d;
    ew  = (d <= WIN);
    checks++;
    if (int'(seg_idx) != es || int'(seg_off) != eo || int'(near_idx) != en || in_window != ew) begin
      failures++;
      $display("FAIL v=%0d seg=%0d/%0d off=%0d/%0d near=%0d/%0d win=%0b/%0b",
               v, seg_idx, es, seg_off, eo, near_idx, en, in_window, ew);
    end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = -IMAX; v <= IMAX; v += 25) check(v);
    // window edges around every breakpoint
    for (int k = 0; k < N; k++) begin
      int b = -IMAX + k * SP;
      if (b - WIN - 1 >= -IMAX) check(b - WIN - 1);
      if (b - WIN >= -IMAX)     check(b - WIN);
      if (b + WIN <= IMAX)      check(b + WIN);
      if (b + WIN + 1 <= IMAX)  check(b + WIN + 1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
