// tb_esbol_interpolator: random stored values and offsets; the output is
// compared with a real-valued linear interpolation truncated toward zero.
module tb_esbol_interpolator;
  import esbol_pkg::*;
  localparam int SP = 2500;
  current_t s_lo, s_hi, seg_off, i_ff;
  int checks = 0, failures = 0;

  esbol_interpolator #(.N(41), .I_MAX_MA(50_000)) dut (.s_lo, .s_hi, .seg_off, .i_ff);

  task automatic check(input int lo, input int hi, input int off);
    longint d; longint e;
    s_lo = current_t'(lo); s_hi = current_t'(hi); seg_off = current_t'(off);
    #1;
    d = longint'(hi - lo) * off;
    // truncation toward zero of d / SP
    e = lo + ((d >= 0) ? (d / SP) : -((-d) / SP));
    checks++;
    if (longint'(i_ff) != e) begin
      failures++;
      $display("FAIL lo=%0d hi=%0d off=%0d got %0d exp %0d", lo, hi, off, i_ff, e);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(-50_000, -47_500, 0);
    check(-50_000, -47_500, 2500);
    check(-50_000, -47_500, 1250);
    check(0, 2500, 1000);          // ideal grid: output equals setpoint
    check(1000, 0, 1);             // falling segment
    check(-3000, 4000, 777);
    repeat (1000)
      check(int'($urandom_range(0, 200_000)) - 100_000,
            int'($urandom_range(0, 200_000)) - 100_000,
            int'($urandom_range(0, SP)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
