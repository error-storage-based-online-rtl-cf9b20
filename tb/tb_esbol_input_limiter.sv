// tb_esbol_input_limiter: checks the setpoint clamp against +/-I_max with
// corner values and random values, including the `limited` flag.
module tb_esbol_input_limiter;
  import esbol_pkg::*;
  localparam int LIM = 50_000;
  current_t i_in, i_out;
  logic limited;
  int checks = 0, failures = 0;

  esbol_input_limiter #(.I_MAX_MA(LIM)) dut (.i_in, .i_out, .limited);

  task automatic check(input int v);
    int exp_v; logic exp_l;
    i_in = current_t'(v);
    #1;
    exp_v = (v > LIM) ? LIM : (v < -LIM) ? -LIM : v;
    exp_l = (v > LIM) || (v < -LIM);
    checks++;
    if (int'(i_out) != exp_v || limited != exp_l) begin
      failures++;
      $display("FAIL in=%0d out=%0d lim=%0b exp %0d %0b", v, i_out, limited, exp_v, exp_l);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int vals[] = '{0, 1, -1, LIM, -LIM, LIM+1, -LIM-1, 8_000_000, -8_000_000, 12_345, -49_999};
    foreach (vals[k]) check(vals[k]);
    repeat (500) check(int'($urandom_range(0, 240_000)) - 120_000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
