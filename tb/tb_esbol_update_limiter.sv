// tb_esbol_update_limiter: checks the update value I_u against a reference
// of the dead band / step limit rule for corner and random I_i.
module tb_esbol_update_limiter;
  import esbol_pkg::*;
  localparam int TOL = 100, STEP = 50;
  current_t i_i, i_u;
  logic nonzero, clipped;
  int checks = 0, failures = 0;

  esbol_update_limiter #(.I_TOL_MA(TOL), .I_MAX_STEP_MA(STEP)) dut (.i_i, .i_u, .nonzero, .clipped);

  task automatic check(input int v);
    int e; logic c;
    i_i = current_t'(v);
    #1;
    c = 1'b0;
    if (v >= TOL) begin
      e = v - TOL; if (e > STEP) begin e = STEP; c = 1'b1; end
    end else if (v <= -TOL) begin
      e = v + TOL; if (e < -STEP) begin e = -STEP; c = 1'b1; end
    end else e = 0;
    checks++;
    if (int'(i_u) != e || clipped != c || nonzero != (e != 0)) begin
      failures++;
      $display("FAIL i_i=%0d i_u=%0d exp %0d clip=%0b", v, i_u, e, clipped);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = -300; v <= 300; v++) check(v);
    repeat (500) check(int'($urandom_range(0, 100_000)) - 50_000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
