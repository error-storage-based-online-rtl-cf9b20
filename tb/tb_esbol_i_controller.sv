// tb_esbol_i_controller: drives errors tick by tick and compares I_i with a
// reference accumulator; checks hold between ticks, the anti-windup clamp
// and the clearing when the controller is switched off.
module tb_esbol_i_controller;
  import esbol_pkg::*;
  localparam int KS = 3, FR = 8, LIM = 50_000;
  logic clk = 0, rst_n = 0, tick = 0, active = 0;
  current_t i_sp = 0, i_meas = 0, i_i;
  int checks = 0, failures = 0;
  longint acc;

  esbol_i_controller #(.KI_SHIFT(KS), .FRAC(FR), .I_LIM_MA(LIM)) dut (.*);

  always #5 clk = ~clk;

  task automatic step(input int sp, input int meas, input bit t);
    longint e;
    @(negedge clk);
    i_sp = current_t'(sp); i_meas = current_t'(meas); tick = t;
    @(negedge clk);
    tick = 0;
    if (t && active) begin
      e = longint'(sp - meas);
      acc = acc + ((e <<< FR) >>> KS);
      if (acc > (longint'(LIM) <<< FR))  acc = longint'(LIM) <<< FR;
      if (acc < -(longint'(LIM) <<< FR)) acc = -(longint'(LIM) <<< FR);
    end
    if (!active) acc = 0;
    checks++;
    if (longint'(i_i) != (acc >>> FR)) begin
      failures++;
      $display("FAIL sp=%0d meas=%0d i_i=%0d exp %0d", sp, meas, i_i, acc >>> FR);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    acc = 0;
    #12 rst_n = 1;
    active = 1;
    step(1000, 0, 1);       // +125 mA
    step(1000, 0, 0);       // no tick: hold
    step(1000, 0, 1);
    step(-7, 0, 1);         // fractional step
    repeat (200) step(int'($urandom_range(0, 4000)) - 2000, int'($urandom_range(0, 4000)) - 2000, 1'($urandom_range(0, 1)));
    repeat (20) step(8_000_000, -300_000, 1);   // windup to the clamp
    checks++;
    if (int'(i_i) != LIM) begin failures++; $display("FAIL clamp %0d", i_i); end
    active = 0;
    step(100, 0, 1);        // switched off: cleared
    checks++;
    if (i_i != 0) begin failures++; $display("FAIL not cleared"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
