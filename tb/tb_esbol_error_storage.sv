// tb_esbol_error_storage: checks the unity initial values after reset, the
// accumulating update against a reference array, saturation,
// preload, the priority of init over writes and re-initialisation.
module tb_esbol_error_storage;
  import esbol_pkg::*;
  localparam int N = 41, IMAX = 50_000, SLIM = 100_000;
  logic clk = 0, rst_n = 0, init = 0, upd_en = 0, ld_en = 0;
  logic [5:0] upd_idx = 0, ld_idx = 0, rd_idx = 0;
  current_t upd_val = 0, ld_val = 0, rd_lo, rd_hi;
  int checks = 0, failures = 0;
  int ref_m[N];

  esbol_error_storage #(.N(N), .I_MAX_MA(IMAX), .S_LIM_MA(SLIM)) dut (.*);

  always #5 clk = ~clk;

  function automatic int ideal(int k);
    return -IMAX + (k * 2 * IMAX) / (N - 1);   // unity characteristic, n = k+1
  endfunction

  task automatic check_all();
    for (int k = 0; k < N - 1; k++) begin
      rd_idx = 6'(k);
      #1;
      checks++;
      if (int'(rd_lo) != ref_m[k] || int'(rd_hi) != ref_m[k+1]) begin
        failures++;
        $display("FAIL idx %0d: %0d %0d exp %0d %0d", k, rd_lo, rd_hi, ref_m[k], ref_m[k+1]);
      end
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < N; k++) ref_m[k] = ideal(k);
    #12 rst_n = 1;
    check_all();
    // spot values of the initial table
    checks++;
    if (ref_m[0] != -50_000 || ref_m[20] != 0 || ref_m[40] != 50_000 || ref_m[21] != 2500) failures++;
    // random updates
    repeat (400) begin
      int k, v;
      k = $urandom_range(0, N - 1);
      v = int'($urandom_range(0, 100)) - 50;
      @(negedge clk);
      upd_en = 1; upd_idx = 6'(k); upd_val = current_t'(v);
      @(negedge clk);
      upd_en = 0;
      ref_m[k] = ref_m[k] + v;
    end
    check_all();
    // saturation: push entry 40 up by large steps
    repeat (30) begin
      @(negedge clk);
      upd_en = 1; upd_idx = 6'd40; upd_val = current_t'(5000);
      @(negedge clk);
      upd_en = 0;
      ref_m[40] = (ref_m[40] + 5000 > SLIM) ? SLIM : ref_m[40] + 5000;
    end
    check_all();
    // preload wins over update in the same clock
    @(negedge clk);
    ld_en = 1; ld_idx = 6'd3; ld_val = current_t'(-12345);
    upd_en = 1; upd_idx = 6'd3; upd_val = current_t'(40);
    @(negedge clk);
    ld_en = 0; upd_en = 0;
    ref_m[3] = -12345;
    check_all();
    // init restores the initial table and wins over an update
    @(negedge clk);
    init = 1; upd_en = 1; upd_idx = 6'd7; upd_val = current_t'(30);
    @(negedge clk);
    init = 0; upd_en = 0;
    for (int k = 0; k < N; k++) ref_m[k] = ideal(k);
    check_all();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
