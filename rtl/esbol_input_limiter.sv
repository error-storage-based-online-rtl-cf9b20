// esbol_input_limiter: input limiting function of the error storage system.
//
// The current setpoint I_sp is clamped to the operating range of the error
// storage, [-I_MAX_MA, +I_MAX_MA], before breakpoints are looked up; the
// `limited` flag reports that the clamp acted. Purely combinational.
// The document names this limiting function; clamping to +/-I_max (the
// span of the breakpoints) is this design's reading of it.
module esbol_input_limiter
  import esbol_pkg::*;
#(
  parameter int unsigned I_MAX_MA = 50_000  // absolute maximum output current
) (
  input  current_t i_in,
  output current_t i_out,
  output logic     limited
);
  localparam current_t LIM = current_t'(I_MAX_MA);

  always_comb begin
    limited = 1'b1;
    if (i_in > LIM)       i_out = LIM;
    else if (i_in < -LIM) i_out = -LIM;
    else begin
      i_out   = i_in;
      limited = 1'b0;
    end
  end
endmodule
