// esbol_interpolator: read function of the error storage system.
//
// The setpoint rarely falls on a breakpoint, so the feed-forward current is
// interpolated linearly between the two stored values around it:
//   I_ff = S_lo + (S_hi - S_lo) * seg_off / SPACING
// with seg_off the distance of the setpoint above the lower breakpoint
// (0..SPACING). The document asks for linear interpolation; the integer
// form, with the quotient truncated toward zero, is this design's.
// Purely combinational.
module esbol_interpolator
  import esbol_pkg::*;
#(
  parameter int unsigned N        = 41,
  parameter int unsigned I_MAX_MA = 50_000
) (
  input  current_t s_lo,
  input  current_t s_hi,
  input  current_t seg_off,
  output current_t i_ff
);
  localparam int unsigned SPACING = 2 * I_MAX_MA / (N - 1);

  logic signed [47:0] prod;
  logic signed [47:0] quot;

  always_comb begin
    prod = (48'(s_hi) - 48'(s_lo)) * 48'(seg_off);
    quot = prod / $signed(48'(SPACING));
    i_ff = current_t'(48'(s_lo) + quot);
  end
endmodule
