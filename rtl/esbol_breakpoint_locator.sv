// esbol_breakpoint_locator: places a (limited) current setpoint on the grid
// of N evenly spaced breakpoints S_1..S_N that span -I_max..+I_max.
//
// Outputs, all 0-based (breakpoint S_n of the document has index n-1):
//   seg_idx  lower breakpoint of the segment holding i_sp (0..N-2); the
//            readout interpolates between seg_idx and seg_idx+1
//   seg_off  distance of i_sp above that breakpoint, 0..SPACING mA
//   near_idx nearest breakpoint, the rounded form of the document's formula
//            n = I_sp/I_max * (N-1)/2 + (N+1)/2
//   in_window i_sp lies within WINDOW_PCT percent of the breakpoint distance
//            of near_idx; only then may the storage be updated
// Purely combinational. The division by the constant breakpoint spacing is
// written with `/`; the spacing 2*I_max/(N-1) must be a whole number of mA
// (2500 mA for the document's N = 41 and I_max = 50 A).
module esbol_breakpoint_locator
  import esbol_pkg::*;
#(
  parameter int unsigned N          = 41,      // Table I
  parameter int unsigned I_MAX_MA   = 50_000,  // Table I: 50 A
  parameter int unsigned WINDOW_PCT = 5,       // Sec. III-C: 5 % of the distance
  localparam int unsigned IDX_W     = $clog2(N)
) (
  input  current_t         i_sp,      // already limited to +/-I_MAX_MA
  output logic [IDX_W-1:0] seg_idx,
  output current_t         seg_off,
  output logic [IDX_W-1:0] near_idx,
  output logic             in_window
);
  localparam int unsigned SPACING = 2 * I_MAX_MA / (N - 1);
  localparam int unsigned WIN     = SPACING * WINDOW_PCT / 100;

  // The grid must be exact and there must be at least one segment.
  initial begin
    assert (N >= 3 && (N % 2) == 1)
      else $error("N must be odd and at least 3");
    assert (SPACING * (N - 1) == 2 * I_MAX_MA)
      else $error("2*I_MAX_MA must be a multiple of N-1");
  end

  logic [CUR_W-1:0] off;   // i_sp + I_max, 0..2*I_max
  logic [CUR_W-1:0] q;
  logic [CUR_W-1:0] r;

  always_comb begin
    off = CUR_W'(i_sp + current_t'(I_MAX_MA));
    q   = off / CUR_W'(SPACING);
    // +I_max itself belongs to the last segment, at its upper end
    if (q >= CUR_W'(N - 1)) q = CUR_W'(N - 2);
    r   = off - q * CUR_W'(SPACING);
    seg_idx = IDX_W'(q);
    seg_off = current_t'(r);
    if (r < CUR_W'((SPACING + 1) / 2)) near_idx = IDX_W'(q);  // round half up
    else                          near_idx = IDX_W'(q + 1);
    in_window = (r <= CUR_W'(WIN)) || (r >= CUR_W'(SPACING - WIN));
  end
endmodule
