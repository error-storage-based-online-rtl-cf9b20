// esbol_update_limiter: computes the storage update value I_u from the
// integral controller output I_i (the document's update rule).
//
//   I_u = min(I_i - I_tol,  I_max_step)  if I_i >=  I_tol
//   I_u = max(I_i + I_tol, -I_max_step)  if I_i <= -I_tol
//   I_u = 0                               otherwise
//
// I_tol is a dead band that keeps small controller values from updating the
// storage; I_max_step bounds the change per update and so the learning
// speed. `nonzero` is set when I_u differs from zero, `clipped` when the
// step limit acted. Purely combinational; all values in mA.
module esbol_update_limiter
  import esbol_pkg::*;
#(
  parameter int unsigned I_TOL_MA      = 100,  // Table I: 100 mA
  parameter int unsigned I_MAX_STEP_MA = 50    // Table I: 50 mA
) (
  input  current_t i_i,
  output current_t i_u,
  output logic     nonzero,
  output logic     clipped
);
  localparam current_t TOL  = current_t'(I_TOL_MA);
  localparam current_t STEP = current_t'(I_MAX_STEP_MA);

  always_comb begin
    i_u     = '0;
    clipped = 1'b0;
    if (i_i >= TOL) begin
      if (i_i - TOL > STEP) begin
        i_u     = STEP;
        clipped = 1'b1;
      end else begin
        i_u = i_i - TOL;
      end
    end else if (i_i <= -TOL) begin
      if (i_i + TOL < -STEP) begin
        i_u     = -STEP;
        clipped = 1'b1;
      end else begin
        i_u = i_i + TOL;
      end
    end
    nonzero = (i_u != '0);
  end
endmodule
