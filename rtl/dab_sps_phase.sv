// dab_sps_phase: phase shift of the single-phase-shift (SPS) modulator.
//
// From the modulator current setpoint I* (i_set, mA) and the primary DC
// voltage U_p (u_p, 0.1 V) it computes the ideal SPS phase shift by the
// SPS power equation solved for the phase, taking the smaller root:
//   phi = sign(I*) * pi/2 * (1 - sqrt(1 - 8 f_sw L_sigma |I*| / (n_tr U_p)))
// The result phi/pi is a signed Q24 fraction (+/-0.5 is +/-pi/2). When the
// root argument would be negative (more current asked than the bridge can
// carry) or U_p is zero, |phi| is set to pi/2, the maximum-power angle, and
// `sat` is raised.
//
// The calculation is sequential: a pulse on `start` captures the inputs,
// a restoring divider forms x = K*|I*|/U_p (DIV_W cycles), a bitwise
// square root forms sqrt(1-x) (PHASE_Q+1 cycles), and `done` pulses for one
// clock when `phi` and `sat` are valid, about 85 clocks after `start`; they
// hold their value until the next result. `start` is ignored while busy.
// The phase equation follows the document; its fixed-point and iterative form is this
// design's. K = 8 f_sw L_sigma / n_tr is a constant built from parameters.
module dab_sps_phase
  import esbol_pkg::*;
#(
  parameter longint unsigned F_SW_HZ    = 50_000,  // Table I: 50 kHz
  parameter longint unsigned L_SIGMA_NH = 11_000,  // Table I: 11 uH
  parameter longint unsigned N_TR       = 1        // Table I: 1:1
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     start,
  input  current_t i_set,
  input  voltage_t u_p,
  output logic     busy,
  output logic     done,
  output phase_t   phi,
  output logic     sat
);
  localparam int Q     = PHASE_Q;
  localparam int G     = 8;         // guard bits of the quotient
  localparam int DIV_W = 56;
  localparam int RAD_W = 2 * Q + 2;
  // x * 2^(Q+G) = NUMK * I[mA] / U[0.1 V]
  localparam longint unsigned DEN_K = N_TR * 64'd100_000_000_000;
  localparam logic [127:0] NUMK_W =
      ((128'd8 * F_SW_HZ * L_SIGMA_NH << (Q + G)) + 128'(DEN_K / 2)) / 128'(DEN_K);
  localparam longint unsigned NUMK = 64'(NUMK_W);

  typedef enum logic [1:0] {IDLE, DIV, SQRT, FIN} state_t;
  state_t state;

  logic             neg;
  logic [DIV_W-1:0] num;     // dividend, shifted out MSB first
  logic [DIV_W-1:0] quo;     // quotient, shifted in
  voltage_t         rem;     // partial remainder, below den
  voltage_t         den;
  logic [6:0]       cnt;
  logic [RAD_W-1:0] op;      // square root operand / remainder
  logic [RAD_W-1:0] res;     // square root result
  logic [RAD_W-1:0] one;     // current power of four
  logic             sat_r;

  logic [CUR_W-1:0] i_abs;
  logic [VOLT_W:0]  rem_sh;
  logic [Q:0]       s_arg;   // 1 - x in Q, 0..2^Q
  logic [Q+1:0]     mag;     // |phi|/pi in Q

  always_comb begin
    i_abs  = i_set[CUR_W-1] ? CUR_W'(-i_set) : CUR_W'(i_set);
    rem_sh = {rem, num[DIV_W-1]};
    s_arg  = (quo >= DIV_W'(64'd1 << (Q + G))) ? '0
           : (Q+1)'((64'd1 << Q) - 64'(quo >> G));
    // |phi|/pi = (1 - sqrt(1-x)) / 2, or 1/2 when saturated
    if (sat_r) mag = (Q+2)'(64'd1 << (Q - 1));
    else       mag = (Q+2)'(((64'd1 << Q) - 64'(res)) >> 1);
  end

  assign busy = (state != IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= IDLE;
      neg   <= 1'b0;
      num   <= '0;
      quo   <= '0;
      rem   <= '0;
      den   <= '0;
      cnt   <= '0;
      op    <= '0;
      res   <= '0;
      one   <= '0;
      sat_r <= 1'b0;
      done  <= 1'b0;
      phi   <= '0;
      sat   <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        IDLE: if (start) begin
          neg   <= i_set[CUR_W-1];
          num   <= DIV_W'(NUMK) * DIV_W'(i_abs);
          quo   <= '0;
          rem   <= '0;
          den   <= u_p;
          cnt   <= 7'(DIV_W);
          state <= DIV;
        end
        DIV: begin
          // one restoring division step per clock
          num <= num << 1;
          if (rem_sh >= {1'b0, den}) begin
            rem <= VOLT_W'(rem_sh - {1'b0, den});
            quo <= {quo[DIV_W-2:0], 1'b1};
          end else begin
            rem <= VOLT_W'(rem_sh);
            quo <= {quo[DIV_W-2:0], 1'b0};
          end
          cnt <= cnt - 1'b1;
          if (cnt == 7'd1) state <= SQRT;
          if (cnt == 7'(DIV_W)) begin
            // a zero voltage cannot carry current: saturate
            sat_r <= (den == '0);
          end
        end
        SQRT: begin
          if (one == '0) begin
            // first SQRT clock: set up sqrt((1-x) * 2^Q) in Q
            op    <= RAD_W'(s_arg) << Q;
            res   <= '0;
            one   <= RAD_W'(1) << (RAD_W - 2);
            sat_r <= sat_r || (quo >= DIV_W'(64'd1 << (Q + G)));
          end else begin
            if (op >= res + one) begin
              op  <= op - (res + one);
              res <= (res >> 1) + one;
            end else begin
              res <= res >> 1;
            end
            one <= one >> 2;
            if (one == RAD_W'(1)) state <= FIN;
          end
        end
        FIN: begin
          phi   <= neg ? -$signed(mag) : $signed(mag);
          sat   <= sat_r;
          done  <= 1'b1;
          one   <= '0;
          state <= IDLE;
        end
        default: state <= IDLE;
      endcase
    end
  end
endmodule
