// esbol_i_controller: integral current controller of the DAB.
//
// Once per control cycle (`tick`) the error I_sp - I_meas is added, scaled
// by 2^-KI_SHIFT, to an accumulator with FRAC fractional bits below 1 mA:
//   acc += (I_sp - I_meas) * 2^(FRAC-KI_SHIFT),   I_i = acc / 2^FRAC
// The accumulator is clamped to +/-I_LIM_MA (anti-windup). When `active`
// is low the controller is switched off: the accumulator and I_i are
// cleared, which leaves pure feed-forward control. I_i is registered and
// changes one clock after `tick`.
// The document uses a plain I-controller and gives no gain; the gain, the
// fraction width and the anti-windup clamp are this design's choices.
module esbol_i_controller
  import esbol_pkg::*;
#(
  parameter int unsigned KI_SHIFT = 6,       // gain 1/64 per control cycle
  parameter int unsigned FRAC     = 8,       // accumulator bits below 1 mA
  parameter int unsigned I_LIM_MA = 50_000   // anti-windup limit
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     tick,     // one pulse per control cycle
  input  logic     active,   // controller enabled
  input  current_t i_sp,
  input  current_t i_meas,
  output current_t i_i
);
  localparam int ACC_W = CUR_W + FRAC + 2;
  localparam logic signed [ACC_W-1:0] ACC_LIM = ACC_W'(I_LIM_MA) <<< FRAC;

  logic signed [ACC_W-1:0] acc;
  logic signed [ACC_W-1:0] err;
  logic signed [ACC_W-1:0] nxt;

  always_comb begin
    err = ACC_W'(i_sp) - ACC_W'(i_meas);
    nxt = acc + ((err <<< FRAC) >>> KI_SHIFT);
    if (nxt > ACC_LIM)       nxt = ACC_LIM;
    else if (nxt < -ACC_LIM) nxt = -ACC_LIM;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       acc <= '0;
    else if (!active) acc <= '0;
    else if (tick)    acc <= nxt;
  end

  assign i_i = current_t'(acc >>> FRAC);
endmodule
