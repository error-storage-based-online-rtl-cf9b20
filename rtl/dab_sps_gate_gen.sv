// dab_sps_gate_gen: gate signals of the two full bridges of a dual active
// bridge under single-phase-shift (SPS) modulation.
//
// A counter runs over one switching period of PERIOD = CLK_HZ/F_SW_HZ
// clocks; period_start pulses when it is 0 and serves as the control-cycle
// tick. Each bridge makes a 50 % square wave: in the first half period the
// diagonal T1/T4 conducts (+U on the AC side), in the second half T2/T3
// (-U). Every switch turns on only DT = T_BT_NS*CLK_HZ/1e9 clocks after
// its half starts, so high and low side of a leg never conduct together
// (the blocking time T_bt). The secondary bridge runs the same pattern
// delayed by the phase shift, converted from phi/pi (Q24) to clocks as
// round(phi/pi * PERIOD/2); a positive phi makes the secondary lag and
// power flow to the secondary. A new phi is taken over only at the end of
// a period, so each period is symmetric. With `enable` low all gates are
// off; the counter and the tick keep running.
// Gate bit order: [0] T1 leg A high, [1] T2 leg A low, [2] T3 leg B high,
// [3] T4 leg B low. SPS and the blocking time follow the document; the
// counter-based generator is this design's.
module dab_sps_gate_gen
  import esbol_pkg::*;
#(
  parameter int unsigned CLK_HZ  = 100_000_000,  // assumed FPGA clock
  parameter int unsigned F_SW_HZ = 50_000,       // Table I: 50 kHz
  parameter int unsigned T_BT_NS = 200           // Table I: 200 ns
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        enable,
  input  phase_t      phi,           // phi/pi, Q24, +/-0.5 = +/-pi/2
  output logic [3:0]  gate_p,        // primary bridge T1..T4
  output logic [3:0]  gate_s,        // secondary bridge T1..T4
  output logic        period_start,  // one pulse per switching period
  output logic signed [31:0] shift   // phase shift in use, clocks
);
  localparam int PERIOD = int'(CLK_HZ / F_SW_HZ);
  localparam int HALF   = PERIOD / 2;
  localparam int DT     = int'((64'(T_BT_NS) * CLK_HZ) / 64'd1_000_000_000);
  localparam int CNT_W  = $clog2(PERIOD);

  initial begin
    assert (PERIOD % 2 == 0 && DT < HALF / 2)
      else $error("period must be even and the blocking time short");
  end

  logic [CNT_W-1:0] cnt;
  logic signed [31:0] shift_nxt;
  logic signed [31:0] cnt_s;

  // Gates of one bridge from its position in the period.
  function automatic logic [3:0] bridge(input int c);
    logic pos, negh;
    pos  = (c >= DT)        && (c < HALF);
    negh = (c >= HALF + DT) && (c < PERIOD);
    return {pos, negh, negh, pos};   // T4, T3, T2, T1
  endfunction

  always_comb begin
    // round(phi * HALF / 2^Q), symmetric for both signs
    logic signed [63:0] p;
    p = 64'(phi) * 64'(HALF);
    if (p >= 0) shift_nxt = 32'((p + (64'sd1 <<< (PHASE_Q - 1))) >>> PHASE_Q);
    else        shift_nxt = -32'(((-p) + (64'sd1 <<< (PHASE_Q - 1))) >>> PHASE_Q);
    cnt_s = 32'(cnt) - shift;
    if (cnt_s < 0)            cnt_s = cnt_s + PERIOD;
    else if (cnt_s >= PERIOD) cnt_s = cnt_s - PERIOD;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt    <= '0;
      shift  <= '0;
      gate_p <= '0;
      gate_s <= '0;
    end else begin
      if (cnt == CNT_W'(PERIOD - 1)) begin
        cnt   <= '0;
        shift <= shift_nxt;
      end else begin
        cnt <= cnt + 1'b1;
      end
      gate_p <= enable ? bridge(int'(cnt)) : 4'b0000;
      gate_s <= enable ? bridge(cnt_s)     : 4'b0000;
    end
  end

  assign period_start = (cnt == '0);
endmodule
