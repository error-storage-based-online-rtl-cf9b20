// esbol_pkg: types and constants shared by the error-storage linearisation
// (ESBOL) controller of a dual active bridge.
//
// All currents inside the controller are signed integers in milliamperes
// (current_t, 24 bits, +/-8388 A). Voltages are unsigned integers in units
// of 0.1 V (voltage_t). The phase shift is a signed fraction of pi in Q24
// (phase_t): +2^24 would be +pi, so the SPS range +/-pi/2 is +/-2^23.
// The number formats are this design's choice; the document works in
// amperes, volts and radians without fixing a number format.
package esbol_pkg;

  localparam int CUR_W   = 24;  // current word, LSB = 1 mA
  localparam int VOLT_W  = 16;  // voltage word, LSB = 0.1 V
  localparam int PHASE_Q = 24;  // fractional bits of phi/pi

  typedef logic signed [CUR_W-1:0]     current_t;
  typedef logic        [VOLT_W-1:0]    voltage_t;
  typedef logic signed [PHASE_Q+1:0]   phase_t;

  // Saturate a wide signed value into +/-lim.
  function automatic current_t sat_current(input logic signed [47:0] v,
                                           input int unsigned lim);
    logic signed [47:0] l;
    l = 48'(lim);
    if (v > l)       return CUR_W'(l);
    else if (v < -l) return CUR_W'(-l);
    else             return CUR_W'(v);
  endfunction

endpackage
