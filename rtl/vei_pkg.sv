// Shared types and constants of the voltage embedded instrument.
//
// The instrument has three operating modes (off, monitoring, calibration).
// Their two-bit encoding is this design's own choice; the mode field is
// written by software through the IJTAG configuration register. Code 2'b11
// is unused and treated as off.
`timescale 1ns/1ps
package vei_pkg;

  typedef enum logic [1:0] {
    MODE_OFF = 2'd0,   // VDD_REF switched off, nothing measured
    MODE_MON = 2'd1,   // delay line on CLK, TDC sampled every cycle
    MODE_CAL = 2'd2    // delay line closed into a ring oscillator, edges counted
  } vei_mode_e;

  // Calibration sequencer states of the controller.
  typedef enum logic [1:0] {
    CAL_IDLE   = 2'd0,  // no measurement pending
    CAL_SETTLE = 2'd1,  // counter cleared, ring running with the new tap
    CAL_COUNT  = 2'd2,  // EN_CAL high, DEL_CLK edges counted
    CAL_DONE   = 2'd3   // count frozen, waiting to be read
  } cal_state_e;

  function automatic vei_mode_e decode_mode(input logic [1:0] code);
    case (code)
      2'd1:    return MODE_MON;
      2'd2:    return MODE_CAL;
      default: return MODE_OFF;
    endcase
  endfunction

endpackage
