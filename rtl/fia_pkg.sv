`timescale 1ns / 1ps
// fia_pkg: types and constants shared by the ring-oscillator PUF fault-injection
// detector.
//
// puf_mode_e is the Mode signal between the detector and the PUF. In reliable mode
// the PUF measures each ring oscillator over a long window (100 system clocks by
// default) and its response is stable enough for key generation. In unreliable mode
// it measures over a single system clock, so a response appears every cycle and
// reacts to clock and supply disturbances; that is the mode the detector uses.
//
// det_state_e holds the states of the detector FSM. The names follow the states of
// the detector's state diagram; ST_IDLE, the state before start_FI_detect arrives,
// is an addition of this design.
//
// ro_variation() gives the fixed per-instance offsets of the behavioural ring
// oscillator model (process variation). It is a small integer hash, so every
// instance of the model with the same seed and index gets the same oscillator.
package fia_pkg;

  typedef enum logic {
    MODE_RELIABLE   = 1'b0,
    MODE_UNRELIABLE = 1'b1
  } puf_mode_e;

  typedef enum logic [2:0] {
    ST_IDLE            = 3'd0,
    ST_UNRELIABLE_MODE = 3'd1,
    ST_WAIT_TASK       = 3'd2,
    ST_ASK_RESPONSE    = 3'd3,
    ST_SAVE_RESPONSE   = 3'd4,
    ST_PERFORM_XOR     = 3'd5,
    ST_ALARM_PROTECT   = 3'd6,
    ST_NO_ATTACK       = 3'd7
  } det_state_e;

  // Default measurement windows, in system clock cycles.
  localparam int unsigned RELIABLE_WINDOW_DEFAULT   = 100;
  localparam int unsigned UNRELIABLE_WINDOW_DEFAULT = 1;

  // Signed offset in [-range, +range] derived from (seed, index, salt).
  function automatic int ro_variation(input int unsigned seed, input int unsigned index,
                                      input int unsigned salt, input int unsigned range);
    int unsigned h;
    h = seed ^ (index * 32'h9E37_79B9) ^ (salt * 32'h85EB_CA6B);
    h = h ^ (h >> 16);
    h = h * 32'h7FEB_352D;
    h = h ^ (h >> 15);
    h = h * 32'h846C_A68B;
    h = h ^ (h >> 16);
    return int'(h % (2 * range + 1)) - int'(range);
  endfunction

endpackage
