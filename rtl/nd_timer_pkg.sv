// Shared types and constants of the non-deterministic timer.
//
// key_mode_e selects how the key that a Bernoulli trial is compared with is
// produced. KEY_STATIC is the basic timer: a fixed attacker-chosen key.
// KEY_FROM_COUNT and KEY_STEP are the two dynamic-key variants that keep the
// trial comparator active in logic simulation (the key becomes zero at some
// point, and a noise-free simulated generator only ever produces zeros), so
// that unused-circuit detection does not flag the timer. KEY_STEP_LIMIT is the
// count below which the stepping key keeps advancing.
`timescale 1ns / 1ps
package nd_timer_pkg;

  typedef enum logic [1:0] {
    KEY_STATIC     = 2'd0,  // key = fixed parameter
    KEY_FROM_COUNT = 2'd1,  // key = low bits of the non-volatile count
    KEY_STEP       = 2'd2   // key register stepped by the count and by itself
  } key_mode_e;

  // Below this count the stepping key advances on every trial.
  localparam int unsigned KEY_STEP_LIMIT = 5;

endpackage
