// Non-deterministic timer: a trigger that fires after KTRIG successful
// Bernoulli trials drawn from a true random number generator.
//
// Instead of counting clock cycles, the timer runs a series of independent
// trials. A trial takes R random bits from the TRNG (one bit per DECIM clock
// cycles) and succeeds when they equal the key, probability p = 2^-R. Each
// success increments the non-volatile count K; the trigger output rises when
// K reaches KTRIG. The trigger time, in trials, is a sum of KTRIG geometric
// variables: mean KTRIG*2^R trials, standard deviation sqrt(KTRIG)*2^R, so
// KTRIG sets the relative spread (1/sqrt(KTRIG)) and R the time scale. In
// clock cycles: mean KTRIG * 2^R * DECIM * R.
//
// Only K is persistent. Everything else (TRNG, partial trial, key register)
// is volatile and is cleared by pwr_rst, so a power cycle only loses the trial
// in progress: DECIM*R cycles of volatile state (27,648 cycles for the
// default R = 27, DECIM = 1024). K is written at most KTRIG times.
//
// Defaults: 16 rings, 1024:1 decimation, R = 27, KTRIG = 8498, a 14-bit
// count: about one year mean trigger time at 1 GHz with a 3.96-day standard
// deviation, as in the document's case study. The static key value is this
// design's choice (any value other than zero never matches in a noise-free
// simulation).
//
// Interface: clk; pwr_rst (synchronous, active high: power-on reset of the
// volatile state); nv_clear (one-off zeroing of K when the part is prepared);
// ro[N_RO-1:0] ring-oscillator outputs, asynchronous. Outputs: trigger, count
// (K), and for observation the TRNG bit stream (rand_bit, rand_valid) and the
// trial results (trial_done, match).
`timescale 1ns / 1ps
module nd_timer
  import nd_timer_pkg::*;
#(
  parameter int unsigned  N_RO     = 16,
  parameter int unsigned  DECIM    = 1024,
  parameter int unsigned  R        = 27,
  parameter int unsigned  KTRIG    = 8498,
  parameter int unsigned  M        = 14,
  parameter key_mode_e    KEY_MODE = KEY_STATIC,
  parameter logic [R-1:0] KEY      = R'(27'h2a5_5a5a)
) (
  input  logic            clk,
  input  logic            pwr_rst,
  input  logic            nv_clear,
  input  logic [N_RO-1:0] ro,
  output logic            trigger,
  output logic [M-1:0]    count,
  output logic            rand_bit,
  output logic            rand_valid,
  output logic            trial_done,
  output logic            match
);

  logic [R-1:0] key;

  trng #(.N_RO(N_RO), .DECIM(DECIM)) u_trng (
    .clk       (clk),
    .rst       (pwr_rst),
    .ro        (ro),
    .rand_bit  (rand_bit),
    .rand_valid(rand_valid)
  );

  key_gen #(.R(R), .M(M), .KEY_MODE(KEY_MODE), .KEY(KEY)) u_key (
    .clk       (clk),
    .rst       (pwr_rst),
    .trial_done(trial_done),
    .count     (count),
    .key       (key)
  );

  bernoulli_trial #(.R(R)) u_trial (
    .clk       (clk),
    .rst       (pwr_rst),
    .rand_bit  (rand_bit),
    .rand_valid(rand_valid),
    .key       (key),
    .trial_done(trial_done),
    .match     (match)
  );

  nv_timer #(.M(M), .KTRIG(KTRIG)) u_nv (
    .clk       (clk),
    .prog_clear(nv_clear),
    .inc       (match),
    .count     (count),
    .trigger   (trigger)
  );

endmodule
