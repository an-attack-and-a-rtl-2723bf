// Key generator for the Bernoulli trials.
//
// KEY_STATIC: the key is the constant KEY (the basic timer).
// KEY_FROM_COUNT: the key is the low R bits of the non-volatile count K, so
//   it changes after every success.
// KEY_STEP: the key is a register, loaded with the low bits of K by the
//   power-on reset, that is advanced by one at the end of every trial while
//   K is below KEY_STEP_LIMIT or while the key itself is zero.
// In the field the trial outcome is independent of the key, so every mode
// gives the same trigger-time statistics. In a noise-free logic simulation
// the TRNG only produces zeros; the two dynamic modes then reach key zero a
// few times, so the counter is seen to move while the timer still never
// reaches KTRIG: this defeats detection of never-exercised circuitry.
// Loading the stepping key from K at power-up (rather than clearing it) keeps
// that number bounded however often a simulation is reset: the key is zero at
// power-up only while K is zero, and once K reaches KEY_STEP_LIMIT the key
// stops moving, so a noise-free simulation sees at most KEY_STEP_LIMIT
// matches (for KEY_STEP_LIMIT < KTRIG and K below 2^R).
//
// Timing: key is valid throughout a trial; in KEY_STEP mode it advances at the
// edge that samples trial_done, after the trial has been compared.
// Interface: clk, rst, trial_done, count[M-1:0] in; key[R-1:0] out.
// The three key choices follow the document; the stepping key's power-up
// value and the zero-extension of a count narrower than the key are this design's choice.
`timescale 1ns / 1ps
module key_gen
  import nd_timer_pkg::*;
#(
  parameter int unsigned R        = 27,
  parameter int unsigned M        = 14,
  parameter key_mode_e   KEY_MODE = KEY_STATIC,
  parameter logic [R-1:0] KEY     = R'(27'h2a5_5a5a)
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         trial_done,
  input  logic [M-1:0] count,
  output logic [R-1:0] key
);

  logic [R-1:0] step_key;

  always_ff @(posedge clk) begin
    if (rst)
      step_key <= R'(count);
    else if (trial_done && ((count < M'(KEY_STEP_LIMIT)) || (step_key == '0)))
      step_key <= step_key + 1'b1;
  end

  always_comb begin
    unique case (KEY_MODE)
      KEY_FROM_COUNT: key = R'(count);
      KEY_STEP:       key = step_key;
      default:        key = KEY;
    endcase
  end

endmodule
