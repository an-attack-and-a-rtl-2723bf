// Top level: the non-deterministic timer with its ring oscillators, and the
// modified deterministic timer it is compared with, side by side.
//
// Non-deterministic side: N_RO ring oscillators (three-inverter rings,
// behavioural models) feed nd_timer, which samples and XORs them, decimates
// the stream DECIM:1, runs R-bit Bernoulli trials against a key, and counts
// successes in a non-volatile count that triggers at KTRIG. The deterministic
// side (d_timer) counts TV cycles in a volatile counter and DK such periods in
// a non-volatile counter. The two share only the clock, the power-on reset
// and the one-off non-volatile clear; each has its own trigger and count.
//
// Ring parameters: RO_INV_DELAY_PS sets the nominal period (3 x 267 ps per
// half period: about 625 MHz). Ring i gets RO_SPREAD_PS*i extra inverter delay
// (manufacturing mismatch) and starts RO_PHASE_PS*i late; RO_JITTER_PS is the
// per-half-period noise. All three default to 0, which is what a logic
// simulator shows: identical in-phase rings, a TRNG stuck at zero and a timer
// that never fires. Set them to nonzero values to emulate silicon.
//
// Interface: clk (the system clock, 50 MHz in the FPGA prototype, 1 GHz in
// the case study), pwr_rst (power-on reset, synchronous, active high),
// nv_clear (zero both non-volatile counts). Outputs: nd_trigger, nd_count,
// nd_rand_bit, nd_rand_valid, nd_trial_done, nd_match; d_trigger, d_count,
// d_j.
`timescale 1ns / 1ps
module timer_top
  import nd_timer_pkg::*;
#(
  parameter int unsigned     N_RO            = 16,
  parameter int unsigned     RO_STAGES       = 3,
  parameter int unsigned     RO_INV_DELAY_PS = 267,
  parameter int unsigned     RO_SPREAD_PS    = 0,
  parameter int unsigned     RO_PHASE_PS     = 0,
  parameter int unsigned     RO_JITTER_PS    = 0,
  parameter int unsigned     DECIM           = 1024,
  parameter int unsigned     R               = 27,
  parameter int unsigned     KTRIG           = 8498,
  parameter int unsigned     M               = 14,
  parameter key_mode_e       KEY_MODE        = KEY_STATIC,
  parameter logic [R-1:0]    KEY             = R'(27'h2a5_5a5a),
  parameter longint unsigned TV              = 64'd3_153_600_000_000,
  parameter int unsigned     DK              = 10000,
  parameter int unsigned     DM              = 14,
  parameter int unsigned     JW              = (TV > 1) ? $clog2(TV) : 1
) (
  input  logic          clk,
  input  logic          pwr_rst,
  input  logic          nv_clear,
  output logic          nd_trigger,
  output logic [M-1:0]  nd_count,
  output logic          nd_rand_bit,
  output logic          nd_rand_valid,
  output logic          nd_trial_done,
  output logic          nd_match,
  output logic          d_trigger,
  output logic [DM-1:0] d_count,
  output logic [JW-1:0] d_j
);

  logic [N_RO-1:0] ro;

  for (genvar i = 0; i < N_RO; i++) begin : g_ro
    ring_oscillator #(
      .STAGES      (RO_STAGES),
      .INV_DELAY_PS(RO_INV_DELAY_PS + RO_SPREAD_PS * i),
      .JITTER_PS   (RO_JITTER_PS),
      .PHASE_PS    (RO_PHASE_PS * i)
    ) u_ro (
      .osc(ro[i])
    );
  end

  nd_timer #(
    .N_RO    (N_RO),
    .DECIM   (DECIM),
    .R       (R),
    .KTRIG   (KTRIG),
    .M       (M),
    .KEY_MODE(KEY_MODE),
    .KEY     (KEY)
  ) u_nd (
    .clk       (clk),
    .pwr_rst   (pwr_rst),
    .nv_clear  (nv_clear),
    .ro        (ro),
    .trigger   (nd_trigger),
    .count     (nd_count),
    .rand_bit  (nd_rand_bit),
    .rand_valid(nd_rand_valid),
    .trial_done(nd_trial_done),
    .match     (nd_match)
  );

  d_timer #(.TV(TV), .DK(DK), .DM(DM), .JW(JW)) u_d (
    .clk     (clk),
    .pwr_rst (pwr_rst),
    .nv_clear(nv_clear),
    .trigger (d_trigger),
    .count   (d_count),
    .j       (d_j)
  );

endmodule
