// True random number generator built from ordinary digital logic.
//
// N_RO ring-oscillator outputs are sampled by the system clock, XORed into
// one raw bit per cycle (ro_sampler) and the raw stream is decimated DECIM:1
// by a single XOR flip-flop (decimator). The result is one random bit every
// DECIM cycles; with 16 rings and 1024:1 decimation this is the configuration
// that the document reports as passing the NIST randomness tests, giving
// 48.8 kbit/s at a 50 MHz clock.
//
// The rings themselves are not part of this module (they cannot be described
// as synthesizable logic); their outputs enter on ro[]. In a logic simulation
// with ideal, in-phase rings all sampled bits are equal, the XOR of an even
// number of them is 0, and rand_bit stays 0 for ever.
//
// Timing: see decimator: rand_valid pulses once every DECIM cycles.
// Interface: clk, rst (power-on reset of the volatile state), ro[] in;
// rand_bit, rand_valid out.
`timescale 1ns / 1ps
module trng #(
  parameter int unsigned N_RO  = 16,
  parameter int unsigned DECIM = 1024
) (
  input  logic            clk,
  input  logic            rst,
  input  logic [N_RO-1:0] ro,
  output logic            rand_bit,
  output logic            rand_valid
);

  logic raw_bit;

  ro_sampler #(.N_RO(N_RO)) u_sampler (
    .clk    (clk),
    .ro     (ro),
    .raw_bit(raw_bit)
  );

  decimator #(.DECIM(DECIM)) u_decim (
    .clk       (clk),
    .rst       (rst),
    .raw_bit   (raw_bit),
    .rand_bit  (rand_bit),
    .rand_valid(rand_valid)
  );

endmodule
