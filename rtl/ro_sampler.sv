// Ring-oscillator sampler and combiner: the entropy front end of the TRNG.
//
// Each of the N_RO free-running ring-oscillator outputs is captured by one
// flip-flop on the system clock. The ring outputs are asynchronous to that
// clock on purpose: a clock edge that lands close to a jittering ring edge
// captures a truly random value. The N_RO captured bits are combined by a
// single exclusive-or into one bit per clock, raw_bit.
//
// Timing: raw_bit is the XOR of the ring values sampled at the previous
// rising edge of clk (one register stage, XOR after the registers).
// Interface: ro[N_RO-1:0] asynchronous inputs; raw_bit output.
// Sixteen rings, one sampling flip-flop each, and the XOR combiner follow the
// document. There are deliberately no synchronizer stages: metastability of
// the sampling flops is part of the noise source. The sampling flops are not
// reset; their first value is discarded by the decimator.
`timescale 1ns / 1ps
module ro_sampler #(
  parameter int unsigned N_RO = 16
) (
  input  logic            clk,
  input  logic [N_RO-1:0] ro,
  output logic            raw_bit
);

  logic [N_RO-1:0] samp;

  always_ff @(posedge clk) samp <= ro;

  assign raw_bit = ^samp;

endmodule
