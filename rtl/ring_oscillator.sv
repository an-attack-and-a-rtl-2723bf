// Ring oscillator: behavioural model (not synthesizable logic).
//
// The real part is a ring of STAGES (odd) inverters; its output toggles once
// every STAGES inverter delays, so the period is 2*STAGES*INV_DELAY_PS. With
// three inverters of 267 ps this is about 1.6 ns, i.e. the roughly 625 MHz
// oscillators the timer is built from. On silicon the edges wander by thermal
// and phase noise (jitter); that noise is what makes the sampled bits random.
//
// A logic simulator has no noise. With JITTER_PS = 0 (the default) this model
// is exactly periodic, like the ideal gates of a logic simulation, and rings
// with equal parameters stay in phase. JITTER_PS > 0 adds to every half
// period a uniformly drawn offset in [-JITTER_PS, +JITTER_PS] ps, a crude
// stand-in for physical phase noise. PHASE_PS delays the first edge.
//
// Interface: one output, osc. There is no enable: the ring runs from power-up.
// Synthesis tools that ignore delays see this model as a loop through a
// latch and an inverter: that loop is the ring itself and the warnings stand.
// The model is the design's own; the document gives the ring's structure
// (three inverters) and its rate, not a model of its noise.
`timescale 1ns / 1ps
module ring_oscillator #(
  parameter int unsigned STAGES       = 3,
  parameter int unsigned INV_DELAY_PS = 267,
  parameter int unsigned JITTER_PS    = 0,
  parameter int unsigned PHASE_PS     = 0
) (
  output logic osc
);

  localparam int HALF_PS = int'(STAGES * INV_DELAY_PS);

  bit started = 1'b0;
  int jit;

  initial osc = 1'b0;

  // One half period per pass: wait, then invert.
  always begin : ring
    if (!started) begin
      started = 1'b1;
      #(real'(PHASE_PS) / 1000.0);
    end
    jit = 0;
    if (JITTER_PS != 0)
      jit = int'($urandom_range(2 * JITTER_PS, 0)) - int'(JITTER_PS);
    #(real'(HALF_PS + jit) / 1000.0) osc = ~osc;
  end

endmodule
