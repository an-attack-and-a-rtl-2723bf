// Volatile timer of the deterministic timer: counts clock cycles up to TV.
//
// J counts clock cycles; in the cycle where J = TV-1 the tick output is high
// and J restarts from zero at the next edge, so tick pulses once every TV
// cycles. J lives in ordinary flip-flops and is cleared by the power-on reset:
// power cycling more often than every TV cycles keeps tick from ever firing.
//
// Interface: clk, pwr_rst (synchronous, active high) in; tick, j out.
// Width JW = bits needed for TV-1. Counter, comparator with j and the reset
// from power follow the document's block diagram.
`timescale 1ns / 1ps
module volatile_timer #(
  parameter longint unsigned TV = 64'd3_153_600_000_000,
  parameter int unsigned     JW = (TV > 1) ? $clog2(TV) : 1
) (
  input  logic          clk,
  input  logic          pwr_rst,
  output logic          tick,
  output logic [JW-1:0] j
);

  assign tick = (j == JW'(TV - 1));

  always_ff @(posedge clk) begin
    if (pwr_rst || tick) j <= '0;
    else                 j <= j + 1'b1;
  end

endmodule
