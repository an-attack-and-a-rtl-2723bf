// XOR decimator of the TRNG.
//
// One toggle flip-flop accumulates the exclusive-or of DECIM consecutive raw
// bits. Every DECIM clock cycles the accumulated value is handed out as one
// output bit and the accumulator restarts from zero. As long as one raw bit of
// a block is truly random, the output bit is too.
//
// Timing: after reset, rand_valid is high for one cycle in every DECIM; the
// first pulse is in the DECIM-th cycle after rst is released (cycles counted
// from 0). rand_bit, valid in the pulse cycle and held until the next pulse,
// is the XOR of the raw_bit values of the DECIM cycles before the pulse.
// Interface: clk, rst (synchronous, active high: the power-on reset),
// raw_bit in; rand_bit, rand_valid out.
// The 1024:1 ratio and the single XOR flip-flop follow the document; the
// counter that marks the block boundary is this design's choice.
`timescale 1ns / 1ps
module decimator #(
  parameter int unsigned DECIM = 1024
) (
  input  logic clk,
  input  logic rst,
  input  logic raw_bit,
  output logic rand_bit,
  output logic rand_valid
);

  localparam int unsigned CW = (DECIM > 1) ? $clog2(DECIM) : 1;

  logic [CW-1:0] cnt;
  logic          acc;
  logic          last;

  assign last = (cnt == CW'(DECIM - 1));

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt        <= '0;
      acc        <= 1'b0;
      rand_bit   <= 1'b0;
      rand_valid <= 1'b0;
    end else begin
      rand_valid <= last;
      if (last) begin
        cnt      <= '0;
        rand_bit <= acc ^ raw_bit;
        acc      <= 1'b0;
      end else begin
        cnt <= cnt + 1'b1;
        acc <= acc ^ raw_bit;
      end
    end
  end

endmodule
