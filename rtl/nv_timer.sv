// Non-volatile timer: a counter K kept in non-volatile memory and compared
// with the trigger value KTRIG.
//
// Each inc pulse adds one to K, which is written back to the non-volatile
// register (one write per increment, so KTRIG bounds the number of writes).
// trigger is high while K equals KTRIG; the counter then stops, so the memory
// is never written more than KTRIG times. The counter's own reset input is
// tied off: a power cycle leaves K as it is. prog_clear zeroes K once, when
// the part is prepared.
//
// Timing: K changes at the clock edge that samples inc; trigger follows
// combinationally from K, so it rises in the cycle after the KTRIG-th inc.
// Interface: clk, prog_clear, inc in; count[M-1:0], trigger out.
// Counter, comparator with k, and the non-reset NV counter follow the
// document's block diagrams; saturation at KTRIG is this design's choice.
`timescale 1ns / 1ps
module nv_timer #(
  parameter int unsigned M     = 14,
  parameter int unsigned KTRIG = 8498
) (
  input  logic         clk,
  input  logic         prog_clear,
  input  logic         inc,
  output logic [M-1:0] count,
  output logic         trigger
);

  logic         at_k;
  logic         wr_en;
  logic [M-1:0] wr_data;

  assign at_k    = (count == M'(KTRIG));
  assign wr_en   = inc && !at_k;
  assign wr_data = count + 1'b1;
  assign trigger = at_k;

  nv_memory #(.M(M)) u_nv (
    .clk       (clk),
    .prog_clear(prog_clear),
    .wr_en     (wr_en),
    .wr_data   (wr_data),
    .rd_data   (count)
  );

  initial assert (64'(KTRIG) < (64'd1 << M))
    else $error("KTRIG does not fit in M bits");

endmodule
