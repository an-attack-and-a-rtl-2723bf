// Non-volatile register of M bits (the timer's persistent count).
//
// Holds its contents across power cycles: it has no connection to the
// power-on reset. wr_en writes wr_data at the rising clock edge; rd_data
// shows the stored word. prog_clear, used once when the part is prepared,
// sets the contents to zero (it has priority over a write).
//
// Written as an ordinary register. On silicon this would be a few bits of
// CMOS-compatible non-volatile memory (for instance NAND Flash cells); the
// FPGA prototype the document describes also used volatile memory in their
// place. Limited write endurance of real cells is not modelled.
// Interface: clk, prog_clear, wr_en, wr_data[M-1:0] in; rd_data[M-1:0] out.
`timescale 1ns / 1ps
module nv_memory #(
  parameter int unsigned M = 14
) (
  input  logic         clk,
  input  logic         prog_clear,
  input  logic         wr_en,
  input  logic [M-1:0] wr_data,
  output logic [M-1:0] rd_data
);

  logic [M-1:0] cells;

  always_ff @(posedge clk) begin
    if (prog_clear)  cells <= '0;
    else if (wr_en)  cells <= wr_data;
  end

  assign rd_data = cells;

endmodule
