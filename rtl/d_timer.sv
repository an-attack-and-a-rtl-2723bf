// Modified deterministic timer: a volatile cycle counter chained with a
// non-volatile counter.
//
// The volatile timer counts TV clock cycles, then increments the non-volatile
// count K and restarts. The trigger rises when K reaches DK, after DK*TV
// cycles of powered operation. The non-volatile memory is written only once
// per TV cycles and at most DK times, however often the chip is power
// cycled, so repeated power cycling during production test cannot wear it
// out. Power cycling in the field faster than every TV cycles, however,
// keeps it from ever counting.
//
// Defaults: one-year trigger at 1 GHz with 10,000 non-volatile writes:
// TV = 3.1536e12 cycles (about 52 minutes), DK = 10000, a 14-bit count.
// This is the deterministic reference design the non-deterministic timer is
// compared with. The value of DK and the count width are this design's reading
// of the case study (writes limited by a 10,000-cycle endurance).
//
// Interface: clk, pwr_rst, nv_clear in; trigger, count[DM-1:0] out, plus the
// volatile count j for observation. trigger rises one cycle after the DK-th
// tick.
`timescale 1ns / 1ps
module d_timer #(
  parameter longint unsigned TV = 64'd3_153_600_000_000,
  parameter int unsigned     DK = 10000,
  parameter int unsigned     DM = 14,
  parameter int unsigned     JW = (TV > 1) ? $clog2(TV) : 1
) (
  input  logic          clk,
  input  logic          pwr_rst,
  input  logic          nv_clear,
  output logic          trigger,
  output logic [DM-1:0] count,
  output logic [JW-1:0] j
);

  logic tick;

  volatile_timer #(.TV(TV), .JW(JW)) u_vt (
    .clk    (clk),
    .pwr_rst(pwr_rst),
    .tick   (tick),
    .j      (j)
  );

  nv_timer #(.M(DM), .KTRIG(DK)) u_nv (
    .clk       (clk),
    .prog_clear(nv_clear),
    .inc       (tick),
    .count     (count),
    .trigger   (trigger)
  );

endmodule
