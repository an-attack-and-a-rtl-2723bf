// Testbench for volatile_timer with t_v = 100 cycles: tick exactly every 100
// cycles, and power resets more often than that prevent any tick.
`timescale 1ns / 1ps
module tb_volatile_timer;
  localparam int TV = 100;
  logic clk = 0, pwr_rst = 1;
  logic tick;
  logic [6:0] j;
  int checks = 0, failures = 0, cyc = 0, last = -1, ticks = 0;

  volatile_timer #(.TV(TV)) dut (.clk(clk), .pwr_rst(pwr_rst), .tick(tick), .j(j));

  always #10 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(negedge clk);
    pwr_rst = 0;
    // free-running: ticks in cycles 99, 199, ... after reset release
    for (cyc = 0; cyc < 1000; cyc++) begin
      checks++;
      if (tick !== (cyc % TV == TV - 1) || j !== 7'(cyc % TV)) begin
        failures++;
        $display("cycle %0d: tick %b j %0d", cyc, tick, j);
      end
      ticks += tick;
      @(negedge clk);
    end
    // power cycle every 90 cycles: never ticks
    for (cyc = 0; cyc < 2000; cyc++) begin
      pwr_rst = (cyc % 90 == 0);
      @(negedge clk);
      checks++;
      if (tick) begin
        failures++;
        $display("ticked despite power cycling");
      end
    end
    checks++;
    if (ticks != 10) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
