// Testbench for nv_timer with the default k = 8498 in a 14-bit count:
// random increments, count and trigger checked against a model, the trigger
// rising exactly after the 8498th increment and the count holding there.
`timescale 1ns / 1ps
module tb_nv_timer;
  localparam int K = 8498;
  logic clk = 0, prog_clear = 0, inc = 0;
  logic [13:0] count;
  logic trigger;
  int checks = 0, failures = 0, model = 0, fired = 0;

  nv_timer dut (.clk(clk), .prog_clear(prog_clear), .inc(inc), .count(count), .trigger(trigger));

  always #10 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(negedge clk);
    prog_clear = 1;
    @(negedge clk);
    prog_clear = 0;
    for (int i = 0; i < 40000; i++) begin
      inc = ($urandom_range(3, 0) != 0);
      @(negedge clk);
      if (inc && model < K) model++;
      checks++;
      if (count !== 14'(model) || trigger !== (model == K)) begin
        failures++;
        if (failures < 10) $display("count %0d trig %b, exp %0d", count, trigger, model);
      end
      fired += trigger;
      if (i == 30000) begin
        prog_clear = 1;
        @(negedge clk);
        prog_clear = 0;
        model = 0;
      end
    end
    checks++;
    if (fired == 0) begin
      failures++;
      $display("never triggered");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
