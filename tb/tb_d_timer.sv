// Testbench for the deterministic timer with t_v = 50 cycles and k = 20:
// runs with occasional power cycles longer apart than t_v, and checks that
// K counts completed t_v periods only (the partial period before a power cycle
// is lost), that K survives power cycles, that the trigger fires exactly at
// K = 20, and that power cycling faster than t_v stops all progress.
`timescale 1ns / 1ps
module tb_d_timer;
  localparam int TV = 50, K = 20;
  logic clk = 0, pwr_rst = 1, nv_clear = 1;
  logic trigger;
  logic [4:0] count;
  logic [5:0] j;
  int checks = 0, failures = 0, vcnt = 0, model = 0, lost = 0, fired_at = -1;

  d_timer #(.TV(TV), .DK(K), .DM(5)) dut (.clk(clk), .pwr_rst(pwr_rst), .nv_clear(nv_clear),
    .trigger(trigger), .count(count), .j(j));

  always #10 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(negedge clk);
    nv_clear = 0;
    pwr_rst = 0;
    for (int c = 0; c < 2000; c++) begin
      // model of the step about to happen at the next edge
      if (pwr_rst) begin
        if (vcnt != 0) lost++;
        vcnt = 0;
      end else if (vcnt == TV - 1) begin
        vcnt = 0;
        if (model < K) model++;
      end else vcnt++;
      @(negedge clk);
      checks++;
      if (count !== 5'(model) || trigger !== (model == K)) begin
        failures++;
        $display("cycle %0d: K=%0d trig=%b exp %0d", c, count, trigger, model);
      end
      if (trigger && fired_at < 0) fired_at = c;
      pwr_rst = ($urandom_range(120, 0) == 0);
    end
    checks++;
    if (fired_at < 0 || lost == 0) begin
      failures++;
      $display("trigger %0d / lost periods %0d", fired_at, lost);
    end
    // field defence: power cycles every 40 cycles (< t_v) -> K frozen
    nv_clear = 1;
    @(negedge clk);
    nv_clear = 0;
    for (int c = 0; c < 1000; c++) begin
      pwr_rst = (c % 40 == 0);
      @(negedge clk);
    end
    checks++;
    if (count !== 0) begin
      failures++;
      $display("K advanced under fast power cycling");
    end
    $display("fired at cycle %0d, partial periods lost %0d", fired_at, lost);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
