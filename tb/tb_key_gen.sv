// Testbench for key_gen: one instance per key mode (8-bit key, 14-bit count),
// driven with random counts and trial ends. The static key must stay
// constant, the count key must equal the low count bits, and the stepping key
// is compared with an independent model: +1 per trial while count < 5 or
// key = 0, loaded from the count by reset.
`timescale 1ns / 1ps
module tb_key_gen;
  import nd_timer_pkg::*;
  localparam int R = 8, M = 14;
  logic clk = 0, rst = 1, trial_done = 0;
  logic [M-1:0] count = '0;
  logic [R-1:0] k_static, k_count, k_step, model;
  int checks = 0, failures = 0, steps = 0, holds = 0;

  key_gen #(.R(R), .M(M), .KEY_MODE(KEY_STATIC), .KEY(8'hc3)) u_s (
    .clk(clk), .rst(rst), .trial_done(trial_done), .count(count), .key(k_static));
  key_gen #(.R(R), .M(M), .KEY_MODE(KEY_FROM_COUNT)) u_c (
    .clk(clk), .rst(rst), .trial_done(trial_done), .count(count), .key(k_count));
  key_gen #(.R(R), .M(M), .KEY_MODE(KEY_STEP)) u_t (
    .clk(clk), .rst(rst), .trial_done(trial_done), .count(count), .key(k_step));

  always #10 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic [R-1:0] got, logic [R-1:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("%s: got %h exp %h", what, got, exp);
    end
  endtask

  initial begin
    model = '0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      check("static", k_static, 8'hc3);
      check("count", k_count, count[R-1:0]);
      check("step", k_step, model);
      // next stimulus
      trial_done = ($urandom_range(2, 0) == 0);
      if (i < 600)       count = M'($urandom_range(7, 0));
      else if (i < 1200) count = M'($urandom_range(9000, 0));
      else               count = M'(5 + $urandom_range(3, 0));
      if (trial_done && (count < 5 || model == 0)) begin
        model = model + 1'b1;
        steps++;
      end else if (trial_done) holds++;
      if (i == 1500) begin
        // power cycle clears the step key
        rst = 1;
        trial_done = 0;
        count = 14'h0123;
        @(negedge clk);
        rst = 0;
        model = 8'h23;
        check("step after reset", k_step, 8'h23);
      end
    end
    checks++;
    if (steps == 0 || holds == 0) begin
      failures++;
      $display("stepping key never advanced or never held");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
