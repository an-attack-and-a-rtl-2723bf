// Testbench for bernoulli_trial with a 4-bit key (success probability 1/16):
// feeds random bits with strobes every 8 cycles, assembles each group of four
// bits itself, and checks trial_done timing (one cycle after the 4th strobe),
// the match result, that a reset drops a partial trial, and that successes
// occur at roughly the expected rate.
`timescale 1ns / 1ps
module tb_bernoulli_trial;
  localparam int R = 4;
  localparam int GAP = 8;
  logic clk = 0, rst = 1, rand_bit = 0, rand_valid = 0;
  logic [R-1:0] key = 4'b1011;
  logic trial_done, match;
  int checks = 0, failures = 0, trials = 0, hits = 0;
  logic [R-1:0] word;
  int nb;

  bernoulli_trial #(.R(R)) dut (.clk(clk), .rst(rst), .rand_bit(rand_bit), .rand_valid(rand_valid),
    .key(key), .trial_done(trial_done), .match(match));

  always #10 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // send one bit: strobe for one cycle, then idle
  task automatic send(logic b);
    @(negedge clk);
    rand_bit = b;
    rand_valid = 1;
    @(negedge clk);
    rand_valid = 0;
    rand_bit = 1'($urandom);
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 rst = 0;
    nb = 0;
    word = '0;
    for (int i = 0; i < 4000; i++) begin
      logic b;
      b = (i % 97 < 8) ? key[R - 1 - (nb % R)] : 1'($urandom);  // force some hits
      word = {word[R-2:0], b};
      send(b);
      nb++;
      // trial_done must be high exactly now (one cycle after the strobe)
      checks++;
      if (trial_done !== (nb == R)) begin
        failures++;
        $display("trial_done=%b after bit %0d", trial_done, nb);
      end
      if (nb == R) begin
        checks++;
        if (match !== (word == key)) begin
          failures++;
          $display("match=%b for word %b", match, word);
        end
        trials++;
        hits += match;
        nb = 0;
      end else begin
        checks++;
        if (match !== 1'b0) begin
          failures++;
          $display("match outside trial end");
        end
      end
      repeat (GAP - 2) @(negedge clk);
      // occasional power cycle in mid-trial drops the partial word
      if (i % 501 == 250 && nb != 0) begin
        rst = 1;
        @(negedge clk);
        rst = 0;
        nb = 0;
      end
    end
    checks++;
    if (hits < trials / 32 || hits > trials / 5) begin
      failures++;
      $display("hit rate %0d of %0d trials out of range", hits, trials);
    end
    $display("trials=%0d hits=%0d", trials, hits);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
