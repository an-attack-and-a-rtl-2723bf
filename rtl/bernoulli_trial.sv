// Bernoulli trial unit: collects R random bits and compares them with a key.
//
// Every rand_valid pulse shifts rand_bit into an R-bit word (first bit ends up
// as the most significant). When the R-th bit of a trial arrives the word is
// compared with key; the trial succeeds with probability 2^-R for a truly
// random input. The comparison uses the shifted-in word including the bit of
// that cycle, so no trial bit is lost and no bit is shared between trials.
//
// Timing: trial_done pulses one cycle after the rand_valid that carried the
// R-th bit, with match valid in the same cycle. With a TRNG delivering a bit
// every DECIM cycles, a trial therefore takes DECIM*R cycles: the volatile
// state window of the timer. A reset (power cycle) drops the partial word.
// Interface: clk, rst, rand_bit, rand_valid, key[R-1:0] in; trial_done, match
// out. R must be at least 2. key must be stable in the cycle of the R-th rand_valid.
// Collecting r bits and comparing them with an r-bit key follows the
// document; bit order and the one-cycle result register are this design's.
`timescale 1ns / 1ps
module bernoulli_trial #(
  parameter int unsigned R = 27
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         rand_bit,
  input  logic         rand_valid,
  input  logic [R-1:0] key,
  output logic         trial_done,
  output logic         match
);

  localparam int unsigned BW = $clog2(R);

  logic [R-2:0]  word;       // the first R-1 bits of the trial in progress
  logic [R-1:0]  word_next;
  logic [BW-1:0] nbits;
  logic          last_bit;

  assign word_next = {word, rand_bit};

  assign last_bit = (nbits == BW'(R - 1));

  always_ff @(posedge clk) begin
    if (rst) begin
      word       <= '0;
      nbits      <= '0;
      trial_done <= 1'b0;
      match      <= 1'b0;
    end else begin
      trial_done <= 1'b0;
      match      <= 1'b0;
      if (rand_valid) begin
        word <= word_next[R-2:0];
        if (last_bit) begin
          nbits      <= '0;
          trial_done <= 1'b1;
          match      <= (word_next == key);
        end else begin
          nbits <= nbits + 1'b1;
        end
      end
    end
  end

  initial assert (R >= 2) else $error("R must be at least 2");

  // A success can only be reported at the end of a trial.
  assert property (@(posedge clk) disable iff (rst) match |-> trial_done);

endmodule
