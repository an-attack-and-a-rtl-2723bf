// Testbench for decimator at its default 1024:1 ratio: feeds random raw bits,
// checks each output bit against the XOR of the 1024 bits before it, and
// checks that a strobe comes exactly every 1024 cycles.
`timescale 1ns / 1ps
module tb_decimator;
  localparam int D = 1024;
  logic clk = 0, rst = 1, raw_bit = 0;
  logic rand_bit, rand_valid;
  int checks = 0, failures = 0;
  int cyc = 0, last_valid = -1, nbits = 0;
  logic hist [$];

  decimator dut (.clk(clk), .rst(rst), .raw_bit(raw_bit), .rand_bit(rand_bit), .rand_valid(rand_valid));

  always #10 clk = ~clk;

  initial begin
    #(20 * D * 30);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference: history of raw bits seen since reset release
  always @(posedge clk) begin
    if (!rst) begin
      if (rand_valid) begin
        logic exp_bit;
        exp_bit = 1'b0;
        checks++;
        if (hist.size() < D) begin
          failures++;
          $display("strobe too early: %0d bits", hist.size());
        end else begin
          for (int i = hist.size() - D; i < hist.size(); i++) exp_bit ^= hist[i];
          if (rand_bit !== exp_bit) begin
            failures++;
            $display("bit %0d mismatch: got %b exp %b", nbits, rand_bit, exp_bit);
          end
        end
        checks++;
        if (last_valid < 0 ? (cyc != D) : (cyc - last_valid != D)) begin
          failures++;
          $display("strobe period wrong at cycle %0d (last %0d)", cyc, last_valid);
        end
        last_valid = cyc;
        nbits++;
        hist.delete();
      end
      hist.push_back(raw_bit);
      cyc++;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    #1 rst = 0;
    while (nbits < 20) begin
      @(negedge clk);
      // mostly random, with a run of all-ones to make a block of known parity
      raw_bit = (nbits == 5) ? 1'b1 : 1'($urandom);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
