// Testbench for ro_sampler: drives random ring values synchronously and checks
// that raw_bit is the XOR of the values present at the previous clock edge.
`timescale 1ns / 1ps
module tb_ro_sampler;
  localparam int N = 16;
  logic clk = 0;
  logic [N-1:0] ro;
  logic raw_bit;
  int checks = 0, failures = 0;
  logic [N-1:0] prev;

  ro_sampler #(.N_RO(N)) dut (.clk(clk), .ro(ro), .raw_bit(raw_bit));

  always #10 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ro = '0;
    @(posedge clk);
    for (int i = 0; i < 500; i++) begin
      #5 ro = N'($urandom);
      prev = ro;
      @(posedge clk);
      #1;
      checks++;
      // independent parity count
      begin
        int ones;
        ones = 0;
        for (int b = 0; b < N; b++) ones += prev[b];
        if (raw_bit !== ones[0]) begin
          failures++;
          $display("mismatch at %0d: ro=%h raw=%b", i, prev, raw_bit);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
