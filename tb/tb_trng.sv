// Testbench for trng: drives the 16 ring inputs with random values that change
// between clock edges, and checks every output bit against the XOR, over the
// 1024 clock edges of its block, of the parity of the ring values sampled at
// each edge (the sampling register adds one edge of delay). Also checks the
// output rate (one bit per 1024 cycles) and that in-phase rings with equal
// values (a noise-free simulation) give only zeros.
`timescale 1ns / 1ps
module tb_trng;
  localparam int N = 16;
  localparam int D = 1024;
  logic clk = 0, rst = 1;
  logic [N-1:0] ro = '0;
  logic rand_bit, rand_valid;
  int checks = 0, failures = 0;
  int edge_n = 0, last_strobe = -1, nbits = 0, ones = 0;
  logic par [int];
  bit in_phase = 0;

  trng dut (.clk(clk), .rst(rst), .ro(ro), .rand_bit(rand_bit), .rand_valid(rand_valid));

  always #10 clk = ~clk;

  initial begin
    #(20 * D * 40);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    logic p;
    p = 1'b0;
    for (int b = 0; b < N; b++) p ^= ro[b];
    par[edge_n] = p;
    if (!rst && rand_valid) begin
      logic e;
      e = 1'b0;
      for (int k = edge_n - 1 - D; k <= edge_n - 2; k++) e ^= par[k];
      checks++;
      if (rand_bit !== e) begin
        failures++;
        $display("bit %0d: got %b exp %b", nbits, rand_bit, e);
      end
      if (last_strobe >= 0) begin
        checks++;
        if (edge_n - last_strobe != D) begin
          failures++;
          $display("bit period %0d", edge_n - last_strobe);
        end
      end
      if (in_phase) begin
        checks++;
        if (rand_bit !== 1'b0) begin
          failures++;
          $display("in-phase rings gave a one");
        end
      end
      ones += rand_bit;
      last_strobe = edge_n;
      nbits++;
    end
    edge_n++;
  end

  initial begin
    repeat (3) @(posedge clk);
    #1 rst = 0;
    while (nbits < 24) begin
      @(negedge clk);
      ro = N'($urandom);
    end
    // Ideal rings: all equal (all toggle together), even count -> parity 0.
    in_phase = 0;
    while (nbits < 26) begin
      @(negedge clk);
      ro = ($urandom & 1) ? '1 : '0;
      if (nbits == 25) in_phase = 1;
    end
    while (nbits < 30) begin
      @(negedge clk);
      ro = ($urandom & 1) ? '1 : '0;
    end
    checks++;
    if (ones == 0) begin
      failures++;
      $display("random input never produced a one");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
