// Testbench for nv_memory: clear, random writes and reads, writes ignored
// without wr_en, clear priority over a write.
`timescale 1ns / 1ps
module tb_nv_memory;
  localparam int M = 14;
  logic clk = 0, prog_clear = 0, wr_en = 0;
  logic [M-1:0] wr_data = '0, rd_data, model;
  int checks = 0, failures = 0;

  nv_memory dut (.clk(clk), .prog_clear(prog_clear), .wr_en(wr_en), .wr_data(wr_data), .rd_data(rd_data));

  always #10 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(negedge clk);
    prog_clear = 1;
    wr_en = 1;
    wr_data = 14'h1abc;
    model = '0;
    for (int i = 0; i < 1000; i++) begin
      @(negedge clk);
      if (prog_clear) model = '0;
      else if (wr_en) model = wr_data;
      checks++;
      if (rd_data !== model) begin
        failures++;
        $display("read %h exp %h", rd_data, model);
      end
      prog_clear = ($urandom_range(50, 0) == 0);
      wr_en = 1'($urandom);
      wr_data = M'($urandom);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
