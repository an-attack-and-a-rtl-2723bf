// Testbench for the ring oscillator model: measures the period of an ideal
// three-inverter ring (2 x 3 x 267 ps = 1.602 ns, about 625 MHz), checks
// that it is exact without jitter, and that a jittered ring stays within the
// jitter bound but does not keep an exact period.
`timescale 1ns / 1ps
module tb_ring_oscillator;
  logic o_ideal, o_jit;
  int checks = 0, failures = 0;
  realtime t_prev, t_now, per;
  int exact = 0;

  ring_oscillator u_ideal (.osc(o_ideal));
  ring_oscillator #(.JITTER_PS(40)) u_jit (.osc(o_jit));

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(posedge o_ideal);
    t_prev = $realtime;
    for (int i = 0; i < 50; i++) begin
      @(posedge o_ideal);
      t_now = $realtime;
      per = t_now - t_prev;
      t_prev = t_now;
      checks++;
      if (per < 1.6015 || per > 1.6025) begin
        failures++;
        $display("ideal period %f ns", per);
      end
    end
    @(posedge o_jit);
    t_prev = $realtime;
    for (int i = 0; i < 50; i++) begin
      @(posedge o_jit);
      t_now = $realtime;
      per = t_now - t_prev;
      t_prev = t_now;
      checks++;
      if (per < 1.521 || per > 1.683) begin
        failures++;
        $display("jittered period %f ns out of bound", per);
      end
      if (per > 1.6015 && per < 1.6025) exact++;
    end
    checks++;
    if (exact > 25) begin
      failures++;
      $display("jittered ring has an exact period %0d times", exact);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
