// Full-size testbench: timer_top with every parameter at its default (16
// ideal rings, 1024:1 decimation, 27-bit trials, k = 8498; deterministic
// t_v = 3.1536e12 cycles), taken through one complete Bernoulli trial plus
// the start of the next.
//
// Default rings have no noise, exactly as in a logic simulation of the real
// circuit: all sixteen run in phase, every sampled bit is equal, and the XOR
// of an even number of them is zero. The test checks that the first random
// bit appears 1024 cycles after power-up and one every 1024 cycles after,
// that every bit is zero, that the trial ends exactly 27 x 1024 cycles after
// power-up (plus the one-cycle result register), that it fails against the
// non-zero key, that the non-volatile count stays at zero and nothing
// triggers, and that the deterministic timer's volatile count tracks the
// cycle count exactly.
`timescale 1ns / 1ps
module tb_timer_top_full;
  localparam int D = 1024, R = 27;
  logic clk = 0, pwr_rst = 1, nv_clear = 1;
  logic nd_trigger, nd_rand_bit, nd_rand_valid, nd_trial_done, nd_match, d_trigger;
  logic [13:0] nd_count, d_count;
  logic [41:0] d_j;
  int checks = 0, failures = 0, cyc = 0, nbits = 0, ntrials = 0, last_bit = 0;

  timer_top dut (
    .clk(clk), .pwr_rst(pwr_rst), .nv_clear(nv_clear),
    .nd_trigger(nd_trigger), .nd_count(nd_count), .nd_rand_bit(nd_rand_bit),
    .nd_rand_valid(nd_rand_valid), .nd_trial_done(nd_trial_done), .nd_match(nd_match),
    .d_trigger(d_trigger), .d_count(d_count), .d_j(d_j));

  always #10 clk = ~clk;

  initial begin
    #(20.0 * (D * R + 3000));
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("cycle %0d: %s", cyc, msg);
    end
  endtask

  // cyc counts edges since power-up (the first edge with pwr_rst low is 0)
  always @(posedge clk) begin
    if (!pwr_rst) begin
      if (nd_rand_valid) begin
        chk(cyc == (nbits + 1) * D, $sformatf("random bit %0d at cycle %0d", nbits, cyc));
        chk(nd_rand_bit == 1'b0, "noise-free rings produced a one");
        nbits++;
      end
      if (nd_trial_done) begin
        chk(cyc == R * D + 1, $sformatf("trial ended at cycle %0d", cyc));
        chk(nd_match == 1'b0, "trial matched without noise");
        ntrials++;
      end
      chk(nd_count == 14'd0 && !nd_trigger, "non-volatile count moved");
      chk(d_j == 42'(cyc) && d_count == 14'd0 && !d_trigger, "deterministic timer");
      cyc++;
    end
  end

  initial begin
    repeat (2) @(negedge clk);
    nv_clear = 0;
    @(negedge clk);
    pwr_rst = 0;
    wait (cyc == D * R + 600);
    chk(ntrials == 1, $sformatf("%0d trials completed", ntrials));
    chk(nbits == R, $sformatf("%0d random bits", nbits));
    $display("bits=%0d trials=%0d cycles=%0d", nbits, ntrials, cyc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
