// End-to-end testbench of timer_top at reduced size, with emulated silicon
// noise: rings with mismatched inverter delays, staggered start and 30 ps of
// jitter per half period; 32:1 decimation, 4-bit trials, k = 6; deterministic
// timer with t_v = 300 cycles and k = 5.
//
// The ring-to-bit path is judged statistically (the bit stream must contain
// both values in a sane proportion). From the TRNG output on, an independent
// model follows the non-deterministic timer cycle by cycle (trial grouping,
// key compare, K, trigger), and a second model follows the deterministic
// timer. Power cycles are applied at random. Every mechanism must occur at
// least once: random ones and zeros, complete trials, successes, a power
// cycle that cuts a trial short, K surviving a power cycle, the
// non-deterministic trigger, a lost partial t_v period, and the deterministic
// trigger.
`timescale 1ns / 1ps
module tb_timer_top;
  import nd_timer_pkg::*;
  localparam int D = 32, R = 4, K = 6, M = 3, TV = 300, DK = 5, DM = 3;
  localparam logic [R-1:0] KEY = 4'b1001;
  logic clk = 0, pwr_rst = 1, nv_clear = 1;
  logic nd_trigger, nd_rand_bit, nd_rand_valid, nd_trial_done, nd_match, d_trigger;
  logic [M-1:0] nd_count;
  logic [DM-1:0] d_count;
  logic [8:0] d_j;
  int checks = 0, failures = 0, cyc = 0;
  // mechanism counters
  int n_ones = 0, n_zeros = 0, n_trials = 0, n_hits = 0, n_cut = 0, n_kept = 0;
  int n_nd_fire = 0, n_d_lost = 0, n_d_fire = 0, n_d_ticks = 0;
  // models
  int nb = 0, mK = 0, vcnt = 0, dK = 0;
  bit pend = 0, pend_match = 0;
  logic [R-1:0] word = '0;

  timer_top #(
    .RO_SPREAD_PS(3), .RO_PHASE_PS(97), .RO_JITTER_PS(30),
    .DECIM(D), .R(R), .KTRIG(K), .M(M), .KEY(KEY),
    .TV(TV), .DK(DK), .DM(DM)
  ) dut (
    .clk(clk), .pwr_rst(pwr_rst), .nv_clear(nv_clear),
    .nd_trigger(nd_trigger), .nd_count(nd_count), .nd_rand_bit(nd_rand_bit),
    .nd_rand_valid(nd_rand_valid), .nd_trial_done(nd_trial_done), .nd_match(nd_match),
    .d_trigger(d_trigger), .d_count(d_count), .d_j(d_j));

  always #10 clk = ~clk;

  initial begin
    #20000000;
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

  always @(posedge clk) begin
    if (!nv_clear) begin
      // non-deterministic timer, from the TRNG output on
      chk(nd_count == M'(mK), $sformatf("ND K=%0d exp %0d", nd_count, mK));
      chk(nd_trigger == (mK == K), "ND trigger");
      chk(nd_trial_done == pend, "trial_done");
      if (pend) begin
        chk(nd_match == pend_match, "match");
        n_trials++;
        if (pend_match) begin
          n_hits++;
          if (mK < K) mK++;
          if (mK == K) n_nd_fire++;
        end
      end
      pend = 0;
      if (pwr_rst) begin
        if (nb != 0) n_cut++;
        if (mK != 0) n_kept++;
        nb = 0;
      end else if (nd_rand_valid) begin
        if (nd_rand_bit) n_ones++; else n_zeros++;
        word = {word[R-2:0], nd_rand_bit};
        nb++;
        if (nb == R) begin
          pend = 1;
          pend_match = (word == KEY);
          nb = 0;
        end
      end
      // deterministic timer
      chk(d_count == DM'(dK), $sformatf("D K=%0d exp %0d", d_count, dK));
      chk(d_trigger == (dK == DK), "D trigger");
      chk(d_j == 9'(vcnt), "D volatile count");
      if (pwr_rst) begin
        if (vcnt != 0) n_d_lost++;
        vcnt = 0;
      end else if (vcnt == TV - 1) begin
        vcnt = 0;
        n_d_ticks++;
        if (dK < DK) begin
          dK++;
          if (dK == DK) n_d_fire++;
        end
      end else vcnt++;
      cyc++;
    end
  end

  initial begin
    repeat (2) @(negedge clk);
    nv_clear = 0;
    pwr_rst = 0;
    while (cyc < 60000 && !(n_nd_fire > 0 && n_d_fire > 0 && cyc > 20000)) begin
      @(negedge clk);
      pwr_rst = ($urandom_range(1500, 0) == 0);
    end
    chk(n_ones > 0 && n_zeros > 0, "TRNG produced a constant stream");
    chk(n_ones * 4 > n_zeros && n_zeros * 4 > n_ones, "TRNG stream badly biased");
    chk(n_trials > 0, "no trial completed");
    chk(n_hits > 0, "no trial succeeded");
    chk(n_cut > 0, "no power cycle cut a trial short");
    chk(n_kept > 0, "no power cycle with K > 0");
    chk(n_nd_fire > 0, "non-deterministic timer never fired");
    chk(n_d_lost > 0, "no t_v period lost to a power cycle");
    chk(n_d_fire > 0, "deterministic timer never fired");
    $display("cycles=%0d ones=%0d zeros=%0d trials=%0d hits=%0d cut=%0d kept=%0d nd_fire=%0d d_ticks=%0d d_lost=%0d d_fire=%0d",
             cyc, n_ones, n_zeros, n_trials, n_hits, n_cut, n_kept, n_nd_fire, n_d_ticks, n_d_lost, n_d_fire);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
