// Trigger-time statistics of the non-deterministic timer.
//
// Mirrors the evaluation of the timer: many timers built for the same mean
// trigger time but different spreads, their trigger times compared with the
// prediction (mean k*2^r trials, standard deviation sqrt(k)*2^r*sqrt(1-2^-r)
// trials). Two groups of NI timers, scaled down so they fire in simulation:
//   group A: r = 2, k = 64  -> mean 256 trials, sd  27.7 trials (narrow)
//   group B: r = 6, k = 4   -> mean 256 trials, sd 127.0 trials (wide)
// Each timer gets its own random ring inputs (standing in for noisy rings)
// and 4:1 decimation. The testbench counts trials up to each trigger, then
// checks each group's sample mean against the prediction (within 5 standard
// errors), each sample standard deviation against the prediction (within a
// factor 0.6 to 1.5), and that group A is the narrower.
`timescale 1ns / 1ps
module tb_trigger_statistics;
  import nd_timer_pkg::*;
  localparam int NI = 40, N = 16, D = 4;
  localparam int RA = 2, KA = 64, RB = 6, KB = 4;
  logic clk = 0, pwr_rst = 1, nv_clear = 1;
  logic [N-1:0] ro_a [NI];
  logic [N-1:0] ro_b [NI];
  logic [NI-1:0] trig_a, trig_b, td_a, td_b;
  int trials_a [NI], trials_b [NI];
  int checks = 0, failures = 0;

  for (genvar i = 0; i < NI; i++) begin : g
    logic [6:0] ca, cb;
    logic rba, rva, ma, rbb, rvb, mb;
    nd_timer #(.N_RO(N), .DECIM(D), .R(RA), .KTRIG(KA), .M(7), .KEY(2'b10)) u_a (
      .clk(clk), .pwr_rst(pwr_rst), .nv_clear(nv_clear), .ro(ro_a[i]), .trigger(trig_a[i]),
      .count(ca), .rand_bit(rba), .rand_valid(rva), .trial_done(td_a[i]), .match(ma));
    nd_timer #(.N_RO(N), .DECIM(D), .R(RB), .KTRIG(KB), .M(7), .KEY(6'b101101)) u_b (
      .clk(clk), .pwr_rst(pwr_rst), .nv_clear(nv_clear), .ro(ro_b[i]), .trigger(trig_b[i]),
      .count(cb), .rand_bit(rbb), .rand_valid(rvb), .trial_done(td_b[i]), .match(mb));
  end

  always #10 clk = ~clk;

  initial begin
    #(20.0 * 400000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (!pwr_rst) begin
      for (int i = 0; i < NI; i++) begin
        if (td_a[i] && !trig_a[i]) trials_a[i]++;
        if (td_b[i] && !trig_b[i]) trials_b[i]++;
      end
    end
  end

  always @(negedge clk) begin
    for (int i = 0; i < NI; i++) begin
      ro_a[i] = N'($urandom);
      ro_b[i] = N'($urandom);
    end
  end

  task automatic judge(string name, int t[NI], real mean_p, real sd_p);
    real s, ss, mean, sd;
    s = 0.0;
    ss = 0.0;
    for (int i = 0; i < NI; i++) s += t[i];
    mean = s / NI;
    for (int i = 0; i < NI; i++) ss += (t[i] - mean) * (t[i] - mean);
    sd = $sqrt(ss / (NI - 1));
    $display("group %s: mean %0.1f trials (predicted %0.1f), sd %0.1f (predicted %0.1f)",
             name, mean, mean_p, sd, sd_p);
    checks++;
    if (mean < mean_p - 5.0 * sd_p / $sqrt(NI) || mean > mean_p + 5.0 * sd_p / $sqrt(NI)) begin
      failures++;
      $display("group %s mean out of range", name);
    end
    checks++;
    if (sd < 0.6 * sd_p || sd > 1.5 * sd_p) begin
      failures++;
      $display("group %s spread out of range", name);
    end
  endtask

  function automatic real sdev(int t[NI]);
    real s, ss;
    s = 0.0;
    ss = 0.0;
    for (int i = 0; i < NI; i++) s += t[i];
    for (int i = 0; i < NI; i++) ss += (t[i] - s / NI) * (t[i] - s / NI);
    return $sqrt(ss / (NI - 1));
  endfunction

  initial begin
    for (int i = 0; i < NI; i++) begin
      trials_a[i] = 0;
      trials_b[i] = 0;
    end
    repeat (2) @(negedge clk);
    nv_clear = 0;
    pwr_rst = 0;
    wait (&trig_a && &trig_b);
    repeat (2) @(negedge clk);
    // the k-th success ends the last counted trial
    judge("A (r=2, k=64)", trials_a, real'(KA) * (1 << RA),
          $sqrt(real'(KA) * (1.0 - 1.0 / (1 << RA))) * (1 << RA));
    judge("B (r=6, k=4)", trials_b, real'(KB) * (1 << RB),
          $sqrt(real'(KB) * (1.0 - 1.0 / (1 << RB))) * (1 << RB));
    checks++;
    if (!(sdev(trials_a) < sdev(trials_b))) begin
      failures++;
      $display("larger k did not give the narrower distribution");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
