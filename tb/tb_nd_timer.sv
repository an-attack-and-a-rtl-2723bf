// Testbench for nd_timer at reduced size (8:1 decimation, 4-bit trials,
// k = 6, 3-bit count).
//
// Instance u_s (static key): the ring inputs are driven with random values,
// standing in for noisy rings. An independent model rebuilds every random bit
// from the parity of the ring values at each clock edge, groups the bits into
// trials, compares them with the key and predicts trial_done, match and the
// count K cycle by cycle. Random power cycles hit trials in progress; the
// test checks that K survives them, that a trial takes exactly 8*4 cycles,
// and that the trigger rises at K = 6 and K then holds.
//
// Instances u_c and u_t (count key and stepping key) see in-phase rings, as a
// noise-free simulation would: their TRNG output is always zero. The count
// key must match exactly once (K = 1); the stepping key must match five times
// (K = 5), below k, so neither fires.
`timescale 1ns / 1ps
module tb_nd_timer;
  import nd_timer_pkg::*;
  localparam int N = 16, D = 8, R = 4, K = 6, M = 3;
  localparam logic [R-1:0] KEY = 4'b0110;
  logic clk = 0, pwr_rst = 1, nv_clear = 1;
  logic [N-1:0] ro = '0, ro_ph = '0;
  logic trig_s, rb_s, rv_s, td_s, m_s;
  logic [M-1:0] cnt_s, cnt_c, cnt_t;
  logic trig_c, trig_t;
  logic rb_c, rv_c, td_c, m_c, rb_t, rv_t, td_t, m_t;
  int checks = 0, failures = 0;
  int edge_n = 0, nb = 0, modelK = 0, trials = 0, hits = 0, cut = 0, last_done = -1;
  int fired_at = -1, periods_ok = 0;
  bit pend = 0, pend_match = 0;
  logic [R-1:0] word = '0;
  logic par [int];

  nd_timer #(.N_RO(N), .DECIM(D), .R(R), .KTRIG(K), .M(M), .KEY_MODE(KEY_STATIC), .KEY(KEY)) u_s (
    .clk(clk), .pwr_rst(pwr_rst), .nv_clear(nv_clear), .ro(ro), .trigger(trig_s), .count(cnt_s),
    .rand_bit(rb_s), .rand_valid(rv_s), .trial_done(td_s), .match(m_s));
  nd_timer #(.N_RO(N), .DECIM(D), .R(R), .KTRIG(K), .M(M), .KEY_MODE(KEY_FROM_COUNT)) u_c (
    .clk(clk), .pwr_rst(pwr_rst), .nv_clear(nv_clear), .ro(ro_ph), .trigger(trig_c), .count(cnt_c),
    .rand_bit(rb_c), .rand_valid(rv_c), .trial_done(td_c), .match(m_c));
  nd_timer #(.N_RO(N), .DECIM(D), .R(R), .KTRIG(K), .M(M), .KEY_MODE(KEY_STEP)) u_t (
    .clk(clk), .pwr_rst(pwr_rst), .nv_clear(nv_clear), .ro(ro_ph), .trigger(trig_t), .count(cnt_t),
    .rand_bit(rb_t), .rand_valid(rv_t), .trial_done(td_t), .match(m_t));

  always #10 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("cycle %0d: %s", edge_n, msg);
    end
  endtask

  // Cycle-by-cycle model of the static-key instance (values before the edge).
  always @(posedge clk) begin
    logic p;
    p = 1'b0;
    for (int b = 0; b < N; b++) p ^= ro[b];
    par[edge_n] = p;
    if (!nv_clear) begin
      chk(cnt_s == M'(modelK), $sformatf("K=%0d exp %0d", cnt_s, modelK));
      chk(trig_s == (modelK == K), "trigger");
      chk(td_s == pend, "trial_done");
      if (pend) begin
        chk(m_s == pend_match, "match");
        if (last_done >= 0 && cut == 0) begin
          chk(edge_n - last_done == D * R, "trial period");
          periods_ok++;
        end
        last_done = edge_n;
        trials++;
        if (pend_match) begin
          hits++;
          if (modelK < K) modelK++;
        end
      end else chk(m_s == 1'b0, "match without trial end");
      pend = 0;
      if (pwr_rst) begin
        if (nb != 0) cut++;
        nb = 0;
        last_done = -1;
      end else if (rv_s) begin
        logic e;
        e = 1'b0;
        for (int k2 = edge_n - 1 - D; k2 <= edge_n - 2; k2++) e ^= par[k2];
        chk(rb_s == e, "random bit");
        word = {word[R-2:0], rb_s};
        nb++;
        if (nb == R) begin
          pend = 1;
          pend_match = (word == KEY);
          nb = 0;
        end
      end
      if (modelK == K && fired_at < 0) fired_at = edge_n;
    end
    edge_n++;
  end

  initial begin
    repeat (2) @(negedge clk);
    nv_clear = 0;
    pwr_rst = 0;
    for (int c = 0; c < 30000; c++) begin
      @(negedge clk);
      ro = N'($urandom);
      ro_ph = ($urandom & 1) ? '1 : '0;
      // power cycles: a few, at random points
      pwr_rst = ($urandom_range(700, 0) == 0);
    end
    chk(fired_at >= 0, "static-key timer never fired");
    chk(cut > 0, "no power cycle interrupted a trial");
    chk(periods_ok > 0, "trial period never measured");
    chk(cnt_c == 1 && !trig_c, $sformatf("count-key timer in simulation: K=%0d", cnt_c));
    chk(cnt_t == 5 && !trig_t, $sformatf("step-key timer in simulation: K=%0d", cnt_t));
    $display("trials=%0d hits=%0d fired_at=%0d interrupted=%0d", trials, hits, fired_at, cut);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
