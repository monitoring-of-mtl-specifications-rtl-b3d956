// tb_tn_monitor_top: end-to-end test of the whole design at its default
// configuration. The missile demonstrator runs four periods of each
// generator scenario (nominal, no fire, late fire, early detonation) and
// then random external launch episodes; every registered verdict is
// compared with the original future-time property evaluated on the
// monitored samples, and the violation counter with the number of failed
// steps. At the same time the operator bank gets random p and q streams and
// each of its ten outputs is compared with its temporal operator on the
// recorded history. Every mechanism must occur: satisfied launches,
// violations by a missing, a late fire edge and an early detonation,
// external input, idle cycles, and each bank output both true and false.
module tb_tn_monitor_top;
  import tn_pkg::*;

  localparam int STEPS = 600;

  logic clk = 1'b0, rst_n = 1'b0, tick = 1'b0;
  logic [1:0] scenario = 2'd0;
  logic use_ext = 1'b0, ext_l = 1'b0, ext_f = 1'b0, ext_d = 1'b0;
  logic l, f, d, ok_q, ok_valid, launch_seen, fire_ok, period_start;
  logic [15:0] violations;
  bit hl [STEPS], hf [STEPS], hd [STEPS];
  int checks = 0, failures = 0, exp_viol = 0;
  int n_launch_tap = 0;
  int n_sat = 0, n_nofire = 0, n_late = 0, n_det = 0, n_ext = 0, n_idle = 0;

  logic p = 1'b0, q = 1'b0;
  bank_out_t bank_y;

  tn_monitor_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (10 * STEPS) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end


  // ---- operator bank reference ----
  localparam int BSTEPS = 3000;
  bit bp [BSTEPS], bq [BSTEPS];
  int bt0 = 0;
  int bank_ones [10], bank_zeros [10];

  function automatic bit all_p(int lo, int hi);
    bit r = 1;
    for (int k = lo; k <= hi; k++) r &= bp[k];
    return r;
  endfunction

  function automatic bit any_q(int lo, int hi);
    bit r = 0;
    for (int k = lo; k <= hi; k++) r |= bq[k];
    return r;
  endfunction

  function automatic bit since_from(int lo, int t);
    for (int k = lo; k <= t; k++)
      if (bq[k] && (k == t || all_p(k + 1, t))) return 1;
    return 0;
  endfunction

  function automatic int maxi(int a, int b);
    return (a > b) ? a : b;
  endfunction

  // Expected bank outputs at step t (history restarted at bt0).
  function automatic bank_out_t bank_expect(int t);
    bank_out_t e;
    e.prev    = (t > bt0) && bp[t-1];
    e.rise    = bp[t] && (t > bt0) && !bp[t-1];
    e.once    = any_q(bt0, t);
    e.ponce   = (t >= bt0 + 9) && bp[t-9];
    e.bonce   = any_q(maxi(bt0, t - 4), t);
    e.hist    = all_p(bt0, t);
    e.bhist   = (t >= bt0 + 5) && all_p(t - 5, t);
    e.hist_ab = (t >= bt0 + 5) && all_p(t - 5, t - 2);
    e.since   = since_from(bt0, t);
    e.bsince  = since_from(maxi(bt0, t - 4), t);
    return e;
  endfunction

  int bias_p = 1, bias_q = 1;

  task automatic bank_drive(int t);
    if ($urandom_range(0, 19) == 0) bias_p = $urandom_range(0, 3);
    if ($urandom_range(0, 19) == 0) bias_q = $urandom_range(0, 3);
    p = (bias_p == 0) ? 1'b0 : (bias_p == 3) ? 1'b1 : ($urandom_range(0, bias_p) != 0);
    q = (bias_q == 0) ? 1'b0 : (bias_q == 3) ? 1'b1 : ($urandom_range(0, 3) == 0);
    // Start each history with p held and q absent, so that Once and
    // Historically are seen both ways even without a reset.
    if (t - bt0 < 3) p = 1'b1;
    if (t - bt0 < 10) q = 1'b0;
    bp[t] = p;
    bq[t] = q;
  endtask

  task automatic bank_check(int t, bit count);
    bank_out_t e;
    e = bank_expect(t);
    checks++;
    if (bank_y !== e) begin
      failures++;
      if (failures < 10) $display("bank step %0d: y=%b expected %b", t, bank_y, e);
    end
    if (count)
      for (int k = 0; k < 10; k++)
        if (e[k]) bank_ones[k]++; else bank_zeros[k]++;
  endtask

  task automatic bank_final();
    for (int k = 0; k < 10; k++) begin
      checks++;
      if (bank_ones[k] == 0 || bank_zeros[k] == 0) begin
        failures++;
        $display("bank output %0d never toggled", k);
      end
    end
  endtask

  function automatic bit rise(ref bit h [STEPS], input int t);
    return (t > 0) && h[t] && !h[t-1];
  endfunction

  // cls: 0 no launch, 1 satisfied, 2 no fire edge in the window,
  // 3 fire edge(s) in the window but each followed by a detonation.
  function automatic bit verdict(int t, output int cls);
    int tl;
    bit any_f, good;
    cls = 0;
    if (t < 9) return 1'b1;
    tl = t - 9;
    if (!rise(hl, tl)) return 1'b1;
    any_f = 0; good = 0;
    for (int k = 0; k <= 4; k++)
      if (rise(hf, tl + k)) begin
        bit nod = 1;
        any_f = 1;
        for (int j = 0; j <= 5; j++) if (hd[tl + k + j]) nod = 0;
        if (nod) good = 1;
      end
    cls = good ? 1 : (any_f ? 3 : 2);
    return good;
  endfunction

  int cls, ep = 0, f_at = 0, d_at = 0;
  bit e;

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < STEPS; t++) begin
      @(negedge clk);
      // Scenario of the generator: four periods of 24 steps each; it is
      // sampled at a period start, so set it one step ahead.
      scenario = 2'(((t + 1) / 96) % 4);
      use_ext  = (t >= 4 * 96);
      if (use_ext) begin
        if (ep == 0) begin
          f_at = $urandom_range(1, 9);
          d_at = f_at + int'($urandom_range(0, 10));
        end
        ext_l = (ep >= 1) && (ep < 8);
        ext_f = (ep >= f_at) && (ep < f_at + 2);
        ext_d = (ep == d_at);
        ep = (ep + 1) % 22;
        n_ext++;
      end
      while ($urandom_range(0, 4) == 0) begin
        tick = 1'b0;
        n_idle++;
        @(negedge clk);
      end
      bank_drive(t);
      tick = 1'b1;
      #1;
      bank_check(t, 1'b1);
      hl[t] = l; hf[t] = f; hd[t] = d;
      e = verdict(t, cls);
      if (launch_seen) n_launch_tap++;
      checks++;
      if (period_start !== (t % 24 == 0)) failures++;
      checks++;
      if (launch_seen !== (t >= 9 && rise(hl, t - 9))) failures++;
      if (!e) exp_viol++;
      if (cls == 1) n_sat++;
      if (cls == 2 && !use_ext && scenario == 2'd1) n_nofire++;
      if (cls == 2 && !use_ext && scenario == 2'd2) n_late++;
      if (cls == 3 && !use_ext && scenario == 2'd3) n_det++;
      @(posedge clk);
      #1;
      checks += 3;
      if (ok_valid !== 1'b1) failures++;
      if (ok_q !== e) begin
        failures++;
        if (failures < 10) $display("step %0d: ok=%b expected %b (class %0d)", t, ok_q, e, cls);
      end
      if (violations !== 16'(exp_viol)) begin
        failures++;
        if (failures < 10) $display("step %0d: violations=%0d expected %0d", t, violations, exp_viol);
      end
    end
    bank_final();
    checks += 7;
    if (n_launch_tap == 0) begin failures++; $display("launch tap never set"); end
    if (n_sat == 0)    begin failures++; $display("no satisfied launch"); end
    if (n_nofire == 0) begin failures++; $display("no missing-fire violation"); end
    if (n_late == 0)   begin failures++; $display("no late-fire violation"); end
    if (n_det == 0)    begin failures++; $display("no early-detonation violation"); end
    if (n_ext == 0)    begin failures++; $display("no external input"); end
    if (n_idle == 0)   begin failures++; $display("no idle cycle"); end
    $display("satisfied=%0d missing=%0d late=%0d detonation=%0d ext=%0d idle=%0d violations=%0d",
             n_sat, n_nofire, n_late, n_det, n_ext, n_idle, violations);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
