// tb_tn_operator_bank: self-checking test of the operator bank. Random
// streams on p and q (with bursts, so that long runs occur) are applied one
// step at a time, some cycles without tick, and every 150 steps a reset
// restarts all testers. Each of the ten outputs is compared with its
// temporal operator evaluated directly on the recorded history, and each
// must be seen both true and false.
module tb_tn_operator_bank;
  import tn_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, tick = 1'b0;
  logic p = 1'b0, q = 1'b0;
  bank_out_t bank_y;
  int checks = 0, failures = 0;

  tn_operator_bank dut (.clk, .rst_n, .tick, .p, .q, .y(bank_y));

  always #5 clk = ~clk;

  initial begin
    repeat (5 * BSTEPS) @(posedge clk);
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

  int t = 0;

  initial begin
    checks++;
    if (dut.NEURONS != 58) failures++;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    while (t < BSTEPS) begin
      @(negedge clk);
      if (t > bt0 && t % 150 == 0) begin
        rst_n = 1'b0;
        #1;
        rst_n = 1'b1;
        bt0 = t;
      end
      bank_drive(t);
      tick = ($urandom_range(0, 5) != 0);
      #1;
      bank_check(t, tick);
      if (tick) t++;
    end
    bank_final();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
