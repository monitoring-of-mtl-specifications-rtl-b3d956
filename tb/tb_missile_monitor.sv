// tb_missile_monitor: self-checking test of the 46-neuron missile monitor.
// Launch episodes with random timing are generated: l rises and stays high
// a random time, f rises a random 0..7 steps later (or never), d pulses a
// random 0..11 steps after the f edge (or never), with occasional random
// noise on all three signals. The verdict of every step is compared with
// the original future-time property evaluated on the recorded history at
// the launch step nine steps back:
//   rise_l(t-9) -> exists k in [0,4]: rise_f(t-9+k) and
//                  no d in [t-9+k, t-9+k+5].
// The test counts satisfied launches, launches violated because the fire
// edge was missing or late, and launches violated by an early detonation,
// and fails if any of these never occurs. It also checks the neuron count.
module tb_missile_monitor;
  import tn_pkg::*;

  localparam int STEPS = 4000;

  logic clk = 1'b0, rst_n = 1'b0, tick = 1'b0;
  logic l = 1'b0, f = 1'b0, d = 1'b0;
  logic ok, launch_seen, fire_ok;
  bit hl [STEPS], hf [STEPS], hd [STEPS];
  int checks = 0, failures = 0;
  int n_sat = 0, n_nofire = 0, n_det = 0;

  missile_monitor dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (4 * STEPS + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bit rise(ref bit h [STEPS], input int t);
    return (t > 0) && h[t] && !h[t-1];
  endfunction

  // Returns the verdict; cls = 0 no launch, 1 satisfied, 2 no fire edge
  // in the window, 3 fire edge(s) only followed by detonation.
  function automatic bit verdict(int t, output int cls);
    int tl;
    bit any_f, good;
    cls = 0;
    if (t < 9) return 1'b1;
    tl = t - 9;
    if (!rise(hl, tl)) return 1'b1;
    any_f = 0; good = 0;
    for (int k = 0; k <= 4; k++) begin
      if (rise(hf, tl + k)) begin
        bit nod = 1;
        any_f = 1;
        for (int j = 0; j <= 5; j++) if (hd[tl + k + j]) nod = 0;
        if (nod) good = 1;
      end
    end
    cls = good ? 1 : (any_f ? 3 : 2);
    return good;
  endfunction

  // Episode generator state.
  int ep_t = 0, ep_len = 0, l_len = 0, f_at = -1, f_len = 0, d_at = -1;
  bit noise = 0;

  task automatic new_episode();
    ep_t   = 0;
    ep_len = $urandom_range(14, 30);
    l_len  = $urandom_range(1, 10);
    f_at   = ($urandom_range(0, 5) == 0) ? -1 : int'($urandom_range(0, 7));
    f_len  = $urandom_range(1, 4);
    d_at   = ($urandom_range(0, 2) == 0) ? -1 : f_at + int'($urandom_range(0, 11));
    noise  = ($urandom_range(0, 9) == 0);
  endtask

  int t = 0, cls;
  bit e;

  initial begin
    checks++;
    if (dut.NEURONS != 46) begin
      failures++;
      $display("neuron count %0d, expected 46", dut.NEURONS);
    end
    new_episode();
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    while (t < STEPS) begin
      @(negedge clk);
      tick = ($urandom_range(0, 4) != 0);
      if (noise) begin
        l = ($urandom_range(0, 3) == 0);
        f = ($urandom_range(0, 3) == 0);
        d = ($urandom_range(0, 7) == 0);
      end else begin
        l = (ep_t >= 1) && (ep_t < 1 + l_len);
        f = (f_at >= 0) && (ep_t >= 1 + f_at) && (ep_t < 1 + f_at + f_len);
        d = (d_at >= 0) && (ep_t == 1 + d_at);
      end
      hl[t] = l; hf[t] = f; hd[t] = d;
      #1;
      e = verdict(t, cls);
      checks++;
      if (ok !== e) begin
        failures++;
        if (failures < 10) $display("step %0d: ok=%b expected %b (class %0d)", t, ok, e, cls);
      end
      checks++;
      if (launch_seen !== (t >= 9 && rise(hl, t - 9))) begin
        failures++;
        if (failures < 10) $display("step %0d: launch_seen=%b", t, launch_seen);
      end
      if (tick) begin
        if (cls == 1) n_sat++;
        if (cls == 2) n_nofire++;
        if (cls == 3) n_det++;
        t++;
        ep_t++;
        if (ep_t >= ep_len) new_episode();
      end
    end
    checks += 3;
    if (n_sat == 0)    begin failures++; $display("no satisfied launch"); end
    if (n_nofire == 0) begin failures++; $display("no missing-fire violation"); end
    if (n_det == 0)    begin failures++; $display("no detonation violation"); end
    $display("satisfied=%0d missing_fire=%0d detonation=%0d", n_sat, n_nofire, n_det);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
