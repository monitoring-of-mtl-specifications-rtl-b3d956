// tb_tn_prev: self-checking test of tn_prev. Expected: y(t) = p1(t-1), false at the first step.
// Random input streams (with bursts so that long runs occur) are applied
// one time step at a time; some cycles carry no tick and must not advance
// the operator, and every 150 steps a reset restarts the history at step
// t0. Each step's output is compared with the operator's semantics
// evaluated directly on the recorded input history. The neuron count of
// the circuit is checked as well.
module tb_tn_prev;
  import tn_pkg::*;

  localparam int STEPS = 3000;

  logic clk = 1'b0, rst_n = 1'b0, tick = 1'b0;
  logic p1 = 1'b0, p2 = 1'b0, y;
  bit   h1 [STEPS];
  bit   h2 [STEPS];
  int   checks = 0, failures = 0, ones = 0, zeros = 0;

  tn_prev dut (.clk, .rst_n, .tick, .phi(p1), .y);

  always #5 clk = ~clk;

  initial begin
    repeat (4 * STEPS + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int t = 0, t0 = 0;

  // Semantics on the history h1/h2[t0..t].
  function automatic bit expect_at(int t);
    bit r;
    r = (t > t0) && h1[t-1];
    return r;
  endfunction

  int bias1 = 1, bias2 = 1;
  bit e;

  initial begin
    checks++;
    if (dut.NEURONS != 2) begin
      failures++;
      $display("neuron count %0d, expected 2", dut.NEURONS);
    end
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    while (t < STEPS) begin
      @(negedge clk);
      if (t > t0 && t % 150 == 0) begin
        rst_n = 1'b0;
        #1;
        rst_n = 1'b1;
        t0 = t;
      end
      if ($urandom_range(0, 19) == 0) bias1 = $urandom_range(0, 3);
      if ($urandom_range(0, 19) == 0) bias2 = $urandom_range(0, 3);
      p1 = (bias1 == 0) ? 1'b0 : (bias1 == 3) ? 1'b1 : ($urandom_range(0, bias1) != 0);
      p2 = (bias2 == 0) ? 1'b0 : (bias2 == 3) ? 1'b1 : ($urandom_range(0, 3) == 0);
      tick = ($urandom_range(0, 5) != 0);
      h1[t] = p1;
      h2[t] = p2;
      #1;
      e = expect_at(t);
      checks++;
      if (y !== e) begin
        failures++;
        if (failures < 10) $display("step %0d: y=%b expected %b", t, y, e);
      end
      if (tick) begin
        if (e) ones++; else zeros++;
        t++;
      end
    end
    checks++;
    if (ones == 0 || zeros == 0) begin
      failures++;
      $display("output never toggled: ones=%0d zeros=%0d", ones, zeros);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
