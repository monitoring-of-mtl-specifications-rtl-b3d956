// tb_missile_stimulus: self-checking test of the demonstrator's signal
// generator with its default timing. For each scenario (nominal, no fire,
// late fire, early detonation), held for several periods, the l, f and d
// samples of every step are compared with the sequence worked out here
// from the step number within the period; ticks are withheld at random and
// must freeze the outputs. The period marker is checked too.
module tb_missile_stimulus;

  logic clk = 1'b0, rst_n = 1'b0, tick = 1'b0;
  logic [1:0] scenario = 2'd0;
  logic l, f, d, period_start;
  int checks = 0, failures = 0;

  missile_stimulus dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Defaults: period 24, l at 2..11, f edge 3 (late: 6) steps after l for
  // 3 steps, d 8 (early: 2) steps after the f edge.
  task automatic expect_step(int s, int sc, output bit el, output bit ef, output bit ed);
    int fa, da;
    fa = 2 + ((sc == 2) ? 6 : 3);
    da = fa + ((sc == 3) ? 2 : 8);
    el = (s >= 2) && (s < 12);
    ef = (sc != 1) && (s >= fa) && (s < fa + 3);
    ed = (s == da);
  endtask

  int s = 0, sc = 0;
  bit el, ef, ed;

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int p = 0; p < 16; p++) begin
      sc = p / 4;
      for (int k = 0; k < 24; k++) begin
        @(negedge clk);
        while ($urandom_range(0, 3) == 0) begin
          tick = 1'b0;
          @(negedge clk);
        end
        // The scenario takes effect at the next period start.
        if (k == 23) scenario = 2'((p + 1) / 4);
        expect_step(s, (p == 0) ? 0 : sc, el, ef, ed);
        checks++;
        if (l !== el || f !== ef || d !== ed || period_start !== (s == 0)) begin
          failures++;
          if (failures < 10) $display("period %0d step %0d: lfd=%b%b%b expected %b%b%b", p, s, l, f, d, el, ef, ed);
        end
        tick = 1'b1;
        s = (s + 1) % 24;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
