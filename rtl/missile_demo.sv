// missile_demo: top level of the missile-launch monitor demonstrator. The
// 46-neuron monitor watches either the built-in signal generator (with a
// selectable injected fault) or three external signals. The verdict of
// each time step is registered together with the monitored samples, and
// a saturating counter totals the steps on which the property was
// violated.
//
// Interface: one time step per cycle with tick = 1; use_ext selects the
// external samples ext_l/ext_f/ext_d (the samples of the current step)
// instead of the generator. After the tick edge, ok_q holds the verdict of
// the step just taken (1 = property holds, 0 = violation) and ok_valid is
// set. The verdict refers to the launch edge of nine steps earlier. The
// monitor's two top sub-formulas and the generator's period marker are
// brought out combinationally for observation (e.g. on an oscilloscope).
// The monitor follows the published construction; the external-input
// selection, the registered verdict and the counter are this design's own
// additions around it.
module missile_demo (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        tick,
  input  logic [1:0]  scenario,
  input  logic        use_ext,
  input  logic        ext_l,
  input  logic        ext_f,
  input  logic        ext_d,
  output logic        l,
  output logic        f,
  output logic        d,
  output logic        launch_seen,   // monitor tap: launch edge of 9 steps ago
  output logic        fire_ok,       // monitor tap: fire window satisfied
  output logic        period_start,  // generator at step 0 of its period
  output logic        ok_q,
  output logic        ok_valid,
  output logic [15:0] violations
);

  logic gen_l, gen_f, gen_d;
  logic ok;

  missile_stimulus u_gen (
    .clk, .rst_n, .tick, .scenario,
    .l(gen_l), .f(gen_f), .d(gen_d), .period_start
  );

  assign l = use_ext ? ext_l : gen_l;
  assign f = use_ext ? ext_f : gen_f;
  assign d = use_ext ? ext_d : gen_d;

  missile_monitor u_mon (
    .clk, .rst_n, .tick, .l, .f, .d,
    .ok, .launch_seen, .fire_ok
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ok_q       <= 1'b1;
      ok_valid   <= 1'b0;
      violations <= '0;
    end else if (tick) begin
      ok_q     <= ok;
      ok_valid <= 1'b1;
      if (!ok && violations != 16'hFFFF)
        violations <= violations + 1'b1;
    end
  end

endmodule
