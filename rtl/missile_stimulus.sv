// missile_stimulus: signal generator of the missile demonstrator. It plays
// a periodic launch sequence on l (launch enable), f (fire enable) and
// d (detonation), one sample per time step, either nominal or with one of
// three injected faults, to exercise the monitor.
//
// Each period of PERIOD steps: l rises at step L_START and stays high for
// L_LEN steps; f rises F_DELAY steps after l (F_LATE steps with the
// LATE_FIRE fault, never with NO_FIRE) and stays high for F_LEN steps;
// d pulses for one step D_DELAY steps after the f edge (D_EARLY steps with
// EARLY_DET; with NO_FIRE, D_DELAY steps after where the f edge would be).
// All timing values are this design's choice; the nominal sequence
// satisfies the property and each fault violates it.
//
// Timing: the outputs are registered and describe the current step; on
// the clock edge with tick = 1 they move to the next step. The scenario is
// sampled at the start of each period. Reset starts at step 0.
module missile_stimulus #(
  parameter int PERIOD  = 24,
  parameter int L_START = 2,
  parameter int L_LEN   = 10,
  parameter int F_DELAY = 3,
  parameter int F_LATE  = 6,
  parameter int F_LEN   = 3,
  parameter int D_DELAY = 8,
  parameter int D_EARLY = 2
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       tick,
  input  logic [1:0] scenario,   // 0 nominal, 1 no fire, 2 late fire, 3 early detonation
  output logic       l,
  output logic       f,
  output logic       d,
  output logic       period_start
);

  typedef enum logic [1:0] {
    SC_NOMINAL   = 2'd0,
    SC_NO_FIRE   = 2'd1,
    SC_LATE_FIRE = 2'd2,
    SC_EARLY_DET = 2'd3
  } scenario_e;

  localparam int W = $clog2(PERIOD + 1);

  logic [W-1:0] step, step_n;
  scenario_e    sc, sc_n;
  logic         l_n, f_n, d_n;
  int           f_at, d_at, s;

  assign step_n = (step == W'(PERIOD - 1)) ? '0 : step + 1'b1;
  assign sc_n   = (step_n == '0) ? scenario_e'(scenario) : sc;

  // Samples of the next step.
  always_comb begin
    s    = int'(step_n);
    f_at = L_START + ((sc_n == SC_LATE_FIRE) ? F_LATE : F_DELAY);
    d_at = f_at + ((sc_n == SC_EARLY_DET) ? D_EARLY : D_DELAY);
    l_n  = (s >= L_START) && (s < L_START + L_LEN);
    f_n  = (sc_n != SC_NO_FIRE) && (s >= f_at) && (s < f_at + F_LEN);
    d_n  = (s == d_at);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      step <= '0;
      sc   <= scenario_e'(scenario);
      l    <= (L_START == 0);
      f    <= 1'b0;
      d    <= 1'b0;
    end else if (tick) begin
      step <= step_n;
      sc   <= sc_n;
      l    <= l_n;
      f    <= f_n;
      d    <= d_n;
    end
  end

  assign period_start = (step == '0);

endmodule
