// tn_operator_bank: the library of neural temporal testers, each built as
// its own circuit of TrueNorth neurons, side by side on two shared Boolean
// input signals p and q. It makes every tester available as a reusable
// block next to the missile monitor (which uses only some of them), and
// lets them be observed together. A NOT neuron supplies the inverse of p
// that the Historically testers take as their second input.
//
// Outputs (bank_out_t): previous p, rise p, once q, punctual once{9} p,
// bounded once[0,4] q, historically p, bounded historically[0,5] p,
// historically[2,5] p, p since q, p since[0,4] q. Interval bounds are the
// testers' defaults. 58 neurons.
//
// Timing: p and q are the samples of the current step, the outputs are
// that step's verdicts (combinational), and state advances on the clock
// edge with tick = 1.
module tn_operator_bank
  import tn_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  logic      tick,
  input  logic      p,
  input  logic      q,
  output bank_out_t y
);

  localparam int NEURONS = 58;

  logic p_n;

  tn_logic #(.OP(OP_NOT)) u_not    (.clk, .rst_n, .tick, .a(p), .b(1'b0), .y(p_n));

  tn_prev          u_prev   (.clk, .rst_n, .tick, .phi(p), .y(y.prev));
  tn_rise          u_rise   (.clk, .rst_n, .tick, .phi(p), .y(y.rise));
  tn_once          u_once   (.clk, .rst_n, .tick, .phi(q), .y(y.once));
  tn_punctual_once u_ponce  (.clk, .rst_n, .tick, .phi(p), .y(y.ponce));
  tn_bounded_once  u_bonce  (.clk, .rst_n, .tick, .phi(q), .y(y.bonce));
  tn_historically  u_hist   (.clk, .rst_n, .tick, .phi(p), .phi_n(p_n), .y(y.hist));
  tn_bounded_hist  u_bhist  (.clk, .rst_n, .tick, .phi(p), .phi_n(p_n), .y(y.bhist));
  tn_hist_interval u_histab (.clk, .rst_n, .tick, .phi(p), .phi_n(p_n), .y(y.hist_ab));
  tn_since         u_since  (.clk, .rst_n, .tick, .phi1(p), .phi2(q), .y(y.since));
  tn_bounded_since u_bsince (.clk, .rst_n, .tick, .phi1(p), .phi2(q), .y(y.bsince));

endmodule
