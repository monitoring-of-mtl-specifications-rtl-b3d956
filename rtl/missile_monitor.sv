// missile_monitor: a 46-neuron TrueNorth runtime monitor for the missile
// launch property
//   "after the launch-enable l rises, a rising edge of fire-enable f must
//    follow within four steps, and no detonation d may occur for five steps
//    from that fire edge on",
// i.e. rise(l) -> once-in-future[0,4](rise(f) AND always[0,5] NOT d). A
// monitor can only judge what has already happened, so the formula is
// evaluated in its past form, shifted back by its temporal depth of 9 steps:
//   P{9} rise(l) -> O[0,4]( P{5} rise(f) AND H[0,5] NOT d )
// with P{a} the punctual Once (a-step delay), O[0,a] the bounded Once and
// H[0,a] the bounded Historically. The verdict `ok` at step t is therefore
// about the launch edge of step t-9; `ok` = 0 (no spike) flags a violation.
//
// Neuron budget: rise(l) 4, P{9} 18, rise(f) 4, P{5} 10, NOT d 1,
// H[0,5] 1, AND 1, O[0,4] 6, implication 1: 46 neurons.
//
// Timing: l, f and d are the signal samples of the current step; `ok` and
// the sub-formula taps are combinational for that step, and all neuron
// state advances on the clock edge with tick = 1.
module missile_monitor
  import tn_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic tick,
  input  logic l,            // launch enable
  input  logic f,            // fire enable
  input  logic d,            // detonation
  output logic ok,           // property holds at this step (spike)
  output logic launch_seen,  // P{9} rise(l): antecedent
  output logic fire_ok       // O[0,4](P{5} rise(f) AND H[0,5] NOT d)
);

  localparam int NEURONS = 46;

  logic rise_l, rise_f, rise_f_d5, not_d, no_det, window_ok;

  tn_rise                       u_rise_l  (.clk, .rst_n, .tick, .phi(l), .y(rise_l));
  tn_punctual_once #(.A(9))     u_p9      (.clk, .rst_n, .tick, .phi(rise_l), .y(launch_seen));

  tn_rise                       u_rise_f  (.clk, .rst_n, .tick, .phi(f), .y(rise_f));
  tn_punctual_once #(.A(5))     u_p5      (.clk, .rst_n, .tick, .phi(rise_f), .y(rise_f_d5));

  tn_logic #(.OP(OP_NOT))       u_not_d   (.clk, .rst_n, .tick, .a(d), .b(1'b0), .y(not_d));
  tn_bounded_hist #(.A(5))      u_h5      (.clk, .rst_n, .tick, .phi(not_d), .phi_n(d), .y(no_det));

  tn_logic #(.OP(OP_AND))       u_and     (.clk, .rst_n, .tick, .a(rise_f_d5), .b(no_det), .y(window_ok));
  tn_bounded_once #(.A(4))      u_o4      (.clk, .rst_n, .tick, .phi(window_ok), .y(fire_ok));

  tn_logic #(.OP(OP_IMPL))      u_impl    (.clk, .rst_n, .tick, .a(launch_seen), .b(fire_ok), .y(ok));

endmodule
