// tn_hist_interval: Historically over a delayed interval [A,B],
// y(t) = phi held at every step of [t-B, t-A], built from the identity
//   H[A,B] phi = P{A} H[0,B-A] phi:
// a bounded-Historically neuron over [0,B-A] followed by a punctual Once
// (a chain of A Previous operators), 1 + 2A neurons. Like its parts, y is
// false until the whole interval lies inside the history. A and B have no
// values in the source; the defaults are this design's choice.
//
// Timing: y depends only on stored state when A > 0; the inputs are taken
// in on each tick.
module tn_hist_interval
  import tn_pkg::*;
#(
  parameter int A = 2,
  parameter int B = 5
) (
  input  logic clk,
  input  logic rst_n,
  input  logic tick,
  input  logic phi,
  input  logic phi_n,
  output logic y
);

  localparam int NEURONS = 1 + 2 * A;

  logic h;

  tn_bounded_hist #(.A(B - A)) u_hist (.clk, .rst_n, .tick, .phi, .phi_n, .y(h));
  tn_punctual_once #(.A(A))    u_dly  (.clk, .rst_n, .tick, .phi(h), .y);

endmodule
