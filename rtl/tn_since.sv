// tn_since: the Since operator, y = phi1 S phi2 (phi2 held at some step k
// <= t and phi1 at every step after k up to t), in four neurons. It uses
// the recursion y(t) = phi2(t) OR (phi1(t) AND y(t-1)), with y(-1) false:
// an AND neuron, an OR neuron and a two-neuron Previous operator feeding
// the OR output back to the AND one step later.
//
// Timing: y is combinational in the inputs within a step; the loop is
// broken by the Previous operator's stored spike; state advances on tick.
module tn_since
  import tn_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic tick,
  input  logic phi1,
  input  logic phi2,
  output logic y
);

  localparam int NEURONS = 4;

  logic y_prev, keep;

  tn_prev                 u_prev (.clk, .rst_n, .tick, .phi(y), .y(y_prev));
  tn_logic #(.OP(OP_AND)) u_and  (.clk, .rst_n, .tick, .a(phi1), .b(y_prev), .y(keep));
  tn_logic #(.OP(OP_OR))  u_or   (.clk, .rst_n, .tick, .a(phi2), .b(keep), .y(y));

endmodule
