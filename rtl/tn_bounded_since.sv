// tn_bounded_since: bounded Since over [0,B], y = phi1 S[0,B] phi2, in
// eleven neurons, using the rewriting
//   phi1 S[0,B] phi2 = (phi1 S phi2) AND once[0,B] phi2:
// a Since tester (4 neurons), a bounded Once tester (6) and an AND neuron.
// The interval bound has no value in the source; B = 4 is this design's
// default.
//
// Timing: y is combinational in the inputs within a step; state advances
// on tick.
module tn_bounded_since
  import tn_pkg::*;
#(
  parameter int B = 4
) (
  input  logic clk,
  input  logic rst_n,
  input  logic tick,
  input  logic phi1,
  input  logic phi2,
  output logic y
);

  localparam int NEURONS = 11;

  logic s_unb, o_bnd;

  tn_since                  u_since (.clk, .rst_n, .tick, .phi1, .phi2, .y(s_unb));
  tn_bounded_once #(.A(B))  u_once  (.clk, .rst_n, .tick, .phi(phi2), .y(o_bnd));
  tn_logic #(.OP(OP_AND))   u_and   (.clk, .rst_n, .tick, .a(s_unb), .b(o_bnd), .y(y));

endmodule
