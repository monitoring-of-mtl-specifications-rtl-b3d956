// tn_rise: rising edge, y = phi AND previous(NOT phi), in four neurons:
// a NOT neuron, a two-neuron Previous operator and an AND neuron. At
// t = 0 the Previous output is false, so no edge is reported at step 0.
//
// Timing: y is combinational in phi within a step; state advances on tick.
module tn_rise
  import tn_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic tick,
  input  logic phi,
  output logic y
);

  localparam int NEURONS = 4;

  logic not_phi, prev_not_phi;

  tn_logic #(.OP(OP_NOT)) u_not (.clk, .rst_n, .tick, .a(phi), .b(1'b0), .y(not_phi));
  tn_prev                 u_prev (.clk, .rst_n, .tick, .phi(not_phi), .y(prev_not_phi));
  tn_logic #(.OP(OP_AND)) u_and (.clk, .rst_n, .tick, .a(phi), .b(prev_not_phi), .y(y));

endmodule
