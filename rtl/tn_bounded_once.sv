// tn_bounded_once: bounded Once over [0,A], y(t) = phi held at some step
// in [t-A, t], in six TrueNorth neurons.
//
// Four neurons detect the last satisfaction of phi, the falling edge
// fall = NOT phi AND previous(phi) (a NOT neuron, a two-neuron Previous and
// an AND neuron). A "core" neuron in non-reset mode counts the steps since
// that edge: the edge input (weight A+1) loads the potential, leak -1 counts
// it down, and it spikes while V >= 1, i.e. on the A steps after the last
// phi. Its phi input has the most negative weight so that phi clears the
// count (saturation at beta = 0). An OR neuron joins phi and the core
// output. The tester table prints the edge weight as A; with leak -1 and
// alpha = 1 that yields only A-1 spikes after the edge, so this design
// loads A+1 to give the A steps the operator's semantics require.
//
// Timing: y is combinational in phi within a step; state advances on tick.
module tn_bounded_once
  import tn_pkg::*;
#(
  parameter int A = 4
) (
  input  logic clk,
  input  logic rst_n,
  input  logic tick,
  input  logic phi,
  output logic y
);

  localparam int NEURONS = 6;

  logic  not_phi, prev_phi, fall, core;
  logic  core_q;
  vmem_t core_v;

  tn_logic #(.OP(OP_NOT)) u_not  (.clk, .rst_n, .tick, .a(phi), .b(1'b0), .y(not_phi));
  tn_prev                 u_prev (.clk, .rst_n, .tick, .phi(phi), .y(prev_phi));
  tn_logic #(.OP(OP_AND)) u_and  (.clk, .rst_n, .tick, .a(not_phi), .b(prev_phi), .y(fall));

  tn_neuron #(.N_AXONS(2)) u_core (
    .clk, .rst_n, .tick,
    .cfg(cfg_bounded_once_core(A)), .conn(2'b11), .gtype({2'd1, 2'd0}),
    .axon({fall, phi}),
    .spike(core), .spike_q(core_q), .v(core_v)
  );

  tn_logic #(.OP(OP_OR))  u_or   (.clk, .rst_n, .tick, .a(phi), .b(core), .y(y));

endmodule
