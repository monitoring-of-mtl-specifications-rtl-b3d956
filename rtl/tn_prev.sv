// tn_prev: the Previous operator (y(t) = phi(t-1), false at t = 0) built
// from two identity neurons, as in the temporal-tester construction: n1
// copies phi in the current step, and n2, evaluated ahead of n1 in the
// step order, reads n1's spike of the previous step (its registered
// spike_q). Both neurons use weight 1, alpha = 1, beta = 0, reset to R = 0.
//
// Timing: y is the output for the current step and depends only on stored
// state; phi is taken in on each tick.
module tn_prev
  import tn_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic tick,
  input  logic phi,
  output logic y
);

  localparam int NEURONS = 2;

  logic  n1_spike, n1_q, n2_q;
  vmem_t n1_v, n2_v;

  tn_neuron #(.N_AXONS(1)) u_n1 (
    .clk, .rst_n, .tick,
    .cfg(cfg_identity()), .conn(1'b1), .gtype(2'd0), .axon(phi),
    .spike(n1_spike), .spike_q(n1_q), .v(n1_v)
  );

  tn_neuron #(.N_AXONS(1)) u_n2 (
    .clk, .rst_n, .tick,
    .cfg(cfg_identity()), .conn(1'b1), .gtype(2'd0), .axon(n1_q),
    .spike(y), .spike_q(n2_q), .v(n2_v)
  );

endmodule
