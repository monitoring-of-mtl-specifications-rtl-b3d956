// tn_bounded_hist: bounded Historically over [0,A], y(t) = phi held at
// every step of [t-A, t], as one TrueNorth neuron fed by phi and its
// inverse phi_n. In non-reset mode the potential counts consecutive phi
// steps (weight 1, leak 0); phi_n, with the most negative weight, drives it
// below beta = 0 where it saturates back to 0. The neuron spikes once the
// count reaches alpha. The tester table sets alpha = A; since the interval
// [t-A, t] holds A+1 steps, this design uses alpha = A+1. The potential
// saturates at its maximum, so long runs of phi keep the neuron firing.
// Before step A the history is too short and y is false.
//
// Timing: y is combinational in the inputs within a step; state advances
// on tick.
module tn_bounded_hist
  import tn_pkg::*;
#(
  parameter int A = 5
) (
  input  logic clk,
  input  logic rst_n,
  input  logic tick,
  input  logic phi,
  input  logic phi_n,
  output logic y
);

  localparam int NEURONS = 1;

  logic  n_q;
  vmem_t n_v;

  tn_neuron #(.N_AXONS(2)) u_n (
    .clk, .rst_n, .tick,
    .cfg(cfg_bounded_hist(A)), .conn(2'b11), .gtype({2'd1, 2'd0}),
    .axon({phi_n, phi}),
    .spike(y), .spike_q(n_q), .v(n_v)
  );

endmodule
