// tn_once: the Once operator (y(t) = phi held at some step 0..t) as one
// TrueNorth neuron. Leak 0 keeps the neuron from forgetting; the input
// weight 7 crosses alpha = 4 on the first phi, and reset mode 0 with
// R = 5 > alpha makes the neuron fire on every later step. Parameters are
// those of the temporal-tester table.
//
// Timing: y is combinational in phi within a step; state advances on tick.
module tn_once
  import tn_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic tick,
  input  logic phi,
  output logic y
);

  localparam int NEURONS = 1;

  logic  n_q;
  vmem_t n_v;

  tn_neuron #(.N_AXONS(1)) u_n (
    .clk, .rst_n, .tick,
    .cfg(cfg_once()), .conn(1'b1), .gtype(2'd0), .axon(phi),
    .spike(y), .spike_q(n_q), .v(n_v)
  );

endmodule
