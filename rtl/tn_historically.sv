// tn_historically: the Historically operator, y(t) = phi held at every step
// 0..t, as one TrueNorth neuron fed by phi and by its inverse phi_n (which a
// NOT neuron outside this tester normally supplies). Parameters are those of
// the temporal-tester table: weights 0 (phi) and -18 (phi_n), leak 4,
// alpha 4, beta -4, reset mode 0 with R = 9. While phi holds, V sits at
// R = 9 and every step crosses alpha; the first phi_n drives V below beta,
// after which V stays at -R = -9 and can never reach alpha again.
//
// Timing: y is combinational in the inputs within a step; state advances
// on tick.
module tn_historically
  import tn_pkg::*;
(
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
    .cfg(cfg_historically()), .conn(2'b11), .gtype({2'd1, 2'd0}),
    .axon({phi_n, phi}),
    .spike(y), .spike_q(n_q), .v(n_v)
  );

endmodule
