// tn_logic: a two-input Boolean operator computed by one TrueNorth neuron.
//
// The neuron is made memoryless: every step it either crosses alpha = 1
// (spike, V reset to R = 0), falls below beta = -1 (negative reset to
// -R = 0) or lands exactly on 0, so each step starts from V = 0 and the
// spike is a pure function of the inputs. Weights, leak and beta per
// operator (AND, OR, NOT, NOR, NAND, implication) follow the logic-operator
// table, in tn_pkg::cfg_logic; alpha = 1 is this design's choice where the
// table leaves it open, and the implication's leak is corrected (see
// tn_pkg). For OP_IMPL the
// output is a -> b; for OP_NOT only `a` is used.
//
// Timing: y is combinational in a and b within a time step (it only depends
// on the state reset to 0 each step); the neuron's state advances on tick.
module tn_logic
  import tn_pkg::*;
#(
  parameter logic_op_e OP = OP_AND
) (
  input  logic clk,
  input  logic rst_n,
  input  logic tick,
  input  logic a,
  input  logic b,
  output logic y
);

  localparam int NEURONS = 1;

  logic [1:0] axon;
  logic       unused_q;
  vmem_t      unused_v;

  // Axon 0 has type 0 (weight s0), axon 1 type 1 (weight s1). For the
  // implication the antecedent sits on the negative weight s1.
  assign axon = (OP == OP_IMPL) ? {a, b} : {b, a};

  tn_neuron #(.N_AXONS(2)) u_n (
    .clk, .rst_n, .tick,
    .cfg    (cfg_logic(OP)),
    .conn   ((OP == OP_NOT) ? 2'b01 : 2'b11),
    .gtype  ({2'd1, 2'd0}),
    .axon   (axon),
    .spike  (y),
    .spike_q(unused_q),
    .v      (unused_v)
  );

endmodule
