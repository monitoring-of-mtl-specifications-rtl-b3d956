// tn_punctual_once: the punctual Once operator over {A}, y(t) = phi(t-A),
// false for t < A, built as a chain of A Previous operators (2A neurons).
// A = 0 is the identity. The default A = 9 is the first punctual operator
// of the missile monitor.
//
// Timing: y depends only on stored state; phi is taken in on each tick.
module tn_punctual_once
  import tn_pkg::*;
#(
  parameter int A = 9
) (
  input  logic clk,
  input  logic rst_n,
  input  logic tick,
  input  logic phi,
  output logic y
);

  localparam int NEURONS = 2 * A;

  logic [A:0] chain;
  assign chain[0] = phi;

  for (genvar k = 0; k < A; k++) begin : g_stage
    tn_prev u_prev (.clk, .rst_n, .tick, .phi(chain[k]), .y(chain[k+1]));
  end

  assign y = chain[A];

endmodule
