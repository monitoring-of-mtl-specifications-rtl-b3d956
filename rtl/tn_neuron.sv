// tn_neuron: one deterministic TrueNorth spiking neuron.
//
// Each time step (a cycle with tick = 1) the neuron
//   1. integrates: V += sum over connected, active axons i of s[G_i],
//      where G_i in 0..3 is the axon's type and s[] the per-type weight;
//   2. leaks: V += Omega * lambda, with Omega = 1, or sgn(V) when leak
//      reversal (epsilon) is set, so that V then does not leak at 0;
//   3. thresholds: if V >= alpha it spikes and resets by gamma
//      (0: V = R, 1: V = V - alpha, 2: V kept); else if V < beta it
//      does not spike and either saturates at beta (kappa = 1) or resets by
//      gamma (0: V = -R, 1: V = V - beta, 2: V kept).
// This is the deterministic part of the TrueNorth model; the stochastic
// synapse, leak and threshold modes are not implemented.
//
// Timing: `spike` is combinational. It is the neuron's output for the
// current time step, computed from the stored potential V(t-1) and the
// axon inputs of step t, so neurons chained in one step behave like the
// topologically ordered evaluation of a software model. On the clock edge
// with tick = 1, V takes the post-reset value and `spike_q` the step's
// spike; `spike_q` is the neuron's output of the previous step, which is what
// a neuron evaluated earlier in the step order sees. Without tick nothing
// changes. Reset (rst_n low, asynchronous) clears V and spike_q to 0.
//
// Design choices beyond the model equations: beta is a signed threshold
// (negative reset when V < beta), intermediate sums are wide and V saturates
// at the limits of its W_V-bit range, and the per-neuron configuration
// (weights, types, connectivity) arrives on ports so that it can be either
// constant or loaded at run time.
module tn_neuron
  import tn_pkg::*;
#(
  parameter int N_AXONS = 255
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     tick,                 // advance one time step
  input  tn_cfg_t                  cfg,                  // neuron parameters
  input  logic [N_AXONS-1:0]       conn,                 // w_ij: axon i connected
  input  logic [N_AXONS-1:0][1:0]  gtype,                // G_i: type of axon i
  input  logic [N_AXONS-1:0]       axon,                 // A_i(t): spikes in
  output logic                     spike,                // spike of step t
  output logic                     spike_q,              // spike of step t-1
  output vmem_t                    v                     // stored potential
);

  localparam int W_ACC = W_V + 16;
  typedef logic signed [W_ACC-1:0] acc_t;

  acc_t syn_sum, v_int, v_leak, v_next_wide;
  acc_t alpha_w, beta_w, r_w;
  logic neg;
  vmem_t v_next;

  always_comb begin
    syn_sum = '0;
    for (int i = 0; i < N_AXONS; i++) begin
      if (conn[i] && axon[i])
        syn_sum = syn_sum + acc_t'(cfg.s[gtype[i]]);
    end
  end

  always_comb begin
    alpha_w = acc_t'(cfg.alpha);
    beta_w  = acc_t'(cfg.beta);
    r_w     = acc_t'(cfg.r);
    v_int   = acc_t'(v) + syn_sum;
    // Leak, with leak reversal: Omega = sgn(V) makes the leak divergent
    // or convergent depending on the sign of lambda; no leak at V = 0.
    if (!cfg.epsilon)
      v_leak = v_int + acc_t'(cfg.lambda);
    else if (v_int > 0)
      v_leak = v_int + acc_t'(cfg.lambda);
    else if (v_int < 0)
      v_leak = v_int - acc_t'(cfg.lambda);
    else
      v_leak = v_int;

    spike = 1'b0;
    neg   = 1'b0;
    v_next_wide = v_leak;
    if (v_leak >= alpha_w) begin
      spike = 1'b1;
      case (cfg.gamma)
        RST_TO_R:   v_next_wide = r_w;
        RST_LINEAR: v_next_wide = v_leak - alpha_w;
        default:    v_next_wide = v_leak;
      endcase
    end else if (v_leak < beta_w) begin
      neg = 1'b1;
      if (cfg.kappa)
        v_next_wide = beta_w;
      else begin
        case (cfg.gamma)
          RST_TO_R:   v_next_wide = -r_w;
          RST_LINEAR: v_next_wide = v_leak - beta_w;
          default:    v_next_wide = v_leak;
        endcase
      end
    end

    if (v_next_wide > acc_t'(V_MAX))
      v_next = V_MAX;
    else if (v_next_wide < acc_t'(V_MIN))
      v_next = V_MIN;
    else
      v_next = vmem_t'(v_next_wide);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v       <= '0;
      spike_q <= 1'b0;
    end else if (tick) begin
      v       <= v_next;
      spike_q <= spike;
    end
  end

  // A spike and a negative reset exclude each other within a step.
  always_comb assert (!(spike && neg));

endmodule
