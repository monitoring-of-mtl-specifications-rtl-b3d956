// tn_pkg: types, widths and operator configurations shared by the
// deterministic TrueNorth neuron and the MTL temporal testers built from it.
//
// A neuron's configuration (tn_cfg_t) holds the four axon-type weights s[G],
// the leak lambda, the positive threshold alpha, the signed negative
// threshold beta, the reset value R, the reset mode gamma, the leak-reversal
// flag epsilon and the saturation flag kappa. The stochastic flags of the
// full TrueNorth model (b, c and the threshold mask M) are not carried: the
// hardware here is the deterministic model, so they are all zero.
//
// Field widths follow the published TrueNorth neuron (9-bit signed weights
// and leak, 18-bit thresholds and reset value, 20-bit membrane potential);
// they are this design's choice, as is alpha = 1 of the logic neurons,
// which the operator table leaves open (beta = -1 follows the table). The functions at the end
// return the configuration of each operator neuron.
package tn_pkg;

  localparam int W_S  = 9;   // synaptic weight width (signed)
  localparam int W_L  = 9;   // leak width (signed)
  localparam int W_TH = 18;  // threshold / reset value width (signed)
  localparam int W_V  = 20;  // membrane potential width (signed)

  typedef logic signed [W_S-1:0]  weight_t;
  typedef logic signed [W_L-1:0]  leak_t;
  typedef logic signed [W_TH-1:0] th_t;
  typedef logic signed [W_V-1:0]  vmem_t;

  // Most negative synaptic weight ("INT_MIN" of the tester tables).
  localparam weight_t S_MIN = weight_t'(-(2 ** (W_S - 1)));
  localparam vmem_t   V_MAX = vmem_t'((2 ** (W_V - 1)) - 1);
  localparam vmem_t   V_MIN = vmem_t'(-(2 ** (W_V - 1)));

  // Reset modes (gamma). Mode 3 is unused and behaves as NONE.
  typedef enum logic [1:0] {
    RST_TO_R   = 2'd0,  // V <- R (positive) / -R (negative)
    RST_LINEAR = 2'd1,  // V <- V - alpha (positive) / V - beta (negative)
    RST_NONE   = 2'd2   // V kept
  } reset_mode_e;

  typedef struct packed {
    weight_t [3:0] s;       // weight per axon type G = 0..3
    leak_t         lambda;  // leak
    th_t           alpha;   // positive threshold: spike when V >= alpha
    th_t           beta;    // negative threshold (signed): reset when V < beta
    th_t           r;       // reset value R
    reset_mode_e   gamma;   // reset mode
    logic          epsilon; // leak reversal
    logic          kappa;   // saturate at beta instead of negative reset
  } tn_cfg_t;

  // Two-input logic neurons of the operator table.
  typedef enum logic [2:0] {
    OP_AND, OP_OR, OP_NOT, OP_NOR, OP_NAND, OP_IMPL
  } logic_op_e;

  // Outputs of the operator bank (tn_operator_bank), one per tester.
  typedef struct packed {
    logic prev;      // previous p
    logic rise;      // rising edge of p
    logic once;      // once q
    logic ponce;     // punctual once {9} p
    logic bonce;     // bounded once [0,4] q
    logic hist;      // historically p
    logic bhist;     // bounded historically [0,5] p
    logic hist_ab;   // historically [2,5] p
    logic since;     // p since q
    logic bsince;    // p since[0,4] q
  } bank_out_t;

  // Common base: memoryless neuron, reset mode 0 with R = 0.
  function automatic tn_cfg_t cfg_base();
    tn_cfg_t c;
    c.s       = '0;
    c.lambda  = '0;
    c.alpha   = th_t'(1);
    c.beta    = th_t'(0);
    c.r       = th_t'(0);
    c.gamma   = RST_TO_R;
    c.epsilon = 1'b0;
    c.kappa   = 1'b0;
    return c;
  endfunction

  // Logic neuron: axon type 0 carries input 0, type 1 input 1. alpha = 1,
  // beta = -1, R = 0: every "no spike" input combination ends at or below
  // 0, where it is either reset to 0 or already 0.
  // For OP_IMPL, input 1 is the antecedent and input 0 the consequent.
  function automatic tn_cfg_t cfg_logic(logic_op_e op);
    tn_cfg_t c = cfg_base();
    c.beta = th_t'(-1);
    case (op)
      OP_AND:  begin c.s[0] = 9;  c.s[1] = 9;  c.lambda = -14; end
      OP_OR:   begin c.s[0] = 9;  c.s[1] = 9;  c.lambda = -5;  end
      OP_NOT:  begin c.s[0] = -4; c.s[1] = 0;  c.lambda = 4;   end
      OP_NOR:  begin c.s[0] = -9; c.s[1] = -9; c.lambda = 4;   end
      OP_NAND: begin c.s[0] = -9; c.s[1] = -9; c.lambda = 13;  end
      default: begin c.s[0] = 9;  c.s[1] = -9; c.lambda = 4;   end
    endcase
    return c;
  endfunction

  // Once: fire on the first input spike, then keep firing (V reset to R > alpha).
  function automatic tn_cfg_t cfg_once();
    tn_cfg_t c = cfg_base();
    c.s[0] = 7; c.alpha = 4; c.beta = -4; c.r = 5;
    return c;
  endfunction

  // Previous (each of its two neurons): identity neuron.
  function automatic tn_cfg_t cfg_identity();
    tn_cfg_t c = cfg_base();
    c.s[0] = 1;
    return c;
  endfunction

  // Historically: type 0 = phi (weight 0), type 1 = not phi (weight -18).
  function automatic tn_cfg_t cfg_historically();
    tn_cfg_t c = cfg_base();
    c.s[0] = 0; c.s[1] = -18; c.lambda = 4; c.alpha = 4; c.beta = -4; c.r = 9;
    return c;
  endfunction

  // Bounded historically over [0,a]: counts consecutive phi steps, type 1
  // (not phi) saturates the count back to 0. Spikes after a+1 steps.
  function automatic tn_cfg_t cfg_bounded_hist(int a);
    tn_cfg_t c = cfg_base();
    c.s[0] = 1; c.s[1] = S_MIN; c.alpha = th_t'(a + 1); c.beta = 0;
    c.gamma = RST_NONE; c.kappa = 1'b1;
    return c;
  endfunction

  // Bounded-once core: type 0 = phi (clears the count), type 1 = falling
  // edge of phi (loads a+1), leak -1 counts down, spikes while V >= 1.
  function automatic tn_cfg_t cfg_bounded_once_core(int a);
    tn_cfg_t c = cfg_base();
    c.s[0] = S_MIN; c.s[1] = weight_t'(a + 1); c.lambda = -1; c.alpha = 1; c.beta = 0;
    c.gamma = RST_NONE; c.kappa = 1'b1;
    return c;
  endfunction

endpackage
