// tn_monitor_top: top level. Two independent parts stand side by side,
// sharing only clock, reset and the time-step strobe:
//   - missile_demo: the 46-neuron missile-launch monitor with its signal
//     generator, fault injection, registered verdict and violation count;
//   - tn_operator_bank: the remaining neural temporal testers on two
//     general inputs p and q, for reuse and observation.
// See the two modules for their interfaces. One time step per cycle with
// tick = 1; all verdicts refer to the step being taken.
module tn_monitor_top
  import tn_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        tick,
  // missile demonstrator
  input  logic [1:0]  scenario,
  input  logic        use_ext,
  input  logic        ext_l,
  input  logic        ext_f,
  input  logic        ext_d,
  output logic        l,
  output logic        f,
  output logic        d,
  output logic        launch_seen,
  output logic        fire_ok,
  output logic        period_start,
  output logic        ok_q,
  output logic        ok_valid,
  output logic [15:0] violations,
  // operator bank
  input  logic        p,
  input  logic        q,
  output bank_out_t   bank_y
);

  missile_demo u_demo (
    .clk, .rst_n, .tick, .scenario, .use_ext, .ext_l, .ext_f, .ext_d,
    .l, .f, .d, .launch_seen, .fire_ok, .period_start,
    .ok_q, .ok_valid, .violations
  );

  tn_operator_bank u_bank (.clk, .rst_n, .tick, .p, .q, .y(bank_y));

endmodule
