// tb_tn_neuron: self-checking test of the deterministic TrueNorth neuron at
// its full size (255 axons). Random configurations (weights, leak with and
// without leak reversal, thresholds, all reset modes, saturation) and random
// axon activity, connectivity and axon types are applied; each step's spike
// and the next membrane potential are compared with an integer reference
// model of the neuron equations written here. Steps without tick must leave
// the state unchanged. Mechanisms (positive spike per reset mode, negative
// reset per mode, saturation, leak reversal) are counted and must all occur.
module tb_tn_neuron;
  import tn_pkg::*;

  localparam int N = 255;

  logic clk = 1'b0, rst_n = 1'b0, tick = 1'b0;
  tn_cfg_t cfg;
  logic [N-1:0] conn, axon;
  logic [N-1:0][1:0] gtype;
  logic spike, spike_q;
  vmem_t v;

  int checks = 0, failures = 0;
  int n_pos[3], n_neg[3], n_sat = 0, n_rev = 0;

  tn_neuron dut (.*);  // default size: 255 axons

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint clamp(longint x);
    if (x > longint'(V_MAX)) return longint'(V_MAX);
    if (x < longint'(V_MIN)) return longint'(V_MIN);
    return x;
  endfunction

  // Reference step: returns the spike, sets vn to the next potential.
  function automatic bit ref_step(longint vin, output longint vn, output int kind);
    longint acc, lam;
    bit sp;
    acc = vin;
    for (int i = 0; i < N; i++)
      if (conn[i] && axon[i]) acc += longint'(cfg.s[gtype[i]]);
    lam = longint'(cfg.lambda);
    if (!cfg.epsilon) acc += lam;
    else if (acc > 0) acc += lam;
    else if (acc < 0) acc -= lam;
    sp = 0; kind = 0;
    vn = acc;
    if (acc >= longint'(cfg.alpha)) begin
      sp = 1; kind = 1;
      if (cfg.gamma == RST_TO_R) vn = longint'(cfg.r);
      else if (cfg.gamma == RST_LINEAR) vn = acc - longint'(cfg.alpha);
    end else if (acc < longint'(cfg.beta)) begin
      kind = 2;
      if (cfg.kappa) begin vn = longint'(cfg.beta); kind = 3; end
      else if (cfg.gamma == RST_TO_R) vn = -longint'(cfg.r);
      else if (cfg.gamma == RST_LINEAR) vn = acc - longint'(cfg.beta);
    end
    vn = clamp(vn);
    return sp;
  endfunction

  task automatic new_cfg();
    for (int g = 0; g < 4; g++) cfg.s[g] = weight_t'($urandom_range(0, 40)) - weight_t'(20);
    if ($urandom_range(0, 9) == 0) cfg.s[$urandom_range(0, 3)] = S_MIN;
    cfg.lambda  = leak_t'($urandom_range(0, 20)) - leak_t'(10);
    cfg.alpha   = th_t'($urandom_range(1, 60));
    cfg.beta    = -th_t'($urandom_range(0, 60));
    cfg.r       = th_t'($urandom_range(0, 60));
    cfg.gamma   = reset_mode_e'($urandom_range(0, 2));
    cfg.epsilon = 1'($urandom_range(0, 1));
    cfg.kappa   = ($urandom_range(0, 3) == 0);
    for (int i = 0; i < N; i++) begin
      conn[i]  = ($urandom_range(0, 15) == 0);
      gtype[i] = 2'($urandom_range(0, 3));
    end
  endtask

  longint vref, vn;
  bit sp_exp;
  int kind;

  initial begin
    new_cfg();
    axon = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    vref = 0;
    for (int t = 0; t < 6000; t++) begin
      @(negedge clk);
      if (t % 200 == 0) new_cfg();
      for (int i = 0; i < N; i++) axon[i] = ($urandom_range(0, 2) == 0);
      tick = ($urandom_range(0, 7) != 0);
      #1;
      sp_exp = ref_step(vref, vn, kind);
      checks++;
      if (spike !== sp_exp || longint'(v) != vref) begin
        failures++;
        if (failures < 10)
          $display("t=%0d spike=%b exp=%b v=%0d exp=%0d", t, spike, sp_exp, v, vref);
      end
      if (tick) begin
        if (kind == 1) n_pos[cfg.gamma]++;
        if (kind == 2) n_neg[cfg.gamma]++;
        if (kind == 3) n_sat++;
        if (cfg.epsilon && vref != 0) n_rev++;
        vref = vn;
      end
      @(posedge clk);
      #1;
      checks++;
      if (tick && spike_q !== sp_exp) begin
        failures++;
        $display("t=%0d spike_q=%b exp=%b", t, spike_q, sp_exp);
      end
    end
    for (int g = 0; g < 3; g++) begin
      checks += 2;
      if (n_pos[g] == 0) begin failures++; $display("no positive reset mode %0d", g); end
      if (n_neg[g] == 0) begin failures++; $display("no negative reset mode %0d", g); end
    end
    checks += 2;
    if (n_sat == 0) begin failures++; $display("no saturation"); end
    if (n_rev == 0) begin failures++; $display("no leak reversal"); end
    $display("pos=%0d/%0d/%0d neg=%0d/%0d/%0d sat=%0d rev=%0d",
             n_pos[0], n_pos[1], n_pos[2], n_neg[0], n_neg[1], n_neg[2], n_sat, n_rev);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
