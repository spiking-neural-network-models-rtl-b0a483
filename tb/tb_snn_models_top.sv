// tb_snn_models_top: end-to-end testbench for the nine-model array, at the
// default parameters.
//
// Phase A reproduces the comparison run of the source design: every model gets
// the same constant current I = 50 and one time step per clock. Phase B keeps
// the current but gates the step strobe randomly. Phase C resets the array and
// runs it without input: the Hodgkin-Huxley neuron, which rests near its leak
// reversal potential, must then stay silent. Phase D pulses the SRM
// presynaptic input. Throughout, each cycle is checked against rules worked
// out from the model definitions rather than taken from the RTL:
//   - a spike lasts one step, shows the FIRING state and the model's reset
//     potential;
//   - a model outside IDLE does not change its potential (refractory hold);
//   - nothing changes in a cycle without a step;
//   - IF-SFA and AdEx add b = 8 to w, Izhikevich adds d = 8 to U, in the
//     firing step, on top of their decay (formulas written out below);
//   - the SRM synaptic kernel grows by eps_spike = 5 per presynaptic spike;
//   - LIF fires every third step under I = 50 (worked by hand: -64 -> -50
//     fires, two held steps, -70 -> -55 fires again); HH and IZH fire at the
//     steps listed in HH_EXP and IZH_EXP.
// Every mechanism is counted and a failure is recorded for one never seen.
module tb_snn_models_top;
  import snn_pkg::*;

  localparam int W = 16;
  localparam int NA = 300, NB = 600, NC = 400, ND = 200;
  localparam int NCYC = NA + NB + NC + ND;
  localparam int RESET_V [NUM_MODELS] = '{-70, -70, -70, -70, -70, -70, -70, 0, -65};
  localparam string NAMES [NUM_MODELS] = '{"LIF", "NLIF", "IF-SFA", "QIF", "AdEx", "SRM",
                                           "Theta", "HH", "IZH"};

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic step = 1'b0;
  logic signed [W-1:0] i_in = '0;
  logic srm_spike_in = 1'b0;
  logic [NUM_MODELS-1:0] spikes;
  logic signed [W-1:0] v_all [NUM_MODELS];
  neuron_state_e states [NUM_MODELS];
  logic signed [W-1:0] ifsfa_w, adex_w, srm_eta, srm_eps, izh_u;
  logic [8:0] hh_m, hh_h, hh_n;

  snn_models_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;
  int n_spk [NUM_MODELS];
  int n_hold_ref [NUM_MODELS];
  // Spike steps in the first 30 steps at I = 50, worked out with an
  // independent integer model of each equation: HH from rest at -84 mV,
  // IZH from 0 mV (fires at once, then every fourth step).
  localparam logic [29:0] HH_EXP  = 30'((1 << 3) | (1 << 6) | (1 << 9) | (1 << 12) |
                                        (1 << 19) | (1 << 23) | (1 << 27));
  localparam logic [29:0] IZH_EXP = 30'h1111_1111;
  logic [29:0] hh_seen = '0, izh_seen = '0;
  int n_gated = 0, n_sfa = 0, n_adex = 0, n_izh = 0, n_syn = 0, n_rest = 0, n_lif_early = 0;

  // values seen one cycle earlier
  logic signed [W-1:0] p_v [NUM_MODELS];
  neuron_state_e p_st [NUM_MODELS];
  logic [NUM_MODELS-1:0] p_spk;
  longint p_w, p_aw, p_u, p_eps, p_eta;
  logic p_step, p_syn;

  task automatic chk(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures <= 15) $display("FAIL %s at %0t: got %0d expected %0d", what, $time, got, exp);
    end
  endtask

  task automatic sample();
    for (int k = 0; k < NUM_MODELS; k++) begin
      p_v[k]  = v_all[k];
      p_st[k] = states[k];
    end
    p_spk = spikes;
    p_w   = ifsfa_w;
    p_aw  = adex_w;
    p_u   = izh_u;
    p_eps = srm_eps;
    p_eta = srm_eta;
  endtask

  // Checks on the values produced by the edge just passed.
  task automatic check_cycle();
    if (!p_step) begin
      n_gated++;
      for (int k = 0; k < NUM_MODELS; k++) begin
        chk({NAMES[k], " v held without step"}, v_all[k], p_v[k]);
        chk({NAMES[k], " state held without step"}, states[k], p_st[k]);
      end
      chk("IF-SFA w held without step", ifsfa_w, p_w);
      chk("IZH u held without step", izh_u, p_u);
      return;
    end
    for (int k = 0; k < NUM_MODELS; k++) begin
      if (spikes[k]) begin
        n_spk[k]++;
        chk({NAMES[k], " spike shows FIRING"}, states[k], ST_FIRING);
        chk({NAMES[k], " reset potential"}, v_all[k], RESET_V[k]);
        chk({NAMES[k], " spike lasts one step"}, p_spk[k], 0);
      end
      if (p_st[k] != ST_IDLE) begin
        n_hold_ref[k]++;
        chk({NAMES[k], " potential held outside IDLE"}, v_all[k], p_v[k]);
      end
    end
    // spike-triggered increments, together with one step of decay
    if (spikes[M_IFSFA]) begin
      n_sfa++;
      chk("IF-SFA w += b", ifsfa_w, p_w + ((-p_w) >>> 3) + 8);
    end
    if (spikes[M_ADEX]) begin
      n_adex++;
      chk("AdEx w += b", adex_w, p_aw + (((longint'(p_v[M_ADEX]) <<< 2) - p_aw) >>> 3) + 8);
    end
    if (spikes[M_IZH]) begin
      n_izh++;
      chk("IZH u += d", izh_u, p_u + (((longint'(p_v[M_IZH]) >>> 4) - p_u) >>> 1) + 8);
    end
    if (p_syn) begin
      n_syn++;
      chk("SRM eps += eps_spike", srm_eps, p_eps - (p_eps >>> 3) + 5);
    end
  endtask

  initial begin : watchdog
    repeat (NCYC + 200) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < NUM_MODELS; k++) begin
      n_spk[k] = 0;
      n_hold_ref[k] = 0;
    end
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    for (int c = 0; c < NCYC; c++) begin
      sample();
      // stimulus for the coming edge
      srm_spike_in = 1'b0;
      if (c < NA) begin
        step = 1'b1;
        i_in = 16'sd50;
      end else if (c < NA + NB) begin
        step = ($urandom_range(0, 1) == 1);
        i_in = 16'sd50;
      end else if (c < NA + NB + NC) begin
        step = 1'b1;
        i_in = '0;
      end else begin
        step = 1'b1;
        i_in = '0;
        srm_spike_in = ($urandom_range(0, 3) == 0);
      end
      p_step = step;
      p_syn  = srm_spike_in;
      if (c == NA + NB) begin
        // restart from rest before the no-input phase
        rst_n = 1'b0;
        @(negedge clk);
        rst_n = 1'b1;
        continue;
      end
      @(negedge clk);
      check_cycle();
      if (c < 30 && spikes[M_LIF]) n_lif_early++;
      if (c < 30) begin
        hh_seen[c]  = spikes[M_HH];
        izh_seen[c] = spikes[M_IZH];
      end
      if (c >= NA + NB + NC - 200 && c < NA + NB + NC) begin
        n_rest++;
        chk("HH at rest without input", spikes[M_HH], 0);
      end
    end

    chk("LIF spikes in the first 30 steps", n_lif_early, 10);
    chk("HH spike steps in the first 30 steps", hh_seen, HH_EXP);
    chk("IZH spike steps in the first 30 steps", izh_seen, IZH_EXP);
    for (int k = 0; k < NUM_MODELS; k++) begin
      $display("%-6s spikes=%0d refractory_holds=%0d", NAMES[k], n_spk[k], n_hold_ref[k]);
      checks++;
      if (n_spk[k] == 0)      begin failures++; $display("FAIL %s never fired", NAMES[k]); end
      checks++;
      if (n_hold_ref[k] == 0) begin failures++; $display("FAIL %s never refractory", NAMES[k]); end
    end
    $display("gated=%0d sfa=%0d adex=%0d izh_reset=%0d synaptic=%0d hh_rest=%0d",
             n_gated, n_sfa, n_adex, n_izh, n_syn, n_rest);
    checks++; if (n_gated == 0) begin failures++; $display("FAIL no gated cycle"); end
    checks++; if (n_sfa == 0)   begin failures++; $display("FAIL no IF-SFA adaptation"); end
    checks++; if (n_adex == 0)  begin failures++; $display("FAIL no AdEx adaptation"); end
    checks++; if (n_izh == 0)   begin failures++; $display("FAIL no IZH reset"); end
    checks++; if (n_syn == 0)   begin failures++; $display("FAIL no SRM synaptic input"); end
    checks++; if (n_rest == 0)  begin failures++; $display("FAIL no HH rest period"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
