// srm_neuron: spike response model neuron.
//
// The potential integrates the input current plus two kernels: eta, the
// response to the neuron's own past spikes, and eps, the postsynaptic
// response to incoming spikes. Both kernels decay geometrically by shifting:
//     V   <- V + ( -V + I + eta + eps ) >>> TAU_S
//     eta <- eta - (eta >>> ETA_S) + (own spike      ? ETA_SPIKE : 0)
//     eps <- eps - (eps >>> EPS_S) + (spike_in high  ? EPS_SPIKE : 0)
// Kernels are updated on every step, from the previous values; V is held
// during the refractory period (neuron_fsm). Because the decay is a floor
// shift, a kernel stops decaying once it is below 2^shift.
//
// Interface and timing are those of lif_neuron plus 'spike_in', a presynaptic
// spike sampled in step cycles, and the kernel outputs 'eta' and 'eps'.
//
// Equations and defaults (eta_spike = 10, eps_spike = 5, kernel time
// constants 8, V_th = -64, V_reset = -70, V0 = -64) follow the source design;
// the listed tau = 3 is used as the shift. Zero initial kernels, width,
// saturation and refractory length are this design's choices.
module srm_neuron
  import snn_pkg::*;
#(
  parameter int unsigned WIDTH     = 16,
  parameter int unsigned T_REF     = 2,
  parameter int unsigned TAU_S     = 3,
  parameter int unsigned ETA_S     = 3,
  parameter int unsigned EPS_S     = 3,
  parameter int          ETA_SPIKE = 10,
  parameter int          EPS_SPIKE = 5,
  parameter int          V_TH      = -64,
  parameter int          V_RESET   = -70,
  parameter int          V0        = -64
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    step,
  input  logic signed [WIDTH-1:0] i_in,
  input  logic                    spike_in,
  output logic signed [WIDTH-1:0] eta,
  output logic signed [WIDTH-1:0] eps,
  output logic                    spike,
  output logic signed [WIDTH-1:0] v,
  output neuron_state_e           state
);

  logic signed [WIDTH-1:0] v_q, eta_q, eps_q;
  acc_t v_cur, eta_cur, eps_cur, dv, v_new, eta_new, eps_new;
  logic at_th, integrate, fire;

  always_comb begin
    v_cur   = acc_t'(v_q);
    eta_cur = acc_t'(eta_q);
    eps_cur = acc_t'(eps_q);
    dv      = (-v_cur + acc_t'(i_in) + eta_cur + eps_cur) >>> TAU_S;
    v_new   = sat_to(v_cur + dv, WIDTH);
    at_th   = (v_new >= acc_t'(V_TH));
    eta_new = sat_to(eta_cur - (eta_cur >>> ETA_S) + (fire ? acc_t'(ETA_SPIKE) : acc_t'(0)), WIDTH);
    eps_new = sat_to(eps_cur - (eps_cur >>> EPS_S) + (spike_in ? acc_t'(EPS_SPIKE) : acc_t'(0)), WIDTH);
  end

  neuron_fsm #(.T_REF(T_REF)) u_fsm (
    .clk, .rst_n, .step, .at_th, .integrate, .fire, .spike, .state
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      v_q   <= WIDTH'(V0);
      eta_q <= '0;
      eps_q <= '0;
    end else begin
      if (fire)           v_q <= WIDTH'(V_RESET);
      else if (integrate) v_q <= v_new[WIDTH-1:0];
      if (step) begin
        eta_q <= eta_new[WIDTH-1:0];
        eps_q <= eps_new[WIDTH-1:0];
      end
    end
  end

  assign v   = v_q;
  assign eta = eta_q;
  assign eps = eps_q;

endmodule
