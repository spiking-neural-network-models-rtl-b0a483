// snn_models_top: the nine spiking-neuron models side by side.
//
// All nine models (LIF, NLIF, IF-SFA, QIF, AdEx, SRM, Theta, HH, Izhikevich)
// receive the same input current and the same time-step strobe, so their
// spike trains can be compared directly for one stimulus. Each model runs its
// own fixed-point Euler update and its own idle/firing/refractory FSM with
// the parameter set listed for it in the source design (the defaults of each
// neuron module).
//
// Ports: 'i_in' is the common signed current, 'step' advances every model by
// one time step in that clock cycle, 'srm_spike_in' is the presynaptic spike
// input of the spike response model (the only model with a synaptic input).
// 'spikes', 'v_all' and 'states' are indexed by snn_pkg::model_e; the
// adaptation, kernel, recovery and gating variables are brought out too, with
// the HH gates as 9-bit Q8 fractions (256 = 1.0). Every
// output is registered inside its neuron; the models are independent, so
// there is no extra latency at this level.
module snn_models_top
  import snn_pkg::*;
#(
  parameter int unsigned WIDTH = 16
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    step,
  input  logic signed [WIDTH-1:0] i_in,
  input  logic                    srm_spike_in,
  output logic [NUM_MODELS-1:0]   spikes,
  output logic signed [WIDTH-1:0] v_all  [NUM_MODELS],
  output neuron_state_e           states [NUM_MODELS],
  // second state variables of the models that have them
  output logic signed [WIDTH-1:0] ifsfa_w,
  output logic signed [WIDTH-1:0] adex_w,
  output logic signed [WIDTH-1:0] srm_eta,
  output logic signed [WIDTH-1:0] srm_eps,
  output logic signed [WIDTH-1:0] izh_u,
  output logic [8:0]              hh_m,
  output logic [8:0]              hh_h,
  output logic [8:0]              hh_n
);

  lif_neuron #(.WIDTH(WIDTH)) u_lif (
    .clk, .rst_n, .step, .i_in,
    .spike(spikes[M_LIF]), .v(v_all[M_LIF]), .state(states[M_LIF])
  );

  nlif_neuron #(.WIDTH(WIDTH)) u_nlif (
    .clk, .rst_n, .step, .i_in,
    .spike(spikes[M_NLIF]), .v(v_all[M_NLIF]), .state(states[M_NLIF])
  );

  ifsfa_neuron #(.WIDTH(WIDTH)) u_ifsfa (
    .clk, .rst_n, .step, .i_in, .w(ifsfa_w),
    .spike(spikes[M_IFSFA]), .v(v_all[M_IFSFA]), .state(states[M_IFSFA])
  );

  qif_neuron #(.WIDTH(WIDTH)) u_qif (
    .clk, .rst_n, .step, .i_in,
    .spike(spikes[M_QIF]), .v(v_all[M_QIF]), .state(states[M_QIF])
  );

  adex_neuron #(.WIDTH(WIDTH)) u_adex (
    .clk, .rst_n, .step, .i_in, .w(adex_w),
    .spike(spikes[M_ADEX]), .v(v_all[M_ADEX]), .state(states[M_ADEX])
  );

  srm_neuron #(.WIDTH(WIDTH)) u_srm (
    .clk, .rst_n, .step, .i_in, .spike_in(srm_spike_in), .eta(srm_eta), .eps(srm_eps),
    .spike(spikes[M_SRM]), .v(v_all[M_SRM]), .state(states[M_SRM])
  );

  theta_neuron #(.WIDTH(WIDTH)) u_theta (
    .clk, .rst_n, .step, .i_in,
    .spike(spikes[M_THETA]), .v(v_all[M_THETA]), .state(states[M_THETA])
  );

  hh_neuron #(.WIDTH(WIDTH), .FRAC(8)) u_hh (
    .clk, .rst_n, .step, .i_in, .m(hh_m), .h(hh_h), .n(hh_n),
    .spike(spikes[M_HH]), .v(v_all[M_HH]), .state(states[M_HH])
  );

  izh_neuron #(.WIDTH(WIDTH)) u_izh (
    .clk, .rst_n, .step, .i_in, .u(izh_u),
    .spike(spikes[M_IZH]), .v(v_all[M_IZH]), .state(states[M_IZH])
  );

endmodule
