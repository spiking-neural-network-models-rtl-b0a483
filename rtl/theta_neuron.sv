// theta_neuron: theta (phase) neuron.
//
// A leaky integrator with an extra conductance term that pulls the potential
// towards the threshold theta with strength g = 2^G_S:
//     V <- V + ( -(V - V_R) + ((V_TH - V) <<< G_S) + I ) >>> TAU_S
// theta is also the firing threshold. Reset, spike and refractory hold are
// handled by neuron_fsm.
//
// Interface and timing are those of lif_neuron.
//
// The equation and defaults (tau = g = 8, theta = -64, V_reset = -70,
// V0 = -64) follow the source design; V_R = 0, width, saturation and
// refractory length are this design's choices.
module theta_neuron
  import snn_pkg::*;
#(
  parameter int unsigned WIDTH   = 16,
  parameter int unsigned T_REF   = 2,
  parameter int unsigned TAU_S   = 3,
  parameter int unsigned G_S     = 3,
  parameter int          V_TH    = -64,
  parameter int          V_RESET = -70,
  parameter int          V_R     = 0,
  parameter int          V0      = -64
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    step,
  input  logic signed [WIDTH-1:0] i_in,
  output logic                    spike,
  output logic signed [WIDTH-1:0] v,
  output neuron_state_e           state
);

  logic signed [WIDTH-1:0] v_q;
  acc_t v_cur, dv, v_new;
  logic at_th, integrate, fire;

  always_comb begin
    v_cur = acc_t'(v_q);
    dv    = (-(v_cur - acc_t'(V_R)) + ((acc_t'(V_TH) - v_cur) <<< G_S) + acc_t'(i_in)) >>> TAU_S;
    v_new = sat_to(v_cur + dv, WIDTH);
    at_th = (v_new >= acc_t'(V_TH));
  end

  neuron_fsm #(.T_REF(T_REF)) u_fsm (
    .clk, .rst_n, .step, .at_th, .integrate, .fire, .spike, .state
  );

  always_ff @(posedge clk) begin
    if (!rst_n)         v_q <= WIDTH'(V0);
    else if (fire)      v_q <= WIDTH'(V_RESET);
    else if (integrate) v_q <= v_new[WIDTH-1:0];
  end

  assign v = v_q;

endmodule
