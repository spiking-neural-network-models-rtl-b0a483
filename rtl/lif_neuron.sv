// lif_neuron: leaky integrate-and-fire neuron.
//
// Per time step the membrane potential moves towards the resting potential
// V_R and is pushed by the input current:
//     V <- V + ( -(V - V_R) + ((I <<< RM_S) >>> GL_S) ) >>> TAU_S
// The time constant tau, membrane resistance Rm and leak conductance gl are
// powers of two, given by their exponents, so the update needs only shifts
// and adders. When the new potential reaches V_TH the neuron fires: V_RESET
// is stored instead, 'spike' is raised for one time step and the potential
// is held for the T_REF-step refractory period (see neuron_fsm).
//
// Interface: 'step' strobes one update; 'i_in' is the signed current, 'v' the
// registered potential, 'spike' and 'state' come from the FSM. The update is
// computed combinationally from the registered potential and stored on the
// clock edge where 'step' is high: one step per clock at most.
//
// The shift-based equation and the default parameters (tau = Rm = gl = 8,
// V_th = -64, V_reset = -70, V_r = 0, V0 = -64) follow the source design; the
// equation is applied as an Euler increment. The 16-bit width, saturation of
// the potential and the refractory length are this design's choices.
module lif_neuron
  import snn_pkg::*;
#(
  parameter int unsigned WIDTH   = 16,
  parameter int unsigned T_REF   = 2,
  parameter int unsigned TAU_S   = 3,
  parameter int unsigned RM_S    = 3,
  parameter int unsigned GL_S    = 3,
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
  acc_t v_cur, drive, dv, v_new;
  logic at_th, integrate, fire;

  always_comb begin
    v_cur = acc_t'(v_q);
    drive = (acc_t'(i_in) <<< RM_S) >>> GL_S;
    dv    = (-(v_cur - acc_t'(V_R)) + drive) >>> TAU_S;
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
