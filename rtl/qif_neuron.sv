// qif_neuron: quadratic integrate-and-fire neuron.
//
// The potential is driven by its own square and by the input current scaled
// by the membrane capacitance Cm = 2^CM_S:
//     V <- V + ( V*V + V_R + (I <<< CM_S) ) >>> TAU_S
// The quadratic term makes the approach to threshold accelerate. After a
// spike the potential stays at V_RESET for the refractory period
// (neuron_fsm).
//
// Interface and timing are those of lif_neuron.
//
// The equation and defaults (tau = Cm = 8, V_th = -64, V_reset = -70,
// V0 = -64) follow the source design; the square enters with a plus sign
// (the source's printed minus sign sends the potential to minus infinity and
// the neuron would never fire). Width, saturation, refractory length and
// V_R = 0 are this design's choices.
module qif_neuron
  import snn_pkg::*;
#(
  parameter int unsigned WIDTH   = 16,
  parameter int unsigned T_REF   = 2,
  parameter int unsigned TAU_S   = 3,
  parameter int unsigned CM_S    = 3,
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
  acc_t v_cur, sq, dv, v_new;
  logic at_th, integrate, fire;

  always_comb begin
    v_cur = acc_t'(v_q);
    sq    = v_cur * v_cur;
    dv    = (sq + acc_t'(V_R) + (acc_t'(i_in) <<< CM_S)) >>> TAU_S;
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
