// nlif_neuron: non-linear integrate-and-fire neuron.
//
// The leaky integrate-and-fire update with an added square of the previous
// potential, which makes the upstroke self-accelerating:
//     V <- V + ( -(V - V_R) + ((I <<< RM_S) >>> GL_S) + V*V ) >>> TAU_S
// The square is the only multiplier. Threshold crossing, reset to V_RESET,
// the one-step spike and the refractory hold are handled by neuron_fsm.
//
// Interface and timing are those of lif_neuron: one Euler step per clock in
// which 'step' is high; 'v' is registered; 'spike' lasts one step and follows
// the crossing step by one clock.
//
// The equation and the default parameters follow the source design (with the
// Euler-increment reading); the width, saturation and refractory length are
// this design's. With the defaults the square dominates, so the neuron fires
// as soon as the refractory period allows.
module nlif_neuron
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
  acc_t v_cur, drive, sq, dv, v_new;
  logic at_th, integrate, fire;

  always_comb begin
    v_cur = acc_t'(v_q);
    drive = (acc_t'(i_in) <<< RM_S) >>> GL_S;
    sq    = v_cur * v_cur;
    dv    = (-(v_cur - acc_t'(V_R)) + drive + sq) >>> TAU_S;
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
