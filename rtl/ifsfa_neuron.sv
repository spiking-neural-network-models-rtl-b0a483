// ifsfa_neuron: integrate-and-fire neuron with spike-frequency adaptation.
//
// A leaky integrator whose input is reduced by an adaptation current w. Every
// spike adds b = 2^B_S to w and w decays towards zero with time constant
// tau_w = 2^TAUW_S, so under a constant input the gaps between spikes grow:
//     V <- V + ( -(V - V_R) + ((I <<< RM_S) >>> GL_S) - w ) >>> TAU_S
//     w <- w + ( -w >>> TAUW_S ) + (spike ? 2^B_S : 0)
// The potential uses the w of the previous step. w is updated on every step,
// also during the refractory period; V is held there (neuron_fsm).
//
// Interface and timing are those of lif_neuron, plus the output 'w'.
//
// The shift-based equations and defaults (tau = tau_w = b = Rm = gl = 8,
// V_th = -64, V_reset = -70, V0 = -64) follow the source design. The source
// prints w with a plus sign in the membrane equation; it is subtracted here
// so that adaptation lowers the firing rate, which is what the model is for.
// Width, saturation and refractory length are this design's choices.
module ifsfa_neuron
  import snn_pkg::*;
#(
  parameter int unsigned WIDTH   = 16,
  parameter int unsigned T_REF   = 2,
  parameter int unsigned TAU_S   = 3,
  parameter int unsigned RM_S    = 3,
  parameter int unsigned GL_S    = 3,
  parameter int unsigned TAUW_S  = 3,
  parameter int unsigned B_S     = 3,
  parameter int          V_TH    = -64,
  parameter int          V_RESET = -70,
  parameter int          V_R     = 0,
  parameter int          V0      = -64
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    step,
  input  logic signed [WIDTH-1:0] i_in,
  output logic signed [WIDTH-1:0] w,
  output logic                    spike,
  output logic signed [WIDTH-1:0] v,
  output neuron_state_e           state
);

  logic signed [WIDTH-1:0] v_q, w_q;
  acc_t v_cur, w_cur, drive, dv, v_new, w_new;
  logic at_th, integrate, fire;

  always_comb begin
    v_cur = acc_t'(v_q);
    w_cur = acc_t'(w_q);
    drive = (acc_t'(i_in) <<< RM_S) >>> GL_S;
    dv    = (-(v_cur - acc_t'(V_R)) + drive - w_cur) >>> TAU_S;
    v_new = sat_to(v_cur + dv, WIDTH);
    at_th = (v_new >= acc_t'(V_TH));
    w_new = sat_to(w_cur + ((-w_cur) >>> TAUW_S) + (fire ? (acc_t'(1) <<< B_S) : acc_t'(0)), WIDTH);
  end

  neuron_fsm #(.T_REF(T_REF)) u_fsm (
    .clk, .rst_n, .step, .at_th, .integrate, .fire, .spike, .state
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      v_q <= WIDTH'(V0);
      w_q <= '0;
    end else begin
      if (fire)           v_q <= WIDTH'(V_RESET);
      else if (integrate) v_q <= v_new[WIDTH-1:0];
      if (step)           w_q <= w_new[WIDTH-1:0];
    end
  end

  assign v = v_q;
  assign w = w_q;

endmodule
