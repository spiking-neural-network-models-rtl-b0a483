// adex_neuron: adaptive exponential integrate-and-fire neuron.
//
// A leaky integrator with an exponential upstroke and an adaptation variable
// w that follows a*V (subthreshold adaptation) and jumps by b at each spike:
//     up = (((V - V_TH) >>> DT_S) + 1) <<< DT_S      ~ Delta_T*exp((V-V_th)/Delta_T)
//     V <- V + ( -(V - V_R) + I - w + up ) >>> TAU_S
//     w <- w + ( (V <<< A_S) - w ) >>> TAUW_S + (spike ? 2^B_S : 0)
// The exponential is replaced by its first-order expansion, which costs one
// shift pair and an adder. w is updated on every step and uses the previous
// potential; V is held during the refractory period (neuron_fsm).
//
// Interface and timing are those of lif_neuron, plus the output 'w'.
//
// The structure and defaults (tau = tau_w = Delta_T = 8, a = 4, V_th = -64,
// V_reset = -70, V0 = -64) follow the source design. This design's own
// choices: the exponential is expanded around threshold with a right shift
// inside (the printed left shift would make the term strongly negative), w is
// subtracted as in the usual AdEx form, b = 8 as for IF-SFA (no value is given
// for AdEx), plus the width, saturation and refractory length.
module adex_neuron
  import snn_pkg::*;
#(
  parameter int unsigned WIDTH   = 16,
  parameter int unsigned T_REF   = 2,
  parameter int unsigned TAU_S   = 3,
  parameter int unsigned TAUW_S  = 3,
  parameter int unsigned A_S     = 2,
  parameter int unsigned DT_S    = 3,
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
  acc_t v_cur, w_cur, up, dv, v_new, w_new;
  logic at_th, integrate, fire;

  always_comb begin
    v_cur = acc_t'(v_q);
    w_cur = acc_t'(w_q);
    up    = (((v_cur - acc_t'(V_TH)) >>> DT_S) + 1) <<< DT_S;
    dv    = (-(v_cur - acc_t'(V_R)) + acc_t'(i_in) - w_cur + up) >>> TAU_S;
    v_new = sat_to(v_cur + dv, WIDTH);
    at_th = (v_new >= acc_t'(V_TH));
    w_new = sat_to(w_cur + (((v_cur <<< A_S) - w_cur) >>> TAUW_S)
                   + (fire ? (acc_t'(1) <<< B_S) : acc_t'(0)), WIDTH);
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
