// izh_neuron: Izhikevich neuron.
//
// Two state variables, the potential V and the recovery variable U:
//     V <- V + ( 2V + 4V + (V*V >>> 4) + 140 - U + I ) >>> DT_S
//     U <- U + ( (V >>> B_S) - U ) >>> A_S
// The quadratic coefficient 0.04 and the linear coefficient 5 of the
// textbook model become a shift by 4 and two shifted copies of V; the square
// is the only multiplier. When V reaches V_TH (30 mV) the model's own reset
// applies, V = C and U = U + D, followed by the refractory hold of neuron_fsm.
// U is updated on every step from the previous V.
//
// Interface and timing are those of lif_neuron, plus the output 'u'.
//
// Equations and defaults (a = 2, b = 16, c = -65, d = 8, V_th = 30, V0 = 0)
// follow the source design. a and b are used as divisors (U relaxes towards
// V/b at rate 1/a), because the printed left shifts let U grow without bound.
// DT_S, an optional time-step shift of the V update, defaults to 0 as in the
// printed equation. Width, saturation and refractory length are this
// design's choices.
module izh_neuron
  import snn_pkg::*;
#(
  parameter int unsigned WIDTH = 16,
  parameter int unsigned T_REF = 2,
  parameter int unsigned A_S   = 1,
  parameter int unsigned B_S   = 4,
  parameter int unsigned DT_S  = 0,
  parameter int          C     = -65,
  parameter int          D     = 8,
  parameter int          V_TH  = 30,
  parameter int          V0    = 0
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    step,
  input  logic signed [WIDTH-1:0] i_in,
  output logic signed [WIDTH-1:0] u,
  output logic                    spike,
  output logic signed [WIDTH-1:0] v,
  output neuron_state_e           state
);

  logic signed [WIDTH-1:0] v_q, u_q;
  acc_t v_cur, u_cur, dv, v_new, u_new;
  logic at_th, integrate, fire;

  always_comb begin
    v_cur = acc_t'(v_q);
    u_cur = acc_t'(u_q);
    dv    = ((v_cur <<< 1) + (v_cur <<< 2) + ((v_cur * v_cur) >>> 4) + 140 - u_cur
             + acc_t'(i_in)) >>> DT_S;
    v_new = sat_to(v_cur + dv, WIDTH);
    at_th = (v_new >= acc_t'(V_TH));
    u_new = sat_to(u_cur + (((v_cur >>> B_S) - u_cur) >>> A_S)
                   + (fire ? acc_t'(D) : acc_t'(0)), WIDTH);
  end

  neuron_fsm #(.T_REF(T_REF)) u_fsm (
    .clk, .rst_n, .step, .at_th, .integrate, .fire, .spike, .state
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      v_q <= WIDTH'(V0);
      u_q <= '0;
    end else begin
      if (fire)           v_q <= WIDTH'(C);
      else if (integrate) v_q <= v_new[WIDTH-1:0];
      if (step)           u_q <= u_new[WIDTH-1:0];
    end
  end

  assign v = v_q;
  assign u = u_q;

endmodule
