// hh_neuron: Hodgkin-Huxley neuron.
//
// The membrane integrates the input current minus three ionic currents:
//     I_Na = (m^3 h (V - E_NA)) <<< GNA_S
//     I_K  = (n^4   (V - E_K )) <<< GK_S
//     I_L  = (V - E_L) <<< GL_S
//     V   <- V + ( I - I_Na - I_K - I_L ) >>> CM_S
// Conductances and capacitance are powers of two (shifts); the gating
// products m^3 h and n^4 and their product with the driving force use
// multipliers. The gating variables m, h, n are unsigned fixed-point
// fractions with FRAC fraction bits (1.0 = 2^FRAC). Each relaxes towards a
// voltage-dependent steady state with its own time constant:
//     x <- x + (x_inf(V) - x) >>> TX_S
// which is the alpha/beta form alpha(1-x) - beta*x rewritten with
// x_inf = alpha/(alpha+beta). x_inf(V) is a clamped linear ramp through
// one half at X_HALF: rising for m and n, falling for h.
//
// When V reaches V_TH the potential is reset to V_RESET and neuron_fsm raises
// 'spike' for one step and holds V for the refractory period; the gates keep
// evolving on every step.
//
// Interface and timing are those of lif_neuron, plus the gate outputs.
//
// The shift-and-multiply structure and the constants (E_Na = 50, E_K = -82,
// E_l = -84, V_th = 50, V_reset = 0; gNa = 120, gK = 36, gl = 3, Cm = 10
// rounded to the nearest powers of two) follow the source design. The sign
// convention of the ionic currents, the ramp shape of the steady states, the
// half-activation voltages, slopes and gate time constants, V0, width,
// saturation and refractory length are this design's choices: the source
// names the rate functions but does not give them.
module hh_neuron
  import snn_pkg::*;
#(
  parameter int unsigned WIDTH   = 16,
  parameter int unsigned T_REF   = 2,
  parameter int unsigned CM_S    = 3,
  parameter int unsigned GNA_S   = 7,
  parameter int unsigned GK_S    = 5,
  parameter int unsigned GL_S    = 2,
  parameter int          E_NA    = 50,
  parameter int          E_K     = -82,
  parameter int          E_L     = -84,
  parameter int          V_TH    = 50,
  parameter int          V_RESET = 0,
  parameter int          V0      = -84,
  parameter int unsigned FRAC    = 8,
  parameter int          M_HALF  = -74,
  parameter int          H_HALF  = -60,
  parameter int          N_HALF  = -55,
  parameter int unsigned SM_S    = 4,
  parameter int unsigned SH_S    = 4,
  parameter int unsigned SN_S    = 3,
  parameter int unsigned TM_S    = 0,
  parameter int unsigned TH_S    = 3,
  parameter int unsigned TN_S    = 3
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    step,
  input  logic signed [WIDTH-1:0] i_in,
  output logic        [FRAC:0]    m,
  output logic        [FRAC:0]    h,
  output logic        [FRAC:0]    n,
  output logic                    spike,
  output logic signed [WIDTH-1:0] v,
  output neuron_state_e           state
);

  localparam acc_t ONE  = acc_t'(1) <<< FRAC;
  localparam acc_t HALF = acc_t'(1) <<< (FRAC - 1);

  logic signed [WIDTH-1:0] v_q;
  logic [FRAC:0] m_q, h_q, n_q;
  acc_t v_cur, m_cur, h_cur, n_cur;
  acc_t m_inf, h_inf, n_inf, m_new, h_new, n_new;
  acc_t p_na, p_k, i_na, i_k, i_l, dv, v_new;
  logic at_th, integrate, fire;

  function automatic acc_t clamp01(input acc_t x);
    if (x < 0)        return 0;
    else if (x > ONE) return ONE;
    else              return x;
  endfunction

  always_comb begin
    v_cur = acc_t'(v_q);
    m_cur = acc_t'({1'b0, m_q});
    h_cur = acc_t'({1'b0, h_q});
    n_cur = acc_t'({1'b0, n_q});

    // ionic currents
    p_na  = (((((m_cur * m_cur) >>> FRAC) * m_cur) >>> FRAC) * h_cur) >>> FRAC;
    p_k   = (((((n_cur * n_cur) >>> FRAC) * n_cur) >>> FRAC) * n_cur) >>> FRAC;
    i_na  = ((p_na * (v_cur - acc_t'(E_NA))) <<< GNA_S) >>> FRAC;
    i_k   = ((p_k  * (v_cur - acc_t'(E_K)))  <<< GK_S)  >>> FRAC;
    i_l   = (v_cur - acc_t'(E_L)) <<< GL_S;
    dv    = (acc_t'(i_in) - i_na - i_k - i_l) >>> CM_S;
    v_new = sat_to(v_cur + dv, WIDTH);
    at_th = (v_new >= acc_t'(V_TH));

    // gating variables
    m_inf = clamp01(HALF + ((v_cur - acc_t'(M_HALF)) <<< SM_S));
    h_inf = clamp01(HALF - ((v_cur - acc_t'(H_HALF)) <<< SH_S));
    n_inf = clamp01(HALF + ((v_cur - acc_t'(N_HALF)) <<< SN_S));
    m_new = clamp01(m_cur + ((m_inf - m_cur) >>> TM_S));
    h_new = clamp01(h_cur + ((h_inf - h_cur) >>> TH_S));
    n_new = clamp01(n_cur + ((n_inf - n_cur) >>> TN_S));
  end

  neuron_fsm #(.T_REF(T_REF)) u_fsm (
    .clk, .rst_n, .step, .at_th, .integrate, .fire, .spike, .state
  );

  // Gates start at their steady state for V0.
  localparam acc_t M0 = (HALF + ((acc_t'(V0) - acc_t'(M_HALF)) <<< SM_S) < 0) ? 0 :
                        (HALF + ((acc_t'(V0) - acc_t'(M_HALF)) <<< SM_S) > ONE) ? ONE :
                        HALF + ((acc_t'(V0) - acc_t'(M_HALF)) <<< SM_S);
  localparam acc_t H0 = (HALF - ((acc_t'(V0) - acc_t'(H_HALF)) <<< SH_S) < 0) ? 0 :
                        (HALF - ((acc_t'(V0) - acc_t'(H_HALF)) <<< SH_S) > ONE) ? ONE :
                        HALF - ((acc_t'(V0) - acc_t'(H_HALF)) <<< SH_S);
  localparam acc_t N0 = (HALF + ((acc_t'(V0) - acc_t'(N_HALF)) <<< SN_S) < 0) ? 0 :
                        (HALF + ((acc_t'(V0) - acc_t'(N_HALF)) <<< SN_S) > ONE) ? ONE :
                        HALF + ((acc_t'(V0) - acc_t'(N_HALF)) <<< SN_S);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      v_q <= WIDTH'(V0);
      m_q <= M0[FRAC:0];
      h_q <= H0[FRAC:0];
      n_q <= N0[FRAC:0];
    end else begin
      if (fire)           v_q <= WIDTH'(V_RESET);
      else if (integrate) v_q <= v_new[WIDTH-1:0];
      if (step) begin
        m_q <= m_new[FRAC:0];
        h_q <= h_new[FRAC:0];
        n_q <= n_new[FRAC:0];
      end
    end
  end

  assign v = v_q;
  assign m = m_q;
  assign h = h_q;
  assign n = n_q;

endmodule
