// snn_pkg: types and helpers shared by the nine spiking-neuron models.
//
// Every neuron is a fixed-point Euler integrator that advances its state by
// one time step whenever its 'step' strobe is high. The membrane equations are
// evaluated in 64-bit signed arithmetic and the result is saturated to the
// storage width with sat_to(), so that no model can wrap around when its
// equations run away. The FSM state type is shared by the controller
// (neuron_fsm) and by every model that exports its state.
package snn_pkg;

  // Wide accumulator for the right-hand side of the update equations.
  typedef logic signed [63:0] acc_t;

  // IDLE: integrating; FIRING: spike is being emitted, potential held at reset;
  // REFRACTORY: rest of the refractory period, input ignored.
  typedef enum logic [1:0] {
    ST_IDLE       = 2'd0,
    ST_FIRING     = 2'd1,
    ST_REFRACTORY = 2'd2
  } neuron_state_e;

  // Index of each model in the top-level spike and potential vectors.
  typedef enum int unsigned {
    M_LIF   = 0,
    M_NLIF  = 1,
    M_IFSFA = 2,
    M_QIF   = 3,
    M_ADEX  = 4,
    M_SRM   = 5,
    M_THETA = 6,
    M_HH    = 7,
    M_IZH   = 8
  } model_e;

  localparam int unsigned NUM_MODELS = 9;

  // Clamp a wide value into the range of a signed 'width'-bit word.
  function automatic acc_t sat_to(input acc_t x, input int unsigned width);
    acc_t hi, lo;
    hi = (acc_t'(1) <<< (width - 1)) - 1;
    lo = -(acc_t'(1) <<< (width - 1));
    if (x > hi)      return hi;
    else if (x < lo) return lo;
    else             return x;
  endfunction

endpackage
