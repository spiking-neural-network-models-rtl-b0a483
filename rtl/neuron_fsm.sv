// neuron_fsm: the control state machine every neuron model shares.
//
// A neuron is IDLE while it integrates its input. When the datapath reports
// that the newly computed potential has reached threshold ('at_th' in a step
// where 'integrate' is high), the FSM raises 'fire' for that cycle: the
// datapath then stores the reset potential instead of the new value and
// applies its spike-triggered increments. The FSM moves to FIRING, where
// 'spike' is high for one time step, and then spends T_REF-1 further steps in
// REFRACTORY. Outside IDLE the datapath holds the membrane potential, which is
// how the refractory period keeps the neuron from integrating input.
//
// Timing: all transitions happen on a clock edge in which 'step' is high, so
// one state lasts one time step whatever the ratio of clock to step rate.
// 'spike' follows the crossing step by one clock and lasts until the next step.
// The refractory period, counting the FIRING step, is T_REF steps (T_REF >= 1).
//
// An FSM with idle and firing states follows the source design; the separate
// REFRACTORY state, the counter and the value of T_REF are this design's.
module neuron_fsm
  import snn_pkg::*;
#(
  parameter int unsigned T_REF = 2
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          step,
  input  logic          at_th,
  output logic          integrate,
  output logic          fire,
  output logic          spike,
  output neuron_state_e state
);

  localparam int unsigned CW = (T_REF < 2) ? 1 : $clog2(T_REF + 1);

  neuron_state_e state_q, state_d;
  logic [CW-1:0] cnt_q, cnt_d;

  assign integrate = step && (state_q == ST_IDLE);
  assign fire      = integrate && at_th;
  assign spike     = (state_q == ST_FIRING);
  assign state     = state_q;

  always_comb begin
    state_d = state_q;
    cnt_d   = cnt_q;
    if (step) begin
      unique case (state_q)
        ST_IDLE: begin
          if (at_th) state_d = ST_FIRING;
        end
        ST_FIRING: begin
          if (T_REF > 1) begin
            state_d = ST_REFRACTORY;
            cnt_d   = CW'(T_REF - 1);
          end else begin
            state_d = ST_IDLE;
          end
        end
        ST_REFRACTORY: begin
          cnt_d = cnt_q - 1'b1;
          if (cnt_q <= CW'(1)) state_d = ST_IDLE;
        end
        default: state_d = ST_IDLE;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state_q <= ST_IDLE;
      cnt_q   <= '0;
    end else begin
      state_q <= state_d;
      cnt_q   <= cnt_d;
    end
  end

  initial assert (T_REF >= 1) else $error("neuron_fsm: T_REF must be at least 1");

  // A spike lasts exactly one time step.
  a_spike_one_step: assert property (@(posedge clk) disable iff (!rst_n)
    (spike && step) |=> !spike);

endmodule
