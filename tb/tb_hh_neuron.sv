// tb_hh_neuron: self-checking testbench for hh_neuron.
//
// After reset the neuron is run for NCYC clock cycles with a random step
// strobe (high three cycles in four) and an input current that jumps to a new
// random level now and then. In parallel the testbench integrates its own copy
// of the model equation with a reference FSM and compares the potential,
// the spike output, the FSM state and the internal variables every cycle.
// It also counts spikes, refractory steps and held (step low) cycles, and
// fails if any of them never happened.
module tb_hh_neuron;
  import snn_pkg::*;
  import tb_ref_pkg::*;

  localparam int W    = 16;
  localparam int NCYC = 6000;
  localparam longint V_TH = 50, V_RESET = 0, V0 = -84, I0 = 50, I_LO = -20, I_SPAN = 140;
  localparam longint ONE = 256, HALF = 128;

  // Clamp to the gate range [0, 1] in Q8.
  function automatic longint c01(input longint x);
    return (x < 0) ? 0 : (x > ONE) ? ONE : x;
  endfunction

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic step = 1'b0;
  logic signed [W-1:0] i_in = '0;
  logic spike;
  logic signed [W-1:0] v;
  neuron_state_e state;
  logic [8:0] m, h, n;
  longint rm, rh, rn, pna, pk, mi, hi, ni;


  hh_neuron dut (.clk, .rst_n, .step, .i_in, .m, .h, .n, .spike, .v, .state);

  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;
  int n_spikes = 0, n_refr = 0, n_hold = 0;
  longint rv, vn, cur;
  bit integ, at_th, fire;
  ref_fsm f;

  task automatic chk(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures <= 10) $display("FAIL %s at %0t: got %0d expected %0d", what, $time, got, exp);
    end
  endtask

  task automatic compare();
    chk("v", longint'(v), rv);
    chk("spike", longint'(spike), longint'(f.spike()));
    chk("state", longint'(state), longint'(f.st));
    chk("m", longint'(m), rm);
    chk("h", longint'(h), rh);
    chk("n", longint'(n), rn);

  endtask

  initial begin : watchdog
    repeat (NCYC + 200) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    f   = new(2);
    rv  = V0;
    cur = I0;
    rm = c01(HALF + (V0 + 74) * 16);
    rh = c01(HALF - (V0 + 60) * 16);
    rn = c01(HALF + (V0 + 55) * 8);

    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    compare();
    for (int c = 0; c < NCYC; c++) begin
      // stimulus for the coming edge
      step = (c < 20) ? 1'b1 : ($urandom_range(0, 3) != 0);
      if (c >= 20 && $urandom_range(0, 59) == 0) cur = longint'($urandom_range(0, I_SPAN)) + I_LO;
      i_in = W'(cur);

      // reference update
      integ = f.integrate(step);
      // gNa = 2^7, gK = 2^5, gl = 2^2, Cm = 2^3, gates in Q8
      pna   = (((((rm * rm) >>> 8) * rm) >>> 8) * rh) >>> 8;
      pk    = (((((rn * rn) >>> 8) * rn) >>> 8) * rn) >>> 8;
      vn    = sat(rv + ((cur - ((pna * (rv - 50) * 128) >>> 8) - ((pk * (rv + 82) * 32) >>> 8)
                        - (rv + 84) * 4) >>> 3), W);
      at_th = (vn >= V_TH);
      if (step) begin
        mi = c01(HALF + (rv + 74) * 16);
        hi = c01(HALF - (rv + 60) * 16);
        ni = c01(HALF + (rv + 55) * 8);
        rm = c01(mi);
        rh = c01(rh + ((hi - rh) >>> 3));
        rn = c01(rn + ((ni - rn) >>> 3));
      end
      fire  = integ && at_th;
      if (fire)       rv = V_RESET;
      else if (integ) rv = vn;
      if (f.spike() && step) n_spikes++;
      if (f.st == 2 && step) n_refr++;
      if (!step) n_hold++;
      f.advance(step, at_th);
      @(negedge clk);
      compare();
    end
    checks++; if (n_spikes == 0) begin failures++; $display("FAIL no spike"); end
    checks++; if (n_refr == 0)   begin failures++; $display("FAIL no refractory step"); end
    checks++; if (n_hold == 0)   begin failures++; $display("FAIL no held cycle"); end
    $display("spikes=%0d refractory_steps=%0d held=%0d", n_spikes, n_refr, n_hold);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
