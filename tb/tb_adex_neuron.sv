// tb_adex_neuron: self-checking testbench for adex_neuron.
//
// After reset the neuron is run for NCYC clock cycles with a random step
// strobe (high three cycles in four) and an input current that jumps to a new
// random level now and then. In parallel the testbench integrates its own copy
// of the model equation with a reference FSM and compares the potential,
// the spike output, the FSM state and the internal variables every cycle.
// It also counts spikes, refractory steps and held (step low) cycles, and
// fails if any of them never happened.
module tb_adex_neuron;
  import snn_pkg::*;
  import tb_ref_pkg::*;

  localparam int W    = 16;
  localparam int NCYC = 4000;
  localparam longint V_TH = -64, V_RESET = -70, V0 = -64, I0 = 50, I_LO = -150, I_SPAN = 300;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic step = 1'b0;
  logic signed [W-1:0] i_in = '0;
  logic spike;
  logic signed [W-1:0] v;
  neuron_state_e state;
  logic signed [W-1:0] w;
  longint rw;

  adex_neuron dut (.clk, .rst_n, .step, .i_in, .w, .spike, .v, .state);

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
    chk("w", longint'(w), rw);
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
    rw = 0;
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
      vn    = sat(rv + ((-rv + cur - rw + ((((rv - V_TH) >>> 3) + 1) <<< 3)) >>> 3), W);
      at_th = (vn >= V_TH);
      if (step) rw = sat(rw + (((rv <<< 2) - rw) >>> 3) + ((integ && at_th) ? 8 : 0), W);
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
