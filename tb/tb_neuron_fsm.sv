// tb_neuron_fsm: self-checking testbench for neuron_fsm.
//
// Three controllers with refractory periods of 1, 2 (the default) and 3
// steps see the same random step strobe and threshold flag. Their outputs
// (integrate, fire, spike, state) are compared every cycle with a reference
// model of the specification. A directed part first checks by hand that a
// crossing with step held high gives a one-step spike one clock later and
// blocks integration for exactly T_REF steps.
module tb_neuron_fsm;
  import snn_pkg::*;
  import tb_ref_pkg::*;

  localparam int NCYC = 3000;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic step = 1'b0;
  logic at_th = 1'b0;
  logic [2:0] integrate, fire, spike;
  neuron_state_e state [3];

  neuron_fsm #(.T_REF(1)) dut1 (.clk, .rst_n, .step, .at_th,
    .integrate(integrate[0]), .fire(fire[0]), .spike(spike[0]), .state(state[0]));
  neuron_fsm              dut2 (.clk, .rst_n, .step, .at_th,
    .integrate(integrate[1]), .fire(fire[1]), .spike(spike[1]), .state(state[1]));
  neuron_fsm #(.T_REF(3)) dut3 (.clk, .rst_n, .step, .at_th,
    .integrate(integrate[2]), .fire(fire[2]), .spike(spike[2]), .state(state[2]));

  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;
  int n_fire = 0, n_refr = 0;
  ref_fsm f [3];

  task automatic chk(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures <= 10) $display("FAIL %s at %0t: got %0d expected %0d", what, $time, got, exp);
    end
  endtask

  initial begin : watchdog
    repeat (NCYC + 200) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 3; k++) f[k] = new(k + 1);
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;

    // Directed, default controller (T_REF = 2): crossing in step 0.
    step  = 1'b1;
    at_th = 1'b1;
    #1 chk("fire on crossing", fire[1], 1);
    @(negedge clk);
    at_th = 1'b0;
    chk("spike one clock after crossing", spike[1], 1);
    chk("no integration while firing", integrate[1], 0);
    @(negedge clk);
    chk("spike lasts one step", spike[1], 0);
    chk("refractory after firing", state[1], ST_REFRACTORY);
    chk("no integration while refractory", integrate[1], 0);
    @(negedge clk);
    chk("idle after T_REF steps", state[1], ST_IDLE);
    chk("integrating again", integrate[1], 1);
    step = 1'b0;
    rst_n = 1'b0;
    @(negedge clk);
    rst_n = 1'b1;

    // Random part against the reference model.
    for (int c = 0; c < NCYC; c++) begin
      step  = ($urandom_range(0, 3) != 0);
      at_th = ($urandom_range(0, 2) == 0);
      #1;
      for (int k = 0; k < 3; k++) begin
        chk("integrate", integrate[k], f[k].integrate(step));
        chk("fire", fire[k], f[k].integrate(step) && at_th);
        chk("spike", spike[k], f[k].spike());
        chk("state", state[k], f[k].st);
        if (f[k].st == 2 && step) n_refr++;
        if (f[k].integrate(step) && at_th) n_fire++;
        f[k].advance(step, at_th);
      end
      @(negedge clk);
    end
    checks++; if (n_fire == 0) begin failures++; $display("FAIL no fire"); end
    checks++; if (n_refr == 0) begin failures++; $display("FAIL no refractory step"); end
    $display("fires=%0d refractory_steps=%0d", n_fire, n_refr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
