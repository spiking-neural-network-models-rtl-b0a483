// tb_ref_pkg: reference pieces shared by the neuron testbenches.
//
// ref_fsm is a cycle-level model of the neuron controller written from its
// specification (IDLE -> FIRING on a threshold crossing, then T_REF-1 steps
// of REFRACTORY, every transition only in a step cycle). sat() clamps a value
// to a signed word. The testbenches build their expected potentials from
// these and from their own copy of each model's update equation.
package tb_ref_pkg;

  function automatic longint sat(input longint x, input int width);
    longint hi, lo;
    hi = (longint'(1) <<< (width - 1)) - 1;
    lo = -(longint'(1) <<< (width - 1));
    return (x > hi) ? hi : (x < lo) ? lo : x;
  endfunction

  class ref_fsm;
    int t_ref;
    int st;    // 0 idle, 1 firing, 2 refractory
    int left;  // refractory steps still to go

    function new(int t);
      t_ref = t;
      st    = 0;
      left  = 0;
    endfunction

    function bit integrate(bit step);
      return step && (st == 0);
    endfunction

    function bit spike();
      return st == 1;
    endfunction

    function void advance(bit step, bit at_th);
      if (!step) return;
      if (st == 0) begin
        if (at_th) st = 1;
      end else if (st == 1) begin
        if (t_ref > 1) begin
          st   = 2;
          left = t_ref - 1;
        end else begin
          st = 0;
        end
      end else begin
        left = left - 1;
        if (left <= 0) st = 0;
      end
    endfunction
  endclass

endpackage
