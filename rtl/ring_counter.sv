// ring_counter: input-independent FSM that produces the periodic control signal
// of a secure switch.
//
// Structure as in the obfuscation scheme: a state register SR, a next-state
// function F and an output function G, with a reset state supplied from outside
// by the reconfigurator. F rotates SR by one position towards the MSB on every
// cycle with adv high. G returns the index of the lowest set bit of SR. With a
// one-hot reset state the control output therefore counts 0,1,..,N-1 and wraps,
// the schedule a folded or multirate datapath needs; any other reset state gives
// a different periodic schedule, which is how an obfuscated mode changes the
// switch without changing the counter hardware. The choice of rotate for F and a
// priority encoder for G is this design's.
//
// Timing: SR loads rst_state on rst or load (load wins over adv); ctrl is a
// combinational function of SR.
module ring_counter #(
  parameter int N     = 2,
  parameter int IDX_W = (N > 1) ? $clog2(N) : 1
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             load,
  input  logic [N-1:0]     rst_state,
  input  logic             adv,
  output logic [N-1:0]     state,
  output logic [IDX_W-1:0] ctrl
);

  // F: next-state function
  function automatic logic [N-1:0] f_next(input logic [N-1:0] s);
    if (N == 1) return s;
    return {s[N-2:0], s[N-1]};
  endfunction

  // SR
  always_ff @(posedge clk) begin
    if (rst || load)  state <= rst_state;
    else if (adv)     state <= f_next(state);
  end

  // G: index of the lowest set bit, 0 when SR is all zero
  always_comb begin
    ctrl = '0;
    for (int i = N - 1; i >= 0; i--)
      if (state[i]) ctrl = IDX_W'(i);
  end

endmodule
