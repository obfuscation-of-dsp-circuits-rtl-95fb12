// secure_switch: N-to-1 switch implemented as a multiplexer.
//
// High-level transformations such as folding and multirate scheduling leave
// periodic N-to-1 switches in a datapath; here each one is a plain multiplexer
// whose control comes from a ring counter (periodic switch) or from the
// reconfigurator (static switch). Which connection is the correct one at a given
// time is decided only by that control, so the multiplexer itself reveals
// nothing. A control value of N or above selects connection 0 (this design's
// choice). Purely combinational.
module secure_switch #(
  parameter int N     = 2,
  parameter int W     = 8,
  parameter int SEL_W = (N > 1) ? $clog2(N) : 1
) (
  input  logic [N-1:0][W-1:0] conn,
  input  logic [SEL_W-1:0]    sel,
  output logic [W-1:0]        y
);

  always_comb begin
    if (int'(sel) < N) y = conn[sel];
    else               y = conn[0];
  end

endmodule
