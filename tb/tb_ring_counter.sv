// tb_ring_counter: self-checking test of the ring counter FSM.
//
// Two instances, N=4 and N=2, get random reset states, loads and advance
// enables. A reference model in the testbench keeps its own copy of the state
// (rotated towards the MSB on every advance) and computes the expected control
// output as the index of the lowest set bit. Checks state and control every
// cycle, including the periodic 0,1,2,3 schedule of a one-hot reset state.
module tb_ring_counter;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic       rst, load, adv;
  logic [3:0] rs4, st4;
  logic [1:0] ctrl4;
  logic [1:0] rs2, st2;
  logic       ctrl2;
  logic [3:0] m4;
  logic [1:0] m2;

  ring_counter #(.N(4)) dut4 (.clk, .rst, .load, .rst_state(rs4), .adv, .state(st4), .ctrl(ctrl4));
  ring_counter #(.N(2)) dut2 (.clk, .rst, .load, .rst_state(rs2), .adv, .state(st2), .ctrl(ctrl2));

  function automatic int low_bit(input logic [3:0] s, input int n);
    for (int i = 0; i < n; i++) if (s[i]) return i;
    return 0;
  endfunction

  task automatic check(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int seq[$];
    rst = 1; load = 0; adv = 0; rs4 = 4'b0001; rs2 = 2'b01;
    @(posedge clk); #1;
    m4 = rs4; m2 = rs2;
    rst = 0;
    // one-hot schedule
    adv = 1;
    for (int i = 0; i < 8; i++) begin
      seq.push_back(int'(ctrl4));
      @(posedge clk); #1;
    end
    for (int i = 0; i < 8; i++) check("one-hot schedule", seq[i], i % 4);
    m4 = st4; m2 = st2;
    // random operation against the model
    for (int i = 0; i < 2000; i++) begin
      rst  = ($urandom_range(0, 99) == 0);
      load = ($urandom_range(0, 19) == 0);
      adv  = $urandom_range(0, 1);
      rs4  = 4'($urandom);
      rs2  = 2'($urandom);
      @(posedge clk);
      if (rst || load) begin m4 = rs4; m2 = rs2; end
      else if (adv) begin m4 = {m4[2:0], m4[3]}; m2 = {m2[0], m2[1]}; end
      #1;
      check("state4", int'(st4), int'(m4));
      check("ctrl4", int'(ctrl4), low_bit(m4, 4));
      check("state2", int'(st2), int'(m2));
      check("ctrl2", int'(ctrl2), low_bit({2'b00, m2}, 2));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
