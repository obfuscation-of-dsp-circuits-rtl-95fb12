// tb_obfuscating_fsm: self-checking test of the key checker.
//
// Applies the correct key followed by a configure word, wrong keys, keys cut
// short by a wrong word, and idle cycles (key_valid low) in between. A
// reference model tracks how many key words have matched (a wrong word equal
// to the first key word starts a new attempt) and predicts every
// cfg_valid pulse and its data; the test also checks that a wrong key is never
// forwarded and that the FSM locks again after each configure word.
module tb_obfuscating_fsm;
  localparam logic [15:0] KEY = 16'hB29E;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic       rst, key_valid;
  logic [3:0] key_in, cfg_data;
  logic       cfg_valid, unlocked;

  obfuscating_fsm #(.KEY_W(4), .KEY_LEN(4), .KEY(KEY)) dut (
    .clk, .rst, .key_valid, .key_in, .cfg_valid, .cfg_data, .unlocked);

  int         m_idx;       // matched words, 4 = waiting for configure data
  logic       m_vld;
  logic [3:0] m_dat;
  int         forwarded;

  task automatic check(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic word(input logic [3:0] w);
    key_valid = 1; key_in = w;
    @(posedge clk);
    m_vld = 0;
    if (m_idx == 4) begin m_vld = 1; m_dat = w; m_idx = 0; end
    else if (w == KEY[(3 - m_idx) * 4 +: 4]) m_idx++;
    else m_idx = (w == KEY[15:12]) ? 1 : 0;
    #1;
    key_valid = 0;
    check("cfg_valid", int'(cfg_valid), int'(m_vld));
    if (m_vld) begin
      check("cfg_data", int'(cfg_data), int'(m_dat));
      forwarded++;
    end
    check("unlocked", int'(unlocked), int'(m_idx == 4));
  endtask

  task automatic idle();
    key_valid = 0; key_in = 4'($urandom);
    @(posedge clk); #1;
    check("no cfg when idle", int'(cfg_valid), 0);
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; key_valid = 0; key_in = 0; m_idx = 0; forwarded = 0;
    repeat (2) @(posedge clk); #1;
    rst = 0;
    // correct key, then configure word
    for (int i = 0; i < 4; i++) word(KEY[(3 - i) * 4 +: 4]);
    word(4'h5);
    check("forwarded after correct key", forwarded, 1);
    // wrong last word: nothing forwarded
    word(4'hB); word(4'h2); word(4'h9); word(4'hF); word(4'h5);
    check("wrong key not forwarded", forwarded, 1);
    // a wrong word must not be skipped over: B 2 9 F E is not the key
    word(4'hB); word(4'h2); word(4'h9); word(4'hF); word(4'hE); word(4'h5);
    check("key with a wrong word inside not forwarded", forwarded, 1);
    // key with idle gaps
    for (int i = 0; i < 4; i++) begin word(KEY[(3 - i) * 4 +: 4]); idle(); end
    word(4'hA);
    check("forwarded after gapped key", forwarded, 2);
    // random traffic, with the key inserted now and then
    for (int n = 0; n < 1500; n++) begin
      if ($urandom_range(0, 9) == 0)
        for (int i = 0; i < 4; i++) word(KEY[(3 - i) * 4 +: 4]);
      if ($urandom_range(0, 3) == 0) idle();
      else word(4'($urandom));
    end
    check("some configure words forwarded", int'(forwarded > 10), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
