// key_size_case: one key-size configuration of the scaler for tb_key_sizes.
//
// Instantiates the scaler with a KEY_W x KEY_LEN key. When start rises it
// applies, for every key word position, a key that is wrong in that word only
// followed by a functional configure word (each must leave the mode alone),
// then the correct key with configure code 5 (must restart the datapath in the
// functional mode and deliver one output per clock). Reports its own check and
// failure counts and raises done.
module key_size_case #(
  parameter int                       KEY_W   = 4,
  parameter int                       KEY_LEN = 4,
  parameter logic [KEY_W*KEY_LEN-1:0] KEY     = '1
) (
  input  logic clk,
  input  logic start,
  output logic done,
  output int   checks,
  output int   failures
);
  import obf_pkg::*;

  logic             rst, key_valid, ext_req, out_valid;
  logic [KEY_W-1:0] key_in;
  pixel_t           out_pix;

  image_scaler_top #(.KEY_W(KEY_W), .KEY_LEN(KEY_LEN), .KEY(KEY)) dut (
    .clk, .rst, .key_valid, .key_in, .ext_en(1'b0), .ext_line('0), .ext_req,
    .out_pix, .out_valid);

  int restarts = 0;
  always @(posedge clk) if (!rst && dut.sync_clr) restarts++;

  task automatic check(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL key %0dx%0d %s: got %0d expected %0d", KEY_W, KEY_LEN, what, got, exp);
    end
  endtask

  task automatic send_key(input logic [KEY_W*KEY_LEN-1:0] k, input logic [KEY_W-1:0] code);
    for (int i = 0; i <= KEY_LEN; i++) begin
      key_valid = 1;
      key_in = (i < KEY_LEN) ? k[(KEY_LEN - 1 - i) * KEY_W +: KEY_W] : code;
      @(posedge clk); #1;
    end
    key_valid = 0;
    repeat (4) @(posedge clk);
    #1;
  endtask

  initial begin
    int run;
    logic [KEY_W*KEY_LEN-1:0] wrong;
    checks = 0; failures = 0; done = 0;
    rst = 1; key_valid = 0; key_in = '0;
    wait (start);
    repeat (2) @(posedge clk); #1;
    rst = 0;
    for (int w = 0; w < KEY_LEN; w++) begin
      wrong = KEY;
      wrong[w * KEY_W] = ~wrong[w * KEY_W];
      send_key(wrong, KEY_W'(5));
      check($sformatf("no restart, key wrong in word %0d", w), restarts, 0);
      check("mode stays non-meaningful", int'(dut.u_ctrl.u_recfg.mode), int'(MODE_SCRAMBLE));
    end
    send_key(KEY, KEY_W'(5));
    check("restart after correct key", restarts, 1);
    check("functional mode", int'(dut.u_ctrl.u_recfg.mode), int'(MODE_FUNC));
    run = 0;
    repeat (10) @(posedge clk);
    #1;
    for (int c = 0; c < 100; c++) begin
      @(posedge clk);
      if (out_valid) run++;
      #1;
    end
    check("one output per clock", run, 100);
    done = 1;
  end
endmodule
