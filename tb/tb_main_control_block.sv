// tb_main_control_block: self-checking test of the two-level control.
//
// Drives key sequences and configure words and checks: no restart after a
// wrong key; a restart pulse after the correct key; the filter-order control
// of each mode; the decimation strobe pattern over successive pix_adv cycles
// (every second sample, even or odd phase, or every sample); and the
// interleave control over successive out_adv cycles, all after the restart.
module tb_main_control_block;
  import obf_pkg::*;
  localparam logic [15:0] KEY = 16'hB29E;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic       rst, key_valid, pix_adv, out_adv;
  logic [3:0] key_in;
  fir_sel_t   fir_sel;
  logic       dec_strobe, ilv_sel, sync_clr;
  int         restarts = 0;

  main_control_block #(.KEY_W(4), .KEY_LEN(4), .KEY(KEY)) dut (
    .clk, .rst, .key_valid, .key_in, .pix_adv, .out_adv,
    .fir_sel, .dec_strobe, .ilv_sel, .sync_clr);

  always @(posedge clk) if (!rst && sync_clr) restarts++;

  task automatic check(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic send(input logic [3:0] w);
    key_valid = 1; key_in = w;
    @(posedge clk); #1;
    key_valid = 0;
  endtask

  // apply key (or a wrong one) and a configure word, wait for the restart
  task automatic configure(input logic [15:0] k, input logic [3:0] c);
    for (int i = 0; i < 4; i++) send(k[(3 - i) * 4 +: 4]);
    send(c);
    repeat (3) @(posedge clk);
    #1;
  endtask

  // observe 8 strobes/controls; both rings step every cycle
  task automatic schedule(input int fir, input logic [7:0] dec_pat, input logic [7:0] ilv_pat);
    check("fir_sel", int'(fir_sel), fir);
    pix_adv = 1; out_adv = 1;
    for (int i = 0; i < 8; i++) begin
      check($sformatf("dec_strobe[%0d]", i), int'(dec_strobe), int'(dec_pat[i]));
      check($sformatf("ilv_sel[%0d]", i), int'(ilv_sel), int'(ilv_pat[i]));
      @(posedge clk); #1;
    end
    pix_adv = 0; out_adv = 0;
  endtask

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int r;
    rst = 1; key_valid = 0; key_in = 0; pix_adv = 0; out_adv = 0;
    repeat (2) @(posedge clk); #1;
    rst = 0;
    // reset mode: high-pass filter, every sample kept, interleave 1,0,1,0
    schedule(4, 8'hFF, 8'h55);
    // wrong key: no restart, schedule unchanged
    configure(16'hB29F, 4'h5);
    check("no restart after wrong key", restarts, 0);
    check("fir_sel unchanged", int'(fir_sel), 4);
    // functional mode
    configure(KEY, 4'h5);
    check("restart after key", restarts, 1);
    schedule(0, 8'h55, 8'hAA);
    // second code for the functional mode
    configure(KEY, 4'hA);
    schedule(0, 8'h55, 8'hAA);
    // lower orders
    configure(KEY, 4'h4); schedule(1, 8'h55, 8'hAA);
    configure(KEY, 4'h7); schedule(2, 8'h55, 8'hAA);
    configure(KEY, 4'hE); schedule(3, 8'h55, 8'hAA);
    // nearest: interleave stuck on the original pixel
    configure(KEY, 4'h8); schedule(0, 8'h55, 8'h00);
    // swap: odd decimation phase, swapped interleave
    configure(KEY, 4'hD); schedule(0, 8'hAA, 8'h55);
    // back to the non-meaningful mode
    configure(KEY, 4'hB); schedule(4, 8'hFF, 8'h55);
    // restart realigns the rings even after an odd number of steps
    pix_adv = 1; out_adv = 1; @(posedge clk); #1; pix_adv = 0; out_adv = 0;
    configure(KEY, 4'h5); schedule(0, 8'h55, 8'hAA);
    check("restarts", restarts, 9);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
