// tb_line_register_block: self-checking test of the line buffer and register bank.
//
// Random line words are delivered every 32 cycles (back to back) and, in a
// second phase, with random gaps. A model keeps the stream of pixels in the
// order they should leave the buffer and checks, whenever pix_valid is high,
// that taps[k] holds the sample k places back in the stream (zero before the
// first sample) and that reg_out is the oldest tap. It also checks that a
// back-to-back stream has no gap in pix_valid.
module tb_line_register_block;
  import obf_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic               rst, clr, line_valid, pix_valid;
  logic [255:0]       line_data;
  pixel_t [NTAPS-1:0] taps;
  pixel_t             reg_out;

  line_register_block dut (.clk, .rst, .clr, .line_valid, .line_data, .taps, .pix_valid, .reg_out);

  pixel_t sent[$];    // pixels in stream order
  int     nvalid = 0;

  task automatic check(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  // model check on every valid sample
  always @(posedge clk) begin
    if (!rst && pix_valid) begin
      for (int k = 0; k < NTAPS; k++)
        check($sformatf("tap %0d at sample %0d", k, nvalid), int'(taps[k]),
              (nvalid - k >= 0) ? int'(sent[nvalid - k]) : 0);
      check("reg_out", int'(reg_out), int'(taps[NTAPS-1]));
      nvalid++;
    end
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic give_line();
    for (int w = 0; w < 8; w++) line_data[w * 32 +: 32] = $urandom;
    for (int x = 0; x < 32; x++) sent.push_back(line_data[x * 8 +: 8]);
    line_valid = 1;
    @(posedge clk); #1;
    line_valid = 0;
  endtask

  initial begin
    int gaps;
    rst = 1; clr = 0; line_valid = 0; line_data = '0;
    repeat (2) @(posedge clk); #1;
    rst = 0;
    // back to back
    for (int l = 0; l < 20; l++) begin
      give_line();
      repeat (31) @(posedge clk);
      #1;
    end
    check("samples after back-to-back lines", nvalid, 20 * 32 - 2);
    repeat (2) @(posedge clk); #1;
    check("all samples delivered", nvalid, 20 * 32);
    // lines with gaps
    for (int l = 0; l < 20; l++) begin
      give_line();
      gaps = $urandom_range(31, 60);
      repeat (gaps) @(posedge clk);
      #1;
    end
    repeat (40) @(posedge clk); #1;
    check("all samples delivered with gaps", nvalid, 40 * 32);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
