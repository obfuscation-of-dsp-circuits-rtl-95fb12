// tb_interp_bilinear_block: self-checking test of the interpolator.
//
// Random sample pairs, both with small and large differences, arrive every
// second cycle while the testbench toggles ilv_sel like a one-hot ring
// counter. Expected: the earlier sample, then the new pixel, which is the
// rounded mean when |cur - prev| < 32 and the earlier sample otherwise; one
// output per cycle. A second phase holds ilv_sel at 0 (only original pixels)
// and a third sends a pair every cycle (one output per pair). Last, pairs
// whose difference lies at 29..33 check both sides of the threshold.
module tb_interp_bilinear_block;
  import obf_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic   rst, clr, dec_valid, ilv_sel, out_valid;
  pixel_t dec_cur, dec_prev, out_pix;

  interp_bilinear_block #(.THRESH(32)) dut (.clk, .rst, .clr, .dec_cur, .dec_prev, .dec_valid,
                                            .ilv_sel, .out_pix, .out_valid);

  task automatic check(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  function automatic int new_pixel(input int p, input int c);
    int d = (c > p) ? c - p : p - c;
    return (d < 32) ? (p + c + 1) / 2 : p;
  endfunction

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int p, c, edges, smooth;
    rst = 1; clr = 0; dec_valid = 0; ilv_sel = 0; dec_cur = 0; dec_prev = 0;
    repeat (2) @(posedge clk); #1;
    rst = 0;
    check("idle", int'(out_valid), 0);
    edges = 0; smooth = 0;
    for (int phase = 0; phase < 3; phase++) begin
      for (int n = 0; n < 500; n++) begin
        p = $urandom_range(0, 255);
        c = ($urandom_range(0, 1) != 0) ? (p + $urandom_range(0, 40)) % 256 : $urandom_range(0, 255);
        if ((c > p ? c - p : p - c) < 32) smooth++; else edges++;
        dec_prev = pixel_t'(p); dec_cur = pixel_t'(c); dec_valid = 1;
        @(posedge clk); #1;
        dec_valid = 0;
        ilv_sel = 0;
        check("valid 1", int'(out_valid), 1);
        check("original pixel", int'(out_pix), p);
        if (phase == 2) continue;
        ilv_sel = (phase == 0);
        @(posedge clk); #1;
        check("valid 2", int'(out_valid), 1);
        check(phase == 0 ? "new pixel" : "held original", int'(out_pix), phase == 0 ? new_pixel(p, c) : p);
        ilv_sel = 0;
      end
      if (phase != 2) begin
        @(posedge clk); #1;
        check("drained", int'(out_valid), 0);
      end
    end
    // directed: differences right at the threshold, in both directions
    for (int n = 0; n < 64; n++) begin
      p = $urandom_range(40, 215);
      c = p + ((n % 4) - 2 + ((n % 8) < 4 ? 31 : -31));
      dec_prev = pixel_t'(p); dec_cur = pixel_t'(c); dec_valid = 1;
      @(posedge clk); #1;
      dec_valid = 0; ilv_sel = 1;
      @(posedge clk); #1;
      check($sformatf("threshold case |%0d-%0d|", c, p), int'(out_pix), new_pixel(p, c));
      ilv_sel = 0;
    end
    check("both branches used", (edges > 100 && smooth > 100) ? 1 : 0, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
