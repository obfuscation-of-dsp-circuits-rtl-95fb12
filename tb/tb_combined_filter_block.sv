// tb_combined_filter_block: self-checking test of the FIR and decimator.
//
// Random register-bank contents, filter selections, pix_valid and dec_strobe
// are applied. The expected filter result is computed here from the
// coefficient sets written out independently (sum of h[k]*x[t-k], arithmetic
// shift by 5, clamp to 0..255), and the expected kept-sample pair is tracked:
// a sample is kept only when pix_valid and dec_strobe are both high.
module tb_combined_filter_block;
  import obf_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic               rst, clr, pix_valid, dec_strobe, dec_valid;
  pixel_t [NTAPS-1:0] taps;
  fir_sel_t           fir_sel;
  pixel_t             dec_cur, dec_prev;

  combined_filter_block dut (.clk, .rst, .clr, .taps, .pix_valid, .fir_sel, .dec_strobe,
                             .dec_cur, .dec_prev, .dec_valid);

  int h[5][10] = '{
    '{1, 2, 3, 4, 6, 6, 4, 3, 2, 1},
    '{2, 4, 10, 10, 4, 2, 0, 0, 0, 0},
    '{4, 12, 12, 4, 0, 0, 0, 0, 0, 0},
    '{16, 16, 0, 0, 0, 0, 0, 0, 0, 0},
    '{1, -2, 3, -4, 6, -6, 4, -3, 2, -1}};

  function automatic int model(input int s);
    int acc = 0;
    for (int k = 0; k < 10; k++) acc += h[s][k] * int'(taps[k]);
    acc = acc >>> 5;
    if (acc < 0) acc = 0;
    if (acc > 255) acc = 255;
    return acc;
  endfunction

  task automatic check(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int m_cur, m_prev, m_vld, kept, clamped;
    rst = 1; clr = 0; pix_valid = 0; dec_strobe = 0; fir_sel = FIR10; taps = '0;
    repeat (2) @(posedge clk); #1;
    rst = 0;
    m_cur = 0; m_prev = 0; kept = 0; clamped = 0;
    for (int n = 0; n < 4000; n++) begin
      for (int k = 0; k < NTAPS; k++)
        taps[k] = (n % 3 == 0) ? pixel_t'($urandom) : pixel_t'($urandom_range(0, 1) ? 255 : $urandom_range(0, 20));
      fir_sel    = fir_sel_t'($urandom_range(0, 4));
      pix_valid  = $urandom_range(0, 3) != 0;
      dec_strobe = $urandom_range(0, 1);
      m_vld = pix_valid && dec_strobe;
      if (m_vld) begin
        m_prev = m_cur;
        m_cur = model(int'(fir_sel));
        if (m_cur == 0 || m_cur == 255) clamped++;
        kept++;
      end
      @(posedge clk); #1;
      check("dec_valid", int'(dec_valid), m_vld);
      check("dec_cur", int'(dec_cur), m_cur);
      check("dec_prev", int'(dec_prev), m_prev);
    end
    check("samples kept", (kept > 1000) ? 1 : 0, 1);
    check("clamping exercised", (clamped > 10) ? 1 : 0, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
