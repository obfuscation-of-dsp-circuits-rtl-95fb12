// combined_filter_block: selectable-order anti-aliasing FIR and decimator.
//
// Five FIR connections are computed in parallel over the register-bank taps,
// y_s = sum_k h_s[k] * x[t-k], with taps[k] = x[t-k]: low-pass filters of order
// 10, 6, 4 and 2 and one high-pass set used only by the non-meaningful mode
// (coefficients in obf_pkg::fir_coef, each low-pass set summing to 32). The
// filter-order switch, a secure_switch driven by the reconfigurator, picks one;
// the result is shifted right by 5 and clamped to 0..255. The decimation switch
// keeps a sample only when dec_strobe (from the decimation ring counter) is high
// with pix_valid, which realises y[n] = sum_k x[nM-k] h[k] for M = 2 in the
// correct mode. The current and the previous kept sample go on to the
// interpolator. Decimating FIR by the dot-product formula follows the source
// scheme; orders, coefficients and rounding are this design's.
//
// Timing: dec_cur/dec_prev/dec_valid are registered, one cycle after the
// pix_valid cycle of a kept sample. rst and clr clear them.
module combined_filter_block
  import obf_pkg::*;
(
  input  logic               clk,
  input  logic               rst,
  input  logic               clr,
  input  pixel_t [NTAPS-1:0] taps,
  input  logic               pix_valid,
  input  fir_sel_t           fir_sel,
  input  logic               dec_strobe,
  output pixel_t             dec_cur,
  output pixel_t             dec_prev,
  output logic               dec_valid
);

  localparam int ACC_W = PIX_W + COEF_W + $clog2(NTAPS) + 1;

  pixel_t [NFIR-1:0] fir_out;
  pixel_t            fir_y;

  // parallel FIR connections
  always_comb begin
    for (int s = 0; s < NFIR; s++) begin
      logic signed [ACC_W-1:0] acc;
      logic signed [ACC_W-1:0] q;
      acc = '0;
      for (int k = 0; k < NTAPS; k++)
        acc += ACC_W'(fir_coef(fir_sel_t'(s), k)) * $signed({1'b0, taps[k]});
      q = acc >>> COEF_SH;
      if (q < 0)                  fir_out[s] = '0;
      else if (q > (1 << PIX_W) - 1) fir_out[s] = '1;
      else                        fir_out[s] = PIX_W'(q);
    end
  end

  // filter-order switch
  secure_switch #(.N(NFIR), .W(PIX_W)) u_order_sw (
    .conn(fir_out), .sel(fir_sel), .y(fir_y)
  );

  // decimation switch: keep the samples the ring counter marks
  always_ff @(posedge clk) begin
    if (rst || clr) begin
      dec_cur   <= '0;
      dec_prev  <= '0;
      dec_valid <= 1'b0;
    end else begin
      dec_valid <= pix_valid && dec_strobe;
      if (pix_valid && dec_strobe) begin
        dec_prev <= dec_cur;
        dec_cur  <= fir_y;
      end
    end
  end

endmodule
