// image_scaler_top: image scaler obfuscated by its own high-level transformation.
//
// Datapath, one pixel per clock: the image input block (counter module) emits a
// 256-bit line every 32 cycles; the line register block buffers it and shifts
// the pixels through a ten-stage register bank; the combined filter block
// low-pass filters and decimates by 2; the bilinear interpolator block
// re-inserts one new pixel between every two kept ones, so one output pixel
// leaves per clock. The multirate schedule of that datapath is carried by three
// switches (filter order, decimation phase, interleave order). The main control
// block sets them: it accepts a key sequence on key_in, and only after the
// correct key does it take the next word as configure data and switch into the
// mode that word selects. After reset, or with a wrong key, the scaler keeps
// running in a non-meaningful mode; other configure data give meaningful but
// wrong outputs (other filter orders or switch schedules).
//
// Interface: key words are applied with key_valid; ext_en/ext_line let external
// image lines replace the built-in test pattern (ext_line is sampled while
// ext_req is high). out_pix is valid with out_valid.
// Timing: a reconfiguration restarts the whole datapath two cycles after the
// configure word; the first output pixel appears 5 cycles after a restart
// (6 in the mode that keeps the odd samples), then one pixel per clock.
module image_scaler_top
  import obf_pkg::*;
#(
  parameter int                       KEY_W   = 4,
  parameter int                       KEY_LEN = 4,
  parameter logic [KEY_W*KEY_LEN-1:0] KEY     = 16'hB29E,
  parameter int                       LINES   = 32,
  parameter int                       THRESH  = 32
) (
  input  logic                      clk,
  input  logic                      rst,
  input  logic                      key_valid,
  input  logic [KEY_W-1:0]          key_in,
  input  logic                      ext_en,
  input  logic [LINE_PIX*PIX_W-1:0] ext_line,
  output logic                      ext_req,
  output pixel_t                    out_pix,
  output logic                      out_valid
);

  logic                      sync_clr;
  fir_sel_t                  fir_sel;
  logic                      dec_strobe, ilv_sel;
  logic                      line_valid;
  logic [LINE_PIX*PIX_W-1:0] line_data;
  pixel_t [NTAPS-1:0]        taps;
  logic                      pix_valid;
  pixel_t                    dec_cur, dec_prev;
  logic                      dec_valid;

  main_control_block #(.KEY_W(KEY_W), .KEY_LEN(KEY_LEN), .KEY(KEY)) u_ctrl (
    .clk, .rst, .key_valid, .key_in,
    .pix_adv(pix_valid), .out_adv(out_valid),
    .fir_sel, .dec_strobe, .ilv_sel, .sync_clr
  );

  image_input_block #(.LINES(LINES)) u_img (
    .clk, .rst, .clr(sync_clr), .ext_en, .ext_line,
    .line_valid, .line_data, .line_idx(), .ext_req
  );

  line_register_block u_lreg (
    .clk, .rst, .clr(sync_clr), .line_valid, .line_data,
    .taps, .pix_valid, .reg_out()
  );

  combined_filter_block u_filt (
    .clk, .rst, .clr(sync_clr), .taps, .pix_valid, .fir_sel, .dec_strobe,
    .dec_cur, .dec_prev, .dec_valid
  );

  interp_bilinear_block #(.THRESH(THRESH)) u_interp (
    .clk, .rst, .clr(sync_clr), .dec_cur, .dec_prev, .dec_valid, .ilv_sel,
    .out_pix, .out_valid
  );

endmodule
