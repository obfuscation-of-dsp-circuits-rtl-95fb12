// interp_bilinear_block: edge-aware interpolation by two with an interleave switch.
//
// For every pair of neighbouring kept samples (dec_prev, dec_cur) the block
// measures their distance Diff = |dec_cur - dec_prev|. Below THRESH the new pixel
// is the bilinear (here one-dimensional, two-point) mean (prev + cur + 1) / 2; at
// or above THRESH it repeats dec_prev, so that an edge stays sharp instead of
// being smeared. The pair (dec_prev, new pixel) is stored and a 2-to-1 secure
// switch, controlled by the interleave ring counter through ilv_sel, emits the
// two pixels over the next two cycles: original first, new pixel second in the
// correct schedule. The threshold test follows the source flowchart; the
// threshold value and the edge rule are this design's.
//
// Timing: a pair arriving with dec_valid in cycle t gives outputs in cycles t+1
// and t+2 (out_valid high); a newer pair replaces a pair not yet fully sent.
module interp_bilinear_block
  import obf_pkg::*;
#(
  parameter int THRESH = 32
) (
  input  logic   clk,
  input  logic   rst,
  input  logic   clr,
  input  pixel_t dec_cur,
  input  pixel_t dec_prev,
  input  logic   dec_valid,
  input  logic   ilv_sel,
  output pixel_t out_pix,
  output logic   out_valid
);

  pixel_t           diff;
  pixel_t           new_pix;
  logic [PIX_W:0]   sum;
  pixel_t           orig_q, new_q;
  logic [1:0]       pending;

  always_comb begin
    diff    = (dec_cur > dec_prev) ? dec_cur - dec_prev : dec_prev - dec_cur;
    sum     = {1'b0, dec_cur} + {1'b0, dec_prev} + 1'b1;
    new_pix = (int'(diff) < THRESH) ? PIX_W'(sum >> 1) : dec_prev;
  end

  always_ff @(posedge clk) begin
    if (rst || clr) begin
      orig_q  <= '0;
      new_q   <= '0;
      pending <= '0;
    end else if (dec_valid) begin
      orig_q  <= dec_prev;
      new_q   <= new_pix;
      pending <= 2'd2;
    end else if (pending != '0) begin
      pending <= pending - 1'b1;
    end
  end

  // interleave switch
  secure_switch #(.N(ILV_L), .W(PIX_W)) u_ilv_sw (
    .conn({new_q, orig_q}), .sel(ilv_sel), .y(out_pix)
  );

  assign out_valid = (pending != '0);

endmodule
