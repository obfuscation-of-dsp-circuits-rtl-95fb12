// line_register_block: one-line buffer feeding a ten-stage pixel register bank.
//
// A whole line word is taken in when line_valid is high. From the next cycle on
// its pixels, pixel 0 first, enter a chain of NTAPS pixel registers, one per
// clock; every stage is a tap, taps[0] the newest sample and taps[NTAPS-1]
// (reg_out) the oldest. When the next line arrives right after the last pixel
// of the current one, the stream continues without a gap. The chain is not
// cleared between lines. The ten-stage chain and its register output follow the
// block diagram; the buffer-then-shift arrangement is this design's reading of
// "one-line memory buffer".
//
// Timing: pix_valid is high in the cycles in which taps hold a sample that was
// shifted in at the preceding clock edge. rst and clr empty buffer and chain.
module line_register_block
  import obf_pkg::*;
(
  input  logic                      clk,
  input  logic                      rst,
  input  logic                      clr,
  input  logic                      line_valid,
  input  logic [LINE_PIX*PIX_W-1:0] line_data,
  output pixel_t [NTAPS-1:0]        taps,
  output logic                      pix_valid,
  output pixel_t                    reg_out
);

  localparam int PTR_W = $clog2(LINE_PIX);

  pixel_t [LINE_PIX-1:0] line_buf;
  logic [PTR_W-1:0]      ptr;
  logic                  active;

  assign reg_out = taps[NTAPS-1];

  always_ff @(posedge clk) begin
    if (rst || clr) begin
      line_buf  <= '0;
      ptr       <= '0;
      active    <= 1'b0;
      taps      <= '0;
      pix_valid <= 1'b0;
    end else begin
      pix_valid <= active;
      if (active) begin
        taps <= {taps[NTAPS-2:0], line_buf[ptr]};
        ptr  <= ptr + 1'b1;
        if (int'(ptr) == LINE_PIX - 1) active <= 1'b0;
      end
      if (line_valid) begin
        line_buf <= line_data;
        ptr      <= '0;
        active   <= 1'b1;
      end
    end
  end

endmodule
