// image_input_block: counter module that times the image and supplies its lines.
//
// A pixel counter (0..LINE_PIX-1) and a line counter (0..LINES-1) give the sync
// timing of the scaler: one line of LINE_PIX pixels every LINE_PIX cycles, the
// lines of a frame back to back, frames repeating. At the start of each line the
// block emits the whole line as one LINE_PIX*PIX_W-bit word (256 bits by
// default, pixel 0 in the low byte). The word is either the built-in test
// pattern, p(x,y) = 8x + 2y + 128*(x >= LINE_PIX/2) mod 256 (a ramp with one
// vertical edge), or ext_line when ext_en is high; ext_req marks the cycle in
// which ext_line is sampled. The pattern and the external port are this
// design's choices; the 256-bit line output follows the block diagram.
//
// Timing: line_valid is a registered one-cycle pulse, line_data is held until
// the next line. rst and clr restart at pixel 0 of line 0.
module image_input_block
  import obf_pkg::*;
#(
  parameter int LINES  = 32,
  parameter int LINE_W = (LINES > 1) ? $clog2(LINES) : 1
) (
  input  logic                       clk,
  input  logic                       rst,
  input  logic                       clr,
  input  logic                       ext_en,
  input  logic [LINE_PIX*PIX_W-1:0]  ext_line,
  output logic                       line_valid,
  output logic [LINE_PIX*PIX_W-1:0]  line_data,
  output logic [LINE_W-1:0]          line_idx,
  output logic                       ext_req
);

  localparam int COL_W = $clog2(LINE_PIX);

  logic [COL_W-1:0]          col;
  logic [LINE_W-1:0]         row;
  logic [LINE_PIX*PIX_W-1:0] pattern;

  always_comb begin
    for (int x = 0; x < LINE_PIX; x++) begin
      pattern[x*PIX_W +: PIX_W] = PIX_W'(8 * x + 2 * int'(row) + ((x >= LINE_PIX / 2) ? 128 : 0));
    end
  end

  assign ext_req = ext_en && (col == '0);

  always_ff @(posedge clk) begin
    if (rst || clr) begin
      col        <= '0;
      row        <= '0;
      line_valid <= 1'b0;
      line_data  <= '0;
      line_idx   <= '0;
    end else begin
      line_valid <= (col == '0);
      if (col == '0) begin
        line_data <= ext_en ? ext_line : pattern;
        line_idx  <= row;
      end
      if (int'(col) == LINE_PIX - 1) begin
        col <= '0;
        row <= (int'(row) == LINES - 1) ? '0 : row + 1'b1;
      end else begin
        col <= col + 1'b1;
      end
    end
  end

endmodule
