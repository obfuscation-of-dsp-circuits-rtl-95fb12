// tb_image_input_block: self-checking test of the counter module.
//
// With LINES=4, checks that a line word appears exactly every 32 cycles, that
// the line number counts 0..3 and wraps, that every pixel of the generated
// word matches p(x,y) = 8x + 2y + 128*(x >= 16) mod 256 computed here, that an
// external line replaces the pattern when ext_en is high, and that clr
// restarts the sequence at line 0.
module tb_image_input_block;
  localparam int LINES = 4;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic         rst, clr, ext_en, line_valid, ext_req;
  logic [255:0] ext_line, line_data, ext_q;
  logic [1:0]   line_idx;

  image_input_block #(.LINES(LINES)) dut (
    .clk, .rst, .clr, .ext_en, .ext_line, .line_valid, .line_data, .line_idx, .ext_req);

  task automatic check(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int last_t, t, exp_row, lines_seen, ext_seen;
    logic ext_was;
    rst = 1; clr = 0; ext_en = 0; ext_line = '0;
    repeat (2) @(posedge clk); #1;
    rst = 0;
    last_t = -1; exp_row = 0; lines_seen = 0; ext_seen = 0; ext_was = 0;
    for (t = 0; t < 1200; t++) begin
      // external lines in the middle of the run
      ext_en = (t >= 400 && t < 600);
      for (int w = 0; w < 8; w++) ext_line[w * 32 +: 32] = $urandom;
      if (t == 900) clr = 1;
      #1;
      if (ext_req) ext_q = ext_line;
      ext_was = ext_req;
      @(posedge clk); #1;
      if (clr) begin
        clr = 0; exp_row = 0; last_t = -1;
        continue;
      end
      if (line_valid) begin
        if (last_t >= 0) check("line period", t - last_t, 32);
        last_t = t;
        check("line_idx", line_idx, exp_row);
        if (ext_was) begin
          check("external line", (line_data == ext_q) ? 1 : 0, 1);
          ext_seen++;
        end else begin
          for (int x = 0; x < 32; x++)
            check($sformatf("pixel %0d of line %0d", x, exp_row), line_data[x * 8 +: 8],
                  (8 * x + 2 * exp_row + (x >= 16 ? 128 : 0)) % 256);
        end
        exp_row = (exp_row + 1) % LINES;
        lines_seen++;
      end
    end
    check("lines seen", (lines_seen > 30) ? 1 : 0, 1);
    check("external lines seen", (ext_seen >= 5) ? 1 : 0, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
