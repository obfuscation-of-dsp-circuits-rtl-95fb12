// tb_secure_switch: self-checking test of the N-to-1 switch.
//
// A 5-input, 8-bit switch gets random connections and every select value
// 0..7; the expected output is the selected connection, or connection 0 for a
// select beyond the last input.
module tb_secure_switch;
  int checks = 0, failures = 0;

  logic [4:0][7:0] conn;
  logic [2:0]      sel;
  logic [7:0]      y;

  secure_switch #(.N(5), .W(8)) dut (.conn, .sel, .y);

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] exp;
    for (int i = 0; i < 400; i++) begin
      for (int c = 0; c < 5; c++) conn[c] = 8'($urandom);
      sel = 3'(i % 8);
      #1;
      exp = (int'(sel) < 5) ? conn[sel] : conn[0];
      checks++;
      if (y !== exp) begin
        failures++;
        $display("FAIL sel=%0d y=%h expected %h", sel, y, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
