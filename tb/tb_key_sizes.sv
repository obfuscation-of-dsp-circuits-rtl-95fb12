// tb_key_sizes: the scaler with four key sizes, 8, 16, 32 and 64 key bits.
//
// Each key_size_case instance checks that a key wrong in any single word is
// rejected and that the correct key followed by a functional configure word
// switches its scaler into the functional mode. Totals are summed here.
module tb_key_sizes;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic start = 1'b0;
  logic [3:0] done;
  int c[4], f[4];
  int checks = 0, failures = 0;

  key_size_case #(.KEY_W(4), .KEY_LEN(2), .KEY(8'h5C))                 k8  (.clk, .start, .done(done[0]), .checks(c[0]), .failures(f[0]));
  key_size_case #(.KEY_W(4), .KEY_LEN(4), .KEY(16'hB29E))              k16 (.clk, .start, .done(done[1]), .checks(c[1]), .failures(f[1]));
  key_size_case #(.KEY_W(8), .KEY_LEN(4), .KEY(32'h3C_A7_19_E2))       k32 (.clk, .start, .done(done[2]), .checks(c[2]), .failures(f[2]));
  key_size_case #(.KEY_W(8), .KEY_LEN(8), .KEY(64'h91_4E_D3_07_6B_F8_25_AC)) k64 (.clk, .start, .done(done[3]), .checks(c[3]), .failures(f[3]));

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(posedge clk); start = 1'b1;
    wait (&done);
    @(posedge clk);
    for (int i = 0; i < 4; i++) begin checks += c[i]; failures += f[i]; end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
