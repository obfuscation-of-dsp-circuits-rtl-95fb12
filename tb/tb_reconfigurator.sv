// tb_reconfigurator: self-checking test of the mode register and its tables.
//
// Checks the reset mode, then applies every configure code in random order and
// compares mode, filter-order control, both ring-counter reset states and the
// reconfig pulse with an expected table written out independently here.
module tb_reconfigurator;
  import obf_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic       rst, cfg_valid, reconfig;
  logic [3:0] cfg_data;
  mode_t      mode;
  recfg_t     cfg;

  reconfigurator dut (.clk, .rst, .cfg_valid, .cfg_data, .mode, .cfg, .reconfig);

  // expected: {mode, fir_sel, dec_state, ilv_state} per configure code
  int exp_mode[16] = '{6, 3, 2, 4, 1, 0, 6, 2, 4, 3, 0, 6, 1, 5, 3, 6};
  int exp_fir [7]  = '{0, 1, 2, 3, 0, 0, 4};
  int exp_dec [7]  = '{1, 1, 1, 1, 1, 2, 3};
  int exp_ilv [7]  = '{1, 1, 1, 1, 3, 2, 2};

  task automatic check(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic check_mode(input int m);
    check("mode", int'(mode), m);
    check("fir_sel", int'(cfg.fir_sel), exp_fir[m]);
    check("dec_state", int'(cfg.dec_state), exp_dec[m]);
    check("ilv_state", int'(cfg.ilv_state), exp_ilv[m]);
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int m;
    rst = 1; cfg_valid = 0; cfg_data = 0;
    #1;
    check("reset-state settings during reset", int'(cfg.fir_sel), exp_fir[6]);
    @(posedge clk); #1;
    rst = 0;
    check_mode(6);
    check("no reconfig after reset", int'(reconfig), 0);
    m = 6;
    for (int n = 0; n < 64; n++) begin
      cfg_data  = 4'($urandom);
      cfg_valid = 1;
      @(posedge clk); #1;
      cfg_valid = 0;
      m = exp_mode[cfg_data];
      check("reconfig pulse", int'(reconfig), 1);
      check_mode(m);
      cfg_data = 4'($urandom);
      @(posedge clk); #1;
      check("reconfig one cycle", int'(reconfig), 0);
      check_mode(m);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
