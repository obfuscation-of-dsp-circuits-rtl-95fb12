// tb_image_scaler_top: end-to-end test of the obfuscated image scaler at its
// default parameters (32 lines of 32 pixels, 16-bit key in four words).
//
// The testbench holds its own model of the scaler: the input stream (test
// pattern or external lines), the FIR of each filter set over the last ten
// samples, the decimation ring (which samples are kept), the new-pixel rule
// (mean below the threshold, earlier sample above it) and the interleave ring
// (which of the two pixels leaves when). After every reconfiguration it
// collects the outputs from the restart on and compares them with the model.
//
// Sequence: run in the reset mode; send a wrong key (must not reconfigure);
// unlock with configure code 5 and check one full frame (1024 outputs, one per
// clock after the first); then every mode via its configure code (A, 4, 7, E,
// 8, D, B), a frame of external lines, and a last return to the functional
// mode. Each mechanism is counted: rejected key, reconfiguration, each mode,
// both interpolation branches, frame wrap-around, external input, clamping.
module tb_image_scaler_top;
  import obf_pkg::*;
  localparam logic [15:0] KEY   = 16'hB29E;
  localparam int          LINES = 32;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic         rst, key_valid, ext_en, ext_req, out_valid;
  logic [3:0]   key_in;
  logic [255:0] ext_line;
  pixel_t       out_pix;

  image_scaler_top dut (.clk, .rst, .key_valid, .key_in, .ext_en, .ext_line, .ext_req,
                        .out_pix, .out_valid);

  // ---------------- reference model ----------------
  int h[5][10] = '{
    '{1, 2, 3, 4, 6, 6, 4, 3, 2, 1},
    '{2, 4, 10, 10, 4, 2, 0, 0, 0, 0},
    '{4, 12, 12, 4, 0, 0, 0, 0, 0, 0},
    '{16, 16, 0, 0, 0, 0, 0, 0, 0, 0},
    '{1, -2, 3, -4, 6, -6, 4, -3, 2, -1}};
  // per mode: filter set, decimation ring reset state, interleave ring reset state
  int m_fir[7] = '{0, 1, 2, 3, 0, 0, 4};
  int m_dec[7] = '{1, 1, 1, 1, 1, 2, 3};
  int m_ilv[7] = '{1, 1, 1, 1, 3, 2, 2};
  string m_name[7] = '{"FUNC", "ORD6", "ORD4", "ORD2", "NEAREST", "SWAP", "SCRAMBLE"};

  logic [255:0] ext_lines[$];   // external lines in the order the scaler took them
  int           use_ext;

  int n_edge = 0, n_smooth = 0, n_clamp = 0, n_wrap = 0, n_ext = 0;
  int n_mode[7];

  function automatic int in_pixel(input int i);
    int x = i % 32, y = (i / 32) % LINES;
    if (use_ext) return int'(ext_lines[i / 32][x * 8 +: 8]);
    return (8 * x + 2 * y + (x >= 16 ? 128 : 0)) % 256;
  endfunction

  function automatic int lowbit(input int s);
    return (s & 1) ? 0 : ((s & 2) ? 1 : 0);
  endfunction

  // expected first n outputs after a restart in mode m
  function automatic void model(input int m, input int n, ref int exp_q[$]);
    int kept_idx[$], kept_val[$];
    int dstate, istate, nin, acc, prev, cur, d, np, cnt;
    exp_q.delete();
    dstate = m_dec[m]; istate = m_ilv[m];
    nin = n + 8;
    for (int i = 0; i < nin; i++) begin
      if (lowbit(dstate) == 0) begin
        acc = 0;
        for (int k = 0; k < 10; k++)
          if (i - k >= 0) acc += h[m_fir[m]][k] * in_pixel(i - k);
        acc = acc >>> 5;
        if (acc < 0 || acc > 255) n_clamp++;
        if (acc < 0) acc = 0;
        if (acc > 255) acc = 255;
        kept_idx.push_back(i); kept_val.push_back(acc);
      end
      dstate = ((dstate << 1) | (dstate >> 1)) & 3;
    end
    for (int j = 0; j < kept_idx.size() - 1 && exp_q.size() < n; j++) begin
      prev = (j == 0) ? 0 : kept_val[j - 1];
      cur  = kept_val[j];
      d    = (cur > prev) ? cur - prev : prev - cur;
      if (d < 32) begin np = (prev + cur + 1) / 2; n_smooth++; end
      else        begin np = prev; n_edge++; end
      cnt = kept_idx[j + 1] - kept_idx[j];
      if (cnt > 2) cnt = 2;
      for (int o = 0; o < cnt && exp_q.size() < n; o++) begin
        exp_q.push_back((lowbit(istate) == 0) ? prev : np);
        istate = ((istate << 1) | (istate >> 1)) & 3;
      end
    end
  endfunction

  // ---------------- stimulus helpers ----------------
  task automatic check(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic send(input logic [3:0] w);
    key_valid = 1; key_in = w;
    @(posedge clk); #1;
    key_valid = 0;
  endtask

  // apply key and configure code, then compare n outputs from the restart on
  task automatic run_mode(input logic [15:0] k, input logic [3:0] code, input int m, input int n,
                          input bit expect_restart);
    int exp_q[$];
    int got_q[$];
    int t_first, t_last, cycles, restarted;
    for (int i = 0; i < 4; i++) send(k[(3 - i) * 4 +: 4]);
    send(code);
    restarted = 0;
    for (int c = 0; c < 4; c++) begin
      if (use_ext) for (int w = 0; w < 8; w++) ext_line[w * 32 +: 32] = $urandom;
      #1;
      if (restarted && ext_req) ext_lines.push_back(ext_line);
      @(posedge clk);
      if (dut.sync_clr) begin restarted = 1; ext_lines.delete(); end
      #1;
    end
    check("restart as expected", restarted, int'(expect_restart));
    if (!expect_restart) return;
    n_mode[m]++;
    // the restart edge was within the last cycles; collect from now on
    cycles = 0; t_first = -1; t_last = 0;
    while (got_q.size() < n && cycles < 8 * n + 200) begin
      if (use_ext) for (int w = 0; w < 8; w++) ext_line[w * 32 +: 32] = $urandom;
      #1;
      if (ext_req) ext_lines.push_back(ext_line);
      @(posedge clk);
      if (out_valid) begin
        got_q.push_back(int'(out_pix));
        if (t_first < 0) t_first = cycles;
        t_last = cycles;
      end
      cycles++;
      #1;
    end
    model(m, n, exp_q);
    check($sformatf("%s output count", m_name[m]), got_q.size(), n);
    for (int i = 0; i < n && i < got_q.size(); i++)
      check($sformatf("%s output %0d", m_name[m], i), got_q[i], exp_q[i]);
    if (m != 6) begin
      // one output per clock once the pipeline is full
      check($sformatf("%s rate", m_name[m]), t_last - t_first + 1, n);
      // first output 5 cycles after the restart edge (6 when the odd phase is kept)
      check($sformatf("%s latency", m_name[m]), t_first, (m == 5) ? 4 : 3);
    end
    if (n > 32 * LINES && !use_ext) n_wrap++;
    if (use_ext) n_ext++;
  endtask

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp_q[$], got_q[$], differ;
    foreach (n_mode[i]) n_mode[i] = 0;
    rst = 1; key_valid = 0; key_in = 0; ext_en = 0; ext_line = '0; use_ext = 0;
    repeat (3) @(posedge clk); #1;
    rst = 0;
    // reset mode: compare with the model of the non-meaningful mode
    repeat (3) @(posedge clk); #1;
    differ = 0;
    for (int i = 0; i < 200; ) begin
      @(posedge clk);
      if (out_valid) begin got_q.push_back(int'(out_pix)); i++; end
      #1;
    end
    model(6, 200, exp_q);
    for (int i = 0; i < 200; i++) check("reset-mode output", got_q[i], exp_q[i]);
    model(0, 200, exp_q);
    for (int i = 0; i < 200; i++) if (got_q[i] != exp_q[i]) differ++;
    check("reset mode differs from functional", (differ > 100) ? 1 : 0, 1);
    n_mode[6]++;
    // wrong key: rejected
    run_mode(16'hB29F, 4'h5, 0, 0, 0);
    run_mode(16'h0000, 4'h5, 0, 0, 0);
    // correct key: one full frame plus wrap-around into the next
    run_mode(KEY, 4'h5, 0, 32 * LINES + 64, 1);
    run_mode(KEY, 4'hA, 0, 300, 1);
    run_mode(KEY, 4'h4, 1, 300, 1);
    run_mode(KEY, 4'h7, 2, 300, 1);
    run_mode(KEY, 4'hE, 3, 300, 1);
    run_mode(KEY, 4'h8, 4, 300, 1);
    run_mode(KEY, 4'hD, 5, 300, 1);
    run_mode(KEY, 4'hB, 6, 300, 1);
    // external lines in the functional mode
    ext_en = 1; use_ext = 1;
    run_mode(KEY, 4'h5, 0, 32 * 4, 1);
    ext_en = 0; use_ext = 0;
    run_mode(KEY, 4'h5, 0, 200, 1);
    // every mechanism must have happened
    for (int i = 0; i < 7; i++) check($sformatf("mode %s used", m_name[i]), int'(n_mode[i] > 0), 1);
    check("bilinear branch used", int'(n_smooth > 0), 1);
    check("edge branch used", int'(n_edge > 0), 1);
    check("clamping used", int'(n_clamp > 0), 1);
    check("frame wrap-around", int'(n_wrap > 0), 1);
    check("external input", int'(n_ext > 0), 1);
    $display("mechanisms: modes %0d %0d %0d %0d %0d %0d %0d, smooth %0d, edge %0d, clamp %0d, wrap %0d, ext %0d",
             n_mode[0], n_mode[1], n_mode[2], n_mode[3], n_mode[4], n_mode[5], n_mode[6],
             n_smooth, n_edge, n_clamp, n_wrap, n_ext);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
