// tb_tme_top - end-to-end test of the testable motion estimator at its
// default size (9 BMMs, 9-bit SADs, 8-bit test sub-lines).
//
// 1. Normal mode: loads a random current eMB, then streams reference lines
//    (random lines, lines equal to the current eMB at some displacement, and
//    lines that differ everywhere). Every cycle with sad_valid, all 9 x 41
//    SADs are compared with mismatch counts taken pixel by pixel from models
//    of the two buffers.
// 2. Self-test: pulses test_start and expects test_pass after the predicted
//    number of cycles, having passed through every test phase.
// 3. Normal mode again: sad_valid must be low until both buffers are
//    reloaded, after which the SADs are checked again.
// Each mechanism (valid output, exact match, all-pixel mismatch, every test
// phase, pass, valid drop after test) is counted and must occur.
module tb_tme_top;
  import tme_pkg::*;
  localparam int unsigned P = 8, W = 9, N = 8, NB = P + 1;
  localparam int unsigned TEST_CYCLES = (1 << N) + 16 + 4 * (16 + 32) + (1 << (2 * W));
  int checks = 0, failures = 0;

  logic clk = 1'b0, rst_n;
  logic [15:0] cur_line;
  logic cur_shift;
  logic [16+P-1:0] ref_line;
  logic ref_shift;
  logic [W-1:0] sads [NB][NUM_SADS];
  logic sad_valid, test_start, test_busy, test_done, test_pass;
  logic [15:0] test_err_cnt;
  test_phase_e test_phase;

  tme_top dut (.*);

  always #5 clk = ~clk;

  logic [15:0]     cur_m [16];
  logic [16+P-1:0] ref_m [16];
  int exp_sad [NB][NUM_SADS];
  bit exp_ok;
  int n_valid, n_zero, n_full, n_ph_rb, n_ph_fill, n_ph_apply, n_ph_acc, n_pass, n_drop;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  function automatic int diff(int k, int x0, int y0, int w, int h);
    int s = 0;
    for (int y = y0; y < y0 + h; y++)
      for (int x = x0; x < x0 + w; x++) s += int'(cur_m[y][x] ^ ref_m[y][x + k]);
    return s;
  endfunction

  function automatic void compute_expected();
    for (int k = 0; k < NB; k++) begin
      for (int b = 0; b < 16; b++) exp_sad[k][IDX_4X4 + b] = diff(k, 4*(b%4), 4*(b/4), 4, 4);
      for (int q = 0; q < 4; q++) begin
        automatic int qx = 8 * (q % 2);
        automatic int qy = 8 * (q / 2);
        exp_sad[k][IDX_4X8 + 2*q]     = diff(k, qx,     qy,     4, 8);
        exp_sad[k][IDX_4X8 + 2*q + 1] = diff(k, qx + 4, qy,     4, 8);
        exp_sad[k][IDX_8X4 + 2*q]     = diff(k, qx,     qy,     8, 4);
        exp_sad[k][IDX_8X4 + 2*q + 1] = diff(k, qx,     qy + 4, 8, 4);
        exp_sad[k][IDX_8X8 + q]       = diff(k, qx,     qy,     8, 8);
      end
      exp_sad[k][IDX_8X16]     = diff(k, 0, 0, 8, 16);
      exp_sad[k][IDX_8X16 + 1] = diff(k, 8, 0, 8, 16);
      exp_sad[k][IDX_16X8]     = diff(k, 0, 0, 16, 8);
      exp_sad[k][IDX_16X8 + 1] = diff(k, 0, 8, 16, 8);
      exp_sad[k][IDX_16X16]    = diff(k, 0, 0, 16, 16);
    end
  endfunction

  // buffer models
  always_ff @(posedge clk)
    if (rst_n && !test_busy) begin
      if (cur_shift) begin
        for (int i = 0; i < 15; i++) cur_m[i] <= cur_m[i+1];
        cur_m[15] <= cur_line;
      end
      if (ref_shift) begin
        for (int i = 0; i < 15; i++) ref_m[i] <= ref_m[i+1];
        ref_m[15] <= ref_line;
      end
    end

  // compare the registered SADs with the state of the previous cycle
  always @(negedge clk) begin
    if (rst_n) begin
      if (sad_valid) begin
        n_valid++;
        check(exp_ok, "sad_valid without a full window");
        for (int k = 0; k < NB; k++)
          for (int i = 0; i < NUM_SADS; i++)
            check(int'(sads[k][i]) == exp_sad[k][i],
                  $sformatf("BMM %0d SAD %0d = %0d, expected %0d", k, i, sads[k][i], exp_sad[k][i]));
        for (int k = 0; k < NB; k++) begin
          if (exp_sad[k][IDX_16X16] == 0)   n_zero++;
          if (exp_sad[k][IDX_16X16] == 256) n_full++;
        end
      end
      compute_expected();
    end
  end

  task automatic load_cur();
    for (int y = 0; y < 16; y++) begin
      @(negedge clk);
      cur_shift = 1'b1;
      cur_line  = 16'($urandom);
    end
    @(negedge clk) cur_shift = 1'b0;
  endtask

  // mode 0: random, 1: copy of current line y at displacement d, 2: complement
  task automatic stream_ref(input int lines, input int mode, input int d);
    for (int y = 0; y < lines; y++) begin
      @(negedge clk);
      ref_shift = 1'b1;
      ref_line  = (16+P)'({$urandom, $urandom});
      if (mode == 1) ref_line[d +: 16] = cur_m[y % 16];
      if (mode == 2) ref_line[15:0]    = ~cur_m[y % 16];
    end
    @(negedge clk) ref_shift = 1'b0;
  endtask

  initial begin
    int cyc;
    rst_n = 1'b0; cur_shift = 1'b0; ref_shift = 1'b0; cur_line = '0; ref_line = '0;
    test_start = 1'b0; exp_ok = 0;
    foreach (cur_m[i]) cur_m[i] = '0;
    foreach (ref_m[i]) ref_m[i] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    load_cur();
    exp_ok = 1;          // valid may appear only once 16 ref lines are in
    stream_ref(20, 0, 0);
    stream_ref(16, 1, 5);
    stream_ref(16, 2, 0);
    stream_ref(8, 0, 0);

    // self-test
    @(negedge clk) test_start = 1'b1;
    @(negedge clk) test_start = 1'b0;
    cyc = 0;
    while (!test_done) begin
      if (test_phase == PH_REGBUF)    n_ph_rb++;
      if (test_phase == PH_SAD_FILL)  n_ph_fill++;
      if (test_phase == PH_SAD_APPLY) n_ph_apply++;
      if (test_phase == PH_ACC)       n_ph_acc++;
      check(!sad_valid, "no valid SADs during test");
      @(negedge clk);
      cyc++;
    end
    check(cyc == TEST_CYCLES, $sformatf("test took %0d cycles, expected %0d", cyc, TEST_CYCLES));
    check(test_pass && test_err_cnt == 0, $sformatf("self-test result: err_cnt=%0d", test_err_cnt));
    if (test_pass) n_pass++;
    check(n_ph_rb == (1 << N) + 16 && n_ph_fill == 64 && n_ph_apply == 128 && n_ph_acc == (1 << (2 * W)),
          "test phase lengths");

    // back to normal mode: buffers hold test data, must be reloaded
    foreach (cur_m[i]) cur_m[i] = dut.cur_lines[i];
    foreach (ref_m[i]) ref_m[i] = dut.ref_lines[i];
    @(negedge clk);
    if (!sad_valid) n_drop++;
    load_cur();
    check(!sad_valid, "valid before reference reload");
    stream_ref(18, 1, 0);
    repeat (3) @(negedge clk);

    check(n_valid > 0,   "valid SAD outputs seen");
    check(n_zero > 0,    "exact match (SAD 0) seen");
    check(n_full > 0,    "all-pixel mismatch (SAD 256) seen");
    check(n_ph_rb > 0 && n_ph_fill > 0 && n_ph_apply > 0 && n_ph_acc > 0, "all test phases run");
    check(n_pass > 0,    "self-test passed");
    check(n_drop > 0,    "valid dropped after test");
    $display("mechanisms: valid=%0d zero=%0d full=%0d regbuf=%0d fill=%0d apply=%0d acc=%0d pass=%0d drop=%0d",
             n_valid, n_zero, n_full, n_ph_rb, n_ph_fill, n_ph_apply, n_ph_acc, n_pass, n_drop);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (TEST_CYCLES + 5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
