// tb_tme_selftest_w8 - runs the built-in self-test of the motion estimator
// in the configuration used for the test-pattern counts: p = 8 (9 BMMs,
// 45 cascaded tAccSAD modules, 144 cascaded SAD cells), w = 8, n = 8.
// It counts the patterns applied in each phase and compares them with the
// expected counts: 2^n = 256 register-buffer patterns, 2^7 = 128 SAD-cell
// patterns and 2^(2w) = 65536 AccSAD patterns, and expects a pass.
module tb_tme_selftest_w8;
  import tme_pkg::*;
  localparam int unsigned P = 8, W = 8, N = 8, NB = P + 1;
  int checks = 0, failures = 0;

  logic clk = 1'b0, rst_n;
  logic [W-1:0] sads [NB][NUM_SADS];
  logic sad_valid, test_start, test_busy, test_done, test_pass;
  logic [15:0] test_err_cnt;
  test_phase_e test_phase;
  int n_rb, n_sad, n_acc;

  tme_top #(.P(P), .W(W), .N(N)) dut (
    .clk, .rst_n, .cur_line(16'h0), .cur_shift(1'b0), .ref_line('0), .ref_shift(1'b0),
    .sads, .sad_valid, .test_start, .test_busy, .test_done, .test_pass, .test_err_cnt, .test_phase
  );

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    rst_n = 1'b0; test_start = 1'b0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk) test_start = 1'b1;
    @(negedge clk) test_start = 1'b0;
    while (!test_done) begin
      // a pattern is checked on every cycle except the first 16 of the buffer phase
      if (test_phase == PH_REGBUF && dut.u_ctrl.cnt >= 16) n_rb++;
      if (test_phase == PH_SAD_APPLY) n_sad++;
      if (test_phase == PH_ACC)       n_acc++;
      @(negedge clk);
    end
    check(n_rb == 256,    $sformatf("register buffer patterns %0d", n_rb));
    check(n_sad == 128,   $sformatf("SAD cell patterns %0d", n_sad));
    check(n_acc == 65536, $sformatf("AccSAD patterns %0d", n_acc));
    check(test_pass && test_err_cnt == 0, "self-test passes");
    $display("patterns: regbuf=%0d sad=%0d accsad=%0d", n_rb, n_sad, n_acc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
