// tb_tme_test_ctrl - checks the test sequencer against behavioural models of
// the circuits it tests (two line buffers, the SAD cell cascade and the
// AccSAD cascade, all modelled here from their definitions). A clean run must
// end with pass and the predicted cycle count; a second run with one
// corrupted response in each of the three phases must count exactly three
// errors and fail.
module tb_tme_test_ctrl;
  import tme_pkg::*;
  localparam int unsigned P = 2, W = 4, N = 4, ROWS = 16;
  localparam int unsigned NACC = 5 * (P + 1);
  localparam int unsigned TOTAL = (1 << N) + ROWS + 4 * (ROWS + 32) + (1 << (2 * W));
  int checks = 0, failures = 0;

  logic clk = 1'b0, rst_n, start, busy, done, pass;
  logic [15:0] err_cnt;
  test_phase_e phase;
  logic buf_tm, buf_shift, dp_tm;
  logic [N-1:0] cur_tpat, ref_tpat;
  logic [15:0] cur_top;
  logic [16+P-1:0] ref_top;
  logic [SAD4_W-1:0] sad_ti, sad_to;
  logic [W-1:0] acc_ti_a, acc_ti_b, acc_to_a, acc_to_b;

  logic [15:0]     cur_m [ROWS];
  logic [16+P-1:0] ref_m [ROWS];
  bit inject;
  bit hit_rb, hit_sad, hit_acc;

  tme_test_ctrl #(.P(P), .W(W), .N(N), .ROWS(ROWS)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // buffer models
  always_ff @(posedge clk)
    if (buf_shift) begin
      for (int i = 0; i < ROWS - 1; i++) begin
        cur_m[i] <= cur_m[i+1];
        ref_m[i] <= ref_m[i+1];
      end
      for (int j = 0; j < 16; j++)    cur_m[ROWS-1][j] <= cur_tpat[j % N];
      for (int j = 0; j < 16 + P; j++) ref_m[ROWS-1][j] <= ref_tpat[j % N];
    end

  // response models, with optional one-off corruption per phase
  always_comb begin
    int tot;
    logic [W-1:0] ea, eb, na;
    tot = 0;
    for (int k = 0; k <= P; k++)
      for (int y = 0; y < ROWS; y++) tot += $countones(cur_m[y] ^ ref_m[y][k +: 16]);
    sad_to = SAD4_W'(int'(sad_ti) + tot);
    ea = acc_ti_a; eb = acc_ti_b;
    for (int c = 0; c < NACC; c++) begin
      na = W'(3 * int'(ea) + 2 * int'(eb));
      eb = W'(2 * int'(ea) + int'(eb));
      ea = na;
    end
    acc_to_a = ea; acc_to_b = eb;
    cur_top  = cur_m[0];
    ref_top  = ref_m[0];
    if (inject) begin
      if (phase == PH_REGBUF && cur_tpat == 4'd8 && ref_m[0][3])                  ref_top[3] = ~ref_top[3];
      if (phase == PH_SAD_APPLY && sad_ti == 5'd7 && cur_m[0][0] && !ref_m[0][0]) sad_to = sad_to + 1'b1;
      if (phase == PH_ACC && acc_ti_a == 4'd6 && acc_ti_b == 4'd4)                   acc_to_b = ~acc_to_b;
    end
  end

  task automatic run(output int cycles);
    @(negedge clk) start = 1'b1;
    @(negedge clk) start = 1'b0;
    cycles = 0;
    while (!done) begin
      if (phase == PH_REGBUF)    hit_rb = 1;
      if (phase == PH_SAD_APPLY) hit_sad = 1;
      if (phase == PH_ACC)       hit_acc = 1;
      check(busy, "busy while testing");
      @(negedge clk);
      cycles++;
    end
  endtask

  initial begin
    int cyc;
    rst_n = 1'b0; start = 1'b0; inject = 0;
    foreach (cur_m[i]) begin cur_m[i] = '0; ref_m[i] = '0; end
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    check(!busy && !done, "idle after reset");
    run(cyc);
    check(pass && err_cnt == 0, "clean run passes");
    check(cyc == TOTAL, $sformatf("clean run cycles %0d, expected %0d", cyc, TOTAL));
    check(hit_rb && hit_sad && hit_acc, "all phases entered");
    inject = 1;
    run(cyc);
    check(!pass && err_cnt == 3, $sformatf("faulty run: err_cnt=%0d", err_cnt));
    check(cyc == TOTAL, "faulty run cycles");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
