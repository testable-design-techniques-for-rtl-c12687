// tb_treg_buf - checks the line-shifting register buffer (16 x 24, 8-bit
// test sub-lines): reset to zero, hold without shift, random normal-mode
// lines against a model of the last 16 lines, and the test-mode sweep of all
// 2^8 counter patterns read back from the top line 16 shifts later.
module tb_treg_buf;
  localparam int unsigned ROWS = 16, COLS = 24, N = 8;
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n, shift, tm;
  logic [COLS-1:0] line_in, lines [ROWS], top_line, model [ROWS];
  logic [N-1:0] tpat;

  treg_buf #(.ROWS(ROWS), .COLS(COLS), .N(N)) dut (.clk, .rst_n, .shift, .tm, .line_in, .tpat, .lines, .top_line);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  function automatic logic [COLS-1:0] rep(input logic [N-1:0] p);
    logic [COLS-1:0] l;
    for (int j = 0; j < COLS; j++) l[j] = p[j % N];
    return l;
  endfunction

  task automatic compare_all(input string what);
    for (int i = 0; i < ROWS; i++) check(lines[i] == model[i], what);
    check(top_line == model[0], {what, " top"});
  endtask

  initial begin
    rst_n = 1'b0; shift = 1'b0; tm = 1'b0; line_in = '0; tpat = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    foreach (model[i]) model[i] = '0;
    compare_all("reset");
    // normal mode, random shift enable
    for (int c = 0; c < 400; c++) begin
      shift   = 1'($urandom);
      line_in = COLS'($urandom);
      tpat    = N'($urandom);
      @(posedge clk);
      if (shift) begin
        for (int i = 0; i < ROWS - 1; i++) model[i] = model[i+1];
        model[ROWS-1] = line_in;
      end
      #1 compare_all("normal");
    end
    // test mode: counter patterns, read back ROWS shifts later
    tm = 1'b1; shift = 1'b1; line_in = '1;
    for (int k = 0; k < (1 << N) + ROWS; k++) begin
      tpat = N'(k);
      if (k >= ROWS) check(top_line == rep(N'(k - ROWS)), "test readback");
      @(posedge clk);
      #1;
    end
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
