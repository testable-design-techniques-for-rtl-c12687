// tb_taccsad_nw - checks the five-module AccSAD network: all 41 SADs from
// random 4x4 SADs against sums computed here block by block, and the
// test-mode cascade of five modules against five applications of
// {A, B} -> {3A+2B, 2A+B}.
module tb_taccsad_nw;
  import tme_pkg::*;
  localparam int unsigned W = 9;
  int checks = 0, failures = 0;
  logic tm;
  logic [SAD4_W-1:0] sad4 [16];
  logic [W-1:0] ta, tb, sads [NUM_SADS], toa, tob;

  taccsad_nw #(.W(W)) dut (.tm, .sad4, .ti_a(ta), .ti_b(tb), .sads, .to_a(toa), .to_b(tob));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // sum of the 4x4 SADs over blocks bx0..bx0+nw-1, by0..by0+nh-1
  function automatic int region(int bx0, int by0, int nw, int nh);
    int s = 0;
    for (int y = by0; y < by0 + nh; y++)
      for (int x = bx0; x < bx0 + nw; x++) s += int'(sad4[4*y + x]);
    return s;
  endfunction

  initial begin
    tm = 1'b0;
    ta = '0; tb = '0;
    for (int i = 0; i < 500; i++) begin
      foreach (sad4[b]) sad4[b] = SAD4_W'($urandom % 17);
      if (i == 0) foreach (sad4[b]) sad4[b] = 5'd16;
      #1;
      for (int b = 0; b < 16; b++) check(int'(sads[IDX_4X4 + b]) == int'(sad4[b]), "4x4");
      for (int q = 0; q < 4; q++) begin
        automatic int qx = 2 * (q % 2), qy = 2 * (q / 2);
        check(int'(sads[IDX_4X8 + 2*q])     == region(qx,     qy,     1, 2), "4x8 left");
        check(int'(sads[IDX_4X8 + 2*q + 1]) == region(qx + 1, qy,     1, 2), "4x8 right");
        check(int'(sads[IDX_8X4 + 2*q])     == region(qx,     qy,     2, 1), "8x4 top");
        check(int'(sads[IDX_8X4 + 2*q + 1]) == region(qx,     qy + 1, 2, 1), "8x4 bottom");
        check(int'(sads[IDX_8X8 + q])       == region(qx,     qy,     2, 2), "8x8");
      end
      check(int'(sads[IDX_8X16])     == region(0, 0, 2, 4), "8x16 left");
      check(int'(sads[IDX_8X16 + 1]) == region(2, 0, 2, 4), "8x16 right");
      check(int'(sads[IDX_16X8])     == region(0, 0, 4, 2), "16x8 top");
      check(int'(sads[IDX_16X8 + 1]) == region(0, 2, 4, 2), "16x8 bottom");
      check(int'(sads[IDX_16X16])    == region(0, 0, 4, 4), "16x16");
    end
    tm = 1'b1;
    for (int i = 0; i < 1000; i++) begin
      logic [W-1:0] ea, eb, na;
      ta = W'($urandom); tb = W'($urandom);
      foreach (sad4[b]) sad4[b] = SAD4_W'($urandom);
      ea = ta; eb = tb;
      repeat (5) begin
        na = W'(3 * int'(ea) + 2 * int'(eb));
        eb = W'(2 * int'(ea) + int'(eb));
        ea = na;
      end
      #1;
      check(toa == ea && tob == eb, "test cascade");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
