// tb_bmm - checks one block matching module: all 41 SADs of random binary
// blocks against mismatch counts taken pixel by pixel over each sub-block,
// and both test cascades (SAD cells: ti + 16*16*(tc^tr) mod 32 with buses
// all-0/all-1; AccSAD modules: five applications of {3A+2B, 2A+B}).
module tb_bmm;
  import tme_pkg::*;
  localparam int unsigned W = 9;
  int checks = 0, failures = 0;
  logic tm;
  logic [15:0] cur [16], refw [16];
  logic [SAD4_W-1:0] sad_ti, sad_to;
  logic [W-1:0] ta, tb, toa, tob, sads [NUM_SADS];

  bmm #(.W(W)) dut (
    .tm, .cur, .refw, .sad_ti, .acc_ti_a(ta), .acc_ti_b(tb),
    .sads, .sad_to, .acc_to_a(toa), .acc_to_b(tob)
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // mismatching pixels in the rectangle x0..x0+w-1, y0..y0+h-1
  function automatic int diff(int x0, int y0, int w, int h);
    int s = 0;
    for (int y = y0; y < y0 + h; y++)
      for (int x = x0; x < x0 + w; x++) s += int'(cur[y][x] ^ refw[y][x]);
    return s;
  endfunction

  initial begin
    tm = 1'b0; sad_ti = 5'd9; ta = '0; tb = '0;
    for (int i = 0; i < 300; i++) begin
      automatic int dens = $urandom % 4;   // vary the mismatch density
      foreach (cur[y]) begin
        cur[y]  = 16'($urandom);
        refw[y] = cur[y] ^ (dens == 0 ? 16'h0 : dens == 3 ? 16'hFFFF : 16'($urandom & $urandom));
      end
      #1;
      for (int b = 0; b < 16; b++)
        check(int'(sads[IDX_4X4 + b]) == diff(4*(b%4), 4*(b/4), 4, 4), "4x4");
      for (int q = 0; q < 4; q++) begin
        automatic int qx = 8 * (q % 2), qy = 8 * (q / 2);
        check(int'(sads[IDX_4X8 + 2*q])     == diff(qx,     qy,     4, 8), "4x8 left");
        check(int'(sads[IDX_4X8 + 2*q + 1]) == diff(qx + 4, qy,     4, 8), "4x8 right");
        check(int'(sads[IDX_8X4 + 2*q])     == diff(qx,     qy,     8, 4), "8x4 top");
        check(int'(sads[IDX_8X4 + 2*q + 1]) == diff(qx,     qy + 4, 8, 4), "8x4 bottom");
        check(int'(sads[IDX_8X8 + q])       == diff(qx,     qy,     8, 8), "8x8");
      end
      check(int'(sads[IDX_8X16])     == diff(0, 0, 8, 16), "8x16 left");
      check(int'(sads[IDX_8X16 + 1]) == diff(8, 0, 8, 16), "8x16 right");
      check(int'(sads[IDX_16X8])     == diff(0, 0, 16, 8), "16x8 top");
      check(int'(sads[IDX_16X8 + 1]) == diff(0, 8, 16, 8), "16x8 bottom");
      check(int'(sads[IDX_16X16])    == diff(0, 0, 16, 16), "16x16");
    end
    tm = 1'b1;
    for (int cs = 0; cs < 4; cs++) begin
      foreach (cur[y]) begin cur[y] = {16{cs[1]}}; refw[y] = {16{cs[0]}}; end
      for (int v = 0; v < 32; v++) begin
        sad_ti = 5'(v);
        #1;
        check(sad_to == 5'(v + 256 * (cs[1] ^ cs[0])), "SAD cascade");
      end
    end
    for (int i = 0; i < 1000; i++) begin
      logic [W-1:0] ea, eb, na;
      ta = W'($urandom); tb = W'($urandom);
      ea = ta; eb = tb;
      repeat (5) begin
        na = W'(3 * int'(ea) + 2 * int'(eb));
        eb = W'(2 * int'(ea) + int'(eb));
        ea = na;
      end
      #1;
      check(toa == ea && tob == eb, "AccSAD cascade");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
