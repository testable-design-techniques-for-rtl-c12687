// tb_taccsad_module - checks the tAccSAD module: the five normal-mode sums
// on random inputs, the test-mode mapping {A, B} -> {3A+2B, 2A+B} mod 2^W,
// and (exhaustively, on a 4-bit instance) that the test mapping is one-to-one.
module tb_taccsad_module;
  localparam int unsigned W = 9;
  int checks = 0, failures = 0;
  logic tm;
  logic [W-1:0] ia, ib, ic, id, ta, tb, oa, ob, oc, od, oe;
  logic [3:0] sa, sb, soa, sob, sd1, sd2, sd3;
  bit seen [256];

  taccsad_module #(.W(W)) dut (
    .tm, .i_a(ia), .i_b(ib), .i_c(ic), .i_d(id), .ti_a(ta), .ti_b(tb),
    .o_a(oa), .o_b(ob), .o_c(oc), .o_d(od), .o_e(oe)
  );

  taccsad_module #(.W(4)) dut4 (
    .tm(1'b1), .i_a(4'd0), .i_b(4'd0), .i_c(4'd0), .i_d(4'd0), .ti_a(sa), .ti_b(sb),
    .o_a(sd1), .o_b(sd2), .o_c(sd3), .o_d(sob), .o_e(soa)
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: tm=%0b in=%0d,%0d,%0d,%0d t=%0d,%0d out=%0d,%0d,%0d,%0d,%0d",
               what, tm, ia, ib, ic, id, ta, tb, oa, ob, oc, od, oe);
    end
  endtask

  initial begin
    tm = 1'b0;
    for (int i = 0; i < 1000; i++) begin
      // SADs of 4x4 blocks (0..16) or of 8x8 blocks (0..64)
      automatic int lim = (i % 2) ? 65 : 17;
      ia = W'($urandom % lim); ib = W'($urandom % lim);
      ic = W'($urandom % lim); id = W'($urandom % lim);
      ta = W'($urandom); tb = W'($urandom);
      #1;
      check(oa == ia + ic, "a+c");
      check(ob == ib + id, "b+d");
      check(oc == ia + ib, "a+b");
      check(od == ic + id, "c+d");
      check(oe == ia + ib + ic + id, "a+b+c+d");
    end
    tm = 1'b1;
    for (int i = 0; i < 1000; i++) begin
      ia = W'($urandom); ib = W'($urandom); ic = W'($urandom); id = W'($urandom);
      ta = W'($urandom); tb = W'($urandom);
      #1;
      check(oe == W'(3 * int'(ta) + 2 * int'(tb)), "test 3A+2B");
      check(od == W'(2 * int'(ta) + int'(tb)), "test 2A+B");
    end
    for (int v = 0; v < 256; v++) begin
      {sa, sb} = 8'(v);
      #1;
      checks++;
      if (seen[{soa, sob}]) begin
        failures++;
        $display("FAIL bijective at %0d", v);
      end
      seen[{soa, sob}] = 1;
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
