// tb_tsad4x4_ha - checks the 4x4 SAD cell: normal mode against a bit count
// of c ^ r (random and corner vectors), test mode over the full 128-pattern
// set (ti 0..31 times the four all-zero/all-one bus cases) against
// ti + 16*(tc ^ tr) mod 32, and that ti -> to is one-to-one for each case.
module tb_tsad4x4_ha;
  import tme_pkg::*;
  int checks = 0, failures = 0;
  logic tm;
  logic [15:0] c, r;
  logic [SAD4_W-1:0] ti, to;
  bit seen [32];

  tsad4x4_ha dut (.tm, .c, .r, .ti, .to);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: tm=%0b c=%h r=%h ti=%0d -> to=%0d", what, tm, c, r, ti, to);
    end
  endtask

  initial begin
    tm = 1'b0;
    ti = 5'd17;  // must be ignored in normal mode
    for (int i = 0; i < 2000; i++) begin
      c = 16'($urandom);
      r = 16'($urandom);
      if (i == 0) begin c = 16'h0000; r = 16'hFFFF; end
      if (i == 1) begin c = 16'hA5A5; r = 16'hA5A5; end
      #1;
      check(to == SAD4_W'($countones(c ^ r)), "normal SAD");
    end
    tm = 1'b1;
    for (int cs = 0; cs < 4; cs++) begin
      c = {16{cs[1]}};
      r = {16{cs[0]}};
      foreach (seen[i]) seen[i] = 0;
      for (int v = 0; v < 32; v++) begin
        ti = 5'(v);
        #1;
        check(to == 5'(v + 16 * (cs[1] ^ cs[0])), "test response");
        check(!seen[to], "bijective");
        seen[to] = 1;
      end
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
