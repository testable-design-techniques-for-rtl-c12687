// tb_tnha - exhaustive check of the 5-bit testable half-adder chain in both
// modes, and of the one-to-one mapping of (x, a) to (co, s) in test mode.
module tb_tnha;
  localparam int unsigned N = 5;
  int checks = 0, failures = 0;
  logic tm, x, co;
  logic [N-1:0] a, s;
  bit seen [2**(N+1)];

  tnha #(.N(N)) dut (.tm, .x, .a, .s, .co);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: tm=%0b x=%0b a=%0d -> co=%0b s=%0d", what, tm, x, a, co, s);
    end
  endtask

  initial begin
    for (int m = 0; m < 2; m++) begin
      tm = 1'(m);
      foreach (seen[i]) seen[i] = 0;
      for (int v = 0; v < 2**(N+1); v++) begin
        {x, a} = (N+1)'(v);
        #1;
        if (!tm) check({co, s} == (N+1)'(int'(a) + int'(x)), "normal sum");
        else begin
          check(s == N'(int'(a) + int'(x)), "test sum");
          check(co == x, "test carry");
          check(!seen[{co, s}], "bijective");
          seen[{co, s}] = 1;
        end
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
