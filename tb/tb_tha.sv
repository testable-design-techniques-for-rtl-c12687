// tb_tha - exhaustive check of the testable half adder: normal mode is a
// half adder, test mode passes t on the carry; with t = a the test-mode
// mapping (a, b) -> (s, c) is one-to-one.
module tb_tha;
  int checks = 0, failures = 0;
  logic tm, a, b, t, s, c;
  logic [3:0] seen;

  tha dut (.tm, .a, .b, .t, .s, .c);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: tm=%0b a=%0b b=%0b t=%0b -> s=%0b c=%0b", what, tm, a, b, t, s, c);
    end
  endtask

  initial begin
    for (int v = 0; v < 16; v++) begin
      {tm, a, b, t} = 4'(v);
      #1;
      check(s == (a ^ b), "sum");
      check(c == (tm ? t : (a & b)), "carry");
    end
    seen = '0;
    tm = 1'b1;
    for (int v = 0; v < 4; v++) begin
      {a, b} = 2'(v);
      t = a;
      #1;
      check(!seen[{s, c}], "bijective");
      seen[{s, c}] = 1'b1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
