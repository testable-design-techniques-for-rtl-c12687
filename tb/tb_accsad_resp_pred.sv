// tb_accsad_resp_pred - checks the response predictor: with C = 1, 2 and 4
// against the closed forms {3A+2B, 2A+B}, {13A+8B, 8A+5B} and
// {233A+144B, 144A+89B}, and with the default C = 45 against 45 iterations
// of the cell mapping, on random and corner inputs.
module tb_accsad_resp_pred;
  localparam int unsigned W = 9;
  int checks = 0, failures = 0;
  logic [W-1:0] a, b, ac1, bc1, ac2, bc2, ac4, bc4, ac, bc;

  accsad_resp_pred #(.W(W), .C(1)) u1 (.a0(a), .b0(b), .ac(ac1), .bc(bc1));
  accsad_resp_pred #(.W(W), .C(2)) u2 (.a0(a), .b0(b), .ac(ac2), .bc(bc2));
  accsad_resp_pred #(.W(W), .C(4)) u4 (.a0(a), .b0(b), .ac(ac4), .bc(bc4));
  accsad_resp_pred #(.W(W))        u45 (.a0(a), .b0(b), .ac(ac), .bc(bc));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: a=%0d b=%0d", what, a, b);
    end
  endtask

  initial begin
    for (int i = 0; i < 2000; i++) begin
      logic [W-1:0] ea, eb, na;
      a = W'($urandom); b = W'($urandom);
      if (i == 0) begin a = '1; b = '1; end
      if (i == 1) begin a = 1; b = 0; end
      if (i == 2) begin a = 0; b = 1; end
      ea = a; eb = b;
      repeat (45) begin
        na = W'(3 * int'(ea) + 2 * int'(eb));
        eb = W'(2 * int'(ea) + int'(eb));
        ea = na;
      end
      #1;
      check(ac1 == W'(3*int'(a) + 2*int'(b)) && bc1 == W'(2*int'(a) + int'(b)), "C=1");
      check(ac2 == W'(13*int'(a) + 8*int'(b)) && bc2 == W'(8*int'(a) + 5*int'(b)), "C=2");
      check(ac4 == W'(233*int'(a) + 144*int'(b)) && bc4 == W'(144*int'(a) + 89*int'(b)), "C=4");
      check(ac == ea && bc == eb, "C=45");
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
