// tha - testable half adder (tHA).
//
// Normal mode (tm = 0) it is a plain half adder: s = a ^ b, c = a & b.
// A half adder alone is not bijective (inputs 01 and 10 both give s=1, c=0),
// so in test mode (tm = 1) the carry output is replaced by the test input t.
// With t tied to an input that, together with the sum, identifies the inputs,
// the 2-in/2-out mapping becomes one-to-one and every gate is exercised by an
// exhaustive count. Purely combinational.
//
// The document gives the normal/test behaviour and the bijective goal; the
// exact gates of its tHA are not given, so the test-mode carry = t is this
// design's choice.
module tha (
  input  logic tm,  // 1 = test mode
  input  logic a,
  input  logic b,
  input  logic t,   // test-mode carry value
  output logic s,
  output logic c
);
  always_comb begin
    s = a ^ b;
    c = tm ? t : (a & b);
  end
endmodule
