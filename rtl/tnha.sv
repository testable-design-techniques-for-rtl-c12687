// tnha - testable n-bit half-adder chain (tnHA).
//
// The cell adds the 1-bit input x to the n-bit word a with a ripple of n half
// adders: {co, s} = a + x in normal mode. The highest half adder is a tHA.
// In test mode (tm = 1) the tHA's carry output carries x itself, taken from
// the input side of the lowest half adder. Then (x, a) -> (co, s) is
// one-to-one: s = a + x mod 2^n and co = x, so a = s - co. All n+1 inputs
// can therefore be swept by a counter and each response predicted.
//
// The ripple of half adders with the top one replaced by a tHA, and the wire
// from the lowest half adder to the tHA, follow the document; which lowest-HA
// signal is used (here its input x) is this design's choice.
// Purely combinational.
module tnha #(
  parameter int unsigned N = 5
) (
  input  logic         tm,
  input  logic         x,
  input  logic [N-1:0] a,
  output logic [N-1:0] s,
  output logic         co
);
  logic [N:0] c;  // c[i] = carry into bit i

  assign c[0] = x;

  for (genvar i = 0; i < N - 1; i++) begin : g_ha
    tha u_ha (.tm(1'b0), .a(a[i]), .b(c[i]), .t(1'b0), .s(s[i]), .c(c[i+1]));
  end

  tha u_tha (.tm(tm), .a(a[N-1]), .b(c[N-1]), .t(x), .s(s[N-1]), .c(c[N]));

  assign co = c[N];
endmodule
