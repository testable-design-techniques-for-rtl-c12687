// taccsad_module - testable accumulative-SAD module (tAccSAD_Module).
//
// Normal mode (tm = 0): from the SADs of four blocks arranged
//     a b
//     c d
// it produces five larger-block SADs with four adders and one subtractor:
//     o_a = a + c        (left  half, 1 x 2 blocks)
//     o_b = b + d        (right half, 1 x 2 blocks)
//     o_e = o_a + o_b    (whole 2 x 2 blocks)
//     o_c = a + b        (top    half, 2 x 1 blocks)
//     o_d = o_e - o_c    (bottom half = c + d, 2 x 1 blocks)
// Used on four 4x4 SADs it gives 4x8, 4x8, 8x8, 8x4, 8x4; used on four 8x8
// SADs it gives 8x16, 8x16, 16x16, 16x8, 16x8.
//
// Test mode (tm = 1): the inputs of the adders are re-routed so that the
// module maps the test inputs {ti_a, ti_b} = {A, B} to
//     {o_e, o_d} = {(3A + 2B) mod 2^W, (2A + B) mod 2^W},
// which is one-to-one (the determinant of [[3,2],[2,1]] is -1). With
// ia = B, ic = A, ib = A and id = o_c the adders compute o_a = A+B,
// o_c = A+B, o_b = 2A+B, o_e = 3A+2B, o_d = 2A+B, so every adder and the
// subtractor lies on the observed path. {o_e, o_d} feed the next module's
// {ti_a, ti_b}.
//
// The four-adders-plus-subtractor structure, the five outputs and the
// test-mode mapping are the document's; the particular re-routing that
// produces that mapping is this design's reconstruction. All arithmetic is
// modulo 2^W. Purely combinational.
module taccsad_module #(
  parameter int unsigned W = 9
) (
  input  logic         tm,
  input  logic [W-1:0] i_a, i_b, i_c, i_d,  // normal-mode SAD inputs
  input  logic [W-1:0] ti_a, ti_b,          // test-mode inputs {A, B}
  output logic [W-1:0] o_a, o_b, o_c, o_d, o_e
);
  logic [W-1:0] ia, ib, ic, id;

  // input multiplexers
  assign ia = tm ? ti_b : i_a;
  assign ic = tm ? ti_a : i_c;
  assign ib = tm ? ti_a : i_b;
  assign id = tm ? o_c  : i_d;

  // four adders and one subtractor
  assign o_a = ia + ic;
  assign o_c = ia + ib;
  assign o_b = ib + id;
  assign o_e = o_a + o_b;
  assign o_d = o_e - o_c;
endmodule
