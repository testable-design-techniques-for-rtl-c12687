// tsad4x4_ha - testable 4x4 SAD cell built from half adders (tSAD4x4_HA).
//
// Function: sums the absolute differences of a 4x4 sub-block of binary
// (1 bit per pixel) features. The absolute difference of two 1-bit pixels is
// their XOR, so the 4x4 SAD is the number of ones among the 16 XOR outputs
// (0..16, 5 bits).
//
// Structure: 16 XOR gates followed by 16 incrementer stages. Stage k is a
// 5-bit tnha that adds the k-th difference bit to a running 5-bit count.
// The accumulator entering stage 0 is 0 in normal mode (tm = 0) and the test
// input ti in test mode (tm = 1). In test mode the cell computes
// to = ti + (number of differing bits) mod 32, which for a fixed c/r setting
// is a one-to-one map from ti to to, so cells can be cascaded to -> ti and all
// tested at once: the c and r buses are held all-zeros or all-ones (4 cases)
// and ti swept by a 5-bit counter, 4 x 32 = 128 patterns.
//
// The XOR + HA incrementer array, the ti multiplexer, the cascade and the
// 2 x 2 bus cases follow the document. Using a uniform 5-bit word in every
// stage (rather than a word that grows stage by stage) is this design's
// choice; it keeps every stage bijective. The carry outputs of the stages are
// not needed: the count never exceeds 16 in normal mode and wraps modulo 32
// in test mode, so they are left open.
// Purely combinational.
module tsad4x4_ha
  import tme_pkg::*;
(
  input  logic              tm,
  input  logic [15:0]       c,   // current 4x4 pixels, bit 4*row + column
  input  logic [15:0]       r,   // reference 4x4 pixels, same order
  input  logic [SAD4_W-1:0] ti,  // test-mode accumulator input
  output logic [SAD4_W-1:0] to   // SAD (normal) or test response
);
  logic [15:0]       ad;
  logic [SAD4_W-1:0] acc [17];

  assign ad     = c ^ r;
  assign acc[0] = tm ? ti : '0;

  for (genvar k = 0; k < 16; k++) begin : g_stage
    tnha #(.N(SAD4_W)) u_inc (
      .tm(tm), .x(ad[k]), .a(acc[k]), .s(acc[k+1]), .co()
    );
  end

  assign to = acc[16];
endmodule
