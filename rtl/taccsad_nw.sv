// taccsad_nw - network of five tAccSAD modules (tAccSAD_Module-NW).
//
// Normal mode: four first-level modules, one per 8x8 quadrant, turn the 16
// 4x4 SADs into the 8 4x8, 8 8x4 and 4 8x8 SADs; a second-level module turns
// the four 8x8 SADs into the 2 8x16, 2 16x8 and the 16x16 SAD. Together with
// the 16 4x4 SADs passed through this gives all 41 SADs of a 16x16 block,
// laid out as described in tme_pkg. The adder levels are: 4x8 sums, then 8x8
// and 8x4 sums, then the 8x4 subtraction, and the same three levels again
// in the second-level module (six levels in all).
//
// Test mode: the five modules form one cascade, quadrants 0..3 then the
// second-level module, each module's {o_e, o_d} driving the next one's
// {ti_a, ti_b}. {ti_a, ti_b} enter the first module and {to_a, to_b} leave
// the last, so networks can be chained further (across BMMs).
//
// The five-module structure and the cascade follow the document; the cascade
// order inside the network is this design's choice. Purely combinational.
module taccsad_nw
  import tme_pkg::*;
#(
  parameter int unsigned W = 9
) (
  input  logic              tm,
  input  logic [SAD4_W-1:0] sad4 [16],        // 4x4 SADs, raster order
  input  logic [W-1:0]      ti_a, ti_b,
  output logic [W-1:0]      sads [NUM_SADS],
  output logic [W-1:0]      to_a, to_b
);
  logic [W-1:0] qa [4], qb [4], qc [4], qd [4], qe [4];
  logic [W-1:0] ca [5], cb [5];  // test cascade into each module

  assign ca[0] = ti_a;
  assign cb[0] = ti_b;

  for (genvar q = 0; q < 4; q++) begin : g_quad
    localparam int unsigned B0 = 8 * (q / 2) + 2 * (q % 2);  // top-left 4x4 block
    taccsad_module #(.W(W)) u_mod (
      .tm  (tm),
      .i_a (W'(sad4[B0])),
      .i_b (W'(sad4[B0 + 1])),
      .i_c (W'(sad4[B0 + 4])),
      .i_d (W'(sad4[B0 + 5])),
      .ti_a(ca[q]), .ti_b(cb[q]),
      .o_a (qa[q]), .o_b(qb[q]), .o_c(qc[q]), .o_d(qd[q]), .o_e(qe[q])
    );
    assign ca[q+1] = qe[q];
    assign cb[q+1] = qd[q];
  end

  logic [W-1:0] la, lb, lc, ld, le;

  taccsad_module #(.W(W)) u_top (
    .tm  (tm),
    .i_a (qe[0]), .i_b(qe[1]), .i_c(qe[2]), .i_d(qe[3]),
    .ti_a(ca[4]), .ti_b(cb[4]),
    .o_a (la), .o_b(lb), .o_c(lc), .o_d(ld), .o_e(le)
  );

  assign to_a = le;
  assign to_b = ld;

  always_comb begin
    for (int i = 0; i < 16; i++) sads[IDX_4X4 + i] = W'(sad4[i]);
    for (int q = 0; q < 4; q++) begin
      sads[IDX_4X8 + 2*q]     = qa[q];
      sads[IDX_4X8 + 2*q + 1] = qb[q];
      sads[IDX_8X4 + 2*q]     = qc[q];
      sads[IDX_8X4 + 2*q + 1] = qd[q];
      sads[IDX_8X8 + q]       = qe[q];
    end
    sads[IDX_8X16]     = la;
    sads[IDX_8X16 + 1] = lb;
    sads[IDX_16X8]     = lc;
    sads[IDX_16X8 + 1] = ld;
    sads[IDX_16X16]    = le;
  end
endmodule
