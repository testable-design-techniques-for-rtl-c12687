// bmm - block matching module (BMM).
//
// Matches one 16x16 current eMB against one 16x16 reference window of binary
// features and produces the 41 variable-block-size SADs (16 4x4, 8 4x8,
// 8 8x4, 4 8x8, 2 8x16, 2 16x8, 1 16x16; layout in tme_pkg). It holds 16
// tsad4x4_ha cells, one per 4x4 sub-block, and a taccsad_nw.
//
// Pixel (y, x) of a 16x16 block is bit x of line y. Sub-block b (raster
// order, b = 4*by + bx) covers lines 4*by..4*by+3 and bits 4*bx..4*bx+3.
//
// Test mode (tm = 1): the 16 SAD cells form one cascade in sub-block order
// (sad_ti -> cell 0 -> ... -> cell 15 -> sad_to) and the AccSAD network forms
// a second cascade (acc_ti -> acc_to); both can be chained across BMMs.
//
// The contents (16 SAD4x4 cells plus the AccSAD part) follow the document;
// the cascade order is this design's choice. Purely combinational.
module bmm
  import tme_pkg::*;
#(
  parameter int unsigned W = 9
) (
  input  logic              tm,
  input  logic [15:0]       cur [16],   // current eMB lines
  input  logic [15:0]       refw [16],  // reference window lines
  input  logic [SAD4_W-1:0] sad_ti,
  input  logic [W-1:0]      acc_ti_a, acc_ti_b,
  output logic [W-1:0]      sads [NUM_SADS],
  output logic [SAD4_W-1:0] sad_to,
  output logic [W-1:0]      acc_to_a, acc_to_b
);
  logic [SAD4_W-1:0] sad4  [16];
  logic [SAD4_W-1:0] chain [17];

  assign chain[0] = sad_ti;

  for (genvar b = 0; b < 16; b++) begin : g_sad
    localparam int unsigned BY = b / 4;
    localparam int unsigned BX = b % 4;
    logic [15:0] cb, rb;
    always_comb begin
      for (int yy = 0; yy < 4; yy++) begin
        cb[4*yy +: 4] = cur [4*BY + yy][4*BX +: 4];
        rb[4*yy +: 4] = refw[4*BY + yy][4*BX +: 4];
      end
    end
    tsad4x4_ha u_sad (.tm(tm), .c(cb), .r(rb), .ti(chain[b]), .to(chain[b+1]));
    assign sad4[b] = chain[b+1];
  end

  assign sad_to = chain[16];

  taccsad_nw #(.W(W)) u_acc (
    .tm(tm), .sad4(sad4), .ti_a(acc_ti_a), .ti_b(acc_ti_b),
    .sads(sads), .to_a(acc_to_a), .to_b(acc_to_b)
  );
endmodule
