// Shared constants, types and functions of the testable variable-block-size
// motion estimator.
//
// The 41 SADs of one 16x16 eMB candidate are carried as a flat array indexed
// by the constants below. The 4x4 blocks are numbered in raster order
// (index = 4*row + column). The four 8x8 quadrants are numbered in raster
// order too; quadrant q covers the 4x4 blocks a (top-left), b (top-right),
// c (bottom-left) and d (bottom-right). Sizes are written width x height.
//
// mat_pow() gives the constants p, q, r, s that predict the output of c
// cascaded tAccSAD cells in test mode: each cell maps {A, B} to
// {3A+2B, 2A+B} modulo 2^w, so c cells apply the matrix [[3,2],[2,1]]^c.
package tme_pkg;

  localparam int unsigned NUM_SADS  = 41;
  localparam int unsigned SAD4_W    = 5;   // a 4x4 SAD is 0..16

  localparam int unsigned IDX_4X4   = 0;   // 16 entries, raster order
  localparam int unsigned IDX_4X8   = 16;  // 8 entries, quadrant q: 16+2q left, 17+2q right
  localparam int unsigned IDX_8X4   = 24;  // 8 entries, quadrant q: 24+2q top, 25+2q bottom
  localparam int unsigned IDX_8X8   = 32;  // 4 entries, quadrant raster order
  localparam int unsigned IDX_8X16  = 36;  // 2 entries: left, right
  localparam int unsigned IDX_16X8  = 38;  // 2 entries: top, bottom
  localparam int unsigned IDX_16X16 = 40;  // 1 entry

  // Test phases of the on-chip test sequencer.
  typedef enum logic [2:0] {
    PH_IDLE,
    PH_REGBUF,
    PH_SAD_FILL,
    PH_SAD_APPLY,
    PH_ACC,
    PH_DONE
  } test_phase_e;

  typedef struct packed {
    longint unsigned p;
    longint unsigned q;
    longint unsigned r;
    longint unsigned s;
  } pqrs_t;

  // [[3,2],[2,1]]^c modulo 2^w, by repeated squaring (about log2(c) steps).
  function automatic pqrs_t mat_pow(input int unsigned c, input int unsigned w);
    longint unsigned m   = (w >= 63) ? 64'hFFFF_FFFF_FFFF_FFFF : ((64'd1 << w) - 64'd1);
    longint unsigned rp  = 1, rq = 0, rr = 0, rs = 1;  // result = identity
    longint unsigned bp  = 3, bq = 2, br = 2, bs = 1;  // base = cell matrix
    longint unsigned t0, t1, t2, t3;
    int unsigned     e   = c;
    pqrs_t           res;
    while (e != 0) begin
      if (e[0]) begin
        t0 = (rp * bp + rq * br) & m;
        t1 = (rp * bq + rq * bs) & m;
        t2 = (rr * bp + rs * br) & m;
        t3 = (rr * bq + rs * bs) & m;
        rp = t0; rq = t1; rr = t2; rs = t3;
      end
      t0 = (bp * bp + bq * br) & m;
      t1 = (bp * bq + bq * bs) & m;
      t2 = (br * bp + bs * br) & m;
      t3 = (br * bq + bs * bs) & m;
      bp = t0; bq = t1; br = t2; bs = t3;
      e  = e >> 1;
    end
    res.p = rp; res.q = rq; res.r = rr; res.s = rs;
    return res;
  endfunction

endpackage
