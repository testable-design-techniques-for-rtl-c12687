// accsad_resp_pred - expected response of a cascade of C tAccSAD modules.
//
// Each tAccSAD module in test mode maps {A, B} to {3A+2B, 2A+B} mod 2^W, so
// a cascade of C modules maps {A0, B0} to
//     {pA0 + qB0, rA0 + sB0} mod 2^W,  [[p,q],[r,s]] = [[3,2],[2,1]]^C.
// p, q, r, s are elaboration-time constants (tme_pkg::mat_pow, about
// log2(C) squarings), so the hardware is four constant multipliers, i.e.
// shifts and adds, and two adders. Purely combinational.
//
// The closed form and the constant-multiplier idea follow the document.
module accsad_resp_pred
  import tme_pkg::*;
#(
  parameter int unsigned W = 9,
  parameter int unsigned C = 45   // cascaded modules, 5 * (p+1)
) (
  input  logic [W-1:0] a0, b0,
  output logic [W-1:0] ac, bc
);
  localparam pqrs_t        K  = mat_pow(C, W);
  localparam logic [W-1:0] KP = W'(K.p);
  localparam logic [W-1:0] KQ = W'(K.q);
  localparam logic [W-1:0] KR = W'(K.r);
  localparam logic [W-1:0] KS = W'(K.s);

  assign ac = W'(KP * a0) + W'(KQ * b0);
  assign bc = W'(KR * a0) + W'(KS * b0);
endmodule
