// ntt_butterfly: one radix-2 butterfly over Z_q with q = 2^QW + 1.
//
// Computes  plus  = xe + xo * 2^e  (mod q)
//           minus = xe - xo * 2^e  (mod q)
// for a twiddle exponent e in [0, 2*QW). Because 2^QW = -1 (mod q) and
// 2^(2QW) = 1 (mod q), every twiddle factor of the transform is a power of
// two and the "multiplication" is a shift: the shifted value is split into
// a low and a high QW-bit half, and low - high is the residue; for e >= QW
// the residue is negated. This shift-based reduction is what the choice of
// a Fermat or pseudo-Fermat ring is for. Operands and results are in
// [0, q-1], so they are QW+1 bits wide. Purely combinational.
//
// The same unit scales by a power of two (inverse transform
// post-scaling) when xe = 0: plus is then xo * 2^e.
module ntt_butterfly #(
  parameter int unsigned QW = 64          // q = 2^QW + 1
) (
  input  logic [QW:0]              xe,     // even input, in [0, q-1]
  input  logic [QW:0]              xo,     // odd input, in [0, q-1]
  input  logic [$clog2(2*QW)-1:0]  e,      // twiddle exponent, < 2*QW
  output logic [QW:0]              plus,
  output logic [QW:0]              minus
);

  localparam logic [QW+1:0] Q = {2'b01, {(QW-1){1'b0}}, 1'b1};  // 2^QW + 1

  logic              neg;
  logic [$clog2(2*QW)-1:0] k;
  logic [2*QW:0]     shifted;
  logic [QW+1:0]     lo, hi, red, t;
  logic [QW+1:0]     sum, dif;

  always_comb begin
    neg     = (e >= ($clog2(2*QW))'(QW));
    k       = neg ? e - ($clog2(2*QW))'(QW) : e;
    shifted = {{QW{1'b0}}, xo} << k;
    lo      = {2'b00, shifted[QW-1:0]};
    hi      = {1'b0, shifted[2*QW:QW]};
    // low - high (mod q); hi <= 2^QW so one correction suffices
    red     = (lo >= hi) ? lo - hi : lo + Q - hi;
    t       = (neg && red != '0) ? Q - red : red;
    sum     = {1'b0, xe} + t;
    sum     = (sum >= Q) ? sum - Q : sum;
    dif     = ({1'b0, xe} >= t) ? {1'b0, xe} - t : {1'b0, xe} + Q - t;
    plus    = sum[QW:0];
    minus   = dif[QW:0];
  end

endmodule
