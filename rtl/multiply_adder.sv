// multiply_adder: point-wise modular multiplication, with an optional
// point-wise addition, over Z_q, q = 2^QW + 1.
//
// out = a * b (mod q)            when add_en = 0
// out = a * b + c (mod q)        when add_en = 1
//
// Four-stage pipeline, one element per cycle:
//   1. operand registers;
//   2. one level of Karatsuba: with a = a1*2^H + a0, b = b1*2^H + b0 the
//      three half-size products a1*b1, a0*b0 and (a0+a1)*(b0+b1);
//   3. recombination and reduction modulo q: the 2QW+2-bit product
//      P = P2*2^(2QW) + P1*2^QW + P0 is congruent to P0 - P1 + P2, which is
//      brought into [0, q-1] by at most two corrections;
//   4. the conditional modulo-q adder.
// out_valid follows in_valid by four cycles. A Karatsuba multiplier followed
// by a conditional adder is the structure the original design names; the
// single level of recursion and the four-stage split are this design's
// choice.
module multiply_adder #(
  parameter int unsigned QW = 64            // q = 2^QW + 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  input  logic [QW:0]   a,                  // in [0, q-1]
  input  logic [QW:0]   b,                  // in [0, q-1]
  input  logic [QW:0]   c,                  // addend, in [0, q-1]
  input  logic          add_en,
  output logic          out_valid,
  output logic [QW:0]   out
);

  localparam int unsigned H  = (QW + 2) / 2;          // split point
  localparam int unsigned AW = QW + 1;                // operand width
  localparam int unsigned HW = AW - H;                // high-half width
  localparam int unsigned PW = 2 * QW + 4;            // product width
  localparam logic [PW-1:0] Q = (PW'(1) << QW) + PW'(1);

  // stage 1
  logic          v1, ae1;
  logic [QW:0]   a1r, b1r, c1;
  // stage 2
  logic          v2, ae2;
  logic [QW:0]   c2;
  logic [2*HW-1:0]  p_hh;
  logic [2*H-1:0]   p_ll;
  logic [2*H+1:0]   p_mid;
  // stage 3
  logic          v3, ae3;
  logic [QW:0]   c3, r3;

  logic [PW-1:0] prod, t;
  logic [QW:0]   r3_d;
  logic [QW+1:0] s4;

  always_comb begin
    prod = (PW'(p_hh) << (2 * H))
         + ((PW'(p_mid) - PW'(p_hh) - PW'(p_ll)) << H)
         + PW'(p_ll);
    // P0 - P1 + P2 + q, in [0, 3q)
    t    = PW'(prod[QW-1:0]) + PW'(prod[PW-1:2*QW]) + Q - PW'(prod[2*QW-1:QW]);
    if (t >= Q) t = t - Q;
    if (t >= Q) t = t - Q;
    r3_d = t[QW:0];
    s4   = {1'b0, r3} + {1'b0, c3};
    if (s4 >= Q[QW+1:0]) s4 = s4 - Q[QW+1:0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      {v1, v2, v3, out_valid} <= '0;
      {ae1, ae2, ae3} <= '0;
      a1r <= '0; b1r <= '0; c1 <= '0; c2 <= '0; c3 <= '0; r3 <= '0;
      p_hh <= '0; p_ll <= '0; p_mid <= '0;
      out <= '0;
    end else begin
      // stage 1
      v1  <= in_valid;
      ae1 <= add_en;
      a1r <= a;
      b1r <= b;
      c1  <= c;
      // stage 2: Karatsuba partial products
      v2    <= v1;
      ae2   <= ae1;
      c2    <= c1;
      p_hh  <= a1r[QW:H] * b1r[QW:H];
      p_ll  <= a1r[H-1:0] * b1r[H-1:0];
      p_mid <= (2*H+2)'(({1'b0, a1r[H-1:0]} + (H+1)'(a1r[QW:H])))
             * (2*H+2)'(({1'b0, b1r[H-1:0]} + (H+1)'(b1r[QW:H])));
      // stage 3: recombination and reduction
      v3  <= v2;
      ae3 <= ae2;
      c3  <= c2;
      r3  <= r3_d;
      // stage 4: conditional adder
      out_valid <= v3;
      out       <= ae3 ? s4[QW:0] : r3;
    end
  end

endmodule
