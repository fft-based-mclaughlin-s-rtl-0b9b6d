// long_adder: segment-serial long adder used for the modulo-r reductions
// (r = 2^l - 1) of the FFT-based multiplier.
//
// A long operand is streamed as l/SW segments of SW = 2u bits, least
// significant first, one per cycle. Two cascaded adders form
// x + y (first adder) and then + z (second adder), where z is the carry
// register. The all-one check ANDs every bit of the running sum into a flag
// so that a result equal to r = 2^l - 1 is recognised.
//
// Each segment carries a carry_ctrl code that travels with it:
//   CARRY_CLR  first segment of a new sum: z = 0 is used, all-one flag set;
//   CARRY_PROP z <- carry out of this segment;
//   CARRY_FOLD last segment of the first pass of a modulo-r reduction:
//              z <- carry out | all-one check, i.e. m_r[l] | epsilon, which
//              is added back in at the least significant end of the
//              second pass (m = (m_r mod 2^l + (m_r[l] | eps)) mod 2^l).
//   CARRY_HOLD leave z unchanged.
// Latency: sum (SW+1 bits, MSB = carry out) is valid three cycles after
// in_valid. all_one_check is the flag over the segments seen so far.
// The two cascaded adders, the carry register with its multiplexer and the
// all-one check follow the published adder; the check is taken on the
// output of the second adder, where the sum m_r is complete.
module long_adder #(
  parameter int unsigned SW = 2 * fmle_pkg::U_DEF      // segment width
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   in_valid,
  input  logic [SW-1:0]          x,
  input  logic [SW-1:0]          y,
  input  fmle_pkg::carry_ctrl_e  carry_ctrl,
  output logic                   out_valid,
  output logic [SW:0]            sum,
  output logic                   all_one_check
);
  import fmle_pkg::*;

  logic          v1, v2;
  carry_ctrl_e   cc1, cc2;
  logic [SW-1:0] x1, y1;
  logic [SW:0]   s1;
  logic          z;
  logic [SW:0]   s2;
  logic          z_used, all_in, eps_now;

  always_comb begin
    z_used  = (cc2 == CARRY_CLR) ? 1'b0 : z;
    all_in  = (cc2 == CARRY_CLR) ? 1'b1 : all_one_check;
    s2      = s1 + (SW+1)'(z_used);
    eps_now = all_in & (&s2[SW-1:0]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      {v1, v2, out_valid} <= '0;
      cc1 <= CARRY_CLR; cc2 <= CARRY_CLR;
      x1 <= '0; y1 <= '0; s1 <= '0;
      z <= 1'b0; all_one_check <= 1'b1;
      sum <= '0;
    end else begin
      v1  <= in_valid;
      cc1 <= carry_ctrl;
      x1  <= x;
      y1  <= y;
      v2  <= v1;
      cc2 <= cc1;
      s1  <= {1'b0, x1} + {1'b0, y1};
      out_valid <= v2;
      if (v2) begin
        sum <= s2;
        case (cc2)
          CARRY_FOLD: begin
            z             <= s2[SW] | eps_now;
            all_one_check <= eps_now;
          end
          CARRY_HOLD: all_one_check <= eps_now;
          default: begin
            z             <= s2[SW];
            all_one_check <= eps_now;
          end
        endcase
      end
    end
  end

endmodule
