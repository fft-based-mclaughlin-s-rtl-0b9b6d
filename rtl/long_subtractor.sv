// long_subtractor: segment-serial long subtractor that produces both
// x - y and (x - y) >> 1 of l-bit operands.
//
// It serves the final step of the FFT-based multiplier, where the modulo-h
// reduction (h = 2^l + 1) and the halving t = (h - g)/2 are merged into
//   h - g = (1 + floor(g'/2^l) - (g' mod 2^l)) mod 2^l,   t = (h - g) >> 1.
// Operands arrive as SW-bit segments, least significant first, one per
// cycle. Two cascaded subtractors compute x - y and then - z, where z is the
// borrow register; the borrow out of the last segment (the sign, i.e. bit l)
// is ignored. The shifted result is assembled by keeping each difference
// segment until the next one arrives and taking that one's LSB as the new
// MSB; after the segment marked last, the final half segment is emitted
// with MSB 0.
//
// Timing: diff/diff_valid three cycles after in_valid; half/half_valid one
// segment later (for the last segment: one cycle after its diff). first
// clears the borrow for a new subtraction. Between the last segment of one
// subtraction and the first of the next at least one idle cycle is needed.
// The cascaded subtractors, borrow register and LSB-discarding output
// follow the published subtractor; the framing signals are this design's.
module long_subtractor #(
  parameter int unsigned SW = 2 * fmle_pkg::U_DEF      // segment width
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           in_valid,
  input  logic           first,      // first segment: borrow in = 0
  input  logic           last,       // last segment
  input  logic [SW-1:0]  x,
  input  logic [SW-1:0]  y,
  output logic           diff_valid,
  output logic [SW-1:0]  diff,       // segment of x - y (mod 2^l)
  output logic           half_valid,
  output logic [SW-1:0]  half        // segment of (x - y mod 2^l) >> 1
);

  logic          v1, v2, f1, f2, l1, l2, l3;
  logic [SW-1:0] x1, y1;
  logic [SW:0]   d1;                 // x - y, two's complement
  logic [SW:0]   d2;                 // x - y - z, two's complement
  logic          z;
  logic [SW-1:0] prev;
  logic          have_prev, flush;

  always_comb d2 = d1 - (SW+1)'((f2 ? 1'b0 : z));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      {v1, v2, f1, f2, l1, l2, l3} <= '0;
      x1 <= '0; y1 <= '0; d1 <= '0; z <= 1'b0;
      diff_valid <= 1'b0; diff <= '0;
      half_valid <= 1'b0; half <= '0;
      prev <= '0; have_prev <= 1'b0; flush <= 1'b0;
    end else begin
      v1 <= in_valid; f1 <= first; l1 <= last;
      x1 <= x; y1 <= y;
      v2 <= v1; f2 <= f1; l2 <= l1;
      d1 <= {1'b0, x1} - {1'b0, y1};
      diff_valid <= v2;
      l3 <= l2;
      if (v2) begin
        diff <= d2[SW-1:0];
        z    <= d2[SW];
      end
      // shifted output
      half_valid <= 1'b0;
      if (diff_valid) begin
        prev      <= diff;
        have_prev <= !l3;
        flush     <= l3;
        if (have_prev) begin
          half       <= {diff[0], prev[SW-1:1]};
          half_valid <= 1'b1;
        end
      end else if (flush) begin
        half       <= {1'b0, prev[SW-1:1]};
        half_valid <= 1'b1;
        flush      <= 1'b0;
      end
    end
  end

  // A new subtraction may not start while the final half segment is pending.
  a_flush_gap: assert property (@(posedge clk) disable iff (!rst_n) flush |-> !diff_valid);

endmodule
