// fft_operator: length-s forward and inverse cyclic (CT/ICT) and nega-cyclic
// (NCT/INCT) number-theoretic transforms over Z_q, q = 2^(c*s) + 1.
//
// Decimation-in-time, constant-geometry radix-2 FFT. Stage j (J = 2^(v-j-1))
// reads elements 2i and 2i+1 of one buffer and writes elements i and i+s/2
// of the other:
//   x'(i)       = x(2i) + x(2i+1) * 2^e
//   x'(i + s/2) = x(2i) - x(2i+1) * 2^e,   e = 2cJ*floor(i/J)        (CT)
//                                          e = 2cJ*floor(i/J) + cJ   (NCT)
//   inverse:                               e = 2cs - 2cJ*floor(i/J)
// so omega = 2^(2c) and phi = 2^c and every twiddle is a shift. The input
// is taken in bit-reversed order and the spectrum comes out in natural
// order; the inverse transform reads its input vector in bit-reversed order
// too, so point-wise products of natural-order spectra can be fed straight
// back. The nega-cyclic weights phi^i are folded into the forward stages
// (the cJ term); the inverse transforms end with a post-scaling pass that
// multiplies element k by s^-1 (ICT) or s^-1 * phi^-k (INCT), both powers
// of two, i.e. by 2^(2cs - v - c*k).
//
// Two butterflies work in parallel, so four elements are processed per
// cycle: a transform takes 1 load cycle + v*s/4 stage cycles, plus s/2
// scaling cycles for an inverse transform. The result is held in out_vec
// from the cycle done is high until the next start.
//
// Interface: start (one-cycle pulse, samples in_vec, inverse, nega),
// busy while running, done one-cycle pulse. The two butterflies and the
// stage equations follow the published design; the buffers here are
// register arrays where the original used block RAMs.
module fft_operator #(
  parameter int unsigned V = fmle_pkg::V_DEF,   // log2 of the length
  parameter int unsigned C = fmle_pkg::C_DEF,   // q = 2^(C*S) + 1
  localparam int unsigned S  = 1 << V,
  localparam int unsigned QW = C * S,
  localparam int unsigned EW = $clog2(2 * QW)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic          inverse,             // 1: ICT / INCT
  input  logic          nega,                // 1: NCT / INCT
  input  logic [QW:0]   in_vec  [S],
  output logic          busy,
  output logic          done,
  output logic [QW:0]   out_vec [S]
);

  typedef enum logic [1:0] {F_IDLE, F_STAGE, F_SCALE} fstate_e;

  fstate_e            state;
  logic [QW:0]        buf0 [S];
  logic [QW:0]        buf1 [S];
  logic               cur;                 // buffer holding the current data
  logic               inv_q, nega_q;
  logic [$clog2(V+1)-1:0] stage;
  logic [V-1:0]       cnt;                 // butterfly-pair or scaling index

  // Bit reversal of a V-bit index.
  function automatic logic [V-1:0] bitrev(input logic [V-1:0] a);
    for (int b = 0; b < V; b++) bitrev[b] = a[V-1-b];
  endfunction

  // Two butterfly units.
  logic [QW:0]   bxe [2];
  logic [QW:0]   bxo [2];
  logic [EW-1:0] be  [2];
  logic [QW:0]   bp  [2];
  logic [QW:0]   bm  [2];

  for (genvar g = 0; g < 2; g++) begin : g_bf
    ntt_butterfly #(.QW(QW)) u_bf (
      .xe(bxe[g]), .xo(bxo[g]), .e(be[g]), .plus(bp[g]), .minus(bm[g])
    );
  end

  // Index and twiddle of butterfly g in the current stage / scaling step.
  logic [V-1:0] bi [2];
  always_comb begin
    int unsigned jj, ii, msk, ex;
    for (int g = 0; g < 2; g++) begin
      ii = 0; jj = 0; msk = 0; ex = 0;
      bxe[g] = '0;
      bxo[g] = '0;
      be[g]  = '0;
      bi[g]  = '0;
      if (state == F_STAGE) begin
        ii     = 2 * int'(cnt) + g;                 // i in [0, s/2)
        jj     = 1 << (V - 1 - int'(stage));        // J
        msk    = ii & ~(jj - 1);                    // J*floor(i/J)
        ex     = 2 * C * msk;
        if (inv_q) ex = (2 * QW - ex) % (2 * QW);
        else if (nega_q) ex = ex + C * jj;
        bi[g]  = V'(ii);
        bxe[g] = cur ? buf1[2*ii]   : buf0[2*ii];
        bxo[g] = cur ? buf1[2*ii+1] : buf0[2*ii+1];
        be[g]  = EW'(ex);
      end else if (state == F_SCALE) begin
        ii     = 2 * int'(cnt) + g;                 // k in [0, s)
        ex     = 2 * QW - V - (nega_q ? C * ii : 0);
        bi[g]  = V'(ii);
        bxo[g] = cur ? buf1[ii] : buf0[ii];
        be[g]  = EW'(ex);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= F_IDLE;
      cur   <= 1'b0;
      inv_q <= 1'b0;
      nega_q <= 1'b0;
      stage <= '0;
      cnt   <= '0;
      done  <= 1'b0;
      for (int k = 0; k < S; k++) begin
        buf0[k] <= '0;
        buf1[k] <= '0;
      end
    end else begin
      done <= 1'b0;
      case (state)
        F_IDLE: begin
          if (start) begin
            for (int k = 0; k < S; k++) buf0[k] <= in_vec[bitrev(V'(k))];
            cur    <= 1'b0;
            inv_q  <= inverse;
            nega_q <= nega;
            stage  <= '0;
            cnt    <= '0;
            state  <= F_STAGE;
          end
        end
        F_STAGE: begin
          for (int g = 0; g < 2; g++) begin
            if (cur) begin
              buf0[bi[g]]         <= bp[g];
              buf0[int'(bi[g]) + S / 2] <= bm[g];
            end else begin
              buf1[bi[g]]         <= bp[g];
              buf1[int'(bi[g]) + S / 2] <= bm[g];
            end
          end
          if (int'(cnt) == S / 4 - 1) begin
            cnt <= '0;
            cur <= ~cur;
            if (int'(stage) == V - 1) begin
              stage <= '0;
              if (inv_q) state <= F_SCALE;
              else begin
                state <= F_IDLE;
                done  <= 1'b1;
              end
            end else begin
              stage <= stage + 1'b1;
            end
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        F_SCALE: begin
          for (int g = 0; g < 2; g++) begin
            if (cur) buf1[bi[g]] <= bp[g];
            else     buf0[bi[g]] <= bp[g];
          end
          if (int'(cnt) == S / 2 - 1) begin
            cnt   <= '0;
            state <= F_IDLE;
            done  <= 1'b1;
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        default: state <= F_IDLE;
      endcase
    end
  end

  assign busy = (state != F_IDLE);

  always_comb
    for (int k = 0; k < S; k++) out_vec[k] = cur ? buf1[k] : buf0[k];

endmodule
