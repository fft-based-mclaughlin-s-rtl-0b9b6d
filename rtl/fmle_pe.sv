// fmle_pe: processing element computing one FFT-based McLaughlin Montgomery
// multiplication without conditional selections (FMLM).
//
// For operands below 2n, with r = 2^l - 1 > 4n, h = 2^l + 1 and l = u*s,
// the result t = x*y*r^-1 (mod n) < 2n is obtained as
//   m  = x*y*n' mod r                      (cyclic transforms, CT/ICT)
//   g' = x (*) y + m (*) n                 (nega-cyclic transforms, NCT/INCT)
//   t  = (h - (g' mod h)) / 2
// with no data-dependent correction step, so every multiplication takes
// the same number of cycles. Operands are held as s digits of u bits.
//
// The element works through a fixed sequence of micro-operations issued by
// the control unit (op + op_start, answered by op_done):
//   CT_Y   Y  <- CT(y)             MODR_M m  <- m' mod r
//   MUL_AN W  <- Y (.) N'          NCT_Y  Yh <- NCT(y)
//   ICT_A  W  <- ICT(W)            MUL_YY Z  <- Yh (.) Yh'
//   MODR_A a  <- a' mod r          NCT_M  W  <- NCT(m)
//   CT_A   A  <- CT(a)             MAD_MN Z  <- W (.) N-hat + Z
//   MUL_YA W  <- Y' (.) A'         INCT_Z Z  <- INCT(Z)
//   ICT_M  W  <- ICT(W)            FINAL  y  <- (h - g)/2
// mode selects where A', Y' and Yh' come from: squaring (own A and Yh),
// common multiplicand forwarded by the other element (its A and Yh), common
// multiplicand from the precomputed RAM (R_2 and R1-hat), multiplication by
// one (A = N' from RAM, Yh = all ones, since NCT(1) = 1), or the powering
// ladder (own A, the other element's Y and Yh). In the common-multiplicand
// modes MUL_AN..CT_A are skipped (op_done on the next cycle).
//
// With ALL_AT_ONCE = 1 (the default where c*s >= 2v + 3u, which guarantees
// q > s^2 (b-1)^3) the first half is m' = ICT(Y (.) Y' (.) N'): MUL_AN
// forms W <- Y' (.) N' (Y' = own Y for squaring, the other element's Y in
// the forwarded and ladder modes) and MUL_YA forms W <- Y (.) W, while
// ICT_A, MODR_A and CT_A are always skipped; A is then not used. The RAM and
// times-one modes are the same in both flows.
//
// Building blocks: one FFT operator (two butterflies), one multiply-adder
// (one element per cycle), one long adder and one long subtractor (2u-bit
// segments). Conversion of a convolution result sum_k d_k b^k to binary is
// done two digits per cycle with a signed carry; for g' each digit is first
// restricted: a residue above its bound B_u[k] stands for the negative
// value residue - q. The modulo-r reduction then takes two adder passes
// (m_r = low + high, the high part entering at the two lowest segments,
// then fold m_r[l] | all-one check), the final step one
// subtractor pass (1 + high - low, halved).
//
// Timing: RAM words for element (or digit pair) k arrive on ram_rdata* in
// cycle op_start + 1 + k; this element consumes them then. The result y_val
// and the exported vectors are stable between operations. Operation
// sequence, modes, building blocks, the all-at-once product and the merged
// final step follow the published element; the register-array storage, the three-pass modulo-r
// reduction (the published one folds a' with a single short addition) and
// the one-element-per-cycle multiply-adder are this design's choices.
module fmle_pe #(
  parameter int unsigned U = fmle_pkg::U_DEF,
  parameter int unsigned V = fmle_pkg::V_DEF,
  parameter int unsigned C = fmle_pkg::C_DEF,
  // all-at-once technique: by default where the ring is large enough
  parameter bit ALL_AT_ONCE = (C * (1 << V) >= 2 * V + 3 * U),
  localparam int unsigned S    = 1 << V,
  localparam int unsigned QW   = C * S,
  localparam int unsigned L    = U * S,
  localparam int unsigned SW   = 2 * U,
  localparam int unsigned NSEG = S / 2
) (
  input  logic                clk,
  input  logic                rst_n,
  // operand load (x for PEA, r mod n for PEB)
  input  logic                load,
  input  logic [L-1:0]        load_val,
  // micro-operation interface
  input  fmle_pkg::pe_op_e    op,
  input  fmle_pkg::pe_mode_e  mode,
  input  logic                op_start,
  output logic                op_done,
  // precomputed RAM read data
  input  logic [QW:0]         ram_rdata0,
  input  logic [QW:0]         ram_rdata1,
  // vectors forwarded by the other element
  input  logic [QW:0]         ext_y  [S],
  input  logic [QW:0]         ext_a  [S],
  input  logic [QW:0]         ext_yh [S],
  // vectors forwarded to the other element
  output logic [QW:0]         vy  [S],
  output logic [QW:0]         va  [S],
  output logic [QW:0]         vyh [S],
  // operand / result (digits of y or t)
  output logic [L-1:0]        y_val
);
  import fmle_pkg::*;

  localparam logic [QW+1:0] Q  = (QW+2)'(1) << QW | (QW+2)'(1);
  localparam int unsigned   NW = QW + U + 4;       // signed conversion width

  typedef enum logic [3:0] {
    P_IDLE, P_FFT, P_PW, P_NORM, P_ADD1, P_ADD2, P_SUB, P_SKIP
  } phase_e;

  phase_e      phase;
  pe_op_e      cur_op;
  pe_mode_e    cur_mode;
  logic [L-1:0] yreg, mreg;
  logic [QW:0] vw [S];
  logic [QW:0] vz [S];
  logic [V:0]  icnt, ocnt;          // issue and output counters
  logic signed [NW-1:0] carry;      // conversion carry (high part at the end)
  logic        issue_en;

  assign y_val = yreg;

  // ---------------------------------------------------------------- FFT
  logic        fft_start, fft_inv, fft_nega, fft_busy, fft_done;
  logic [QW:0] fft_in  [S];
  logic [QW:0] fft_out [S];

  fft_operator #(.V(V), .C(C)) u_fft (
    .clk, .rst_n, .start(fft_start), .inverse(fft_inv), .nega(fft_nega),
    .in_vec(fft_in), .busy(fft_busy), .done(fft_done), .out_vec(fft_out)
  );

  always_comb begin
    fft_inv  = cur_op inside {OP_ICT_A, OP_ICT_M, OP_INCT_Z};
    fft_nega = cur_op inside {OP_NCT_Y, OP_NCT_M, OP_INCT_Z};
    for (int k = 0; k < S; k++) begin
      unique case (cur_op)
        OP_CT_Y, OP_NCT_Y: fft_in[k] = (QW+1)'(yreg[k*U +: U]);
        OP_CT_A, OP_NCT_M: fft_in[k] = (QW+1)'(mreg[k*U +: U]);
        OP_INCT_Z:         fft_in[k] = vz[k];
        default:           fft_in[k] = vw[k];
      endcase
    end
  end

  // ------------------------------------------------------- multiply-adder
  logic        ma_valid, ma_add, ma_ovalid;
  logic [QW:0] ma_a, ma_b, ma_c, ma_out;
  logic [V-1:0] ik;

  multiply_adder #(.QW(QW)) u_ma (
    .clk, .rst_n, .in_valid(ma_valid), .a(ma_a), .b(ma_b), .c(ma_c),
    .add_en(ma_add), .out_valid(ma_ovalid), .out(ma_out)
  );

  always_comb begin
    ik       = icnt[V-1:0];
    ma_valid = (phase == P_PW) && issue_en;
    ma_add   = (cur_op == OP_MAD_MN);
    ma_c     = vz[ik];
    ma_a     = vy[ik];
    ma_b     = ram_rdata0;
    unique case (cur_op)
      OP_MUL_AN: begin
        // all-at-once: W <- Y' (.) N' with Y' of the other operand
        ma_a = (ALL_AT_ONCE && cur_mode inside {MODE_CM_PE, MODE_LAD_EXT}) ? ext_y[ik]
                                                                          : vy[ik];
        ma_b = ram_rdata0;
      end
      OP_MUL_YA: begin
        if (ALL_AT_ONCE) begin
          // M' <- Y (.) W, W = Y' (.) N' from MUL_AN; RAM vector otherwise
          ma_a = vy[ik];
          ma_b = (cur_mode inside {MODE_SQ, MODE_CM_PE, MODE_LAD_EXT}) ? vw[ik] : ram_rdata0;
        end else begin
          ma_a = (cur_mode == MODE_LAD_EXT) ? ext_y[ik] : vy[ik];
          unique case (cur_mode)
            MODE_SQ, MODE_LAD_EXT: ma_b = va[ik];
            MODE_CM_PE:            ma_b = ext_a[ik];
            default:               ma_b = ram_rdata0;
          endcase
        end
      end
      OP_MUL_YY: begin
        ma_a = vyh[ik];
        unique case (cur_mode)
          MODE_SQ:                  ma_b = vyh[ik];
          MODE_CM_PE, MODE_LAD_EXT: ma_b = ext_yh[ik];
          MODE_CM_RAM:              ma_b = ram_rdata0;
          default:                  ma_b = (QW+1)'(1);
        endcase
      end
      OP_MAD_MN: begin
        ma_a = vw[ik];
        ma_b = ram_rdata0;
      end
      default: ;
    endcase
  end

  // --------------------------------------------------- digit conversion
  // Two convolution digits per cycle: seg = d0 + d1*b + carry.
  logic [V-1:0] pj;                     // pair index
  logic [QW:0]  r0, r1;
  logic signed [NW-1:0] d0, d1, segv, carry_nx;
  always_comb begin
    pj = icnt[V-1:0];
    r0 = (cur_op == OP_FINAL) ? vz[2*pj]   : vw[2*pj];
    r1 = (cur_op == OP_FINAL) ? vz[2*pj+1] : vw[2*pj+1];
    d0 = NW'(r0);
    d1 = NW'(r1);
    if (cur_op == OP_FINAL) begin
      // restriction (18): above the bound B_u[k] means negative
      if (r0 > ram_rdata0) d0 = d0 - NW'(Q);
      if (r1 > ram_rdata1) d1 = d1 - NW'(Q);
    end
    segv     = d0 + (d1 <<< U) + carry;
    carry_nx = segv >>> SW;
  end

  // ---------------------------------------------------------- long adder
  logic          la_valid, la_ovalid, la_allone;
  logic [SW-1:0] la_x, la_y;
  carry_ctrl_e   la_ctrl;
  logic [SW:0]   la_sum;

  long_adder #(.SW(SW)) u_add (
    .clk, .rst_n, .in_valid(la_valid), .x(la_x), .y(la_y),
    .carry_ctrl(la_ctrl), .out_valid(la_ovalid), .sum(la_sum),
    .all_one_check(la_allone)
  );

  always_comb begin
    la_valid = (phase inside {P_ADD1, P_ADD2}) && issue_en;
    la_x     = mreg[int'(icnt[V-2:0]) * SW +: SW];
    // high part floor(value / 2^l): below 2^(2v+2u+1), so at most two
    // segments (the all-at-once product needs the second one)
    la_y     = '0;
    if (phase == P_ADD1 && icnt == '0) la_y = carry[SW-1:0];
    if (phase == P_ADD1 && icnt == 1)  la_y = SW'(carry >>> SW);
    if (phase == P_ADD1)
      la_ctrl = (icnt == '0) ? CARRY_CLR :
                (int'(icnt) == NSEG - 1) ? CARRY_FOLD : CARRY_PROP;
    else
      la_ctrl = CARRY_PROP;
  end

  // ----------------------------------------------------- long subtractor
  logic          ls_valid, ls_first, ls_last, ls_dvalid, ls_hvalid;
  logic [SW-1:0] ls_x, ls_y, ls_diff, ls_half;

  long_subtractor #(.SW(SW)) u_sub (
    .clk, .rst_n, .in_valid(ls_valid), .first(ls_first), .last(ls_last),
    .x(ls_x), .y(ls_y), .diff_valid(ls_dvalid), .diff(ls_diff),
    .half_valid(ls_hvalid), .half(ls_half)
  );

  always_comb begin
    ls_valid = (phase == P_SUB) && issue_en;
    ls_first = (icnt == '0);
    ls_last  = (int'(icnt) == NSEG - 1);
    ls_x     = (icnt == '0) ? carry[SW-1:0] + SW'(1) : '0;
    ls_y     = mreg[int'(icnt[V-2:0]) * SW +: SW];
  end

  // ---------------------------------------------------------- sequencer
  logic skip;
  always_comb begin
    if (ALL_AT_ONCE)
      skip = (op inside {OP_ICT_A, OP_MODR_A, OP_CT_A}) ||
             (op == OP_MUL_AN && !(mode inside {MODE_SQ, MODE_CM_PE, MODE_LAD_EXT}));
    else
      skip = op_needs_own_a(op) && !(mode inside {MODE_SQ, MODE_LAD_EXT});
  end

  // The all-at-once product needs q > s^2 (b-1)^3, i.e. c*s >= 2v + 3u.
  if (ALL_AT_ONCE && (C * S < 2 * V + 3 * U)) begin : g_bad_aao
    $error("fmle_pe: ring too small for the all-at-once technique");
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase    <= P_IDLE;
      cur_op   <= OP_NONE;
      cur_mode <= MODE_SQ;
      yreg     <= '0;
      mreg     <= '0;
      icnt     <= '0;
      ocnt     <= '0;
      carry    <= '0;
      issue_en <= 1'b0;
      op_done  <= 1'b0;
      fft_start <= 1'b0;
      for (int k = 0; k < S; k++) begin
        vy[k] <= '0; va[k] <= '0; vyh[k] <= '0; vw[k] <= '0; vz[k] <= '0;
      end
    end else begin
      op_done   <= 1'b0;
      fft_start <= 1'b0;
      if (load) yreg <= load_val;
      unique case (phase)
        P_IDLE: if (op_start) begin
          cur_op   <= op;
          cur_mode <= mode;
          icnt     <= '0;
          ocnt     <= '0;
          carry    <= '0;
          issue_en <= 1'b1;
          if (skip) phase <= P_SKIP;
          else begin
            unique case (op)
              OP_CT_Y, OP_ICT_A, OP_CT_A, OP_ICT_M, OP_NCT_Y, OP_NCT_M, OP_INCT_Z: begin
                phase     <= P_FFT;
                fft_start <= 1'b1;
              end
              OP_MUL_AN, OP_MUL_YA, OP_MUL_YY, OP_MAD_MN: phase <= P_PW;
              OP_MODR_A, OP_MODR_M, OP_FINAL:             phase <= P_NORM;
              default:                                    phase <= P_SKIP;
            endcase
          end
        end
        P_SKIP: begin
          phase   <= P_IDLE;
          op_done <= 1'b1;
        end
        P_FFT: if (fft_done) begin
          for (int k = 0; k < S; k++) begin
            unique case (cur_op)
              OP_CT_Y:  vy[k]  <= fft_out[k];
              OP_CT_A:  va[k]  <= fft_out[k];
              OP_NCT_Y: vyh[k] <= fft_out[k];
              OP_INCT_Z: vz[k] <= fft_out[k];
              default:  vw[k]  <= fft_out[k];
            endcase
          end
          phase   <= P_IDLE;
          op_done <= 1'b1;
        end
        P_PW: begin
          if (issue_en) begin
            if (int'(icnt) == S - 1) issue_en <= 1'b0;
            icnt <= icnt + 1'b1;
          end
          if (ma_ovalid) begin
            if (cur_op inside {OP_MUL_YY, OP_MAD_MN}) vz[ocnt[V-1:0]] <= ma_out;
            else                                      vw[ocnt[V-1:0]] <= ma_out;
            ocnt <= ocnt + 1'b1;
            if (int'(ocnt) == S - 1) begin
              phase   <= P_IDLE;
              op_done <= 1'b1;
            end
          end
        end
        P_NORM: begin
          mreg[int'(pj) * SW +: SW] <= segv[SW-1:0];
          carry <= carry_nx;
          if (int'(icnt) == NSEG - 1) begin
            icnt     <= '0;
            ocnt     <= '0;
            issue_en <= 1'b1;
            phase    <= (cur_op == OP_FINAL) ? P_SUB : P_ADD1;
          end else begin
            icnt <= icnt + 1'b1;
          end
        end
        P_ADD1, P_ADD2: begin
          if (issue_en) begin
            if (int'(icnt) == NSEG - 1) issue_en <= 1'b0;
            icnt <= icnt + 1'b1;
          end
          if (la_ovalid) begin
            mreg[int'(ocnt[V-2:0]) * SW +: SW] <= la_sum[SW-1:0];
            ocnt <= ocnt + 1'b1;
            if (int'(ocnt) == NSEG - 1) begin
              icnt     <= '0;
              ocnt     <= '0;
              if (phase == P_ADD1) begin
                issue_en <= 1'b1;
                phase    <= P_ADD2;
              end else begin
                phase    <= P_IDLE;
                op_done  <= 1'b1;
              end
            end
          end
        end
        P_SUB: begin
          if (issue_en) begin
            if (int'(icnt) == NSEG - 1) issue_en <= 1'b0;
            icnt <= icnt + 1'b1;
          end
          if (ls_hvalid) begin
            yreg[int'(ocnt[V-2:0]) * SW +: SW] <= ls_half;
            ocnt <= ocnt + 1'b1;
            if (int'(ocnt) == NSEG - 1) begin
              phase   <= P_IDLE;
              op_done <= 1'b1;
            end
          end
        end
        default: phase <= P_IDLE;
      endcase
    end
  end

  // An operation is only started when the element is idle.
  a_start_idle: assert property (@(posedge clk) disable iff (!rst_n)
                                 op_start |-> phase == P_IDLE);

endmodule
