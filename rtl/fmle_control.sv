// fmle_control: control unit of the FFT-based exponentiation.
//
// Three parts, as in the published control unit:
//  * FSM with states IDLE, S0, S1, S2:
//      IDLE -> S0  on en (both operands are loaded into the elements);
//      S0   -> S1  when y = FMLM(y, r_1) is done (conversion of x into
//                  Montgomery form);
//      S1   -> S1  after each iteration, S1 -> S2 after the iteration
//                  with index tau-1 (tau = exp_len);
//      S2   -> IDLE when t = FMLM(t, 1) is done (conversion back), with a
//                  one-cycle done pulse.
//  * Exponent block RAM of TAU bits, written EXPW bits at a time by the host,
//    read one bit per iteration: e[0], e[1], ... for the right-to-left
//    binary method, e[tau-1] ... e[0] for the powering ladder.
//  * Control signal generator: for every FMLM it issues the fixed sequence
//    of fourteen micro-operations (eleven with ALL_AT_ONCE) to both elements with the same
//    op/op_start signals, waits for op_done of every active element, and
//    drives the two read addresses of the precomputed-variable RAM: word k
//    of the operation's region in cycle start + k (s words), or the pair of
//    bounds B_u[2k], B_u[2k+1] for the final step (s/2 pairs).
//
// Work assignment (spa = 0, right-to-left binary method):
//   S0: PEA y <- FMLM(y, r_1) (R_2 and R1-hat from RAM); PEB idle.
//   S1: PEA y <- FMLM(y, y); PEB t <- FMLM(t, y) when e[i] = 1, with A and
//       Y-hat forwarded from PEA, else idle.
//   S2: PEB t <- FMLM(t, 1); PEA idle.
// With spa = 1 (Montgomery powering ladder, simple-power-analysis
// protection) both elements always work:
//   S0: PEA y <- FMLM(y, r_1); PEB t <- FMLM(t, t) (dummy).
//   S1, e[i] = 1: PEA y <- FMLM(y, y); PEB t <- FMLM(t, y) with Y, Y-hat
//       forwarded from PEA.  e[i] = 0: PEA y <- FMLM(y, t) with T, T-hat
//       forwarded from PEB; PEB t <- FMLM(t, t).
//   S2: PEA y <- FMLM(y, y) (dummy); PEB t <- FMLM(t, 1).
// With ALL_AT_ONCE = 1 the sequence is eleven micro-operations: ICT_A,
// MODR_A and CT_A are not issued (the elements form m' from Y, Y' and N'
// directly).
// The micro-operation encoding, the handshake and the exponent RAM word
// width are this design's choices.
module fmle_control #(
  parameter int unsigned V    = fmle_pkg::V_DEF,
  parameter int unsigned TAU  = fmle_pkg::TAU_DEF,   // maximum exponent bits
  parameter int unsigned EXPW = 32,                  // exponent RAM word
  parameter bit ALL_AT_ONCE   = fmle_pkg::AAO_DEF,   // skip ICT_A..CT_A
  localparam int unsigned S     = 1 << V,
  localparam int unsigned DEPTH = fmle_pkg::NUM_REGIONS * S,
  localparam int unsigned AW    = $clog2(DEPTH),
  localparam int unsigned EWORDS = (TAU + EXPW - 1) / EXPW,
  localparam int unsigned EAW   = (EWORDS > 1) ? $clog2(EWORDS) : 1,
  localparam int unsigned TW    = $clog2(TAU + 1)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 en,          // start an exponentiation
  input  logic                 spa,         // 1: Montgomery powering ladder
  input  logic [TW-1:0]        exp_len,     // tau, 1 .. TAU
  // exponent RAM write port
  input  logic                 exp_we,
  input  logic [EAW-1:0]       exp_waddr,
  input  logic [EXPW-1:0]      exp_wdata,
  // to / from the processing elements
  output logic                 load,        // load x into PEA, r mod n into PEB
  output fmle_pkg::pe_op_e     op,
  output logic                 op_start_a,
  output logic                 op_start_b,
  output fmle_pkg::pe_mode_e   mode_a,
  output fmle_pkg::pe_mode_e   mode_b,
  input  logic                 done_a,
  input  logic                 done_b,
  // precomputed-variable RAM read addresses
  output logic [AW-1:0]        ram_raddr0,
  output logic [AW-1:0]        ram_raddr1,
  // status
  output fmle_pkg::fsm_state_e state,
  output logic                 exp_bit,     // exponent bit of the iteration
  output logic                 busy,
  output logic                 done
);
  import fmle_pkg::*;

  // ------------------------------------------------------- exponent RAM
  logic [EXPW-1:0] exp_mem [EWORDS];

  always_ff @(posedge clk)
    if (exp_we) exp_mem[exp_waddr] <= exp_wdata;

  // ------------------------------------------------------------- FSM
  logic [TW-1:0] iter;            // iterations done in S1
  logic [TW-1:0] bit_idx;         // exponent bit of the current iteration
  logic          act_a, act_b;    // elements working in this FMLM
  logic          seen_a, seen_b;  // op_done received
  logic          running;         // an FMLM is in progress
  logic          waiting;         // a micro-operation is in progress
  pe_op_e        nxt_op;
  logic          spa_q;
  logic [V:0]    rcnt;            // RAM address counter
  logic          rdata_pairs;

  // bit index of iteration k
  function automatic logic [TW-1:0] bit_of(logic [TW-1:0] k, logic ladder,
                                           logic [TW-1:0] len);
    return ladder ? len - 1'b1 - k : k;
  endfunction

  logic ebit_rd;
  always_comb ebit_rd = exp_mem[int'(bit_idx) / EXPW][int'(bit_idx) % EXPW];

  // modes and activity of the FMLM about to start in state st
  task automatic plan(input fsm_state_e st, input logic ladder, input logic eb,
                      output logic aa, output logic ab,
                      output pe_mode_e ma, output pe_mode_e mb);
    aa = 1'b0; ab = 1'b0; ma = MODE_SQ; mb = MODE_SQ;
    unique case (st)
      ST_S0: begin
        aa = 1'b1; ma = MODE_CM_RAM;
        ab = ladder; mb = MODE_SQ;
      end
      ST_S1: begin
        if (!ladder) begin
          aa = 1'b1; ma = MODE_SQ;
          ab = eb;   mb = MODE_CM_PE;
        end else begin
          aa = 1'b1; ab = 1'b1;
          ma = eb ? MODE_SQ : MODE_LAD_EXT;
          mb = eb ? MODE_LAD_EXT : MODE_SQ;
        end
      end
      ST_S2: begin
        aa = ladder; ma = MODE_SQ;
        ab = 1'b1;   mb = MODE_CM_ONE;
      end
      default: ;
    endcase
  endtask

  logic          p_aa, p_ab;
  pe_mode_e      p_ma, p_mb;
  fsm_state_e    plan_state;
  always_comb begin
    plan_state = state;
    plan(plan_state, spa_q, ebit_rd, p_aa, p_ab, p_ma, p_mb);
  end

  // RAM region of the current micro-operation
  logic [AW-1:0] base;
  always_comb begin
    rdata_pairs = (op == OP_FINAL);
    unique case (op)
      OP_MUL_AN: base = AW'(REG_NP * S);
      OP_MUL_YA: base = ((act_a && mode_a == MODE_CM_RAM) || (act_b && mode_b == MODE_CM_RAM))
                        ? AW'(REG_R2 * S) : AW'(REG_NP * S);
      OP_MUL_YY: base = AW'(REG_R1H * S);
      OP_MAD_MN: base = AW'(REG_NH * S);
      OP_FINAL:  base = AW'(REG_BU * S);
      default:   base = '0;
    endcase
    if (rdata_pairs) begin
      ram_raddr0 = base + AW'(2 * rcnt);
      ram_raddr1 = base + AW'(2 * rcnt + 1);
    end else begin
      ram_raddr0 = base + AW'(rcnt);
      ram_raddr1 = base + AW'(rcnt);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= ST_IDLE;
      iter       <= '0;
      bit_idx    <= '0;
      act_a      <= 1'b0;
      act_b      <= 1'b0;
      seen_a     <= 1'b0;
      seen_b     <= 1'b0;
      running    <= 1'b0;
      waiting    <= 1'b0;
      op         <= OP_NONE;
      nxt_op     <= OP_CT_Y;
      op_start_a <= 1'b0;
      op_start_b <= 1'b0;
      mode_a     <= MODE_SQ;
      mode_b     <= MODE_SQ;
      load       <= 1'b0;
      done       <= 1'b0;
      spa_q      <= 1'b0;
      exp_bit    <= 1'b0;
      rcnt       <= '0;
    end else begin
      load       <= 1'b0;
      done       <= 1'b0;
      op_start_a <= 1'b0;
      op_start_b <= 1'b0;
      if (rcnt != '1) rcnt <= rcnt + 1'b1;

      if (state == ST_IDLE) begin
        if (en) begin
          state   <= ST_S0;
          spa_q   <= spa;
          load    <= 1'b1;
          iter    <= '0;
          running <= 1'b0;
        end
      end else if (!running) begin
        // start the next FMLM of this state
        act_a   <= p_aa;
        act_b   <= p_ab;
        mode_a  <= p_ma;
        mode_b  <= p_mb;
        exp_bit <= ebit_rd;
        running <= 1'b1;
        waiting <= 1'b0;
        nxt_op  <= OP_CT_Y;
      end else if (!waiting) begin
        // issue the next micro-operation
        op         <= nxt_op;
        op_start_a <= act_a;
        op_start_b <= act_b;
        seen_a     <= !act_a;
        seen_b     <= !act_b;
        waiting    <= 1'b1;
        rcnt       <= '0;
      end else begin
        if (done_a) seen_a <= 1'b1;
        if (done_b) seen_b <= 1'b1;
        if ((seen_a || done_a) && (seen_b || done_b)) begin
          waiting <= 1'b0;
          if (op == OP_FINAL) begin
            // FMLM complete: FSM transition
            running <= 1'b0;
            unique case (state)
              ST_S0: begin
                state   <= ST_S1;
                iter    <= '0;
                bit_idx <= bit_of('0, spa_q, exp_len);
              end
              ST_S1: begin
                if (iter == exp_len - 1'b1) state <= ST_S2;
                iter    <= iter + 1'b1;
                bit_idx <= bit_of(iter + 1'b1, spa_q, exp_len);
              end
              default: begin
                state <= ST_IDLE;
                done  <= 1'b1;
              end
            endcase
          end else begin
            nxt_op <= (ALL_AT_ONCE && op == OP_MUL_AN) ? OP_MUL_YA
                                                       : pe_op_e'(int'(op) + 1);
          end
        end
      end
    end
  end

  assign busy = (state != ST_IDLE);

  // Only an element that was started may report completion.
  a_done_a: assert property (@(posedge clk) disable iff (!rst_n)
                             done_a |-> (act_a && waiting));
  a_done_b: assert property (@(posedge clk) disable iff (!rst_n)
                             done_b |-> (act_b && waiting));

endmodule
