// tb_fmle_control: self-checking test of the control unit.
//
// Both processing elements are replaced by responders that answer each
// op_start with op_done after an operation-dependent delay. For random
// exponents, with the right-to-left method and with the powering ladder,
// the testbench checks:
//   * the load pulse at the start and the FSM path IDLE -> S0 -> S1 (tau
//     iterations) -> S2 -> IDLE with one done pulse;
//   * that every FMLM is the micro-operations CT_Y .. FINAL in order
//     (eleven with the all-at-once flow tested here: ICT_A, MODR_A and
//     CT_A are not issued);
//   * which element is started and in which mode, per state and exponent
//     bit (bits read upwards for right-to-left, downwards for the ladder);
//   * the RAM read addresses in the cycle of op_start: word 0 of the
//     region of the operation (N', N-hat, R_2, R1-hat) and, for the final
//     step, the pair B_u[0], B_u[1], then advancing by one word (or pair)
//     per cycle.
module tb_fmle_control;
  import fmle_pkg::*;
  localparam int unsigned V = 3, TAU = 64, EXPW = 32;
  localparam bit AAO = 1'b1;             // all-at-once sequence
  localparam int unsigned NOPS = AAO ? 11 : 14;
  localparam int unsigned S = 1 << V;
  localparam int unsigned AW = $clog2(5 * S);
  localparam int unsigned TW = $clog2(TAU + 1);

  logic clk = 1'b0, rst_n = 1'b0;
  logic en = 1'b0, spa = 1'b0;
  logic [TW-1:0] exp_len = '0;
  logic exp_we = 1'b0;
  logic [0:0] exp_waddr = '0;
  logic [EXPW-1:0] exp_wdata = '0;
  logic load, op_start_a, op_start_b, done_a = 1'b0, done_b = 1'b0;
  pe_op_e op;
  pe_mode_e mode_a, mode_b;
  logic [AW-1:0] ram_raddr0, ram_raddr1;
  fsm_state_e state;
  logic exp_bit, busy, done;
  int checks = 0, failures = 0;

  fmle_control #(.V(V), .TAU(TAU), .EXPW(EXPW), .ALL_AT_ONCE(AAO)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // responders: done after 3 + op cycles
  int dly_a = -1, dly_b = -1;
  always @(posedge clk) begin
    done_a <= 1'b0; done_b <= 1'b0;
    if (dly_a == 0) done_a <= 1'b1;
    if (dly_b == 0) done_b <= 1'b1;
    if (dly_a >= 0) dly_a--;
    if (dly_b >= 0) dly_b--;
    if (op_start_a) dly_a = 3 + int'(op);
    if (op_start_b) dly_b = 3 + 2 * int'(op);
  end

  // expected behaviour
  logic [TAU-1:0] e;
  int tau;
  logic ladder;
  int fmlm_idx;        // 0: S0, 1..tau: iterations, tau+1: S2
  int op_idx;
  int n_done, n_load;
  fsm_state_e path [$];

  // micro-operation number k of an FMLM
  function automatic pe_op_e exp_op(int k);
    if (AAO && k >= 2) k += 3;           // ICT_A, MODR_A, CT_A left out
    return pe_op_e'(int'(OP_CT_Y) + k);
  endfunction

  function automatic logic [AW-1:0] exp_addr(pe_op_e o, pe_mode_e ma, pe_mode_e mb,
                                             logic aa, logic ab);
    unique case (o)
      OP_MUL_AN: return AW'(REG_NP * S);
      OP_MUL_YA: return ((aa && ma == MODE_CM_RAM) || (ab && mb == MODE_CM_RAM))
                        ? AW'(REG_R2 * S) : AW'(REG_NP * S);
      OP_MUL_YY: return AW'(REG_R1H * S);
      OP_MAD_MN: return AW'(REG_NH * S);
      OP_FINAL:  return AW'(REG_BU * S);
      default:   return '0;
    endcase
  endfunction

  always @(posedge clk) if (rst_n) begin
    if (load) n_load++;
    if (done) n_done++;
    if (path.size() == 0 || path[$] != state) path.push_back(state);
    if (op_start_a || op_start_b) begin
      logic ea, eb; pe_mode_e xa, xb; int bi; logic bit_i;
      // expected activity and modes
      bi    = ladder ? tau - fmlm_idx : fmlm_idx - 1;
      bit_i = (fmlm_idx >= 1 && fmlm_idx <= tau) ? e[bi] : 1'b0;
      if (fmlm_idx == 0) begin
        ea = 1; xa = MODE_CM_RAM; eb = ladder; xb = MODE_SQ;
      end else if (fmlm_idx <= tau) begin
        if (!ladder) begin ea = 1; xa = MODE_SQ; eb = bit_i; xb = MODE_CM_PE; end
        else begin
          ea = 1; eb = 1;
          xa = bit_i ? MODE_SQ : MODE_LAD_EXT;
          xb = bit_i ? MODE_LAD_EXT : MODE_SQ;
        end
      end else begin
        ea = ladder; xa = MODE_SQ; eb = 1; xb = MODE_CM_ONE;
      end
      checks++;
      if (op != exp_op(op_idx)) begin
        failures++; $display("FAIL op %s, expected index %0d", op.name(), op_idx);
      end
      checks++;
      if (op_start_a != ea || op_start_b != eb ||
          (ea && mode_a != xa) || (eb && mode_b != xb)) begin
        failures++;
        $display("FAIL FMLM %0d: start %b%b mode %s/%s", fmlm_idx, op_start_a, op_start_b,
                 mode_a.name(), mode_b.name());
      end
      if (op_reads_ram(op) || op == OP_FINAL) begin
        logic [AW-1:0] b;
        b = exp_addr(op, xa, xb, ea, eb);
        checks++;
        if (ram_raddr0 != b || (op == OP_FINAL && ram_raddr1 != b + 1)) begin
          failures++; $display("FAIL RAM address %0d for %s", ram_raddr0, op.name());
        end
        @(posedge clk);
        checks++;
        if (ram_raddr0 != b + ((op == OP_FINAL) ? 2 : 1)) begin
          failures++; $display("FAIL RAM address step for %s", op.name());
        end
      end
      op_idx++;
      if (op_idx == NOPS) begin op_idx = 0; fmlm_idx++; end
    end
  end

  task automatic run(input logic lad);
    ladder = lad;
    tau = 1 + $urandom % TAU;
    e = {$urandom, $urandom};
    fmlm_idx = 0; op_idx = 0; n_done = 0; n_load = 0;
    path.delete();
    for (int w = 0; w < 2; w++) begin
      @(negedge clk);
      exp_we = 1'b1; exp_waddr = w[0]; exp_wdata = e[w*32 +: 32];
    end
    @(negedge clk);
    exp_we = 1'b0; exp_len = TW'(tau); spa = lad; en = 1'b1;
    @(negedge clk) en = 1'b0;
    while (!done) @(negedge clk);
    repeat (3) @(negedge clk);
    checks++;
    if (fmlm_idx != tau + 2 || n_done != 1 || n_load != 1) begin
      failures++;
      $display("FAIL %0d FMLMs for tau %0d, %0d done, %0d load", fmlm_idx, tau, n_done, n_load);
    end
    checks++;
    if (path.size() != 5 || path[0] != ST_IDLE || path[1] != ST_S0 || path[2] != ST_S1 ||
        path[3] != ST_S2 || path[4] != ST_IDLE) begin
      failures++; $display("FAIL FSM path");
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    path.push_back(ST_IDLE);
    for (int t = 0; t < 6; t++) begin
      run(1'b0);
      run(1'b1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
