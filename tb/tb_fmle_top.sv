// tb_fmle_top: end-to-end test of the FMLE exponentiator at a reduced size.
//
// Parameter set: u = 8, v = 3 (s = 8), c = 4, so l = 64, q = 2^32 + 1 and
// moduli of 60 bits; exponents of up to 64 bits. This set satisfies the
// bounds the design relies on: q > 2s(b-1)^2, q > s^2(b-1)^3 (c*s >= 2v+3u,
// all-at-once product) and u + v + 3 < 2u. Two copies of the design run
// side by side on the same stimulus: dut 0 with the sequential
// multiplication flow (ALL_AT_ONCE = 0) and dut 1 with the all-at-once flow
// (ALL_AT_ONCE = 1). For each run the testbench acts as the host: it draws
// an odd modulus n coprime to r = 2^l - 1, computes n', r mod n,
// r_1 = r^2 mod n, r_2 = r_1 n' mod r and the five precomputed vectors (by
// direct transform sums), loads them and the exponent, starts both copies
// and compares each t_out with x^e mod n from a square-and-multiply
// reference.
//
// Runs: random exponents with both the right-to-left method and the
// powering ladder, the public exponent 2^16+1, an all-ones exponent, e = 1.
// Counted mechanisms (each must occur in each copy): FSM states S0, S1, S2;
// PEB idle in an iteration (e[i] = 0) and active with operands forwarded
// from PEA; common multiplicand from RAM (S0) and multiplication by one
// (S2); ladder iterations forwarding from PEA to PEB and from PEB to PEA;
// and, in dut 1 only, the skipped transforms of the all-at-once flow (no
// ICT_A is issued) while dut 0 issues them. Timing checks: every S1
// iteration of a run takes the same number of cycles whatever the exponent
// bit (constant time), the S0 and S2 multiplications take the same time,
// and S1 lasts tau*T_iter (running time tau*T_squaring + 2*T_conversion).
module tb_fmle_top;
  import fmle_pkg::*;
  import fmle_tb_pkg::*;
  localparam int unsigned U = 8, V = 3, C = 4, TAU = 64, EXPW = 32;
  localparam int unsigned S = 1 << V, QW = C * S, L = U * S;
  localparam int unsigned NBITS = L - 4;
  localparam int unsigned AW = $clog2(5 * S);
  localparam int unsigned EWORDS = TAU / EXPW;
  localparam int unsigned TW = $clog2(TAU + 1);
  localparam int unsigned ND = 2;                 // design copies
  typedef fmle_ref #(U, V, C) ref_t;
  typedef ref_t::big_t big_t;

  logic clk = 1'b0, rst_n = 1'b0;
  logic en = 1'b0, spa = 1'b0;
  logic [TW-1:0] exp_len = '0;
  logic [L-1:0] x_in = '0, r0_in = '0;
  logic ram_we = 1'b0;
  logic [AW-1:0] ram_waddr = '0;
  logic [QW:0] ram_wdata = '0;
  logic exp_we = 1'b0;
  logic [$clog2(EWORDS)-1:0] exp_waddr = '0;
  logic [EXPW-1:0] exp_wdata = '0;
  logic busy [ND], done [ND], exp_bit [ND];
  fsm_state_e state [ND];
  logic [L-1:0] t_out [ND];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (3000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------ mechanism counters
  int n_s0 [ND], n_s1 [ND], n_s2 [ND];
  int n_peb_idle [ND], n_fwd_ab [ND], n_cm_ram [ND], n_cm_one [ND];
  int n_lad_ab [ND], n_lad_ba [ND], n_ict_a [ND];
  // timing
  int cyc_s0 [ND], cyc_s1 [ND], cyc_s2 [ND], iter_ref [ND], iter_bad [ND];
  int iter_start [ND];
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  for (genvar d = 0; d < ND; d++) begin : g_dut
    fmle_top #(.U(U), .V(V), .C(C), .TAU(TAU), .EXPW(EXPW), .ALL_AT_ONCE(d == 1)) dut (
      .clk, .rst_n, .en, .spa, .exp_len, .x_in, .r0_in, .ram_we, .ram_waddr, .ram_wdata,
      .exp_we, .exp_waddr, .exp_wdata, .busy(busy[d]), .done(done[d]), .state(state[d]),
      .exp_bit(exp_bit[d]), .t_out(t_out[d])
    );

    // count each FMLM once, at its first micro-operation
    always @(posedge clk) if (rst_n && (dut.op_start_a || dut.op_start_b)) begin
      if (dut.op == OP_ICT_A) n_ict_a[d]++;
      if (dut.op == OP_CT_Y) begin
        unique case (state[d])
          ST_S0: n_s0[d]++;
          ST_S1: n_s1[d]++;
          ST_S2: n_s2[d]++;
          default: ;
        endcase
        if (state[d] == ST_S1 && !dut.op_start_b) n_peb_idle[d]++;
        if (dut.op_start_b && dut.mode_b == MODE_CM_PE) n_fwd_ab[d]++;
        if (dut.op_start_a && dut.mode_a == MODE_CM_RAM) n_cm_ram[d]++;
        if (dut.op_start_b && dut.mode_b == MODE_CM_ONE) n_cm_one[d]++;
        if (dut.op_start_b && dut.mode_b == MODE_LAD_EXT) n_lad_ab[d]++;
        if (dut.op_start_a && dut.mode_a == MODE_LAD_EXT) n_lad_ba[d]++;
      end
    end

    always @(posedge clk) if (rst_n) begin
      unique case (state[d])
        ST_S0: cyc_s0[d]++;
        ST_S1: cyc_s1[d]++;
        ST_S2: cyc_s2[d]++;
        default: ;
      endcase
      // an S1 iteration starts when the control unit plans a new FMLM
      if (state[d] == ST_S1 && !dut.u_ctrl.running) begin
        if (iter_start[d] >= 0) begin
          if (iter_ref[d] < 0) iter_ref[d] = cycle - iter_start[d];
          else if (cycle - iter_start[d] != iter_ref[d]) iter_bad[d]++;
        end
        iter_start[d] = cycle;
      end
    end
  end

  // ------------------------------------------------------ host tasks
  task automatic ram_write(int region, ref logic [QW:0] v [S]);
    for (int k = 0; k < S; k++) begin
      @(negedge clk);
      ram_we = 1'b1; ram_waddr = AW'(region * S + k); ram_wdata = v[k];
    end
    @(negedge clk) ram_we = 1'b0;
  endtask

  task automatic run(input string name, input big_t n, input big_t np,
                     input big_t x, input big_t e, input int tau,
                     input logic ladder);
    big_t r, r0, r1, r2, expect_t;
    logic [QW:0] vec [S];
    bit fin [ND];
    r  = ref_t::rmod();
    r0 = r % n;
    r1 = (r * r) % n;
    r2 = (r1 * np) % r;
    ref_t::xform(np, 1'b0, vec); ram_write(REG_NP, vec);
    ref_t::xform(n,  1'b1, vec); ram_write(REG_NH, vec);
    for (int k = 0; k < S; k++) vec[k] = ref_t::bound(k);
    ram_write(REG_BU, vec);
    ref_t::xform(r2, 1'b0, vec); ram_write(REG_R2, vec);
    ref_t::xform(r1, 1'b1, vec); ram_write(REG_R1H, vec);
    for (int w = 0; w < EWORDS; w++) begin
      @(negedge clk);
      exp_we = 1'b1; exp_waddr = w[$clog2(EWORDS)-1:0]; exp_wdata = e[w*EXPW +: EXPW];
    end
    @(negedge clk);
    exp_we = 1'b0;
    x_in = L'(x); r0_in = L'(r0); exp_len = TW'(tau); spa = ladder;
    for (int d = 0; d < ND; d++) begin
      cyc_s0[d] = 0; cyc_s1[d] = 0; cyc_s2[d] = 0;
      iter_start[d] = -1; iter_ref[d] = -1; iter_bad[d] = 0;
      fin[d] = 0;
    end
    en = 1'b1;
    @(negedge clk) en = 1'b0;
    while (!(fin[0] && fin[1])) begin
      @(negedge clk);
      for (int d = 0; d < ND; d++) if (done[d]) fin[d] = 1;
    end
    expect_t = ref_t::modexp(x, e, n);
    for (int d = 0; d < ND; d++) begin
      if (iter_ref[d] < 0) iter_ref[d] = cyc_s1[d];     // a single iteration
      checks++;
      if (big_t'(t_out[d]) != expect_t) begin
        failures++;
        $display("FAIL %s dut %0d: t = %h, expected %h", name, d, t_out[d], expect_t);
      end
      // constant time: all iterations alike, S0 and S2 alike
      checks++;
      if (iter_bad[d] != 0) begin
        failures++; $display("FAIL %s dut %0d: %0d iterations differ", name, d, iter_bad[d]);
      end
      checks++;
      if (cyc_s0[d] != cyc_s2[d] || cyc_s1[d] != tau * iter_ref[d]) begin
        failures++;
        $display("FAIL %s dut %0d: S0 %0d S2 %0d S1 %0d vs tau*%0d", name, d, cyc_s0[d],
                 cyc_s2[d], cyc_s1[d], iter_ref[d]);
      end
      $display("%s dut %0d: tau=%0d (S0 %0d, iteration %0d, S2 %0d cycles)",
               name, d, tau, cyc_s0[d], iter_ref[d], cyc_s2[d]);
    end
  endtask

  initial begin
    big_t n, np, x, e;
    int tau;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int trial = 0; trial < 8; trial++) begin
      n = ref_t::rand_modulus(NBITS, np);
      x = ref_t::rand_below(n - 1) + 1;
      tau = 1 + ($urandom % TAU);
      e = ref_t::rand_below(big_t'(1) << tau);
      e[tau-1] = 1'b1;
      case (trial)
        0: begin e = 65537; tau = 17; end              // public exponent
        1: begin tau = TAU; e = (big_t'(1) << TAU) - 1; end   // all ones
        2: begin e = 1; tau = 1; end
        default: ;
      endcase
      run($sformatf("R2L #%0d", trial), n, np, x, e, tau, 1'b0);
      run($sformatf("ladder #%0d", trial), n, np, x, e, tau, 1'b1);
    end
    // every mechanism must have happened
    for (int d = 0; d < ND; d++) begin
      checks++;
      if (n_s0[d] == 0 || n_s1[d] == 0 || n_s2[d] == 0 || n_peb_idle[d] == 0 ||
          n_fwd_ab[d] == 0 || n_cm_ram[d] == 0 || n_cm_one[d] == 0 || n_lad_ab[d] == 0 ||
          n_lad_ba[d] == 0) begin
        failures++;
        $display("FAIL dut %0d: a mechanism never occurred", d);
      end
      // sequential flow issues ICT_A, all-at-once flow never does
      checks++;
      if ((d == 0) ? (n_ict_a[d] == 0) : (n_ict_a[d] != 0)) begin
        failures++;
        $display("FAIL dut %0d: ICT_A issued %0d times", d, n_ict_a[d]);
      end
      $display("dut %0d mechanisms: S0 %0d S1 %0d S2 %0d, PEB idle %0d, forwarded %0d, ",
               d, n_s0[d], n_s1[d], n_s2[d], n_peb_idle[d], n_fwd_ab[d],
               "RAM multiplicand %0d, times one %0d, ladder A->B %0d, B->A %0d, ICT_A %0d",
               n_cm_ram[d], n_cm_one[d], n_lad_ab[d], n_lad_ba[d], n_ict_a[d]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
