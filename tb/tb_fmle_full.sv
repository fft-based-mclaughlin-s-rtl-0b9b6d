// tb_fmle_full: the exponentiator at its default size, end to end.
//
// fmle_top is instantiated with no parameter overrides: u = 17, v = 6
// (s = 64 points), c = 1 (q = 2^64 + 1), l = 1088 and exponents of up to
// 1024 bits, the configuration for 1024-bit moduli. The testbench acts as
// the host: it draws a random odd 1024-bit modulus n coprime to r = 2^l - 1,
// computes n', r mod n, r_1 = r^2 mod n, r_2 = r_1 n' mod r and the five
// precomputed vectors (by direct transform sums), loads them, then runs
//   1. an encryption-style exponentiation with e = 2^16 + 1 (right-to-left
//      binary method), and
//   2. an exponentiation with a random 1024-bit exponent (full decryption
//      length) using the powering ladder,
// and compares t_out with x^e mod n from a square-and-multiply reference.
// It also checks that every S1 iteration takes the same number of cycles
// and reports the cycle counts of the conversions and of one iteration.
module tb_fmle_full;
  import fmle_pkg::*;
  import fmle_tb_pkg::*;
  localparam int unsigned U = U_DEF, V = V_DEF, C = C_DEF, TAU = TAU_DEF, EXPW = 32;
  localparam int unsigned S = 1 << V, QW = C * S, L = U * S;
  localparam int unsigned NBITS = 1024;
  localparam int unsigned AW = $clog2(5 * S);
  localparam int unsigned EWORDS = TAU / EXPW;
  localparam int unsigned TW = $clog2(TAU + 1);
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
  logic busy, done, exp_bit;
  fsm_state_e state;
  logic [L-1:0] t_out;
  int checks = 0, failures = 0;

  fmle_top dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (4000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // iteration timing
  int cyc_s0, cyc_s1, cyc_s2, iter_ref, iter_bad, iter_start;
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;
  always @(posedge clk) if (rst_n) begin
    unique case (state)
      ST_S0: cyc_s0++;
      ST_S1: cyc_s1++;
      ST_S2: cyc_s2++;
      default: ;
    endcase
    if (state == ST_S1 && !dut.u_ctrl.running) begin
      if (iter_start >= 0) begin
        if (iter_ref < 0) iter_ref = cycle - iter_start;
        else if (cycle - iter_start != iter_ref) iter_bad++;
      end
      iter_start = cycle;
    end
  end

  task automatic ram_write(int region, ref logic [QW:0] v [S]);
    for (int k = 0; k < S; k++) begin
      @(negedge clk);
      ram_we = 1'b1; ram_waddr = AW'(region * S + k); ram_wdata = v[k];
    end
    @(negedge clk) ram_we = 1'b0;
  endtask

  task automatic run(input string name, input big_t n, input big_t x,
                     input big_t e, input int tau, input logic ladder);
    big_t r, r0, expect_t;
    r  = ref_t::rmod();
    r0 = r % n;
    for (int w = 0; w < EWORDS; w++) begin
      @(negedge clk);
      exp_we = 1'b1; exp_waddr = w[$clog2(EWORDS)-1:0]; exp_wdata = e[w*EXPW +: EXPW];
    end
    @(negedge clk);
    exp_we = 1'b0;
    x_in = L'(x); r0_in = L'(r0); exp_len = TW'(tau); spa = ladder;
    cyc_s0 = 0; cyc_s1 = 0; cyc_s2 = 0;
    iter_start = -1; iter_ref = -1; iter_bad = 0;
    en = 1'b1;
    @(negedge clk) en = 1'b0;
    while (!done) @(negedge clk);
    if (iter_ref < 0) iter_ref = cyc_s1;
    expect_t = ref_t::modexp(x, e, n);
    checks++;
    if (big_t'(t_out) != expect_t) begin
      failures++;
      $display("FAIL %s: t = %h, expected %h", name, t_out, expect_t);
    end
    checks++;
    if (iter_bad != 0 || cyc_s1 != tau * iter_ref || cyc_s0 != cyc_s2) begin
      failures++;
      $display("FAIL %s: timing S0 %0d S1 %0d (%0d bad) S2 %0d", name, cyc_s0, cyc_s1,
               iter_bad, cyc_s2);
    end
    $display("%s: tau=%0d, S0 %0d cycles, iteration %0d cycles, S2 %0d cycles, total %0d",
             name, tau, cyc_s0, iter_ref, cyc_s2, cyc_s0 + cyc_s1 + cyc_s2);
  endtask

  initial begin
    big_t n, np, x, e, r, r1, r2;
    logic [QW:0] vec [S];
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    n  = ref_t::rand_modulus(NBITS, np);
    r  = ref_t::rmod();
    r1 = (r * r) % n;
    r2 = (r1 * np) % r;
    ref_t::xform(np, 1'b0, vec); ram_write(REG_NP, vec);
    ref_t::xform(n,  1'b1, vec); ram_write(REG_NH, vec);
    for (int k = 0; k < S; k++) vec[k] = ref_t::bound(k);
    ram_write(REG_BU, vec);
    ref_t::xform(r2, 1'b0, vec); ram_write(REG_R2, vec);
    ref_t::xform(r1, 1'b1, vec); ram_write(REG_R1H, vec);

    x = ref_t::rand_below(n - 1) + 1;
    run("e = 2^16+1, right-to-left", n, x, 65537, 17, 1'b0);
    x = ref_t::rand_below(n - 1) + 1;
    e = ref_t::rand_below(big_t'(1) << TAU);
    e[TAU-1] = 1'b1;
    run("1024-bit e, ladder", n, x, e, TAU, 1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
