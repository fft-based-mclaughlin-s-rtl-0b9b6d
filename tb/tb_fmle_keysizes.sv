// tb_fmle_keysizes: the exponentiator configured for the larger RSA key
// sizes of the published parameter table, one public-exponent operation each.
//
// Four copies of fmle_top run side by side, one per parameter set:
//   2,048-bit key: u = 33,  v = 6, q = 2^128 + 1 (c = 2), l = 2,112, all-at-once
//   3,072-bit key: u = 49,  v = 6, q = 2^128 + 1 (c = 2), l = 3,136, sequential
//   4,096-bit key: u = 33,  v = 7, q = 2^128 + 1 (c = 1), l = 4,224, all-at-once
//   7,680-bit key: u = 121, v = 6, q = 2^256 + 1 (c = 4), l = 7,744, sequential
// (the flow follows from c*s >= 2v + 3u, the default of ALL_AT_ONCE). For
// each, the testbench acts as the host (with bit-serial reference arithmetic) with a random odd modulus of the key
// length coprime to r = 2^l - 1: it computes n', r mod n, r_1, r_2 and the
// five precomputed vectors, runs x^(2^16+1) mod n with the right-to-left
// method, then x^e mod n for a random 24-bit e with the powering ladder (the
// SPA-protected variant), and compares t_out with a square-and-multiply
// reference each time. It also checks that all iterations of a run take the
// same number of cycles and prints the cycles per iteration. The exponent
// RAM is kept at 64 bits (TAU = 64).
module tb_fmle_keysizes;
  import fmle_pkg::*;
  import fmle_tb_pkg::*;
  localparam int unsigned NCFG = 4;
  localparam int unsigned KEY [NCFG] = '{2048, 3072, 4096, 7680};
  localparam int unsigned UU  [NCFG] = '{33, 49, 33, 121};
  localparam int unsigned VV  [NCFG] = '{6, 6, 7, 6};
  localparam int unsigned CC  [NCFG] = '{2, 2, 1, 4};
  localparam int unsigned TAU = 64, EXPW = 32;
  localparam int unsigned EWORDS = TAU / EXPW;
  localparam int unsigned TW = $clog2(TAU + 1);

  logic clk = 1'b0, rst_n = 1'b0;
  int checks = 0, failures = 0;
  bit finished [NCFG];

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  for (genvar g = 0; g < NCFG; g++) begin : g_cfg
    localparam int unsigned U = UU[g], V = VV[g], C = CC[g];
    localparam int unsigned S = 1 << V, QW = C * S, L = U * S;
    localparam int unsigned AW = $clog2(5 * S);
    typedef fmle_ref_wide #(U, V, C) ref_t;
    typedef logic [L + 63:0] big_t;  // same width as the reference class

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

    fmle_top #(.U(U), .V(V), .C(C), .TAU(TAU), .EXPW(EXPW)) dut (
      .clk, .rst_n, .en, .spa, .exp_len, .x_in, .r0_in, .ram_we,
      .ram_waddr, .ram_wdata, .exp_we, .exp_waddr, .exp_wdata, .busy, .done,
      .state, .exp_bit, .t_out
    );

    int iter_ref = -1, iter_bad = 0, iter_start = -1;
    always @(posedge clk) if (rst_n && state == ST_S1 && !dut.u_ctrl.running) begin
      if (iter_start >= 0) begin
        if (iter_ref < 0) iter_ref = cycle - iter_start;
        else if (cycle - iter_start != iter_ref) iter_bad++;
      end
      iter_start = cycle;
    end

    task automatic ram_write(int region, ref logic [QW:0] v [S]);
      for (int k = 0; k < S; k++) begin
        @(negedge clk);
        ram_we = 1'b1; ram_waddr = AW'(region * S + k); ram_wdata = v[k];
      end
      @(negedge clk) ram_we = 1'b0;
    endtask

    task automatic run(input string name, input big_t n, input big_t r, input big_t e,
                       input int tau, input logic ladder);
      big_t x, expect_t;
      int t0;
      x = ref_t::rand_below(n - 1) + 1;
      for (int w = 0; w < EWORDS; w++) begin
        @(negedge clk);
        exp_we = 1'b1; exp_waddr = w[$clog2(EWORDS)-1:0]; exp_wdata = e[w*EXPW +: EXPW];
      end
      @(negedge clk);
      exp_we = 1'b0;
      x_in = L'(x); r0_in = L'(ref_t::mod(r, n)); exp_len = TW'(tau); spa = ladder;
      iter_start = -1; iter_ref = -1; iter_bad = 0;
      en = 1'b1;
      t0 = cycle;
      @(negedge clk) en = 1'b0;
      while (!done) @(negedge clk);
      expect_t = ref_t::modexp(x, e, n);
      checks++;
      if (big_t'(t_out) != expect_t) begin
        failures++;
        $display("FAIL %0d-bit key, %s: wrong x^e mod n", KEY[g], name);
      end
      checks++;
      if (iter_bad != 0) begin
        failures++;
        $display("FAIL %0d-bit key, %s: %0d iterations differ in length", KEY[g], name, iter_bad);
      end
      $display("%0d-bit key (u=%0d v=%0d c=%0d, all-at-once %0d), %s: %0d cycles per iteration, %0d in total",
               KEY[g], U, V, C, dut.ALL_AT_ONCE, name, iter_ref, cycle - t0);
    endtask

    initial begin
      big_t n, np, r, r1, r2, e;
      logic [QW:0] vec [S];
      n  = ref_t::rand_modulus(KEY[g], np);
      r  = ref_t::rmod();
      r1 = ref_t::modmul(ref_t::mod(r, n), ref_t::mod(r, n), n);
      r2 = ref_t::modmul(r1, np, r);
      wait (rst_n);
      ref_t::xform(np, 1'b0, vec); ram_write(REG_NP, vec);
      ref_t::xform(n,  1'b1, vec); ram_write(REG_NH, vec);
      for (int k = 0; k < S; k++) vec[k] = ref_t::bound(k);
      ram_write(REG_BU, vec);
      ref_t::xform(r2, 1'b0, vec); ram_write(REG_R2, vec);
      ref_t::xform(r1, 1'b1, vec); ram_write(REG_R1H, vec);
      run("e = 2^16+1, right-to-left", n, r, 65537, 17, 1'b0);
      e = big_t'($urandom % (1 << 24)) | (big_t'(1) << 23);
      run("24-bit e, ladder", n, r, e, 24, 1'b1);
      finished[g] = 1'b1;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (finished[0] && finished[1] && finished[2] && finished[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
