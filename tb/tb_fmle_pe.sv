// tb_fmle_pe: self-checking test of one processing element.
//
// A random 1,024-bit odd modulus n coprime to r = 2^l - 1 is drawn and the
// precomputed vectors (N' = CT(n'), N-hat = NCT(n), B_u) are computed here
// by direct transform sums. The testbench plays the control unit: it issues
// the fourteen micro-operations of one FMLM, serving RAM words one cycle
// after each address as the RAM unit would. Every mode is exercised:
//   squaring             y <- FMLM(y, y)
//   common multiplicand  t <- FMLM(t, c), A (or C), C-hat forwarded
//   common multiplicand  t <- FMLM(t, c), A and C-hat from the RAM
//   multiply by one      t <- FMLM(t, 1)
//   ladder               t <- FMLM(t, w), Y and Y-hat of w forwarded
// and each result is checked as t*r = x*y (mod n) and t < 2n. The cycle
// count of every FMLM of a mode must be the same for all operands
// (constant running time). At this size the element uses the all-at-once
// flow, in which the micro-operations ICT_A, MODR_A and CT_A are skipped.
module tb_fmle_pe;
  import fmle_pkg::*;
  import fmle_tb_pkg::*;
  localparam int unsigned U = 17, V = 6, C = 1;
  localparam int unsigned S = 1 << V, QW = C * S, L = U * S;
  localparam int unsigned NBITS = 1024;
  typedef fmle_ref #(U, V, C) ref_t;
  typedef ref_t::big_t big_t;

  logic clk = 1'b0, rst_n = 1'b0;
  logic load = 1'b0;
  logic [L-1:0] load_val = '0;
  pe_op_e   op = OP_NONE;
  pe_mode_e mode = MODE_SQ;
  logic op_start = 1'b0, op_done;
  logic [QW:0] ram_rdata0 = '0, ram_rdata1 = '0;
  logic [QW:0] ext_y [S], ext_a [S], ext_yh [S];
  logic [QW:0] vy [S], va [S], vyh [S];
  logic [L-1:0] y_val;
  int checks = 0, failures = 0;

  fmle_pe #(.U(U), .V(V), .C(C)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (60000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // RAM contents served by the testbench
  logic [QW:0] np_v [S], nh_v [S], bu_v [S], ra_v [S], rh_v [S];

  // serve one word (or digit pair) per cycle from the cycle after op_start
  int  srv_k = -1;
  always @(posedge clk) begin
    if (op_start) srv_k = 0;
    if (srv_k >= 0) begin
      if (op == OP_FINAL) begin
        if (srv_k < S / 2) begin
          ram_rdata0 <= bu_v[2*srv_k];
          ram_rdata1 <= bu_v[2*srv_k+1];
        end
      end else if (srv_k < S) begin
        unique case (op)
          OP_MUL_AN: ram_rdata0 <= np_v[srv_k];
          OP_MAD_MN: ram_rdata0 <= nh_v[srv_k];
          OP_MUL_YA: ram_rdata0 <= (mode == MODE_CM_ONE) ? np_v[srv_k] : ra_v[srv_k];
          OP_MUL_YY: ram_rdata0 <= rh_v[srv_k];
          default:   ram_rdata0 <= '0;
        endcase
      end
      srv_k++;
      if (srv_k > S) srv_k = -1;
    end
  end

  task automatic fmlm(input pe_mode_e md, output int cyc);
    cyc = 0;
    for (int o = int'(OP_CT_Y); o <= int'(OP_FINAL); o++) begin
      @(negedge clk);
      op = pe_op_e'(o); mode = md; op_start = 1'b1;
      @(negedge clk) op_start = 1'b0;
      cyc += 1;
      while (!op_done) begin @(negedge clk); cyc++; end
    end
  endtask

  task automatic load_value(input big_t v);
    @(negedge clk) load = 1'b1; load_val = L'(v);
    @(negedge clk) load = 1'b0;
  endtask

  task automatic check(input string what, input big_t a, input big_t b,
                       input big_t n);
    big_t t, r;
    r = ref_t::rmod();
    t = big_t'(y_val);
    checks++;
    if ((t * r) % n != (a * b) % n || t >= 2 * n) begin
      failures++;
      $display("FAIL %s: t*r != a*b (mod n) or t >= 2n", what);
    end
  endtask

  initial begin
    big_t n, np, r, x, y, cm, a, w;
    int cyc, cyc_ref [pe_mode_e];
    r = ref_t::rmod();
    n = ref_t::rand_modulus(NBITS, np);
    ref_t::xform(np, 1'b0, np_v);
    ref_t::xform(n, 1'b1, nh_v);
    for (int k = 0; k < S; k++) bu_v[k] = ref_t::bound(k);
    for (int k = 0; k < S; k++) begin ext_y[k] = '0; ext_a[k] = '0; ext_yh[k] = '0; end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    for (int trial = 0; trial < 3; trial++) begin
      pe_mode_e md;
      // squaring
      x = ref_t::rand_below(2 * n - 1) + 1;
      if (trial == 0) x = 2 * n - 1;                         // largest input
      load_value(x);
      fmlm(MODE_SQ, cyc);
      check("square", x, x, n);
      md = MODE_SQ;
      checks++;
      if (!cyc_ref.exists(md)) cyc_ref[md] = cyc;
      else if (cyc != cyc_ref[md]) begin failures++; $display("FAIL square time %0d vs %0d", cyc, cyc_ref[md]); end
      if (trial == 0) $display("FMLM squaring: %0d cycles", cyc);

      // common multiplicand forwarded by the other element
      x  = ref_t::rand_below(2 * n - 1) + 1;
      cm = ref_t::rand_below(2 * n - 1) + 1;
      a  = (cm * np) % r;
      ref_t::xform(a, 1'b0, ext_a);
      ref_t::xform(cm, 1'b0, ext_y);
      ref_t::xform(cm, 1'b1, ext_yh);
      load_value(x);
      fmlm(MODE_CM_PE, cyc);
      check("common multiplicand (PE)", x, cm, n);
      md = MODE_CM_PE;
      checks++;
      if (!cyc_ref.exists(md)) cyc_ref[md] = cyc;
      else if (cyc != cyc_ref[md]) begin failures++; $display("FAIL CM time"); end
      if (trial == 0) $display("FMLM common multiplicand: %0d cycles", cyc);

      // common multiplicand from the RAM
      x  = ref_t::rand_below(2 * n - 1) + 1;
      cm = ref_t::rand_below(n - 1) + 1;
      ref_t::xform((cm * np) % r, 1'b0, ra_v);
      ref_t::xform(cm, 1'b1, rh_v);
      load_value(x);
      fmlm(MODE_CM_RAM, cyc);
      check("common multiplicand (RAM)", x, cm, n);

      // multiplication by one
      x = ref_t::rand_below(2 * n - 1) + 1;
      load_value(x);
      fmlm(MODE_CM_ONE, cyc);
      check("times one", x, 1, n);
      checks++;
      if (big_t'(y_val) > n) begin failures++; $display("FAIL FMLM(t,1) > n"); end

      // ladder: own A, Y and Y-hat of w forwarded
      x = ref_t::rand_below(2 * n - 1) + 1;
      w = ref_t::rand_below(2 * n - 1) + 1;
      ref_t::xform(w, 1'b0, ext_y);
      ref_t::xform(w, 1'b1, ext_yh);
      load_value(x);
      fmlm(MODE_LAD_EXT, cyc);
      check("ladder", x, w, n);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
