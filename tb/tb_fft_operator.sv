// tb_fft_operator: self-checking test of the number-theoretic transform unit.
//
// Random vectors over Z_q are transformed with all four transforms and
// compared with a direct O(s^2) evaluation of the definitions
//   CT(x)_k  = sum_i x_i w^(ik),  NCT(x)_k = sum_i phi^i x_i w^(ik)  (mod q)
// computed here with wide-integer arithmetic, w = 2^(2c), phi = 2^c. The
// inverse transforms are fed the reference spectra and must give back the
// original vectors. The latency of each transform is checked against
// 1 + v*s/4 cycles (forward) and 1 + v*s/4 + s/2 cycles (inverse).
module tb_fft_operator;
  localparam int unsigned V  = 6;
  localparam int unsigned C  = 1;
  localparam int unsigned S  = 1 << V;
  localparam int unsigned QW = C * S;
  localparam logic [2*QW+3:0] Q = (1 << QW) + 1;

  logic clk = 1'b0, rst_n = 1'b0;
  logic start = 1'b0, inverse = 1'b0, nega = 1'b0, busy, done;
  logic [QW:0] in_vec [S];
  logic [QW:0] out_vec [S];
  int checks = 0, failures = 0;

  fft_operator #(.V(V), .C(C)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [2*QW+3:0] mulmod(logic [2*QW+3:0] a, logic [2*QW+3:0] b);
    return (a * b) % Q;
  endfunction

  logic [2*QW+3:0] wp [S];       // w^t
  logic [2*QW+3:0] pp [S];       // phi^t
  logic [QW:0] x [S];
  logic [QW:0] ref_ct [S];
  logic [QW:0] ref_nct [S];

  task automatic run(input logic inv, input logic ng, input logic [QW:0] v [S], output int cyc);
    for (int k = 0; k < S; k++) in_vec[k] = v[k];
    inverse = inv; nega = ng;
    @(negedge clk) start = 1'b1;
    @(negedge clk) start = 1'b0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
  endtask

  task automatic compare(input string what, input logic [QW:0] exp_v [S]);
    int bad = 0;
    for (int k = 0; k < S; k++) if (out_vec[k] !== exp_v[k]) bad++;
    checks++;
    if (bad != 0) begin
      failures++;
      $display("FAIL %s: %0d elements differ (e.g. [0] got %h exp %h)", what, bad, out_vec[0], exp_v[0]);
    end
  endtask

  initial begin
    int cyc;
    logic [2*QW+3:0] acc;
    wp[0] = 1; pp[0] = 1;
    for (int t = 1; t < S; t++) begin
      wp[t] = mulmod(wp[t-1], 1 << (2*C));
      pp[t] = mulmod(pp[t-1], 1 << C);
    end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int trial = 0; trial < 4; trial++) begin
      for (int i = 0; i < S; i++) begin
        logic [2*QW+3:0] r;
        r = {$urandom, $urandom, $urandom, $urandom, $urandom};
        if (trial == 0) r = (i == 1) ? 1 : 0;          // impulse
        x[i] = QW'(0) | (QW+1)'(r % Q);
      end
      for (int k = 0; k < S; k++) begin
        acc = 0;
        for (int i = 0; i < S; i++) acc = (acc + mulmod(x[i], wp[(i*k) % S])) % Q;
        ref_ct[k] = (QW+1)'(acc);
        acc = 0;
        for (int i = 0; i < S; i++)
          acc = (acc + mulmod(mulmod(x[i], pp[i]), wp[(i*k) % S])) % Q;
        ref_nct[k] = (QW+1)'(acc);
      end
      run(1'b0, 1'b0, x, cyc);  compare("CT", ref_ct);
      checks++; if (cyc != 1 + V*S/4) begin failures++; $display("FAIL CT latency %0d", cyc); end
      run(1'b0, 1'b1, x, cyc);  compare("NCT", ref_nct);
      run(1'b1, 1'b0, ref_ct, cyc);  compare("ICT", x);
      checks++; if (cyc != 1 + V*S/4 + S/2) begin failures++; $display("FAIL ICT latency %0d", cyc); end
      run(1'b1, 1'b1, ref_nct, cyc); compare("INCT", x);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
