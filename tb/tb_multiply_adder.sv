// tb_multiply_adder: self-checking test of the point-wise modular
// multiply-adder. Random operands in [0, q-1] (including the extreme values
// 0, 1 and q-1) are streamed one per cycle with a random add enable; every
// result is compared with (a*b [+ c]) mod q computed with wide-integer
// arithmetic, and the pipeline latency of four cycles is checked.
module tb_multiply_adder;
  localparam int unsigned QW = 64;
  localparam int unsigned N  = 2000;
  localparam logic [2*QW+3:0] Q = (1 << QW) + 1;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0, add_en = 1'b0, out_valid;
  logic [QW:0] a = '0, b = '0, c = '0, out;
  int checks = 0, failures = 0;

  multiply_adder #(.QW(QW)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (N + 1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [QW:0] exp_q [$];
  int          t_q   [$];
  int          cycle = 0;

  always @(posedge clk) cycle <= cycle + 1;

  function automatic logic [QW:0] pick();
    logic [2*QW+3:0] r;
    case ($urandom % 8)
      0: r = 0;
      1: r = 1;
      2: r = Q - 1;
      default: r = {$urandom, $urandom, $urandom} % Q;
    endcase
    return (QW+1)'(r);
  endfunction

  // checker
  always @(posedge clk) if (rst_n && out_valid) begin
    checks++;
    if (exp_q.size() == 0) begin
      failures++; $display("FAIL unexpected output");
    end else begin
      logic [QW:0] e; int t0;
      e = exp_q.pop_front(); t0 = t_q.pop_front();
      if (out !== e) begin
        failures++; $display("FAIL got %h exp %h", out, e);
      end
      if (cycle - t0 != 4) begin
        failures++; $display("FAIL latency %0d", cycle - t0);
      end
    end
  end

  initial begin
    logic [2*QW+3:0] p;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < N; n++) begin
      @(negedge clk);
      in_valid = ($urandom % 4) != 0;
      a = pick(); b = pick(); c = pick();
      add_en = $urandom % 2;
      if (in_valid) begin
        p = ({{(QW+3){1'b0}}, a} * {{(QW+3){1'b0}}, b}) % Q;
        if (add_en) p = (p + c) % Q;
        exp_q.push_back((QW+1)'(p));
        t_q.push_back(cycle);
      end
    end
    @(negedge clk) in_valid = 1'b0;
    repeat (8) @(posedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("FAIL %0d results missing", exp_q.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
