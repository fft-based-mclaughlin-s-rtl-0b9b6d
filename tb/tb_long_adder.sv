// tb_long_adder: self-checking test of the segment-serial long adder in its
// modulo-r role. For random l-bit values A and small values H it streams
// pass 1, m_r = A + H (H added at the least significant segment, last
// segment marked CARRY_FOLD), then pass 2, m = m_r mod 2^l + (m_r[l] | eps),
// and compares m with (A + H) mod (2^l - 1) from wide-integer arithmetic.
// Corner cases make m_r exactly 2^l - 1 (all-one check) and make m_r carry
// into bit l. A plain two-operand sum also checks the CLR/PROP framing and
// the three-cycle latency.
module tb_long_adder;
  import fmle_pkg::*;
  localparam int unsigned SW   = 34;
  localparam int unsigned NSEG = 32;
  localparam int unsigned L    = SW * NSEG;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0, out_valid, all_one_check;
  logic [SW-1:0] x = '0, y = '0;
  carry_ctrl_e carry_ctrl = CARRY_CLR;
  logic [SW:0] sum;
  int checks = 0, failures = 0;

  long_adder #(.SW(SW)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [L:0] res;       // collected output (with the last carry on top)
  int         nout, lat, t_in;
  int         cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  always @(posedge clk) if (out_valid) begin
    if (nout == 0) lat = cycle - t_in;
    res[nout*SW +: SW+1] = sum;
    nout++;
  end

  // Streams a pass; H is added in segment 0; fold marks the last segment.
  task automatic pass(input logic [L-1:0] a, input logic [SW-1:0] h, input logic fold);
    nout = 0; res = '0;
    for (int j = 0; j < NSEG; j++) begin
      @(negedge clk);
      if (j == 0) t_in = cycle;
      in_valid   = 1'b1;
      x          = a[j*SW +: SW];
      y          = (j == 0) ? h : '0;
      carry_ctrl = (j == 0 && fold) ? CARRY_CLR :
                   (j == NSEG - 1 && fold) ? CARRY_FOLD : CARRY_PROP;
      if (j == 0 && !fold) carry_ctrl = CARRY_PROP;   // second pass keeps z
    end
    @(negedge clk) in_valid = 1'b0;
    repeat (4) @(posedge clk);
  endtask

  task automatic modr(input logic [L-1:0] a, input logic [SW-1:0] h);
    logic [L+1:0] r, e;
    logic [L-1:0] mr;
    r = (L+2)'(1) << L; r = r - 1;
    e = ({2'b00, a} + (L+2)'(h)) % r;
    pass(a, h, 1'b1);
    mr = res[L-1:0];
    checks++;
    if (res[L:0] != (L+1)'({1'b0, a} + (L+1)'(h))) begin
      failures++; $display("FAIL pass 1 sum");
    end
    if (lat != 3) begin failures++; $display("FAIL latency %0d", lat); end
    pass(mr, '0, 1'b0);
    checks++;
    if (res[L-1:0] != e[L-1:0]) begin
      failures++; $display("FAIL mod r: got %h exp %h", res[L-1:0], e[L-1:0]);
    end
  endtask

  initial begin
    logic [L-1:0] a;
    logic [SW-1:0] h;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 40; t++) begin
      for (int w = 0; w < L / 32 + 1; w++) a[w*32 +: 32] = $urandom;
      h = SW'({$urandom, $urandom}) >> ($urandom % SW);
      case (t)
        0: begin h = 5;   a = '1; a = a - 5; end          // m_r = r exactly
        1: begin h = 0;   a = '1; end                      // a = r, m = 0
        2: begin h = 9;   a = '1; end                      // carry into bit l
        3: begin h = '1;  a = '1; a = a - 3; end           // carry, low bits not zero
        default: ;
      endcase
      modr(a, h);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
