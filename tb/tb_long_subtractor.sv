// tb_long_subtractor: self-checking test of the segment-serial long
// subtractor in its final-step role. For random g' = G_hi*2^l + G_lo it
// streams x = 1 + G_hi (in segment 0) and y = G_lo and compares the
// difference with (1 + G_hi - G_lo) mod 2^l and the halved output with that
// value shifted right by one, both from wide-integer arithmetic. The
// latency of the first difference segment (three cycles) is checked too.
module tb_long_subtractor;
  localparam int unsigned SW   = 34;
  localparam int unsigned NSEG = 32;
  localparam int unsigned L    = SW * NSEG;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0, first = 1'b0, last = 1'b0;
  logic [SW-1:0] x = '0, y = '0;
  logic diff_valid, half_valid;
  logic [SW-1:0] diff, half;
  int checks = 0, failures = 0;

  long_subtractor #(.SW(SW)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [L-1:0] dres, hres;
  int nd, nh, lat, t_in;
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;
  always @(posedge clk) begin
    if (diff_valid) begin
      if (nd == 0) lat = cycle - t_in;
      dres[nd*SW +: SW] = diff; nd++;
    end
    if (half_valid) begin hres[nh*SW +: SW] = half; nh++; end
  end

  initial begin
    logic [L-1:0] lo, e;
    logic [SW-1:0] hi;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 40; t++) begin
      for (int w = 0; w < L / 32 + 1; w++) lo[w*32 +: 32] = $urandom;
      hi = SW'($urandom) >> ($urandom % 20);
      if (t == 0) begin lo = '0; hi = '0; end
      if (t == 1) begin lo = '1; hi = 7; end
      e = L'(L'(1) + L'(hi) - lo);
      nd = 0; nh = 0;
      for (int j = 0; j < NSEG; j++) begin
        @(negedge clk);
        if (j == 0) t_in = cycle;
        in_valid = 1'b1;
        first = (j == 0);
        last  = (j == NSEG - 1);
        x = (j == 0) ? hi + SW'(1) : '0;
        y = lo[j*SW +: SW];
      end
      @(negedge clk) in_valid = 1'b0; last = 1'b0; first = 1'b0;
      repeat (6) @(posedge clk);
      checks++;
      if (nd != NSEG || dres != e) begin failures++; $display("FAIL diff (%0d segs)", nd); end
      checks++;
      if (nh != NSEG || hres != (e >> 1)) begin failures++; $display("FAIL half (%0d segs)", nh); end
      checks++;
      if (lat != 3) begin failures++; $display("FAIL latency %0d", lat); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
