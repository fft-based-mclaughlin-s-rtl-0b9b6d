// tb_precomp_ram: self-checking test of the precomputed-variable RAM. The
// whole depth is written with random words, then both read ports read
// random addresses every cycle and the data, one cycle later, is compared
// with a copy kept in the testbench; writes interleaved with reads check
// that a written word is returned on the following reads.
module tb_precomp_ram;
  localparam int unsigned V = 6, C = 1, S = 1 << V, QW = C * S;
  localparam int unsigned DEPTH = 5 * S, AW = $clog2(DEPTH);

  logic clk = 1'b0, we = 1'b0;
  logic [AW-1:0] waddr = '0, raddr0 = '0, raddr1 = '0;
  logic [QW:0] wdata = '0, rdata0, rdata1;
  logic [QW:0] model [DEPTH];
  int checks = 0, failures = 0;

  precomp_ram #(.V(V), .C(C)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [AW-1:0] a0, a1;
    for (int k = 0; k < DEPTH; k++) begin
      @(negedge clk);
      we = 1'b1; waddr = AW'(k); wdata = {$urandom, $urandom, $urandom};
      model[k] = wdata;
    end
    @(negedge clk) we = 1'b0;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      a0 = AW'($urandom % DEPTH); a1 = AW'($urandom % DEPTH);
      raddr0 = a0; raddr1 = a1;
      we = ($urandom % 4 == 0);
      waddr = AW'($urandom % DEPTH); wdata = {$urandom, $urandom, $urandom};
      @(posedge clk);
      #1;
      checks += 2;
      if (rdata0 !== model[a0]) begin failures++; $display("FAIL port 0 @%0d", a0); end
      if (rdata1 !== model[a1]) begin failures++; $display("FAIL port 1 @%0d", a1); end
      if (we) model[waddr] = wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
