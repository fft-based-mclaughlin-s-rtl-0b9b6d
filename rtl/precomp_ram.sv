// precomp_ram: RAM unit of precomputed variables shared by both processing
// elements.
//
// Five regions of s words each (depth 5s), one ring element of c*s+1 bits
// per word: N' = CT(n'), N-hat = NCT(n), the upper bounds
// B_u[k] = 2(k+1)(b-1)^2 of the nega-cyclic convolution digits, R_2 = CT(r_2)
// with r_2 = r_1 n' mod r, and R1-hat = NCT(r_1) with r_1 = r^2 mod n
// (region k occupies addresses k*s .. k*s+s-1). It is written by the host
// before an exponentiation through the write port and read by the control
// unit's address generator through two synchronous read ports (data one
// cycle after the address); the second port lets B_u be read two digits per
// cycle. The organisation (width, depth, contents) follows the published
// design; the second read port is this design's choice.
module precomp_ram #(
  parameter int unsigned V = fmle_pkg::V_DEF,
  parameter int unsigned C = fmle_pkg::C_DEF,
  localparam int unsigned S     = 1 << V,
  localparam int unsigned QW    = C * S,
  localparam int unsigned DEPTH = fmle_pkg::NUM_REGIONS * S,
  localparam int unsigned AW    = $clog2(DEPTH)
) (
  input  logic           clk,
  input  logic           we,
  input  logic [AW-1:0]  waddr,
  input  logic [QW:0]    wdata,
  input  logic [AW-1:0]  raddr0,
  input  logic [AW-1:0]  raddr1,
  output logic [QW:0]    rdata0,
  output logic [QW:0]    rdata1
);

  logic [QW:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata0 <= mem[raddr0];
    rdata1 <= mem[raddr1];
  end

endmodule
