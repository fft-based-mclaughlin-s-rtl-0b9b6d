// fmle_top: FFT-based McLaughlin Montgomery exponentiation (FMLE),
// t = x^e mod n, with two FFT-based multipliers working in parallel.
//
// Structure: processing element A (squarings, y <- y^2, and the conversion
// of x into Montgomery form), processing element B (multiplications
// t <- t*y and the conversion out of Montgomery form), the control unit
// (FSM, exponent RAM, control signal generator) and the RAM unit holding
// the precomputed ring vectors N', N-hat, B_u, R_2, R1-hat. In the
// right-to-left binary method PEA forwards A = CT(y n' mod r) and
// Y-hat = NCT(y) to PEB, which then skips its own computation of A; with
// the all-at-once technique (ALL_AT_ONCE, on by default for the 1,024-bit
// set, as in the published implementation) PEA forwards Y = CT(y) and
// Y-hat instead and each element forms m' = ICT(Y (.) Y' (.) N'). The
// exponentiation time is tau squarings plus two conversions, independent
// of the data (no conditional selections anywhere).
//
// Host protocol (this design's choice): with busy low, write the five RAM
// regions (ram_we/ram_waddr/ram_wdata, region k at addresses k*s..k*s+s-1,
// see precomp_ram) and the exponent (exp_we/exp_waddr/exp_wdata, bit i of
// e at word i/EXPW, bit i%EXPW); present x (0 < x < n) on x_in and
// r mod n on r0_in, set exp_len = tau and spa, and pulse en. done pulses
// when t_out holds x^e mod n (t_out <= n; t_out = n cannot occur for x
// coprime to n). Modulus requirements: r = 2^l - 1 > 4n, gcd(n, r) = 1,
// l = U * 2^V; the precomputed vectors are computed by the host from n,
// n' = -n^-1 mod r, r_1 = r^2 mod n and r_2 = r_1 n' mod r.
module fmle_top #(
  parameter int unsigned U    = fmle_pkg::U_DEF,
  parameter int unsigned V    = fmle_pkg::V_DEF,
  parameter int unsigned C    = fmle_pkg::C_DEF,
  parameter int unsigned TAU  = fmle_pkg::TAU_DEF,
  parameter int unsigned EXPW = 32,
  // all-at-once technique where the ring allows it (c*s >= 2v + 3u)
  parameter bit ALL_AT_ONCE   = (C * (1 << V) >= 2 * V + 3 * U),
  localparam int unsigned S      = 1 << V,
  localparam int unsigned QW     = C * S,
  localparam int unsigned L      = U * S,
  localparam int unsigned DEPTH  = fmle_pkg::NUM_REGIONS * S,
  localparam int unsigned AW     = $clog2(DEPTH),
  localparam int unsigned EWORDS = (TAU + EXPW - 1) / EXPW,
  localparam int unsigned EAW    = (EWORDS > 1) ? $clog2(EWORDS) : 1,
  localparam int unsigned TW     = $clog2(TAU + 1)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,
  input  logic             spa,
  input  logic [TW-1:0]    exp_len,
  input  logic [L-1:0]     x_in,
  input  logic [L-1:0]     r0_in,
  input  logic             ram_we,
  input  logic [AW-1:0]    ram_waddr,
  input  logic [QW:0]      ram_wdata,
  input  logic             exp_we,
  input  logic [EAW-1:0]   exp_waddr,
  input  logic [EXPW-1:0]  exp_wdata,
  output logic             busy,
  output logic             done,
  output fmle_pkg::fsm_state_e state,
  output logic             exp_bit,
  output logic [L-1:0]     t_out
);
  import fmle_pkg::*;

  logic        load;
  pe_op_e      op;
  logic        op_start_a, op_start_b, done_a, done_b;
  pe_mode_e    mode_a, mode_b;
  logic [AW-1:0] raddr0, raddr1;
  logic [QW:0] rdata0, rdata1;
  logic [QW:0] vy_a [S], va_a [S], vyh_a [S];
  logic [QW:0] vy_b [S], va_b [S], vyh_b [S];
  logic [L-1:0] y_a, y_b;

  fmle_control #(.V(V), .TAU(TAU), .EXPW(EXPW), .ALL_AT_ONCE(ALL_AT_ONCE)) u_ctrl (
    .clk, .rst_n, .en, .spa, .exp_len,
    .exp_we, .exp_waddr, .exp_wdata,
    .load, .op, .op_start_a, .op_start_b, .mode_a, .mode_b,
    .done_a, .done_b,
    .ram_raddr0(raddr0), .ram_raddr1(raddr1),
    .state, .exp_bit, .busy, .done
  );

  precomp_ram #(.V(V), .C(C)) u_ram (
    .clk, .we(ram_we), .waddr(ram_waddr), .wdata(ram_wdata),
    .raddr0, .raddr1, .rdata0, .rdata1
  );

  fmle_pe #(.U(U), .V(V), .C(C), .ALL_AT_ONCE(ALL_AT_ONCE)) u_pea (
    .clk, .rst_n, .load, .load_val(x_in),
    .op, .mode(mode_a), .op_start(op_start_a), .op_done(done_a),
    .ram_rdata0(rdata0), .ram_rdata1(rdata1),
    .ext_y(vy_b), .ext_a(va_b), .ext_yh(vyh_b),
    .vy(vy_a), .va(va_a), .vyh(vyh_a),
    .y_val(y_a)
  );

  fmle_pe #(.U(U), .V(V), .C(C), .ALL_AT_ONCE(ALL_AT_ONCE)) u_peb (
    .clk, .rst_n, .load, .load_val(r0_in),
    .op, .mode(mode_b), .op_start(op_start_b), .op_done(done_b),
    .ram_rdata0(rdata0), .ram_rdata1(rdata1),
    .ext_y(vy_a), .ext_a(va_a), .ext_yh(vyh_a),
    .vy(vy_b), .va(va_b), .vyh(vyh_b),
    .y_val(y_b)
  );

  assign t_out = y_b;

endmodule
