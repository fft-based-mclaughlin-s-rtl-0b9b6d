// fmle_pkg: constants and types shared by the FFT-based McLaughlin
// exponentiation (FMLE) datapath.
//
// The default parameter set is the 1,024-bit modulus configuration with the
// shortest clock-cycle count of the published sets: digit width u = 17,
// v = 6 FFT stages (transform length s = 64), ring q = 2^(c*s)+1 with c = 1,
// so l = u*s = 1,088 and q = 2^64+1. All ring elements are kept in [0, q-1]
// and therefore need c*s+1 bits.
//
// The enumerations describe the micro-operations that the control unit
// issues to both processing elements in lock step (one FMLM is the fixed
// sequence of these operations), the operand-source modes of a processing
// element, the carry control of the long adder and the states of the
// exponentiation FSM. The encodings are this design's own choice.
package fmle_pkg;

  // Default parameter set (1,024-bit key, starred set with u = 17, s = 64).
  localparam int unsigned U_DEF   = 17;    // digit width u, b = 2^u
  localparam int unsigned V_DEF   = 6;     // FFT stages v
  localparam int unsigned S_DEF   = 64;    // transform length s = 2^v
  localparam int unsigned C_DEF   = 1;     // q = 2^(c*s) + 1
  localparam int unsigned TAU_DEF = 1024;  // maximum exponent length in bits
  // All-at-once technique where the ring allows it: c*s >= 2v + 3u.
  localparam bit          AAO_DEF = (C_DEF * S_DEF >= 2 * V_DEF + 3 * U_DEF);

  // Regions of the precomputed-variable RAM, each s words deep.
  localparam int unsigned REG_NP  = 0;  // N'     = CT(n')
  localparam int unsigned REG_NH  = 1;  // N-hat  = NCT(n)
  localparam int unsigned REG_BU  = 2;  // B_u    = {2(k+1)(b-1)^2}
  localparam int unsigned REG_R2  = 3;  // R_2    = CT(r_2)
  localparam int unsigned REG_R1H = 4;  // R1-hat = NCT(r_1)
  localparam int unsigned NUM_REGIONS = 5;

  // Micro-operations of one FMLM, in the order the control unit issues them.
  typedef enum logic [3:0] {
    OP_NONE   = 4'd0,
    OP_CT_Y   = 4'd1,   // Y  <- CT(y)
    OP_MUL_AN = 4'd2,   // W  <- Y (.) N'
    OP_ICT_A  = 4'd3,   // W  <- ICT(W)
    OP_MODR_A = 4'd4,   // a  <- sum a'_k b^k mod r
    OP_CT_A   = 4'd5,   // A  <- CT(a)
    OP_MUL_YA = 4'd6,   // W  <- Y (.) A
    OP_ICT_M  = 4'd7,   // W  <- ICT(W)
    OP_MODR_M = 4'd8,   // m  <- sum m'_k b^k mod r
    OP_NCT_Y  = 4'd9,   // Yh <- NCT(y)
    OP_MUL_YY = 4'd10,  // Z  <- Yh (.) Yh'
    OP_NCT_M  = 4'd11,  // W  <- NCT(m)
    OP_MAD_MN = 4'd12,  // Z  <- W (.) N-hat + Z
    OP_INCT_Z = 4'd13,  // Z  <- INCT(Z)
    OP_FINAL  = 4'd14   // y  <- (h - (sum g'_k b^k mod h)) / 2
  } pe_op_e;

  // Operand sources of a processing element.
  typedef enum logic [2:0] {
    MODE_SQ      = 3'd0,  // squaring: A and Yh computed locally
    MODE_CM_PE   = 3'd1,  // common multiplicand A, Yh taken from the other PE
    MODE_CM_RAM  = 3'd2,  // common multiplicand A, Yh read from the RAM unit
    MODE_CM_ONE  = 3'd3,  // multiply by 1: A = N' from RAM, Yh = all ones
    MODE_LAD_EXT = 3'd4   // ladder: own A, Y and Yh of the other PE
  } pe_mode_e;

  // Carry register control of the long adder.
  typedef enum logic [1:0] {
    CARRY_CLR  = 2'd0,  // clear the carry and the all-one flag
    CARRY_PROP = 2'd1,  // carry <- MSB of the sum
    CARRY_FOLD = 2'd2,  // carry <- MSB | all-one check (end of the first pass)
    CARRY_HOLD = 2'd3   // keep the carry
  } carry_ctrl_e;

  // Exponentiation FSM.
  typedef enum logic [1:0] {
    ST_IDLE = 2'd0,
    ST_S0   = 2'd1,
    ST_S1   = 2'd2,
    ST_S2   = 2'd3
  } fsm_state_e;

  // Operations that a PE in a common-multiplicand mode skips (it has A).
  function automatic logic op_needs_own_a(pe_op_e op);
    return op inside {OP_MUL_AN, OP_ICT_A, OP_MODR_A, OP_CT_A};
  endfunction

  // Operations that read the precomputed-variable RAM one word per cycle.
  function automatic logic op_reads_ram(pe_op_e op);
    return op inside {OP_MUL_AN, OP_MUL_YA, OP_MUL_YY, OP_MAD_MN};
  endfunction

endpackage
