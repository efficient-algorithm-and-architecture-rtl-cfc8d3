// Shared constants and types of the Koblitz-curve point multiplier.
//
// Field: GF(2^163) in a type-4 Gaussian normal basis (GNB). An element is an m-bit
// vector whose bit i is the coefficient of beta^(2^i). In this basis squaring is a
// cyclic shift (bit i of A^2 is bit i-1 of A) and the unity element is all ones.
// Curve: NIST K-163, y^2 + xy = x^3 + x^2 + 1 (a = 1).
// Scalar: tau-adic non-adjacent form, stored in the Joye-Tymen left-to-right code
// (nonzero digit and the zero that follows it -> "1s" with s the sign, zero -> "0"),
// so m+1 = 164 bits hold the longest expansion.
//
// The field size, GNB type, scalar width and the multiplexer encodings follow the
// described architecture; the micro-operation format is this implementation's own.
package kpm_pkg;

  parameter int unsigned M  = 163;    // field degree
  parameter int unsigned T  = 4;      // GNB type
  parameter int unsigned KW = M + 1;  // Joye-Tymen coded scalar width
  parameter int unsigned LW = 8;      // width of the digit counter (max 255 digits)

  // Squaring in normal basis: bit i of the result is bit i-1 (cyclically) of the input.
  function automatic logic [M-1:0] nb_sqr(input logic [M-1:0] a);
    return {a[M-2:0], a[M-1]};
  endfunction

  // Left adder operand of the field arithmetic unit (multiplexer s1).
  typedef enum logic [1:0] {
    S1_J    = 2'd0,   // AND array output (multiplication term)
    S1_R    = 2'd1,   // register file read port
    S1_ZERO = 2'd2    // zero
  } s1_e;

  // Right adder operand (multiplexer s2).
  typedef enum logic [1:0] {
    S2_ZERO = 2'd0,   // zero
    S2_ONE  = 2'd1,   // unity element (all ones)
    S2_Z    = 2'd2,   // Z
    S2_ZSQ  = 2'd3    // Z squared (cyclic shift)
  } s2_e;

  // Register file read port select (6-to-1 multiplexer sR).
  typedef enum logic [2:0] {
    R_T1 = 3'd0, R_T2 = 3'd1, R_X1 = 3'd2, R_Y1 = 3'd3, R_X = 3'd4, R_Y = 3'd5
  } sr_e;

  // Destination of a register-file write from Z.
  typedef enum logic [2:0] {
    D_NONE = 3'd0, D_T1 = 3'd1, D_T2 = 3'd2, D_X1 = 3'd3, D_Y1 = 3'd4
  } dst_e;

  // Kinds of micro-operation. Every kind takes one cycle per repetition.
  typedef enum logic [2:0] {
    U_ZOP  = 3'd0,   // Z <- mux1 + mux2, once
    U_ZSQ  = 3'd1,   // Z <- Z^2, cnt times
    U_T2SQ = 3'd2,   // T2 <- T2^2 (own squarer), cnt times
    U_MUL  = 3'd3,   // Z <- T1 x T2, M cycles
    U_ST   = 3'd4    // dst <- Z
  } ukind_e;

  // Execution condition of a micro-operation; a false condition costs no cycle.
  typedef enum logic [1:0] {
    C_ALL = 2'd0,    // always
    C_NEG = 2'd1,    // only for a negative digit (point subtraction / -P)
    C_POS = 2'd2     // only for a positive digit
  } cond_e;

  typedef struct packed {
    ukind_e     kind;
    s1_e        s1;
    s2_e        s2;
    sr_e        sr;
    dst_e       dst;
    logic [6:0] cnt;    // repetitions for U_ZSQ / U_T2SQ
    cond_e      cond;
    logic       last;   // last micro-operation of its routine
  } uop_t;

  // Routines of the controller and their entry addresses in the micro-program.
  typedef enum logic [2:0] {
    RT_NONE   = 3'd0,
    RT_INIT   = 3'd1,   // Q <- P or -P
    RT_FROB_Y = 3'd2,   // Frobenius map, Z holds y1 on entry, x1 on exit
    RT_FROB_X = 3'd3,   // Frobenius map, Z holds x1 on entry, y1 on exit
    RT_RELOAD = 3'd4,   // Z <- x1 ahead of a point addition
    RT_PADD   = 3'd5    // point addition / subtraction
  } routine_e;

  parameter int unsigned UA_W      = 7;
  parameter int unsigned UA_INIT   = 0;
  parameter int unsigned UA_FROB_Y = 5;
  parameter int unsigned UA_FROB_X = 10;
  parameter int unsigned UA_RELOAD = 15;
  parameter int unsigned UA_PADD   = 16;

  // Cycle counts of the routines with m = 163 (each micro-operation one cycle,
  // multiplications m cycles, an e-fold squaring e cycles).
  parameter int unsigned CYC_INIT = 4;
  parameter int unsigned CYC_FROB = 5;
  parameter int unsigned CYC_PADD = 11 * M + 162 + 31;   // 1986
  parameter int unsigned CYC_PSUB = CYC_PADD + 2;        // 1988

endpackage
