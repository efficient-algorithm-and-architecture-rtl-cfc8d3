// Field arithmetic unit (FAU): bit-level PIPO Gaussian normal basis multiplier whose
// accumulator also performs field additions and squarings.
//
// Datapath:  Z <- mux1(s1) XOR mux2(s2), when z_en
//   s1: 0 = J (AND array), 1 = R (register file read port), 2 = zero
//   s2: 0 = zero, 1 = unity (all ones), 2 = Z, 3 = Z^2 (cyclic shift of Z)
// The multiplier part takes the squares of the register-file operands (T1^2 and T2^2,
// free rewiring), passes T1^2 through the rho' XOR array and ANDs the result bitwise
// with T2^2 read in reversed bit order (the J block, m AND gates).
//
// Multiplication: the controller holds s1 = J for m cycles, with s2 = zero in the
// first cycle and s2 = Z^2 afterwards, while T1 and T2 rotate by one place each cycle
// in the register file. After the m-th cycle Z = T1 x T2, and T1, T2 are back to their
// starting values. Addition, squaring and loads are single cycles (Z <- R, Z <- R + Z,
// Z <- Z^2, Z <- R + 1, Z <- R + Z^2).
//
// The multiplexer encodings, the operand squaring and the J/rho'/Z structure follow the
// described architecture; the reversed T2 order that makes the schedule work is this
// design's own derivation (see gnb_rho.sv). Z resets to zero.
module fau #(
  parameter int unsigned M = kpm_pkg::M,
  parameter int unsigned T = kpm_pkg::T
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [M-1:0] t1,     // register T1
  input  logic [M-1:0] t2,     // register T2
  input  logic [M-1:0] r,      // register file read port
  input  kpm_pkg::s1_e s1,
  input  kpm_pkg::s2_e s2,
  input  logic         z_en,
  output logic [M-1:0] z
);

  import kpm_pkg::*;

  logic [M-1:0] u, v, rho, j_and, op1, op2;

  // squarers on the operand inputs (rewiring)
  assign u = {t1[M-2:0], t1[M-1]};
  assign v = {t2[M-2:0], t2[M-1]};

  gnb_rho #(.M(M), .T(T)) u_rho (.u(u), .rho(rho));

  // J block: m AND gates, T2^2 taken in reversed order (bit p uses bit -p mod m)
  always_comb begin
    for (int p = 0; p < M; p++) j_and[p] = rho[p] & v[(M - p) % M];
  end

  always_comb begin
    unique case (s1)
      S1_J:    op1 = j_and;
      S1_R:    op1 = r;
      default: op1 = '0;
    endcase
    unique case (s2)
      S2_ZERO: op2 = '0;
      S2_ONE:  op2 = '1;
      S2_Z:    op2 = z;
      default: op2 = {z[M-2:0], z[M-1]};
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    z <= '0;
    else if (z_en) z <= op1 ^ op2;
  end

endmodule
