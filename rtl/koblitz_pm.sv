// Point multiplier for the Koblitz curve K-163 over GF(2^163) (top level).
//
// Computes Q = kP in affine coordinates with a single bit-serial Gaussian normal basis
// multiplier. The scalar arrives as a tau-adic NAF in Joye-Tymen code; every digit
// costs a Frobenius map (squaring x and y, which in normal basis is a cyclic shift)
// and every nonzero digit a point addition or subtraction whose inversion uses the
// Dimitrov-Jarvinen chain, so two temporaries T1, T2 suffice and double as the
// multiplier operand registers.
//
// Blocks: fau (multiplier, adder, squarer around register Z), regfile (T1, T2, x1,
// y1, x, y and the 6-to-1 read multiplexer), scalar_reg (k) and controller (routine
// sequencer). Z feeds the register file; the read port R and T1, T2 feed the FAU.
//
// Interface: pulse start (one cycle, while busy is low) with px, py (base point, GNB
// coordinates), k_in (Joye-Tymen code, leading digit in the top bit, which must be 1)
// and klen (number of tau-NAF digits). done pulses when qx, qy hold kP; err goes high
// with done if the scalar was rejected. routine / routine_first show which routine runs.
// rst_n clears every register asynchronously (active low); a lint report of rst_n used
// both asynchronously and synchronously comes from the controller's assertion only.
// Latency: 1 load cycle, then 4 + 5 per Frobenius map + 1986 per addition + 1988 per
// subtraction + 1 per reload of Z (about 107,000 cycles for a 163-digit scalar with a
// third of its digits nonzero).
module koblitz_pm
  import kpm_pkg::*;
(
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [M-1:0]  px,
  input  logic [M-1:0]  py,
  input  logic [KW-1:0] k_in,
  input  logic [LW-1:0] klen,
  output logic          busy,
  output logic          done,
  output logic          err,
  output logic [M-1:0]  qx,
  output logic [M-1:0]  qy,
  output routine_e      routine,
  output logic          routine_first
);

  s1_e          s1;
  s2_e          s2;
  sr_e          sr;
  logic         z_en, s_t1, s_t2, en_t1, en_t2, en_x1, en_y1, ld_p, s_k, k_shift;
  logic [1:0]   k_msbs;
  logic [M-1:0] z, r, t1, t2;

  controller u_ctrl (
    .clk, .rst_n, .start, .klen,
    .k_lead(k_in[KW-1]), .k_lead_neg(k_in[KW-2]), .k_msbs,
    .s1, .s2, .z_en, .sr, .s_t1, .s_t2, .en_t1, .en_t2, .en_x1, .en_y1,
    .ld_p, .s_k, .k_shift,
    .busy, .done, .err, .routine, .rt_first(routine_first)
  );

  scalar_reg u_k (
    .clk, .rst_n, .s_k, .shift(k_shift), .k_in, .k_msbs
  );

  regfile u_rf (
    .clk, .rst_n, .z, .s_t1, .s_t2, .en_t1, .en_t2, .en_x1, .en_y1,
    .ld_p, .px, .py, .sr, .t1, .t2, .x1(qx), .y1(qy), .r
  );

  fau u_fau (
    .clk, .rst_n, .t1, .t2, .r, .s1, .s2, .z_en, .z
  );

endmodule
