// rho' module: the XOR array of the parallel-in parallel-out (PIPO) Gaussian normal
// basis multiplier.
//
// Output bit p is the XOR of a fixed subset of the input bits. Together with the AND
// array of the field arithmetic unit and the rotating accumulator Z this gives, after
// m cycles, the product of the two operands held in T1 and T2 (see fau.sv).
//
// Derivation (this design's own; the source architecture gives only the block's role).
// Let W_d = beta * beta^(2^d) in the normal basis. The entry of the multiplication
// matrix that gives coordinate 0 of beta^(2^i) * beta^(2^j) is W_{j-i}[-i] (indices
// mod m). With both operands rotated one place per cycle and Z <- Z^2 + g each
// cycle, choosing g[p] = rho[p](U) & V[-p] with U, V the squared operands makes the
// m terms of every product coordinate appear once each, provided
//     rho mask bit (p, q) = W_{-p-q}[p-q].
// W_d is found from the type-T GNB construction: with P = mT+1 prime and u of order
// T mod P, beta^(2^i) is the sum of gamma^e over the coset C_i = {2^i u^j mod P},
// gamma a primitive P-th root of unity. Expanding beta * beta^(2^d) as a sum of
// T*T powers gamma^s, coordinate x is the parity of the number of terms with
// s = 2^x mod P plus the number with s = 0 (gamma^0 = 1 is the all-ones element).
// The masks are computed at elaboration time; the circuit is only XOR trees.
//
// Interface: combinational, u (m bits) in, rho (m bits) out.
// Note: this array has m outputs where the rho' of the multiplier this architecture is
// built on has (m+1)/2. Here every output feeds its own AND gate, and the XOR count is
// C_N - m (482 for m = 163, T = 4), the same as a plain serial rho array, so the halving
// of the XOR count is not reproduced.
module gnb_rho #(
  parameter int unsigned M = kpm_pkg::M,
  parameter int unsigned T = kpm_pkg::T
) (
  input  logic [M-1:0] u,
  output logic [M-1:0] rho
);

  localparam int unsigned P = M * T + 1;

  // mask of output bit p (one call per bit keeps each constant evaluation short)
  function automatic logic [M-1:0] rho_mask(int unsigned p);
    logic [M-1:0] mk;
    int unsigned  pw2 [M];
    int unsigned  upw [T];
    int unsigned  ug, e, s, cnt, d, x;
    bit           ok;
    // element of multiplicative order T modulo P
    ug = 0;
    for (int unsigned c = 2; c < P && ug == 0; c++) begin
      e  = 1;
      ok = 1'b1;
      for (int unsigned k = 1; k < T; k++) begin
        e = (e * c) % P;
        if (e == 1) ok = 1'b0;
      end
      e = (e * c) % P;
      if (ok && e == 1) ug = c;
    end
    upw[0] = 1;
    for (int unsigned j = 1; j < T; j++) upw[j] = (upw[j-1] * ug) % P;
    pw2[0] = 1;
    for (int unsigned i = 1; i < M; i++) pw2[i] = (pw2[i-1] * 2) % P;
    for (int unsigned q = 0; q < M; q++) begin
      d   = (2 * M - p - q) % M;
      x   = (M + p - q) % M;
      cnt = 0;
      for (int unsigned j1 = 0; j1 < T; j1++)
        for (int unsigned j2 = 0; j2 < T; j2++) begin
          s = (upw[j1] + (pw2[d] * upw[j2]) % P) % P;
          if (s == 0 || s == pw2[x]) cnt++;
        end
      mk[q] = cnt[0];
    end
    return mk;
  endfunction

  for (genvar p = 0; p < M; p++) begin : g_bit
    localparam logic [M-1:0] MASK = rho_mask(p);
    assign rho[p] = ^(u & MASK);
  end

endmodule
