// Scalar register k of the control unit.
//
// Holds the tau-adic NAF of the scalar in the Joye-Tymen left-to-right code (m+1 bits,
// most significant digit at the top). A 2-to-1 multiplexer (s_k) loads a new scalar
// (s_k = 1) or feeds back the register shifted left by one place (shift = 1), zero
// filled. The two most significant bits go to the controller: the top bit says whether
// the next digit is nonzero and, if it is, the second bit gives its sign (1 = negative).
// A nonzero digit with its following zero is consumed by two shifts.
//
// One shift per cycle; load has priority over shift; resets to zero. The structure
// follows the described control unit; reset and priority are this design's choice.
module scalar_reg #(
  parameter int unsigned KW = kpm_pkg::KW
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          s_k,      // 1: load k_in
  input  logic          shift,    // shift left by one
  input  logic [KW-1:0] k_in,
  output logic [1:0]    k_msbs
);

  logic [KW-1:0] k;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     k <= '0;
    else if (s_k)   k <= k_in;
    else if (shift) k <= {k[KW-2:0], 1'b0};
  end

  assign k_msbs = k[KW-1 -: 2];

endmodule
