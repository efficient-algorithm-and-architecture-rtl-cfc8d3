// Register file of the point multiplier: six m-bit registers and one read port.
//
// T1 and T2 are the temporaries of the point addition and, at the same time, the
// operand registers of the multiplier. Each has a 2-to-1 input multiplexer choosing
// its own square (cyclic shift, select 0) or Z (select 1), so that T1 and T2 can rotate
// during a multiplication or be squared in place in one cycle. x1 and y1 hold the
// running point Q and are loaded from Z. x and y hold the base point P and are loaded
// from the inputs px, py when ld_p is high.
// A 6-to-1 multiplexer (sR: 0 T1, 1 T2, 2 x1, 3 y1, 4 x, 5 y) drives the read port R.
//
// Every register has a write enable and is written on the rising clock edge; all reset
// to zero. The structure follows the described register file; the enables and the
// reset are this design's choice.
module regfile #(
  parameter int unsigned M = kpm_pkg::M
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [M-1:0] z,
  input  logic         s_t1,     // 0: T1 <- T1^2, 1: T1 <- Z
  input  logic         s_t2,     // 0: T2 <- T2^2, 1: T2 <- Z
  input  logic         en_t1,
  input  logic         en_t2,
  input  logic         en_x1,
  input  logic         en_y1,
  input  logic         ld_p,
  input  logic [M-1:0] px,
  input  logic [M-1:0] py,
  input  kpm_pkg::sr_e sr,
  output logic [M-1:0] t1,
  output logic [M-1:0] t2,
  output logic [M-1:0] x1,
  output logic [M-1:0] y1,
  output logic [M-1:0] r
);

  import kpm_pkg::*;

  logic [M-1:0] x, y;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      t1 <= '0;
      t2 <= '0;
      x1 <= '0;
      y1 <= '0;
      x  <= '0;
      y  <= '0;
    end else begin
      if (en_t1) t1 <= s_t1 ? z : {t1[M-2:0], t1[M-1]};
      if (en_t2) t2 <= s_t2 ? z : {t2[M-2:0], t2[M-1]};
      if (en_x1) x1 <= z;
      if (en_y1) y1 <= z;
      if (ld_p) begin
        x <= px;
        y <= py;
      end
    end
  end

  always_comb begin
    unique case (sr)
      R_T1:    r = t1;
      R_T2:    r = t2;
      R_X1:    r = x1;
      R_Y1:    r = y1;
      R_X:     r = x;
      R_Y:     r = y;
      default: r = '0;
    endcase
  end

endmodule
