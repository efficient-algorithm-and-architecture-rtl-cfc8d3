// Testbench of the field arithmetic unit at m = 163 (type-4 GNB).
// The testbench plays the register file: it rotates T1 and T2 while the FAU multiplies
// (s1 = J, s2 = 0 in the first cycle, Z^2 after), and checks after exactly m cycles that
// Z equals the reference product. It also checks the single-cycle operations: load,
// addition, squaring, +1, Z^2 + R, and hold with z_en low.
module tb_fau;
  import kpm_pkg::*;
  import gnb_ref_pkg::*;

  typedef gnb_ref#(163, 4) F;

  logic         clk = 1'b0, rst_n = 1'b0;
  logic [162:0] t1, t2, r, z;
  s1_e          s1;
  s2_e          s2;
  logic         z_en;
  int           checks = 0, failures = 0, cycles = 0;

  fau dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic op(input s1_e a, input s2_e b, input logic [162:0] rv);
    s1 = a; s2 = b; r = rv; z_en = 1'b1;
    @(posedge clk); #1;
    z_en = 1'b0;
  endtask

  task automatic multiply(input logic [162:0] a, b);
    int c0;
    t1 = a; t2 = b;
    c0 = cycles;
    for (int t = 0; t < 163; t++) begin
      s1 = S1_J; s2 = (t == 0) ? S2_ZERO : S2_ZSQ; z_en = 1'b1;
      @(posedge clk); #1;
      t1 = F::sqr(t1); t2 = F::sqr(t2);
    end
    z_en = 1'b0;
    check(cycles - c0 == 163, "multiplication takes m cycles");
    check(t1 == a && t2 == b, "operands restored after m rotations");
  endtask

  initial begin
    logic [162:0] a, b, hold;
    s1 = S1_ZERO; s2 = S2_ZERO; z_en = 1'b0; r = '0; t1 = '0; t2 = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    #1;
    check(z == '0, "reset clears Z");
    for (int n = 0; n < 12; n++) begin
      a = F::rand_fe();
      b = F::rand_fe();
      if (n == 0) b = '1;
      if (n == 1) b = a;
      multiply(a, b);
      check(z == F::mul(a, b), $sformatf("product %0d", n));
      // Z <- R ; Z <- Z + R ; Z <- Z^2 ; Z <- R + 1 ; Z <- Z^2 + R
      op(S1_R, S2_ZERO, a);
      check(z == a, "load");
      op(S1_R, S2_Z, b);
      check(z == (a ^ b), "addition");
      op(S1_ZERO, S2_ZSQ, '0);
      check(z == F::sqr(a ^ b), "squaring");
      hold = z;
      z_en = 1'b0;
      @(posedge clk); #1;
      check(z == hold, "hold");
      op(S1_R, S2_ONE, a);
      check(z == ~a, "add unity");
      op(S1_R, S2_ZSQ, b);
      check(z == (F::sqr(~a) ^ b), "square and add");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
