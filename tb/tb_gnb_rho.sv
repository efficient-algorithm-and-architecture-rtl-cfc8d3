// Testbench of the rho' XOR array. For three field sizes (m = 163 type 4, the default;
// m = 11 type 2; m = 7 type 4) it runs the multiplier schedule in the testbench around
// the array: m cycles of Z <- Z^2 + (rho(T1^2) & reverse(T2^2)) with T1, T2 rotating,
// and compares Z with the reference product from gnb_ref_pkg (cyclic convolution in
// the ring of P-th roots of unity). Also checks A x 1 = A and A x A = A^2.
module tb_gnb_rho;
  import gnb_ref_pkg::*;

  int checks = 0, failures = 0;

  logic [162:0] u163, r163;
  logic [10:0]  u11,  r11;
  logic [6:0]   u7,   r7;

  gnb_rho                       dut163 (.u(u163), .rho(r163));
  gnb_rho #(.M(11), .T(2))      dut11  (.u(u11),  .rho(r11));
  gnb_rho #(.M(7),  .T(4))      dut7   (.u(u7),   .rho(r7));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // one product through the schedule, for each size
  task automatic sched163(input logic [162:0] a, b, output logic [162:0] z);
    logic [162:0] t1 = a, t2 = b, v, g;
    z = '0;
    for (int t = 0; t < 163; t++) begin
      u163 = {t1[161:0], t1[162]};
      v    = {t2[161:0], t2[162]};
      #1;
      for (int p = 0; p < 163; p++) g[p] = r163[p] & v[(163 - p) % 163];
      z  = (t == 0) ? g : ({z[161:0], z[162]} ^ g);
      t1 = {t1[161:0], t1[162]};
      t2 = {t2[161:0], t2[162]};
    end
  endtask

  task automatic sched11(input logic [10:0] a, b, output logic [10:0] z);
    logic [10:0] t1 = a, t2 = b, v, g;
    z = '0;
    for (int t = 0; t < 11; t++) begin
      u11 = {t1[9:0], t1[10]};
      v   = {t2[9:0], t2[10]};
      #1;
      for (int p = 0; p < 11; p++) g[p] = r11[p] & v[(11 - p) % 11];
      z  = (t == 0) ? g : ({z[9:0], z[10]} ^ g);
      t1 = {t1[9:0], t1[10]};
      t2 = {t2[9:0], t2[10]};
    end
  endtask

  task automatic sched7(input logic [6:0] a, b, output logic [6:0] z);
    logic [6:0] t1 = a, t2 = b, v, g;
    z = '0;
    for (int t = 0; t < 7; t++) begin
      u7 = {t1[5:0], t1[6]};
      v  = {t2[5:0], t2[6]};
      #1;
      for (int p = 0; p < 7; p++) g[p] = r7[p] & v[(7 - p) % 7];
      z  = (t == 0) ? g : ({z[5:0], z[6]} ^ g);
      t1 = {t1[5:0], t1[6]};
      t2 = {t2[5:0], t2[6]};
    end
  endtask

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    logic [162:0] a, b, z, ref163;
    logic [10:0]  a11, b11, z11;
    logic [6:0]   a7, b7, z7;

    // reference self-consistency: A x A = A^2 (cyclic shift), A x 1 = A
    a = gnb_ref#(163, 4)::rand_fe();
    check(gnb_ref#(163, 4)::mul(a, a) == {a[161:0], a[162]}, "reference square");
    check(gnb_ref#(163, 4)::mul(a, '1) == a, "reference unity");

    for (int n = 0; n < 20; n++) begin
      a = gnb_ref#(163, 4)::rand_fe();
      b = gnb_ref#(163, 4)::rand_fe();
      if (n == 0) b = '1;
      if (n == 1) b = a;
      sched163(a, b, z);
      ref163 = gnb_ref#(163, 4)::mul(a, b);
      check(z == ref163, $sformatf("m=163 product %0d", n));
    end
    for (int n = 0; n < 50; n++) begin
      a11 = 11'($urandom);
      b11 = 11'($urandom);
      sched11(a11, b11, z11);
      check(z11 == gnb_ref#(11, 2)::mul(a11, b11), $sformatf("m=11 product %0d", n));
      a7 = 7'($urandom);
      b7 = 7'($urandom);
      sched7(a7, b7, z7);
      check(z7 == gnb_ref#(7, 4)::mul(a7, b7), $sformatf("m=7 product %0d", n));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
