// End-to-end testbench of the point multiplier at its default size (K-163, m = 163).
//
// For random base points on the curve and random tau-NAF scalars (from one digit up to
// 163 digits, nonzero digits never adjacent) it encodes the scalar in Joye-Tymen code,
// runs the multiplier and compares Q with Algorithm 1 evaluated by the reference model
// (Frobenius map = squaring of both coordinates, affine addition with reference
// multiplication and inversion). It also checks that Q lies on the curve.
// A monitor measures every routine: initialisation 4 cycles, Frobenius map 5, point
// addition 1986, point subtraction 1988, reload 1; it counts how often each happened,
// and the number of Frobenius maps, additions and subtractions is compared with the
// digits of the scalar. A scalar with a zero leading digit must be rejected (err).
// Every mechanism (both initialisations, both Frobenius variants, reload, addition,
// subtraction, rejection) must occur at least once.
module tb_koblitz_pm;
  import kpm_pkg::*;
  import gnb_ref_pkg::*;

  typedef gnb_ref#(163, 4) F;
  typedef F::pt_t pt_t;

  logic          clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [162:0]  px, py, qx, qy;
  logic [163:0]  k_in;
  logic [7:0]    klen;
  logic          busy, done, err, routine_first;
  routine_e      routine;

  int checks = 0, failures = 0;
  longint cyc = 0;

  koblitz_pm dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ------------------------------------------------------------ routine monitor
  int n_init_pos = 0, n_init_neg = 0, n_frob_y = 0, n_frob_x = 0, n_reload = 0;
  int n_add = 0, n_sub = 0, n_err = 0;
  routine_e cur_rt = RT_NONE;
  longint   rt_t0;

  task automatic close_routine(longint len);
    unique case (cur_rt)
      RT_INIT:   check(len == CYC_INIT, $sformatf("init length %0d", len));
      RT_FROB_Y: begin n_frob_y++; check(len == CYC_FROB, $sformatf("frobenius length %0d", len)); end
      RT_FROB_X: begin n_frob_x++; check(len == CYC_FROB, $sformatf("frobenius length %0d", len)); end
      RT_RELOAD: begin n_reload++; check(len == 1, "reload length"); end
      RT_PADD: begin
        if (len == CYC_PADD) n_add++;
        else if (len == CYC_PSUB) n_sub++;
        else check(1'b0, $sformatf("point addition length %0d", len));
      end
      default: ;
    endcase
  endtask

  always @(posedge clk) begin
    if (routine_first || (cur_rt != RT_NONE && routine == RT_NONE)) begin
      if (cur_rt != RT_NONE) close_routine(cyc - rt_t0);
      cur_rt = routine;
      rt_t0  = cyc;
    end
  end

  // ------------------------------------------------------------ scalars
  typedef int digits_t [$];   // digits[i] = k_i, i = 0 .. l-1

  function automatic digits_t rand_tnaf(int l, int lead);
    digits_t d;
    d = {};
    for (int i = 0; i < l; i++) d.push_back(0);
    d[l-1] = lead;
    for (int i = l - 3; i >= 0; i--)
      if (d[i+1] == 0 && $urandom_range(0, 1) == 1) d[i] = ($urandom_range(0, 1) == 1) ? 1 : -1;
    return d;
  endfunction

  function automatic logic [163:0] jt_encode(digits_t d);
    logic [163:0] k = '0;
    int pos = 163;
    int i = d.size() - 1;
    while (i >= 0) begin
      if (d[i] == 0) begin
        pos--; i--;
      end else begin
        k[pos] = 1'b1;
        k[pos-1] = (d[i] < 0);
        pos -= 2; i -= 2;
      end
    end
    return k;
  endfunction

  function automatic pt_t ref_pm(pt_t p, digits_t d);
    pt_t q;
    int l = d.size();
    q = (d[l-1] > 0) ? p : F::neg(p);
    for (int i = l - 2; i >= 0; i--) begin
      q = F::frob(q);
      if (d[i] > 0) q = F::add(q, p);
      if (d[i] < 0) q = F::add(q, F::neg(p));
    end
    return q;
  endfunction

  task automatic run(pt_t p, digits_t d, input string name);
    pt_t q;
    longint t0;
    int nz_pos = 0, nz_neg = 0, a0, s0, f0;
    for (int i = 0; i < d.size() - 1; i++) begin
      if (d[i] > 0) nz_pos++;
      if (d[i] < 0) nz_neg++;
    end
    if (d[d.size()-1] > 0) n_init_pos++; else n_init_neg++;
    a0 = n_add; s0 = n_sub; f0 = n_frob_x + n_frob_y;
    @(negedge clk);
    px = p.x; py = p.y; k_in = jt_encode(d); klen = 8'(d.size());
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    t0 = cyc;
    while (!done) @(negedge clk);
    @(negedge clk);   // let the monitor close the last routine
    q = ref_pm(p, d);
    check(!err, {name, ": no error"});
    check(qx == q.x && qy == q.y, {name, ": Q = kP"});
    check(F::on_curve('{x: qx, y: qy}), {name, ": Q on curve"});
    check(n_add - a0 == nz_pos && n_sub - s0 == nz_neg,
          $sformatf("%s: %0d additions, %0d subtractions", name, n_add - a0, n_sub - s0));
    check(n_frob_x + n_frob_y - f0 == d.size() - 1, {name, ": one Frobenius map per digit"});
    $display("%s: %0d digits, %0d add, %0d sub, %0d cycles", name, d.size(), nz_pos, nz_neg,
             cyc - t0);
    repeat (2) @(negedge clk);
  endtask

  initial begin
    pt_t p;
    digits_t d;
    px = '0; py = '0; k_in = '0; klen = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    p = F::rand_point();
    check(F::on_curve(p), "base point on curve");

    d = '{1};                         run(p, d, "k = 1");
    d = '{0, -1};                     run(p, d, "k = -tau");
    d = '{1, 0, 0, -1};               run(p, d, "k = -tau^3 + 1");
    d = '{-1, 0, 0, 0, 1};            run(p, d, "k = tau^4 - 1");
    d = '{0, 1, 0, -1, 0, 0, 1};      run(p, d, "7 digits");
    for (int n = 0; n < 3; n++) begin
      d = rand_tnaf(12 + 7 * n, (n % 2) ? -1 : 1);
      run(p, d, $sformatf("random short %0d", n));
    end
    p = F::rand_point();
    d = rand_tnaf(163, 1);
    run(p, d, "full length");

    // rejected scalar: leading digit zero
    @(negedge clk);
    k_in = '0; klen = 8'd5; start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    while (!done) @(negedge clk);
    check(err, "zero leading digit rejected");
    if (err) n_err++;

    check(n_init_pos > 0 && n_init_neg > 0, "both initialisations");
    check(n_frob_y > 0 && n_frob_x > 0, "both Frobenius variants");
    check(n_reload > 0, "reload");
    check(n_add > 0 && n_sub > 0, "addition and subtraction");
    check(n_err > 0, "rejection");
    $display("init+ %0d init- %0d frobY %0d frobX %0d reload %0d add %0d sub %0d err %0d",
             n_init_pos, n_init_neg, n_frob_y, n_frob_x, n_reload, n_add, n_sub, n_err);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
