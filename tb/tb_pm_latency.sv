// Latency workload: full-length (163-digit) random tau-NAF scalars with the usual
// density of about one nonzero digit in three, on random base points of K-163.
// Each result is compared with the reference point multiplication, and each run's cycle
// count (start to done) with the routine-level formula
//   1 + 4 + 5 (l - 1) + 1986 A + 1988 S + R
// (A additions, S subtractions, R reloads of Z predicted from the digit pattern).
// The average over the runs must lie within 5 % of 106,700 cycles, the expected latency
// of this architecture with H(k) = m/3 nonzero digits. Random digits do not hit m/3
// exactly, so the measured mean cost of a nonzero digit (addition or subtraction plus
// any reload) is also used to estimate the latency at exactly H(k) = m/3:
//   1 + 4 + 5 (m - 1) + (m/3 - 1) x (mean cost); this estimate must lie within 1 %.
module tb_pm_latency;
  import kpm_pkg::*;
  import gnb_ref_pkg::*;

  typedef gnb_ref#(163, 4) F;
  typedef F::pt_t pt_t;

  localparam int RUNS = 4;

  logic          clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [162:0]  px, py, qx, qy;
  logic [163:0]  k_in;
  logic [7:0]    klen;
  logic          busy, done, err, routine_first;
  routine_e      routine;
  int            checks = 0, failures = 0;

  koblitz_pm dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (RUNS * 130_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    int d [$];
    int l, pos, n_add, n_sub, n_rel, cycles, expect_cyc;
    longint total = 0, nz_total = 0;
    real    per_digit, est;
    bit zx;
    pt_t p, q;
    px = '0; py = '0; k_in = '0; klen = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int r = 0; r < RUNS; r++) begin
      l = 163;
      d = {};
      for (int i = 0; i < l; i++) d.push_back(0);
      d[l-1] = 1;
      for (int i = l - 3; i >= 0; i--)
        if (d[i+1] == 0 && $urandom_range(0, 1) == 1) d[i] = $urandom_range(0, 1) ? 1 : -1;
      k_in = '0; pos = 163;
      for (int i = l - 1; i >= 0;) begin
        if (d[i] == 0) begin pos--; i--; end
        else begin k_in[pos] = 1'b1; k_in[pos-1] = (d[i] < 0); pos -= 2; i -= 2; end
      end
      // reference result and predicted routine mix
      p = F::rand_point();
      q = p;
      n_add = 0; n_sub = 0; n_rel = 0; zx = 1'b0;
      for (int i = l - 2; i >= 0; i--) begin
        q = F::frob(q);
        zx = !zx;
        if (d[i] != 0) begin
          if (!zx) n_rel++;
          zx = 1'b0;
          if (d[i] > 0) begin n_add++; q = F::add(q, p); end
          else begin n_sub++; q = F::add(q, F::neg(p)); end
        end
      end
      expect_cyc = 1 + CYC_INIT + CYC_FROB * (l - 1) + CYC_PADD * n_add + CYC_PSUB * n_sub + n_rel;
      px = p.x; py = p.y; klen = 8'(l);
      start = 1'b1;
      cycles = 0;
      @(negedge clk);
      start = 1'b0;
      cycles = 1;
      while (!done) begin @(negedge clk); cycles++; end
      check(!err && qx == q.x && qy == q.y, $sformatf("run %0d: Q = kP", r));
      check(cycles == expect_cyc, $sformatf("run %0d: %0d cycles, expected %0d", r, cycles,
            expect_cyc));
      $display("run %0d: %0d additions, %0d subtractions, %0d reloads, %0d cycles", r, n_add,
               n_sub, n_rel, cycles);
      total += cycles;
      nz_total += n_add + n_sub;
      repeat (2) @(negedge clk);
    end
    $display("average latency %0d cycles over %0d runs", total / RUNS, RUNS);
    check(total / RUNS > 101_365 && total / RUNS < 112_035, "average within 5 % of 106,700");
    per_digit = real'(total - RUNS * (1 + CYC_INIT + CYC_FROB * 162)) / real'(nz_total);
    est = 1 + CYC_INIT + CYC_FROB * 162 + (163.0 / 3.0 - 1.0) * per_digit;
    $display("mean cost per nonzero digit %.1f cycles; estimate at H(k) = m/3: %.0f cycles",
             per_digit, est);
    check(est > 105_633.0 && est < 107_767.0, "estimate at H(k) = m/3 within 1 % of 106,700");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
