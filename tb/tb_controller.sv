// Testbench of the controller alone. A model of the k register in the testbench follows
// the controller's load and shift commands. For random tau-NAF scalars the testbench
// predicts the routine sequence (initialisation, one Frobenius map per further digit
// in the variant that matches what Z holds, a reload of Z when needed, an addition or
// subtraction per nonzero digit) and compares it with the routines the controller runs.
// It checks each routine's length, the number of multiplier cycles (s1 = J) per point
// addition (11 x 163), the number of k shifts, and the done pulse.
module tb_controller;
  import kpm_pkg::*;

  logic          clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [LW-1:0] klen;
  logic          k_lead, k_lead_neg;
  logic [1:0]    k_msbs;
  s1_e           s1;
  s2_e           s2;
  sr_e           sr;
  logic          z_en, s_t1, s_t2, en_t1, en_t2, en_x1, en_y1, ld_p, s_k, k_shift;
  logic          busy, done, err, rt_first;
  routine_e      routine;

  logic [163:0]  k_in, kmodel;
  int            checks = 0, failures = 0;

  controller dut (.*);

  assign k_lead     = k_in[163];
  assign k_lead_neg = k_in[162];
  assign k_msbs     = kmodel[163:162];

  always #5 clk = ~clk;

  always @(posedge clk) begin
    if (s_k) kmodel <= k_in;
    else if (k_shift) kmodel <= {kmodel[162:0], 1'b0};
  end

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // observed routines with their lengths and multiplier cycles
  routine_e obs_rt [$];
  int       obs_len [$];
  int       obs_mul [$];
  int       len_cnt, mul_cnt, shifts;
  routine_e cur = RT_NONE;

  always @(posedge clk) begin
    if (k_shift) shifts++;
    if (rt_first || (cur != RT_NONE && routine == RT_NONE)) begin
      if (cur != RT_NONE) begin
        obs_rt.push_back(cur);
        obs_len.push_back(len_cnt);
        obs_mul.push_back(mul_cnt);
      end
      cur = routine;
      len_cnt = 0;
      mul_cnt = 0;
    end
    if (cur != RT_NONE) begin
      len_cnt++;
      if (z_en && s1 == S1_J) mul_cnt++;
    end
  end

  initial begin
    int d [$];
    routine_e exp_rt [$];
    int exp_len [$];
    bit zx;
    int l, pos;
    string tag;
    klen = '0; k_in = '0; kmodel = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 12; n++) begin
      // random tau-NAF, leading digit nonzero
      l = (n < 2) ? n + 1 : $urandom_range(2, 60);
      d = {};
      for (int i = 0; i < l; i++) d.push_back(0);
      d[l-1] = (n % 2) ? -1 : 1;
      for (int i = l - 3; i >= 0; i--)
        if (d[i+1] == 0 && $urandom_range(0, 2) == 0) d[i] = $urandom_range(0, 1) ? 1 : -1;
      // Joye-Tymen code
      k_in = '0; pos = 163;
      for (int i = l - 1; i >= 0;) begin
        if (d[i] == 0) begin pos--; i--; end
        else begin k_in[pos] = 1'b1; k_in[pos-1] = (d[i] < 0); pos -= 2; i -= 2; end
      end
      // expected routine sequence
      exp_rt = {RT_INIT}; exp_len = {CYC_INIT}; zx = 1'b0;
      for (int i = l - 2; i >= 0; i--) begin
        exp_rt.push_back(zx ? RT_FROB_X : RT_FROB_Y); exp_len.push_back(CYC_FROB); zx = !zx;
        if (d[i] != 0) begin
          if (!zx) begin exp_rt.push_back(RT_RELOAD); exp_len.push_back(1); zx = 1'b1; end
          exp_rt.push_back(RT_PADD); exp_len.push_back(d[i] > 0 ? CYC_PADD : CYC_PSUB);
          zx = 1'b0;
        end
      end
      obs_rt = {}; obs_len = {}; obs_mul = {}; shifts = 0;
      klen = LW'(l);
      start = 1'b1;
      @(negedge clk);
      start = 1'b0;
      while (!done) @(negedge clk);
      @(negedge clk);
      tag = $sformatf("scalar %0d (%0d digits)", n, l);
      check(!err, {tag, ": no error"});
      check(obs_rt.size() == exp_rt.size(), $sformatf("%s: %0d routines, expected %0d", tag,
            obs_rt.size(), exp_rt.size()));
      for (int i = 0; i < exp_rt.size() && i < obs_rt.size(); i++) begin
        check(obs_rt[i] == exp_rt[i], $sformatf("%s: routine %0d is %s, expected %s", tag, i,
              obs_rt[i].name(), exp_rt[i].name()));
        check(obs_len[i] == exp_len[i], $sformatf("%s: routine %0d length %0d, expected %0d",
              tag, i, obs_len[i], exp_len[i]));
        if (obs_rt[i] == RT_PADD)
          check(obs_mul[i] == 11 * 163, $sformatf("%s: %0d multiplier cycles", tag, obs_mul[i]));
      end
      check(shifts <= l + 1 && shifts >= l, $sformatf("%s: %0d k shifts", tag, shifts));
      repeat (2) @(negedge clk);
    end
    // leading digit zero is rejected at once
    k_in = '0; klen = 8'd4; start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    check(done && err && !busy, "rejected scalar");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
