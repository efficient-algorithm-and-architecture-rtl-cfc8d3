// Testbench of the register file at m = 163. Random sequences of writes (from Z, from
// the base-point inputs, in-place squaring of T1 and T2) and reads through all six
// select values are compared with a model kept in the testbench.
module tb_regfile;
  import kpm_pkg::*;

  logic         clk = 1'b0, rst_n = 1'b0;
  logic [162:0] z, px, py, t1, t2, x1, y1, r;
  logic         s_t1, s_t2, en_t1, en_t2, en_x1, en_y1, ld_p;
  sr_e          sr;
  int           checks = 0, failures = 0;

  logic [162:0] m_reg [6];   // model: T1, T2, x1, y1, x, y

  regfile dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [162:0] rnd();
    logic [162:0] v;
    for (int i = 0; i < 163; i += 32) v[i +: 32] = $urandom;
    return v;
  endfunction

  function automatic logic [162:0] sq(logic [162:0] a);
    return {a[161:0], a[162]};
  endfunction

  initial begin
    {s_t1, s_t2, en_t1, en_t2, en_x1, en_y1, ld_p} = '0;
    z = '0; px = '0; py = '0; sr = R_T1;
    foreach (m_reg[i]) m_reg[i] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 2000; n++) begin
      z  = rnd(); px = rnd(); py = rnd();
      s_t1 = 1'($urandom); s_t2 = 1'($urandom);
      {en_t1, en_t2, en_x1, en_y1, ld_p} = 5'($urandom);
      sr = sr_e'($urandom_range(0, 5));
      #1;
      checks++;
      if (r !== m_reg[sr]) begin
        failures++;
        $display("FAIL: read %0d", sr);
      end
      @(posedge clk);
      if (en_t1) m_reg[0] = s_t1 ? z : sq(m_reg[0]);
      if (en_t2) m_reg[1] = s_t2 ? z : sq(m_reg[1]);
      if (en_x1) m_reg[2] = z;
      if (en_y1) m_reg[3] = z;
      if (ld_p) begin m_reg[4] = px; m_reg[5] = py; end
      #1;
      checks++;
      if (t1 !== m_reg[0] || t2 !== m_reg[1] || x1 !== m_reg[2] || y1 !== m_reg[3]) begin
        failures++;
        $display("FAIL: register contents at step %0d", n);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
