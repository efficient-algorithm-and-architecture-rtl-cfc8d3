// Testbench of the k register (164 bits). Loads random codes and shifts them out one
// place at a time, comparing the two most significant bits with the loaded value.
module tb_scalar_reg;

  logic         clk = 1'b0, rst_n = 1'b0;
  logic         s_k, shift;
  logic [163:0] k_in, model;
  logic [1:0]   k_msbs;
  int           checks = 0, failures = 0;

  scalar_reg dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    s_k = 1'b0; shift = 1'b0; k_in = '0; model = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 20; n++) begin
      for (int i = 0; i < 164; i += 32) k_in[i +: 32] = $urandom;
      s_k = 1'b1; shift = 1'b1;      // load wins over shift
      @(posedge clk); #1;
      model = k_in;
      s_k = 1'b0;
      for (int c = 0; c < 170; c++) begin
        shift = 1'($urandom);
        checks++;
        if (k_msbs !== model[163:162]) begin
          failures++;
          $display("FAIL: msbs %b expected %b", k_msbs, model[163:162]);
        end
        @(posedge clk); #1;
        if (shift) model = {model[162:0], 1'b0};
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
