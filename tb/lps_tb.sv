// Testbench of the leakage power sensor model.
// Drives leakage currents across and beyond the ADC range and checks each
// code against floor(I * R / V_FS * 2^10), clamped, computed here; checks
// that the code arrives one cycle after the sample pulse, that no valid is
// given without a sample, and that the reported power matches VDD * I
// within one code step.
module lps_tb;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  real i_leak, p;
  logic sample, valid;
  logic [9:0] code;
  lps dut (.clk, .rst_n, .i_leak, .sample, .code, .valid, .p_leak_w(p));

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp_code;
    real v;
    sample = 0; i_leak = 0.0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 500; i++) begin
      i_leak = 1.0e-9 * real'($urandom % 40000);   // 0 .. 40 uA
      if (i == 0) i_leak = 0.0;
      if (i == 1) i_leak = 1.0e-3;
      v = i_leak * 25.0e3 / 0.9 * 1024.0;
      exp_code = (v >= 1023.0) ? 1023 : int'($floor(v));
      sample = (i % 3) != 2;
      @(negedge clk);
      chk(valid == sample, "valid one cycle after sample");
      if (sample) begin
        chk(code == 10'(exp_code), $sformatf("I=%g code %0d expected %0d", i_leak, code, exp_code));
        if (exp_code < 1023)
          chk(p > 1.0 * i_leak - 0.9 / 25.0e3 / 1024.0 && p < 1.0 * i_leak + 0.9 / 25.0e3 / 1024.0,
              $sformatf("power %g for current %g", p, i_leak));
      end
      sample = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
