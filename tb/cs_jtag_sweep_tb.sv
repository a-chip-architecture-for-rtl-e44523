// Design-space testbench: runs the whole chip end to end at the points of
// the area/speed study. Parameters are the number of measurements M, the
// frequency ratio R = f_MG / f_LPS and the measurement width BW_Y, with
// 16-bit measurements as well as 18 and 26 bits. N is reduced to 1024
// vectors (512 for the slowest ratio) to keep the run short. Each chip is
// checked by cs_jtag_run against its own reference, cycle count included.
module cs_jtag_sweep_tb;
  logic clk = 1'b0;
  always #2.5 clk = ~clk;

  localparam int NI = 7;
  int  c[NI], f[NI];
  bit  d[NI];

  cs_jtag_run #(.M(8),   .R(1),   .BW_Y(16), .N_VEC(1024)) r0 (.clk, .checks(c[0]), .failures(f[0]), .done(d[0]));
  cs_jtag_run #(.M(16),  .R(2),   .BW_Y(18), .N_VEC(1024)) r1 (.clk, .checks(c[1]), .failures(f[1]), .done(d[1]));
  cs_jtag_run #(.M(32),  .R(4),   .BW_Y(26), .N_VEC(1024)) r2 (.clk, .checks(c[2]), .failures(f[2]), .done(d[2]));
  cs_jtag_run #(.M(64),  .R(8),   .BW_Y(16), .N_VEC(1024)) r3 (.clk, .checks(c[3]), .failures(f[3]), .done(d[3]));
  cs_jtag_run #(.M(128), .R(16),  .BW_Y(16), .N_VEC(1024)) r4 (.clk, .checks(c[4]), .failures(f[4]), .done(d[4]));
  cs_jtag_run #(.M(64),  .R(3),   .BW_Y(16), .N_VEC(1024)) r5 (.clk, .checks(c[5]), .failures(f[5]), .done(d[5]));
  cs_jtag_run #(.M(128), .R(128), .BW_Y(16), .N_VEC(512))  r6 (.clk, .checks(c[6]), .failures(f[6]), .done(d[6]));

  int checks, failures;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    checks = 0; failures = 1;
    foreach (c[i]) begin checks += c[i]; failures += f[i]; end
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit all;
    do begin
      @(posedge clk);
      all = 1;
      foreach (d[i]) all &= d[i];
    end while (!all);
    checks = 0; failures = 0;
    foreach (c[i]) begin checks += c[i]; failures += f[i]; end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
