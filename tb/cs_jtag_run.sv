// Test harness used by cs_jtag_sweep_tb: one CS-JTAG chip at the given
// M, R, BW_Y and N_VEC, taken through one complete Trojan-detection run from
// the JTAG pins. Each measurement received on the serial output is checked
// against a reference: the CUT leakage model, quantised as by the ADC, is
// biased, then accumulated with the +/-1 row entries of each lane LFSR.
// Lane k serves rows t*H + k (t = 0 .. R-1) and steps R times per sample.
// The run time from Start to the last serial bit is also checked:
// N*R + BW_Y*M + 7 cycles: N sample periods, the drain, and M serial words.
module cs_jtag_run
  import cs_jtag_pkg::*;
#(
  parameter int unsigned M     = 8,
  parameter int unsigned R     = 1,
  parameter int unsigned BW_Y  = 16,
  parameter int unsigned N_VEC = 256
) (
  input  logic clk,
  output int   checks,
  output int   failures,
  output bit   done
);

  localparam logic [31:0] MSEED = 32'h1D87_2B41;
  localparam int XREF = 512;
  localparam int H = (M + R - 1) / R;

  logic rst_n = 1'b0;
  logic jtag_enable, jtag_input, jtag_output, tdo_valid;
  cut_in_t pin_in = '0;
  logic [RESULT_W-1:0] pin_out;
  real cut_leak_a;
  logic [BW_Y-1:0] y_ci;
  logic y_valid, trojan_enable, cs_busy;

  cs_jtag_top #(.M(M), .R(R), .BW_Y(BW_Y), .N_VEC(N_VEC)) dut (
    .clk, .rst_n, .jtag_enable, .jtag_input, .jtag_output, .tdo_valid,
    .pin_in, .pin_out, .cut_leak_a, .y_ci, .y_valid, .trojan_enable, .cs_busy);

  function automatic real leak(logic [15:0] d);
    real i;
    i = 18.0e-6 + 0.3e-6 * (real'($countones(d)) - 8.0) / 8.0;
    if (d[7:4] == 4'hC) i += 0.8e-6;   // sparse extra leakage
    return i;
  endfunction
  function automatic int adc(real i);
    real v;
    v = i * 25.0e3 / 0.9 * 1024.0;
    if (v <= 0.0) return 0;
    if (v >= 1023.0) return 1023;
    return int'($floor(v));
  endfunction
  always_comb cut_leak_a = leak(dut.u_cut.data);

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL [M=%0d R=%0d BW=%0d]: %s", M, R, BW_Y, msg);
    end
  endtask

  task automatic tms(input bit b, input bit d = 1'b0);
    jtag_enable = b;
    jtag_input  = d;
    @(negedge clk);
  endtask

  initial begin
    logic [31:0] lf[H];
    logic [BW_Y-1:0] yr[M], ys[M];
    int cyc, start_cyc, last_cyc, nb, k, expect_cyc;
    checks = 0; failures = 0; done = 0;
    jtag_enable = 1; jtag_input = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (5) @(negedge clk);
    tms(0); tms(1); tms(1); tms(0); tms(0);
    for (int i = 0; i < IR_W; i++) tms(i == IR_W - 1, CS_OPCODE[i]);
    tms(1);
    jtag_enable = 0;
    cyc = 0; start_cyc = -1; last_cyc = -1; nb = 0; k = 0;
    foreach (ys[i]) ys[i] = '0;
    while (cyc < N_VEC * R + (BW_Y + 2) * M + 100) begin
      @(posedge clk);
      #0.1;
      if (dut.start && start_cyc < 0) start_cyc = cyc;
      if (tdo_valid && k < M) begin
        ys[k][nb] = jtag_output;
        last_cyc = cyc;
        nb++;
        if (nb == BW_Y) begin nb = 0; k++; end
      end
      cyc++;
    end
    foreach (lf[j]) begin
      lf[j] = MSEED ^ 32'((64'(j) + 1) * 64'h9E3779B9);
      if (lf[j] == 0) lf[j] = 1;
    end
    foreach (yr[i]) yr[i] = '0;
    for (int i = 0; i < N_VEC; i++) begin
      int xc;
      xc = adc(leak(16'(i))) - XREF;
      for (int t = 0; t < R; t++)
        for (int j = 0; j < H; j++) begin
          int row;
          row = t * H + j;
          if (row < M) yr[row] = lf[j][0] ? yr[row] - BW_Y'(xc) : yr[row] + BW_Y'(xc);
          lf[j] = lf[j][0] ? ((lf[j] >> 1) ^ 32'h80200003) : (lf[j] >> 1);
        end
    end
    chk(k == M, $sformatf("%0d words received", k));
    for (int j = 0; j < M; j++)
      chk(ys[j] == yr[j], $sformatf("y_c%0d = %h, expected %h", j + 1, ys[j], yr[j]));
    expect_cyc = N_VEC * R + BW_Y * M + 7;
    chk(start_cyc >= 0 && last_cyc - start_cyc + 1 == expect_cyc,
        $sformatf("run took %0d cycles, expected %0d", last_cyc - start_cyc + 1, expect_cyc));
    done = 1;
  end
endmodule
