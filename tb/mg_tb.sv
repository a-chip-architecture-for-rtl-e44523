// Self-checking testbench of the measurement generator.
// Two instances run side by side on the same random samples:
//   dut_a : M = 10, R = 3 (H = 4 lanes of 3 words, two unused words)
//   dut_b : M = 8,  R = 1 (one word per lane, one sample per cycle)
// A reference model steps its own copy of every lane LFSR and accumulates
// +/-(x - x_ref) into the row that the lane serves in that cycle, so the
// measurements, their order, the sample rate (one per R cycles) and the
// processing latency (R cycles after the registered sample) are all checked.
// Samples are chosen so that the sums also wrap past 16 bits.
module mg_tb;
  import cs_jtag_pkg::*;

  localparam int unsigned BW_X = 10, BW_Y = 16, LW = 32;
  localparam int unsigned NS   = 300;   // samples per run

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", msg);
    end
  endtask

  class mg_ref;
    int unsigned m, r, h;
    logic [LW-1:0] lf[];
    logic [BW_Y-1:0] y[];
    function new(int unsigned m_, int unsigned r_, logic [LW-1:0] seed);
      m = m_; r = r_; h = (m + r - 1) / r;
      lf = new[h]; y = new[m];
      foreach (lf[k]) begin
        lf[k] = seed ^ LW'((64'(k) + 1) * 64'h9E3779B9);
        if (lf[k] == 0) lf[k] = 1;
      end
      foreach (y[i]) y[i] = 0;
    endfunction
    function void sample(int xb);
      for (int t = 0; t < r; t++)
        for (int k = 0; k < h; k++) begin
          int row = t * h + k;
          if (row < m) y[row] = lf[k][0] ? y[row] - BW_Y'(xb) : y[row] + BW_Y'(xb);
          lf[k] = lf[k][0] ? ((lf[k] >> 1) ^ 32'h80200003) : (lf[k] >> 1);
        end
    endfunction
  endclass

  logic clear, xv_a, xv_b, so_a, so_b;
  logic [LW-1:0] seed;
  logic [BW_X-1:0] x, x_ref;
  logic busy_a, busy_b, yv_a, yv_b, yl_a, yl_b;
  logic signed [BW_Y-1:0] y_a, y_b;

  mg #(.M(10), .R(3), .BW_X(BW_X), .BW_Y(BW_Y), .LFSR_W(LW)) dut_a (
    .clk, .rst_n, .clear, .seed, .x_valid(xv_a), .x, .x_ref, .busy(busy_a),
    .shift_out(so_a), .y_out(y_a), .y_valid(yv_a), .y_last(yl_a));
  mg #(.M(8), .R(1), .BW_X(BW_X), .BW_Y(BW_Y), .LFSR_W(LW)) dut_b (
    .clk, .rst_n, .clear, .seed, .x_valid(xv_b), .x, .x_ref, .busy(busy_b),
    .shift_out(so_b), .y_out(y_b), .y_valid(yv_b), .y_last(yl_b));

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Feed NS samples to one instance, one every r cycles, then read back.
  task automatic run(input int unsigned which, input int unsigned r, mg_ref ref_m,
                     input logic [BW_X-1:0] xr);
    int unsigned got, t0;
    x_ref = xr;
    @(negedge clk) clear = 1'b1;
    @(negedge clk) clear = 1'b0;
    for (int i = 0; i < NS; i++) begin
      // mostly near the reference, sometimes full scale so sums wrap
      x = (i % 37 == 0) ? BW_X'($urandom) : BW_X'(int'(xr) + ($urandom % 41) - 20);
      ref_m.sample(int'({1'b0, x}) - int'({1'b0, xr}));
      if (which == 0) xv_a = 1'b1; else xv_b = 1'b1;
      @(negedge clk);
      xv_a = 1'b0; xv_b = 1'b0;
      repeat (r - 1) @(negedge clk);
    end
    // processing of the last sample ends R cycles after it was registered
    t0 = 0;
    while ((which == 0) ? busy_a : busy_b) begin
      @(negedge clk);
      t0++;
    end
    // the sample presented at cycle c is registered at c+1 and processed in
    // cycles c+1 .. c+R, so busy must fall exactly R+1 cycles after c
    chk(t0 + r == r + 1, $sformatf("inst %0d: busy fell %0d cycles after last sample, expected %0d", which, t0 + r, r + 1));
    got = 0;
    for (int i = 0; i < ref_m.m + 3; i++) begin
      if (which == 0) so_a = 1'b1; else so_b = 1'b1;
      @(negedge clk);
      so_a = 1'b0; so_b = 1'b0;
      if ((which == 0) ? yv_a : yv_b) begin
        logic signed [BW_Y-1:0] yy;
        yy = (which == 0) ? y_a : y_b;
        chk(got < ref_m.m, $sformatf("inst %0d: extra output", which));
        if (got < ref_m.m)
          chk(yy == signed'(ref_m.y[got]),
              $sformatf("inst %0d y[%0d] = %0d, expected %0d", which, got, yy, signed'(ref_m.y[got])));
        chk(((which == 0) ? yl_a : yl_b) == (got == ref_m.m - 1), "y_last position");
        got++;
      end
    end
    chk(got == ref_m.m, $sformatf("inst %0d: %0d outputs, expected %0d", which, got, ref_m.m));
  endtask

  initial begin
    mg_ref ra, rb, rc;
    clear = 0; xv_a = 0; xv_b = 0; so_a = 0; so_b = 0; x = 0; x_ref = 0;
    seed = 32'h1234_5678;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    ra = new(10, 3, seed);
    run(0, 3, ra, 10'd512);
    rb = new(8, 1, seed);
    run(1, 1, rb, 10'd480);
    // second run with another seed: clear must restart sums and LFSRs
    seed = 32'hCAFE_0001;
    rc = new(10, 3, seed);
    run(0, 3, rc, 10'd300);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
