// Self-checking testbench of the test vector generator.
// Applies vectors with random gaps, checks that N = 300 vectors count up
// from 0 with the constant seed and load on the first one only, that `last`
// marks the N-th apply, that further applies are ignored, and that `start`
// rewinds. A second instance at the default N = 2^16 is run to the end
// (one apply per cycle) to check the exhaustive sweep and its cycle count.
module tvg_tb;
  import cs_jtag_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  localparam logic [63:0] SEED = 64'hDEAD_BEEF_0BAD_F00D;
  logic start, apply, last, done, start_f, apply_f, last_f, done_f;
  cut_in_t vec, vec_f;

  tvg #(.N_VEC(300), .SEED(SEED)) dut (.clk, .rst_n, .start, .apply, .vec, .last, .done);
  tvg dut_full (.clk, .rst_n, .start(start_f), .apply(apply_f), .vec(vec_f),
                .last(last_f), .done(done_f));

  initial begin : watchdog
    repeat (80000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n, cyc;
    start = 0; apply = 0; start_f = 0; apply_f = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int run = 0; run < 2; run++) begin
      start = 1'b1; @(negedge clk); start = 1'b0;
      n = 0;
      while (n < 305) begin
        apply = ($urandom % 3) != 0;
        #1;
        if (apply) begin
          if (n < 300) begin
            chk(vec.data == 16'(n), $sformatf("vector %0d data %h", n, vec.data));
            chk(vec.seed == SEED, "seed constant");
            chk(vec.load == (n == 0), "load only on the first vector");
            chk(last == (n == 299), $sformatf("last at vector %0d", n));
            chk(!done, "done before the end");
          end else begin
            chk(done && !last, "applies after the end are ignored");
          end
          n++;
        end
        @(negedge clk);
      end
      apply = 1'b0;
    end
    // full-size sweep, one vector per cycle
    start_f = 1'b1; @(negedge clk); start_f = 1'b0;
    apply_f = 1'b1;
    cyc = 0;
    n = 0;
    while (!done_f) begin
      if (vec_f.data != 16'(cyc)) n++;
      @(negedge clk);
      cyc++;
    end
    apply_f = 1'b0;
    chk(n == 0, $sformatf("%0d vectors out of order in the full sweep", n));
    chk(cyc == 65536, $sformatf("full sweep took %0d cycles, expected 65536", cyc));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
