// End-to-end testbench of the CS-JTAG chip at its default parameters
// (M = 64, R = 1, N = 2^16, 10-bit samples, 16-bit measurements).
//
// 1. Boundary scan in normal mode: Capture-DR / Shift-DR / Update-DR through
//    the JTAG pins. The CUT result is read out of the chain, and a vector
//    shifted in is then checked at the CUT inputs.
// 2. Mode switch: the CS opcode is loaded through the instruction path and
//    Run-Test/Idle is entered; the chip then runs all 2^16 vectors alone.
//    The CUT leakage current is modelled here as a function of the data
//    applied to the CUT: a smooth data-dependent part plus, for the
//    Trojan-embedded chip, extra current on the 256 vectors whose upper
//    byte matches the trigger's (a sparse difference).
// 3. The 64 measurements are collected from the serial JTAG output and
//    checked against a reference computed here: the same quantiser, the
//    same bias and an independent model of the lane LFSRs. The gold
//    reference y_G (Trojan-free leakage) is computed too, and y_C - y_G must
//    be non-zero.
// Cycle count: from Start to the last serial bit must be N + 16 M + 7
// cycles (about 0.33 ms at 200 MHz).
// Mechanisms counted (each must occur): scan capture, scan update, mode
// switch, parallel vector insertion, LPS samples, Trojan trigger in the CUT,
// wrap-free measurement words, serial words.
module cs_jtag_top_tb;
  import cs_jtag_pkg::*;

  localparam int N = 65536, MM = 64, BY = 16;
  localparam logic [31:0] MSEED = 32'h1D87_2B41;
  localparam int XREF = 512;

  logic clk = 1'b0, rst_n = 1'b0;
  always #2.5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  logic jtag_enable, jtag_input, jtag_output, tdo_valid;
  cut_in_t pin_in;
  logic [RESULT_W-1:0] pin_out;
  real cut_leak_a;
  logic [BY-1:0] y_ci;
  logic y_valid, trojan_enable, cs_busy;

  cs_jtag_top dut (.clk, .rst_n, .jtag_enable, .jtag_input, .jtag_output, .tdo_valid,
                   .pin_in, .pin_out, .cut_leak_a, .y_ci, .y_valid, .trojan_enable, .cs_busy);

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- leakage model of the CUT (amperes), driven from its actual inputs
  function automatic real leak(logic [15:0] d, bit trojan);
    real i;
    i = 18.0e-6 + 0.3e-6 * (real'($countones(d)) - 8.0) / 8.0;
    if (trojan && d[15:8] == 8'hA5) i += 0.6e-6;
    return i;
  endfunction
  function automatic int adc(real i);
    real v;
    v = i * 25.0e3 / 0.9 * 1024.0;
    if (v <= 0.0) return 0;
    if (v >= 1023.0) return 1023;
    return int'($floor(v));
  endfunction
  always_comb cut_leak_a = leak(dut.u_cut.data, 1'b1);

  // ---- mechanism counters
  int n_capture = 0, n_update = 0, n_switch = 0, n_insert = 0, n_sample = 0;
  int n_words = 0, n_trig = 0;
  always @(posedge clk) begin
    if (dut.tb_get) n_capture++;
    if (dut.tb_set) n_update++;
    if (dut.cs_apply) n_insert++;
    if (dut.cs_sample) n_sample++;
  end

  task automatic tms(input bit b, input bit d = 1'b0);
    jtag_enable = b;
    jtag_input  = d;
    @(negedge clk);
  endtask

  localparam int L = CUT_IN_W + RESULT_W;

  initial begin
    logic [L-1:0] got, din;
    logic [RESULT_W-1:0] res_seen;
    cut_in_t v;
    logic [31:0] lf[MM];
    logic [BY-1:0] yc[MM], yg[MM], yser[MM];
    int start_cyc, last_bit_cyc, cyc, nb, k, diff;
    bit wrapped;

    jtag_enable = 1; jtag_input = 0;
    pin_in = cut_in_t'({64'h1111_2222_3333_4444, 1'b0, 16'h0F0F});
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (5) @(negedge clk);     // functional mode: CUT runs from the pins
    chk(dut.cut_in == pin_in, "pins drive the CUT in Test-Logic-Reset");

    // ---- 1. boundary scan
    tms(0); tms(1); tms(0);         // RTI, SelDR, CapDR
    res_seen = pin_out;             // result present at capture
    tms(0);                         // -> ShDR (capture happened)
    v = cut_in_t'({64'hA5A5_0000_FFFF_1234, 1'b1, 16'h5A5A});
    din = {v, {RESULT_W{1'b0}}};
    for (int i = 0; i < L; i++) begin
      got[i] = jtag_output;
      tms(i == L - 1, din[i]);
    end
    tms(1);                         // Update-DR
    tms(0);                         // RTI
    chk(got[RESULT_W-1:0] == res_seen, $sformatf("scanned result %h, expected %h",
                                                  got[RESULT_W-1:0], res_seen));
    chk(dut.cut_in == v, "Update-DR drives the shifted vector into the CUT");
    chk(n_capture == 1 && n_update == 1, "one capture and one update");

    // ---- 2. load the CS instruction, then enter Run-Test/Idle
    tms(1); tms(1); tms(0); tms(0);
    for (int i = 0; i < IR_W; i++) tms(i == IR_W - 1, CS_OPCODE[i]);
    tms(1);                         // Update-IR
    jtag_enable = 0;
    @(negedge clk);                 // Run-Test/Idle
    chk(trojan_enable, "Trojan mode after the CS instruction");
    if (trojan_enable) n_switch++;
    jtag_enable = 0;                // Run-Test/Idle from now on
    cyc = 0; start_cyc = -1; last_bit_cyc = -1; nb = 0; k = 0;
    foreach (yser[i]) yser[i] = '0;
    while (cyc < N + 20 * MM + 100) begin
      @(posedge clk);
      #0.1;
      if (dut.start && start_cyc < 0) start_cyc = cyc;
      if (tdo_valid && k < MM) begin
        yser[k][nb] = jtag_output;
        last_bit_cyc = cyc;
        nb++;
        if (nb == BY) begin nb = 0; k++; n_words++; end
      end
      cyc++;
    end
    if (dut.u_cut.trojan_fired) n_trig++;

    // ---- 3. reference: samples, bias, Bernoulli +/-1 rows from the lane LFSRs
    foreach (lf[j]) begin
      lf[j] = MSEED ^ 32'((64'(j) + 1) * 64'h9E3779B9);
      if (lf[j] == 0) lf[j] = 1;
      yc[j] = 0; yg[j] = 0;
    end
    wrapped = 0;
    for (int i = 0; i < N; i++) begin
      int xc, xg;
      xc = adc(leak(16'(i), 1'b1)) - XREF;
      xg = adc(leak(16'(i), 1'b0)) - XREF;
      for (int j = 0; j < MM; j++) begin
        int s;
        s = lf[j][0] ? -1 : 1;
        yc[j] = yc[j] + BY'(s * xc);
        yg[j] = yg[j] + BY'(s * xg);
        lf[j] = lf[j][0] ? ((lf[j] >> 1) ^ 32'h80200003) : (lf[j] >> 1);
      end
    end
    chk(k == MM, $sformatf("%0d measurement words received, expected %0d", k, MM));
    diff = 0;
    for (int j = 0; j < MM; j++) begin
      chk(yser[j] == yc[j], $sformatf("y_c%0d = %0d, expected %0d", j + 1,
                                      $signed(yser[j]), $signed(yc[j])));
      if (yc[j] != yg[j]) diff++;
    end
    chk(diff > MM / 2, $sformatf("only %0d of %0d measurements show the Trojan", diff, MM));
    chk(start_cyc >= 0 && last_bit_cyc - start_cyc + 1 == N + 16 * MM + 7,
        $sformatf("run took %0d cycles from Start to last bit, expected %0d",
                  last_bit_cyc - start_cyc + 1, N + 16 * MM + 7));
    chk(n_insert == N && n_sample == N, $sformatf("%0d insertions, %0d samples", n_insert, n_sample));
    chk(!cs_busy, "run complete");

    $display("mechanisms: scan_capture=%0d scan_update=%0d mode_switch=%0d insert=%0d sample=%0d trojan_trigger=%0d serial_words=%0d",
             n_capture, n_update, n_switch, n_insert, n_sample, n_trig, n_words);
    chk(n_capture > 0, "scan capture happened");
    chk(n_update > 0, "scan update happened");
    chk(n_switch > 0, "mode switch happened");
    chk(n_insert > 0 && n_sample > 0, "parallel insertion and sensing happened");
    chk(n_trig > 0, "Trojan trigger happened in the CUT");
    chk(n_words > 0, "serial readout happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
