// Self-checking testbench of the tap buffer (boundary-scan chain).
// Random get / shift / set / parallel-load operations and test-mode changes
// are applied; a bit-level reference model of the 129-cell chain and of the
// input register buffer predicts tdo and the CUT inputs every cycle.
// Also shifts a full known pattern through the chain and checks that it
// comes out after exactly 129 shifts.
module tap_buffer_tb;
  import cs_jtag_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  localparam int L = CUT_IN_W + RESULT_W;
  logic test_mode, tdi, tdo, get, shift, set, par_load;
  cut_in_t par_vec, pin_in, cut_in;
  logic [RESULT_W-1:0] cut_out;

  tap_buffer dut (.clk, .rst_n, .test_mode, .tdi, .tdo, .get, .shift, .set,
                  .par_load, .par_vec, .pin_in, .cut_in, .cut_out);

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bit ch[L];          // ch[0] is the cell next to tdo
  logic [CUT_IN_W-1:0] upd_m;

  initial begin
    logic [CUT_IN_W-1:0] drive;
    logic [L-1:0] pat;
    test_mode = 0; tdi = 0; get = 0; shift = 0; set = 0; par_load = 0;
    par_vec = '0; pin_in = '0; cut_out = '0;
    foreach (ch[i]) ch[i] = 0;
    upd_m = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int c = 0; c < 3000; c++) begin
      int op;
      op = $urandom % 10;
      test_mode = (c % 500) > 50;
      pin_in  = cut_in_t'({$urandom, $urandom, $urandom});
      par_vec = cut_in_t'({$urandom, $urandom, $urandom});
      cut_out = {$urandom, $urandom};
      tdi = $urandom;
      get = (op == 0); shift = (op >= 1 && op <= 6); set = (op == 7); par_load = (op == 8);
      #1;
      drive = test_mode ? upd_m : pin_in;
      chk(cut_in == cut_in_t'(drive), "CUT input source");
      chk(tdo == ch[0], $sformatf("tdo at cycle %0d", c));
      // reference update
      if (get) begin
        logic [L-1:0] cap;
        cap = {drive, cut_out};
        for (int i = 0; i < L; i++) ch[i] = cap[i];
      end else if (shift) begin
        for (int i = 0; i < L - 1; i++) ch[i] = ch[i+1];
        ch[L-1] = tdi;
      end
      if (par_load) upd_m = par_vec;
      else if (set) for (int i = 0; i < CUT_IN_W; i++) upd_m[i] = ch[RESULT_W + i];
      @(negedge clk);
    end
    // a known pattern must take exactly L shifts from tdi to tdo
    get = 0; set = 0; par_load = 0; shift = 1;
    pat = {$urandom, $urandom, $urandom, $urandom, $urandom};
    for (int i = 0; i < L; i++) begin tdi = pat[i]; @(negedge clk); end
    for (int i = 0; i < L; i++) begin
      chk(tdo == pat[i], $sformatf("pattern bit %0d", i));
      tdi = 0;
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
