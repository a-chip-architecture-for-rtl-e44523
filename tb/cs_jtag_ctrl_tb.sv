// Self-checking testbench of the CS-JTAG controller.
// Walks the TAP from the pins to Shift-IR, shifts in instructions (LSB
// first) and checks that Trojan enable rises only after Update-IR of the
// CS opcode, and falls for another instruction or on Test-Logic-Reset.
// Checks the pass-through of enable and input, the choice of the JTAG
// output (scan chain outside Trojan mode), and, in Trojan mode, that each
// 16-bit measurement handed over is sent LSB first, one bit per cycle,
// starting the cycle after it was handed over, with tdo_valid on those bits.
module cs_jtag_ctrl_tb;
  import cs_jtag_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  logic jtag_enable, jtag_input, enable, input_bit, trojan_enable;
  logic [15:0] y_in;
  logic y_valid, scan_out, jtag_output, tdo_valid;

  cs_jtag_ctrl #(.BW_Y(16)) dut (.clk, .rst_n, .jtag_enable, .jtag_input, .enable,
    .input_bit, .trojan_enable, .y_in, .y_valid, .scan_out, .jtag_output, .tdo_valid);

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic tms(input bit b);
    jtag_enable = b;
    @(negedge clk);
  endtask

  // from Run-Test/Idle: load an instruction, return to Run-Test/Idle
  task automatic load_ir(input logic [3:0] ins);
    tms(1); tms(1); tms(0); tms(0);           // SelDR, SelIR, CapIR, ShIR
    for (int i = 0; i < 4; i++) begin
      jtag_input = ins[i];
      tms(i == 3);                            // last bit leaves to Exit1-IR
    end
    tms(1);                                   // Update-IR
    tms(0);                                   // Run-Test/Idle
  endtask

  initial begin
    jtag_enable = 1; jtag_input = 0; y_in = 0; y_valid = 0; scan_out = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    tms(1); tms(0);
    for (int i = 0; i < 50; i++) begin
      jtag_enable = $urandom; jtag_input = $urandom; scan_out = $urandom;
      #1;
      chk(enable == jtag_enable && input_bit == jtag_input, "pass-through");
      chk(jtag_output == scan_out, "scan output outside Trojan mode");
      jtag_enable = 0;
      @(negedge clk);
    end
    tms(1); tms(1); tms(1); tms(1); tms(1); tms(0);  // reset, idle
    chk(!trojan_enable, "no Trojan mode after reset");
    load_ir(4'b0101);
    chk(!trojan_enable, "other instruction");
    load_ir(CS_OPCODE);
    chk(trojan_enable, "CS opcode enables Trojan mode");
    // serialiser
    for (int w = 0; w < 6; w++) begin
      logic [15:0] v;
      v = 16'($urandom);
      y_in = v; y_valid = 1;
      @(negedge clk);
      y_valid = 0; y_in = 16'($urandom);
      for (int b = 0; b < 16; b++) begin
        chk(tdo_valid, "tdo_valid during the word");
        chk(jtag_output == v[b], $sformatf("word %0d bit %0d", w, b));
        @(negedge clk);
      end
      chk(!tdo_valid, "tdo_valid ends after 16 bits");
    end
    load_ir(4'b1111);
    chk(!trojan_enable, "leaving the CS instruction");
    load_ir(CS_OPCODE);
    chk(trojan_enable, "CS opcode again");
    tms(1); tms(1); tms(1); tms(1); tms(1);
    chk(!trojan_enable, "Test-Logic-Reset clears Trojan mode");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
