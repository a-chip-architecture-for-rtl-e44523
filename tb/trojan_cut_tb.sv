// Self-checking testbench of the Trojan-embedded circuit under test.
// A Trojan-embedded and a Trojan-free instance receive the same stream of
// random data, loads and enables. A reference model (bitwise LFSR, XOR cipher
// and a bit-serial CRC-32 written out independently) follows each instance.
// The trigger pattern is applied twice; before it both instances must agree,
// after it the Trojan-embedded one must follow the modified seed.
module trojan_cut_tb;
  import cs_jtag_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  localparam logic [15:0] TRIG = 16'hA5C3;
  localparam logic [63:0] RSEED = 64'h0123_4567_89AB_CDEF;

  logic en, load;
  logic [63:0] seed;
  logic [15:0] data;
  logic [47:0] res_t, res_f;
  logic fired_t, fired_f;

  trojan_cut #(.TROJAN(1'b1)) dut_t (.clk, .rst_n, .en, .seed, .load, .data,
                                     .result(res_t), .trojan_fired(fired_t));
  trojan_cut #(.TROJAN(1'b0)) dut_f (.clk, .rst_n, .en, .seed, .load, .data,
                                     .result(res_f), .trojan_fired(fired_f));

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference state for the embedded (t) and free (f) circuits
  logic [63:0] p_t, p_f;
  logic [31:0] c_t, c_f;
  logic [15:0] q_t, q_f;

  function automatic logic [63:0] lfsr64(logic [63:0] s);
    logic b;
    b = s[63] ^ s[62] ^ s[60] ^ s[59];
    return {s[62:0], b};
  endfunction

  function automatic logic [31:0] crc_bits(logic [31:0] c, logic [15:0] d);
    logic [31:0] poly = 32'h04C11DB7;
    for (int i = 15; i >= 0; i--) begin
      logic top;
      top = c[31];
      c = {c[30:0], 1'b0};
      if (top != d[i]) c = c ^ poly;
    end
    return c;
  endfunction

  task automatic ref_step(inout logic [63:0] p, inout logic [31:0] c, inout logic [15:0] q,
                          input bit troj);
    logic [63:0] s;
    logic l;
    s = seed; l = load;
    if (troj && data == TRIG) begin s = ~seed; l = 1'b1; end
    q = data ^ p[15:0];
    c = crc_bits(c, q);
    p = l ? s : lfsr64(p);
  endtask

  int diverged = 0;
  initial begin
    en = 0; load = 0; seed = 64'hFEDC_BA98_7654_3210; data = 0;
    p_t = RSEED; p_f = RSEED; c_t = '1; c_f = '1; q_t = 0; q_f = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 600; i++) begin
      en   = ($urandom % 8) != 0;
      load = (i == 5) || (($urandom % 97) == 0);
      seed = {$urandom, $urandom};
      data = (i == 200 || i == 450) ? TRIG : 16'($urandom);
      if (data == TRIG && i != 200 && i != 450) data = 16'h0000;
      if (i == 200 || i == 450) en = 1'b1;
      if (en) begin
        ref_step(p_t, c_t, q_t, 1'b1);
        ref_step(p_f, c_f, q_f, 1'b0);
      end
      @(negedge clk);
      chk(res_t == {q_t, c_t}, $sformatf("embedded result %h expected %h at %0d", res_t, {q_t, c_t}, i));
      chk(res_f == {q_f, c_f}, $sformatf("free result %h expected %h at %0d", res_f, {q_f, c_f}, i));
      chk(fired_t == (i >= 200), "Trojan fired flag");
      chk(!fired_f, "Trojan-free circuit must never fire");
      if (i < 200) chk(res_t == res_f, "circuits must agree before the trigger");
      else if (res_t != res_f) diverged++;
    end
    chk(diverged > 100, $sformatf("Trojan changed the cipher in only %0d cycles", diverged));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
