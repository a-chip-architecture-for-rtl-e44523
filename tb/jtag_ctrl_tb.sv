// Self-checking testbench of the JTAG controller.
// Normal mode: random enable (TMS) sequences; an independent table of the
// IEEE 1149.1 state transitions predicts the state and the Reset, Start,
// Get_reg, Shift_reg and Set_reg outputs.
// Trojan mode (N_VEC = 20, R = 3, M = 5, BW_Y = 4): one run is started by
// entering Run-Test/Idle. The pulse times are recorded and checked: one
// Start; Set_reg every R cycles, N_VEC times; Get_reg one cycle after each
// Set_reg; after an R+3 drain, M Shift_reg pulses BW_Y cycles apart; no
// second run while staying in Run-Test/Idle; and a run aborted by leaving
// Run-Test/Idle.
module jtag_ctrl_tb;
  import cs_jtag_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  localparam int NV = 20, RR = 3, MM = 5, BY = 4;
  logic enable, trojan_en;
  tap_state_t state;
  logic reset, start, get_reg, shift_reg, set_reg, cs_busy;

  jtag_ctrl #(.N_VEC(NV), .R(RR), .M(MM), .BW_Y(BY)) dut (
    .clk, .rst_n, .enable, .trojan_en, .state, .reset, .start,
    .get_reg, .shift_reg, .set_reg, .cs_busy);

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // state numbering of the reference: 0 TLR 1 RTI 2 SelDR 3 CapDR 4 ShDR
  // 5 Ex1DR 6 PauDR 7 Ex2DR 8 UpdDR 9 SelIR 10 CapIR 11 ShIR 12 Ex1IR
  // 13 PauIR 14 Ex2IR 15 UpdIR ; nxt[state][tms]
  int nxt [16][2] = '{
    '{1, 0}, '{1, 2}, '{3, 9}, '{4, 5}, '{4, 5}, '{6, 8}, '{6, 7}, '{4, 8},
    '{1, 2}, '{10, 0}, '{11, 12}, '{11, 12}, '{13, 15}, '{13, 14}, '{11, 15}, '{1, 2}};

  int cyc = 0;
  always @(posedge clk) cyc++;

  int t_start[$], t_set[$], t_get[$], t_shift[$];
  always @(negedge clk) if (trojan_en) begin
    if (start)     t_start.push_back(cyc);
    if (set_reg)   t_set.push_back(cyc);
    if (get_reg)   t_get.push_back(cyc);
    if (shift_reg) t_shift.push_back(cyc);
  end

  initial begin
    int s;
    enable = 1; trojan_en = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    s = 0;
    for (int i = 0; i < 3000; i++) begin
      enable = ($urandom % 3) == 0;
      @(negedge clk);
      s = nxt[s][enable];
      chk(int'(state) == s, $sformatf("state %0d expected %0d", state, s));
      chk(reset == (s == 0) && start == (s == 1) && get_reg == (s == 3) &&
          shift_reg == (s == 4) && set_reg == (s == 8), "normal-mode outputs");
    end
    // go to Test-Logic-Reset, then Trojan mode, then Run-Test/Idle
    enable = 1; repeat (5) @(negedge clk);
    trojan_en = 1;
    chk(!start && !set_reg && !get_reg && !shift_reg, "Trojan mode quiet outside Run-Test/Idle");
    enable = 0;
    repeat (NV * RR + 6 + MM * BY + 40) @(negedge clk);
    chk(!cs_busy, "run finished");
    chk(t_start.size() == 1, $sformatf("%0d start pulses", t_start.size()));
    chk(t_set.size() == NV, $sformatf("%0d set pulses", t_set.size()));
    chk(t_get.size() == NV, $sformatf("%0d get pulses", t_get.size()));
    chk(t_shift.size() == MM, $sformatf("%0d shift pulses", t_shift.size()));
    if (t_set.size() == NV && t_get.size() == NV && t_start.size() == 1) begin
      chk(t_set[0] == t_start[0] + 1, "first set right after start");
      for (int i = 1; i < NV; i++) chk(t_set[i] - t_set[i-1] == RR, "set every R cycles");
      for (int i = 0; i < NV; i++) chk(t_get[i] == t_set[i] + 1, "get one cycle after set");
    end
    if (t_shift.size() == MM && t_set.size() == NV) begin
      chk(t_shift[0] == t_set[NV-1] + RR + 4, $sformatf("first shift %0d cycles after last set",
                                                        t_shift[0] - t_set[NV-1]));
      for (int i = 1; i < MM; i++) chk(t_shift[i] - t_shift[i-1] == BY, "shift every BW_Y cycles");
    end
    // stay in Run-Test/Idle: no second run
    t_start.delete(); t_set.delete();
    repeat (50) @(negedge clk);
    chk(t_start.size() == 0 && t_set.size() == 0, "one run per visit to Run-Test/Idle");
    // leave and come back: new run, aborted by leaving Run-Test/Idle
    enable = 1; @(negedge clk); enable = 0; @(negedge clk); @(negedge clk);  // SelDR, CapDR
    enable = 1; @(negedge clk); @(negedge clk); enable = 0; @(negedge clk);  // Ex1, Upd, RTI
    repeat (10) @(negedge clk);
    chk(t_start.size() == 1 && cs_busy, "second run started");
    enable = 1; @(negedge clk); enable = 0;
    @(negedge clk);
    chk(!cs_busy, "leaving Run-Test/Idle aborts the run");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
