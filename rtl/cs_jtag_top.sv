// CS-JTAG: on-chip compressive-sensing front end for leakage-power based
// IC Trojan detection, reached through the ordinary JTAG pins.
//
// A Trojan-detection run (Trojan mode) works like this:
//   1. The test vector generator (TVG) produces N exhaustive test vectors.
//      They are inserted in parallel into the tap buffer around the circuit
//      under test (CUT), one per sample period (R clock cycles).
//   2. The leakage power sensor (LPS) converts the CUT's leakage for each
//      vector into a 10-bit sample x_ci.
//   3. The measurement generator (MG) folds each sample into M random +/-1
//      combinations. After the last vector it holds y_c = Phi (x_c - x_ref).
//      These M words leave the chip serially on the JTAG output, in place of
//      N raw samples.
// Off chip, the same Phi applied to simulated "gold" leakage gives y_G.
// Sparse recovery of x_C - x_G from y_C - y_G then points at the few vectors
// that reveal a Trojan.
//
// Control: the JTAG controller's TAP is stepped by jtag_enable. The CS-JTAG
// controller watches the instruction path. Loading CS_OPCODE raises Trojan
// enable, and the next entry into Run-Test/Idle then starts one run. With
// any other instruction the chip is a plain boundary-scan device.
// Capture-DR, Shift-DR and Update-DR then work the tap buffer: get, shift
// and set. Outside Test-Logic-Reset the tap buffer, not the pins, drives
// the CUT.
//
// Ports: one clock for JTAG, CUT and MG. f_MG = f_CUT, and the LPS samples
// every R cycles. Then come the JTAG pins, the CUT's functional pins, and
// the CUT's analog leakage current `cut_leak_a`, which feeds the LPS model.
// y_ci/y_valid show each measurement in parallel as it enters the serialiser.
//
// Defaults follow the main configuration evaluated: M = 64, N = 2^16,
// 16-bit measurements and f_MG = f_LPS (R = 1). The MG seed, the bias
// reference and the opcode are this design's choices.
module cs_jtag_top
  import cs_jtag_pkg::*;
#(
  parameter int unsigned       M       = 64,
  parameter int unsigned       R       = 1,
  parameter int unsigned       N_VEC   = 1 << DATA_W,
  parameter int unsigned       BW_X    = 10,
  parameter int unsigned       BW_Y    = 16,
  parameter int unsigned       LFSR_W  = 32,
  parameter logic [LFSR_W-1:0] MG_SEED = 32'h1D87_2B41,
  parameter logic [BW_X-1:0]   X_REF   = 10'd512,
  parameter logic [SEED_W-1:0] TV_SEED = 64'h0123_4567_89AB_CDEF,
  parameter bit                TROJAN  = 1'b1
) (
  input  logic                clk,          // JTAG_clock
  input  logic                rst_n,
  input  logic                jtag_enable,
  input  logic                jtag_input,
  output logic                jtag_output,
  output logic                tdo_valid,
  input  cut_in_t             pin_in,
  output logic [RESULT_W-1:0] pin_out,
  input  real                 cut_leak_a,
  output logic [BW_Y-1:0]     y_ci,
  output logic                y_valid,
  output logic                trojan_enable,
  output logic                cs_busy
);

  logic       en_tms, tdi, scan_tdo;
  tap_state_t state;
  logic       reset_o, start, get_reg, shift_reg, set_reg;

  cs_jtag_ctrl #(.BW_Y(BW_Y)) u_cs_ctrl (
    .clk, .rst_n,
    .jtag_enable, .jtag_input,
    .enable(en_tms), .input_bit(tdi), .trojan_enable,
    .y_in(y_ci), .y_valid,
    .scan_out(scan_tdo), .jtag_output, .tdo_valid
  );

  jtag_ctrl #(.N_VEC(N_VEC), .R(R), .M(M), .BW_Y(BW_Y)) u_jtag (
    .clk, .rst_n, .enable(en_tms), .trojan_en(trojan_enable),
    .state, .reset(reset_o), .start, .get_reg, .shift_reg, .set_reg, .cs_busy
  );

  // Normal mode steps go to the tap buffer, Trojan-mode steps to TVG/LPS/MG.
  logic test_mode, tb_get, tb_shift, tb_set;
  logic cs_start, cs_apply, cs_sample, cs_out;
  assign test_mode = !reset_o;
  assign tb_get    = get_reg   && !trojan_enable;
  assign tb_shift  = shift_reg && !trojan_enable;
  assign tb_set    = set_reg   && !trojan_enable;
  assign cs_start  = start     &&  trojan_enable;
  assign cs_apply  = set_reg   &&  trojan_enable;
  assign cs_sample = get_reg   &&  trojan_enable;
  assign cs_out    = shift_reg &&  trojan_enable;

  cut_in_t tv_vec;
  logic    tv_last, tv_done;
  tvg #(.N_VEC(N_VEC), .SEED(TV_SEED)) u_tvg (
    .clk, .rst_n, .start(cs_start), .apply(cs_apply),
    .vec(tv_vec), .last(tv_last), .done(tv_done)
  );

  cut_in_t             cut_in;
  logic [RESULT_W-1:0] cut_out;
  tap_buffer u_tap_buf (
    .clk, .rst_n, .test_mode, .tdi, .tdo(scan_tdo),
    .get(tb_get), .shift(tb_shift), .set(tb_set),
    .par_load(cs_apply), .par_vec(tv_vec),
    .pin_in, .cut_in, .cut_out
  );

  // The CUT steps every cycle in functional mode, and once per applied
  // vector (the cycle after Update-DR or a parallel insertion) in test mode.
  logic cut_step, set_q, trojan_fired;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) set_q <= 1'b0;
    else        set_q <= tb_set || cs_apply;
  end
  assign cut_step = test_mode ? set_q : 1'b1;

  trojan_cut #(.TROJAN(TROJAN)) u_cut (
    .clk, .rst_n, .en(cut_step),
    .seed(cut_in.seed), .load(cut_in.load), .data(cut_in.data),
    .result(cut_out), .trojan_fired
  );
  assign pin_out = cut_out;

  logic [BW_X-1:0] x_code;
  logic            x_valid;
  real             p_leak_w;
  lps #(.ADC_BITS(BW_X)) u_lps (
    .clk, .rst_n, .i_leak(cut_leak_a), .sample(cs_sample),
    .code(x_code), .valid(x_valid), .p_leak_w
  );

  logic                   mg_busy, y_last;
  logic signed [BW_Y-1:0] y_s;
  mg #(.M(M), .R(R), .BW_X(BW_X), .BW_Y(BW_Y), .LFSR_W(LFSR_W)) u_mg (
    .clk, .rst_n, .clear(cs_start), .seed(MG_SEED),
    .x_valid, .x(x_code), .x_ref(X_REF), .busy(mg_busy),
    .shift_out(cs_out), .y_out(y_s), .y_valid, .y_last
  );
  assign y_ci = y_s;

endmodule
