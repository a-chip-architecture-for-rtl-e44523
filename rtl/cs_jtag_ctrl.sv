// CS-JTAG controller: sits between the JTAG pins and the JTAG controller and
// adds the Trojan-detection mode without any new pin.
//
// Input side: clock, enable and input pass through to the JTAG controller.
// The controller follows the TAP state from the pins with its own copy of
// the state machine. While the TAP is in Shift-IR it shifts the input line
// (LSB first) into an IR_W-bit instruction register, and at Update-IR it
// raises `trojan_enable` if the instruction is CS_OPCODE. Any other
// instruction, or Test-Logic-Reset, lowers it again.
// Output side: in Trojan mode each measurement y_ci that the measurement
// generator hands over (y_valid) is loaded into a BW_Y-bit register and sent
// LSB first on the JTAG output, one bit per cycle (tdo_valid marks the
// bits). Otherwise the JTAG output carries the tap buffer's scan output.
//
// From the architecture description: placement at the input side of the
// JTAG controller, the Trojan enable signal, no additional port, and the
// measurements returned through this controller. The instruction-register
// mechanism, the opcode and the serial bit order are this design's choices.
module cs_jtag_ctrl
  import cs_jtag_pkg::*;
#(
  parameter int unsigned BW_Y = 16
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            jtag_enable,
  input  logic            jtag_input,
  output logic            enable,
  output logic            input_bit,
  output logic            trojan_enable,
  input  logic [BW_Y-1:0] y_in,
  input  logic            y_valid,
  input  logic            scan_out,
  output logic            jtag_output,
  output logic            tdo_valid
);

  localparam int unsigned BC_W = $clog2(BW_Y + 1);

  tap_state_t      st;
  logic [IR_W-1:0] ir_sh;
  logic [BW_Y-1:0] ysr;
  logic [BC_W-1:0] bits_left;

  tap_fsm u_track (.clk, .rst_n, .tms(jtag_enable), .state(st));

  assign enable    = jtag_enable;
  assign input_bit = jtag_input;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ir_sh         <= '0;
      trojan_enable <= 1'b0;
    end else begin
      if (st == TAP_RESET)     trojan_enable <= 1'b0;
      if (st == TAP_SHIFT_IR)  ir_sh <= {jtag_input, ir_sh[IR_W-1:1]};
      if (st == TAP_UPDATE_IR) trojan_enable <= (ir_sh == CS_OPCODE);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ysr       <= '0;
      bits_left <= '0;
    end else if (y_valid && trojan_enable) begin
      ysr       <= y_in;
      bits_left <= BC_W'(BW_Y);
    end else if (bits_left != '0) begin
      ysr       <= ysr >> 1;
      bits_left <= bits_left - 1'b1;
    end
  end

  assign tdo_valid   = trojan_enable && (bits_left != '0);
  assign jtag_output = trojan_enable ? ysr[0] : scan_out;

endmodule
