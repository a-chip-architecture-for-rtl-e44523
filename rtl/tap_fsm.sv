// Test access port state machine: the sixteen-state IEEE 1149.1 controller
// stepped by the JTAG "enable" line (TMS) on every clock. Used by the JTAG
// controller, and tracked a second time by the CS-JTAG controller so that it
// can follow the instruction path from the pins alone.
// Asynchronous reset (and five clocks with enable high) lead to Test-Logic-Reset.
module tap_fsm
  import cs_jtag_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       tms,
  output tap_state_t state
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) state <= TAP_RESET;
    else        state <= tap_next(state, tms);
  end

endmodule
