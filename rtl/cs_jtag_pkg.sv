// Shared types and constants of the CS-JTAG Trojan-detection architecture.
//
// tap_state_t   : the sixteen states of the IEEE 1149.1 test access port state
//                 machine, stepped by the JTAG "enable" line (TMS).
// cut_in_t      : one input vector of the circuit under test (64-bit seed, load
//                 bit, 16-bit data), as held in the tap buffer's input cells.
// CS_OPCODE     : the instruction that, shifted in through the instruction path,
//                 puts the chip in Trojan-detection (compressive sensing) mode.
//                 Its value and the instruction width are this design's choice.
package cs_jtag_pkg;

  typedef enum logic [3:0] {
    TAP_RESET      = 4'h0,  // Test-Logic-Reset
    TAP_IDLE       = 4'h1,  // Run-Test/Idle
    TAP_SEL_DR     = 4'h2,
    TAP_CAPTURE_DR = 4'h3,  // "get"
    TAP_SHIFT_DR   = 4'h4,  // "shift"
    TAP_EXIT1_DR   = 4'h5,
    TAP_PAUSE_DR   = 4'h6,
    TAP_EXIT2_DR   = 4'h7,
    TAP_UPDATE_DR  = 4'h8,  // "set"
    TAP_SEL_IR     = 4'h9,
    TAP_CAPTURE_IR = 4'hA,
    TAP_SHIFT_IR   = 4'hB,
    TAP_EXIT1_IR   = 4'hC,
    TAP_PAUSE_IR   = 4'hD,
    TAP_EXIT2_IR   = 4'hE,
    TAP_UPDATE_IR  = 4'hF
  } tap_state_t;

  // Next TAP state for the current state and the enable (TMS) bit.
  function automatic tap_state_t tap_next(tap_state_t s, logic tms);
    unique case (s)
      TAP_RESET:      return tms ? TAP_RESET     : TAP_IDLE;
      TAP_IDLE:       return tms ? TAP_SEL_DR    : TAP_IDLE;
      TAP_SEL_DR:     return tms ? TAP_SEL_IR    : TAP_CAPTURE_DR;
      TAP_CAPTURE_DR: return tms ? TAP_EXIT1_DR  : TAP_SHIFT_DR;
      TAP_SHIFT_DR:   return tms ? TAP_EXIT1_DR  : TAP_SHIFT_DR;
      TAP_EXIT1_DR:   return tms ? TAP_UPDATE_DR : TAP_PAUSE_DR;
      TAP_PAUSE_DR:   return tms ? TAP_EXIT2_DR  : TAP_PAUSE_DR;
      TAP_EXIT2_DR:   return tms ? TAP_UPDATE_DR : TAP_SHIFT_DR;
      TAP_UPDATE_DR:  return tms ? TAP_SEL_DR    : TAP_IDLE;
      TAP_SEL_IR:     return tms ? TAP_RESET     : TAP_CAPTURE_IR;
      TAP_CAPTURE_IR: return tms ? TAP_EXIT1_IR  : TAP_SHIFT_IR;
      TAP_SHIFT_IR:   return tms ? TAP_EXIT1_IR  : TAP_SHIFT_IR;
      TAP_EXIT1_IR:   return tms ? TAP_UPDATE_IR : TAP_PAUSE_IR;
      TAP_PAUSE_IR:   return tms ? TAP_EXIT2_IR  : TAP_PAUSE_IR;
      TAP_EXIT2_IR:   return tms ? TAP_UPDATE_IR : TAP_SHIFT_IR;
      TAP_UPDATE_IR:  return tms ? TAP_SEL_DR    : TAP_IDLE;
      default:        return TAP_RESET;
    endcase
  endfunction

  localparam int unsigned SEED_W   = 64;  // CUT pseudo random generator seed
  localparam int unsigned DATA_W   = 16;  // CUT data input
  localparam int unsigned RESULT_W = 48;  // CUT result: 16-bit cipher + CRC-32

  typedef struct packed {
    logic [SEED_W-1:0] seed;
    logic              load;
    logic [DATA_W-1:0] data;
  } cut_in_t;

  localparam int unsigned CUT_IN_W = $bits(cut_in_t);

  localparam int unsigned IR_W      = 4;
  localparam logic [IR_W-1:0] CS_OPCODE = 4'b1010;

endpackage
