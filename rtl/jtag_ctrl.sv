// JTAG controller with the Trojan-detection behaviour.
//
// Its control outputs are Reset, Start, Get_reg, Shift_reg and Set_reg.
// In normal mode (trojan_en low) they decode the TAP state machine, which
// the enable line (TMS) steps: Reset = Test-Logic-Reset, Start =
// Run-Test/Idle, Get_reg = Capture-DR, Shift_reg = Shift-DR and Set_reg =
// Update-DR. These work the boundary-scan chain around the CUT: get the
// output data, shift the test vector, set the input register buffers.
//
// With trojan_en high, the same three outputs drive the three steps of
// compressive sensing. The run starts when the TAP enters Run-Test/Idle,
// and the outputs then act as follows:
//   Start     : one pulse. It clears the measurement generator and rewinds
//               the TVG.
//   Set_reg   : one pulse every R cycles, N_VEC times. Each pulse inserts
//               the TVG's next vector in parallel into the CUT input buffer.
//   Get_reg   : Set_reg delayed by one cycle. Each pulse has the LPS sample
//               the leakage power of the vector just applied.
//   Shift_reg : after a drain of R+3 cycles, one pulse every BW_Y cycles, M
//               times. Each pulse makes the MG hand over its next
//               measurement, which the CS-JTAG controller then shifts out one
//               bit per cycle.
// One run is made per visit to Run-Test/Idle. Leaving that state aborts it.
// `cs_busy` is high from Start until the readout phase ends. The serial
// output of the last word runs two cycles beyond that.
// From the architecture description: the five control outputs, the get,
// shift and set steps, and the use of the Trojan enable signal to switch
// the controller to the three-step detection process. The state-to-output
// decode and the Trojan-mode schedule are this design's choices.
module jtag_ctrl
  import cs_jtag_pkg::*;
#(
  parameter int unsigned N_VEC = 1 << DATA_W,
  parameter int unsigned R     = 1,
  parameter int unsigned M     = 64,
  parameter int unsigned BW_Y  = 16
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       enable,      // TMS
  input  logic       trojan_en,
  output tap_state_t state,
  output logic       reset,
  output logic       start,
  output logic       get_reg,
  output logic       shift_reg,
  output logic       set_reg,
  output logic       cs_busy
);

  typedef enum logic [2:0] {
    SEQ_IDLE, SEQ_START, SEQ_SENSE, SEQ_DRAIN, SEQ_OUT, SEQ_DONE
  } seq_t;

  localparam int unsigned DRAIN = R + 3;
  localparam int unsigned RC_W  = $clog2(R + 1);
  localparam int unsigned VC_W  = $clog2(N_VEC + 1);
  localparam int unsigned DC_W  = $clog2(DRAIN + 1);
  localparam int unsigned BC_W  = $clog2(BW_Y + 1);
  localparam int unsigned OC_W  = $clog2(M + 1);

  tap_fsm u_tap (.clk, .rst_n, .tms(enable), .state);

  seq_t            seq;
  logic [RC_W-1:0] rc;
  logic [VC_W-1:0] vc;
  logic [DC_W-1:0] dc;
  logic [BC_W-1:0] bc;
  logic [OC_W-1:0] oc;
  logic            cs_set, cs_get, cs_shift;

  assign cs_set   = (seq == SEQ_SENSE) && (rc == '0);
  assign cs_shift = (seq == SEQ_OUT)   && (bc == '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      seq    <= SEQ_IDLE;
      rc     <= '0;
      vc     <= '0;
      dc     <= '0;
      bc     <= '0;
      oc     <= '0;
      cs_get <= 1'b0;
    end else begin
      cs_get <= cs_set;
      if (!trojan_en || (state != TAP_IDLE && seq != SEQ_IDLE)) begin
        seq <= SEQ_IDLE;
      end else begin
        unique case (seq)
          SEQ_IDLE:  if (state == TAP_IDLE) seq <= SEQ_START;
          SEQ_START: begin
            seq <= SEQ_SENSE;
            rc  <= '0;
            vc  <= '0;
          end
          SEQ_SENSE: begin
            rc <= (rc == RC_W'(R - 1)) ? '0 : rc + 1'b1;
            if (rc == '0) begin
              vc <= vc + 1'b1;
              if (vc == VC_W'(N_VEC - 1)) begin
                seq <= SEQ_DRAIN;
                dc  <= '0;
              end
            end
          end
          SEQ_DRAIN: begin
            dc <= dc + 1'b1;
            if (dc == DC_W'(DRAIN - 1)) begin
              seq <= SEQ_OUT;
              bc  <= '0;
              oc  <= '0;
            end
          end
          SEQ_OUT: begin
            bc <= (bc == BC_W'(BW_Y - 1)) ? '0 : bc + 1'b1;
            if (bc == '0) oc <= oc + 1'b1;
            if (bc == BC_W'(BW_Y - 1) && oc == OC_W'(M)) seq <= SEQ_DONE;
          end
          SEQ_DONE:  ;
          default:   seq <= SEQ_IDLE;
        endcase
      end
    end
  end

  always_comb begin
    reset   = (state == TAP_RESET);
    cs_busy = (seq != SEQ_IDLE) && (seq != SEQ_DONE);
    if (trojan_en) begin
      start     = (seq == SEQ_START);
      set_reg   = cs_set;
      get_reg   = cs_get;
      shift_reg = cs_shift;
    end else begin
      start     = (state == TAP_IDLE);
      get_reg   = (state == TAP_CAPTURE_DR);
      shift_reg = (state == TAP_SHIFT_DR);
      set_reg   = (state == TAP_UPDATE_DR);
    end
  end

endmodule
