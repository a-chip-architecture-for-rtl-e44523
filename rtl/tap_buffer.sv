// Tap buffer: the boundary-scan register chain around the circuit under
// test, worked by the JTAG controller's three steps.
//
// The chain has one cell per CUT input (seed, load, data: CUT_IN_W cells)
// and one per CUT output (RESULT_W cells). From the serial input, the input
// cells come first and the output cells last, so bit 0 of the result is the
// first bit out. `get` captures the CUT's present inputs and outputs into
// the chain, `shift` moves the chain one bit (tdi in, tdo out), `set` copies
// the input cells into the input register buffer. While `test_mode` is high
// that buffer, not the chip pins, drives the CUT.
// For Trojan detection the buffer is also loaded in parallel: `par_load`
// writes `par_vec` (the TVG's vector) straight into the input register
// buffer in one cycle, without shifting.
//
// Timing: all three steps and the parallel load take effect at the clock
// edge; tdo is the chain's last cell (registered).
// From the architecture description: a scan chain around the CUT with get,
// shift and set steps, and parallel test vector insertion. Cell order, the
// capture of the input pins, and output pins that always follow the CUT
// are this design's choices.
module tap_buffer
  import cs_jtag_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  input  logic                test_mode,
  input  logic                tdi,
  output logic                tdo,
  input  logic                get,
  input  logic                shift,
  input  logic                set,
  input  logic                par_load,
  input  cut_in_t             par_vec,
  input  cut_in_t             pin_in,
  output cut_in_t             cut_in,
  input  logic [RESULT_W-1:0] cut_out
);

  localparam int unsigned L = CUT_IN_W + RESULT_W;

  logic [L-1:0] chain;   // [RESULT_W-1:0] output cells, above them input cells
  cut_in_t      upd;     // input register buffer

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      chain <= '0;
      upd   <= '0;
    end else begin
      if (get)        chain <= {cut_in, cut_out};
      else if (shift) chain <= {tdi, chain[L-1:1]};
      if (par_load)   upd <= par_vec;
      else if (set)   upd <= cut_in_t'(chain[L-1:RESULT_W]);
    end
  end

  assign tdo    = chain[0];
  assign cut_in = test_mode ? upd : pin_in;

  assert property (@(posedge clk) disable iff (!rst_n) !(get && shift))
    else $error("tap_buffer: get and shift in the same cycle");

endmodule
