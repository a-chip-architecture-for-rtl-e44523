// Test vector generator (TVG): produces the N test vectors v_1 .. v_N that
// are applied to the circuit under test during a Trojan-detection run, so
// that no test vector has to be fed into the chip.
//
// The vectors are exhaustive over the 16-bit data input: v_i carries data
// i-1, counting up from 0 to N-1. The 64-bit seed is a constant (SEED) and
// the load bit is set on the first vector only, so every run starts the
// CUT's random generator from the same state.
//
// Interface and timing: `vec` always shows the next vector. `start` (one
// cycle) rewinds to v_1. Each `apply` pulse consumes the vector shown in that
// cycle (the tap buffer copies it in parallel into the CUT input buffer in
// the same cycle) and advances; `last` marks the apply of v_N and `done`
// stays high afterwards, when further applies are ignored.
// From the architecture description: N on-chip vectors, exhaustive over the
// 16-bit data with a constant 64-bit seed, one vector per sample period.
// This design's choices: counting order, the load on the first vector, the
// SEED value.
module tvg
  import cs_jtag_pkg::*;
#(
  parameter int unsigned       N_VEC = 1 << DATA_W,
  parameter logic [SEED_W-1:0] SEED  = 64'h0123_4567_89AB_CDEF
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    start,
  input  logic    apply,
  output cut_in_t vec,
  output logic    last,
  output logic    done
);

  localparam int unsigned IW = $clog2(N_VEC + 1);
  logic [IW-1:0] idx;

  assign vec.seed = SEED;
  assign vec.load = (idx == '0);
  assign vec.data = DATA_W'(idx);
  assign last     = apply && !done && (idx == IW'(N_VEC - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      idx  <= '0;
      done <= 1'b0;
    end else if (start) begin
      idx  <= '0;
      done <= 1'b0;
    end else if (apply && !done) begin
      idx <= idx + 1'b1;
      if (idx == IW'(N_VEC - 1)) done <= 1'b1;
    end
  end

endmodule
