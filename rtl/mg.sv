// Measurement generator (MG): computes the M compressive measurements
//   y_ci = sum_j phi_ij * (x_cj - x_ref),   phi_ij in {+1, -1}
// of a stream of N leakage-power samples on the fly.
//
// Structure (as in the architecture): H = ceil(M / R) lanes, each made of a
// circular shift register (CSR) of R partial-sum words, an LFSR and a
// selective adder. R is the frequency ratio floor(f_MG / f_LPS): after each
// sample the MG has R clock cycles. In cycle t of a sample, lane k works on
// the row t*H + k: the word at the head of its CSR is read, the selected
// summand (+x or -x, chosen by the lane's LFSR bit) is added, and the sum is
// written at the tail while the CSR shifts by one. After R cycles every word
// has been updated once and each CSR is back in its original alignment.
// Each sample is first biased by x_ref, a reference in the middle of the
// leakage range, so that the partial sums stay small.
//
// After the last sample, each shift_out pulse presents the next measurement
// on y_out (with y_valid one cycle later), in the order y_c1 .. y_cM: the
// output multiplexer walks the H CSR heads, then all CSRs rotate by one.
//
// Interface and timing:
//   clear     : one-cycle pulse; zeroes all partial sums and loads each lane
//               LFSR with a seed derived from `seed` and the lane index.
//   x_valid/x : one sample; the sample is registered and processed in the R
//               cycles that follow, so samples may arrive every R cycles.
//   shift_out : request the next measurement (ignored once M were given).
// Choices of this design, not taken from the architecture description: the
// LFSR polynomial and width, the per-lane seeding, the sign coding (LFSR bit
// 0 selects +x, 1 selects -x), the one-cycle input register, and the
// two's-complement wrap-around of the BW_Y-bit partial sums.
module mg
  import cs_jtag_pkg::*;
#(
  parameter int unsigned M      = 64,  // number of measurements
  parameter int unsigned R      = 1,   // frequency ratio floor(f_MG/f_LPS)
  parameter int unsigned BW_X   = 10,  // ADC sample width
  parameter int unsigned BW_Y   = 16,  // measurement width BW(y_ci)
  parameter int unsigned LFSR_W = 32
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   clear,
  input  logic [LFSR_W-1:0]      seed,
  input  logic                   x_valid,
  input  logic [BW_X-1:0]        x,
  input  logic [BW_X-1:0]        x_ref,
  output logic                   busy,
  input  logic                   shift_out,
  output logic signed [BW_Y-1:0] y_out,
  output logic                   y_valid,
  output logic                   y_last
);

  localparam int unsigned H     = (M + R - 1) / R;        // parallelism ratio
  localparam int unsigned T_W   = (R > 1) ? $clog2(R) : 1;
  localparam int unsigned K_W   = (H > 1) ? $clog2(H) : 1;
  localparam int unsigned CNT_W = $clog2(M + 1);
  localparam logic [LFSR_W-1:0] LFSR_MASK = LFSR_W'(64'h0000_0000_8020_0003);

  // Galois LFSR step (x^32 + x^22 + x^2 + x + 1 for the default width).
  function automatic logic [LFSR_W-1:0] lfsr_step(logic [LFSR_W-1:0] s);
    return s[0] ? ((s >> 1) ^ LFSR_MASK) : (s >> 1);
  endfunction

  function automatic logic [LFSR_W-1:0] lane_seed(logic [LFSR_W-1:0] s, int unsigned k);
    logic [LFSR_W-1:0] v;
    v = s ^ LFSR_W'((64'(k) + 64'd1) * 64'h9E37_79B9);
    return (v == '0) ? LFSR_W'(1) : v;
  endfunction

  logic signed [BW_Y-1:0] csr  [H][R];
  logic [LFSR_W-1:0]      lfsr [H];
  logic signed [BW_X:0]   xb;          // biased sample being processed
  logic                   act;
  logic [T_W-1:0]         t;
  logic [K_W-1:0]         ok;          // output lane pointer
  logic [CNT_W-1:0]       out_cnt;

  logic signed [BW_X:0]   x_bias;
  logic signed [BW_Y-1:0] xe;
  assign x_bias = signed'({1'b0, x}) - signed'({1'b0, x_ref});
  assign xe     = BW_Y'(xb);
  assign busy   = act;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      act <= 1'b0;
      t   <= '0;
      xb  <= '0;
    end else if (clear) begin
      act <= 1'b0;
      t   <= '0;
    end else if (x_valid) begin
      xb  <= x_bias;
      act <= 1'b1;
      t   <= '0;
    end else if (act) begin
      if (t == T_W'(R - 1)) act <= 1'b0;
      t <= t + 1'b1;
    end
  end

  logic do_out, rotate;
  assign do_out = shift_out && !act && (out_cnt != CNT_W'(M));
  assign rotate = do_out && (ok == K_W'(H - 1));

  for (genvar k = 0; k < H; k++) begin : g_lane
    logic signed [BW_Y-1:0] sum;
    assign sum = lfsr[k][0] ? (csr[k][0] - xe) : (csr[k][0] + xe);

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        for (int j = 0; j < R; j++) csr[k][j] <= '0;
        lfsr[k] <= lane_seed('0, k);
      end else if (clear) begin
        for (int j = 0; j < R; j++) csr[k][j] <= '0;
        lfsr[k] <= lane_seed(seed, k);
      end else if (act) begin
        for (int j = 0; j + 1 < R; j++) csr[k][j] <= csr[k][j+1];
        csr[k][R-1] <= sum;
        lfsr[k]     <= lfsr_step(lfsr[k]);
      end else if (rotate) begin
        for (int j = 0; j + 1 < R; j++) csr[k][j] <= csr[k][j+1];
        csr[k][R-1] <= csr[k][0];
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ok      <= '0;
      out_cnt <= '0;
      y_out   <= '0;
      y_valid <= 1'b0;
      y_last  <= 1'b0;
    end else begin
      y_valid <= 1'b0;
      y_last  <= 1'b0;
      if (clear) begin
        ok      <= '0;
        out_cnt <= '0;
      end else if (do_out) begin
        y_out   <= csr[ok][0];
        y_valid <= 1'b1;
        y_last  <= (out_cnt == CNT_W'(M - 1));
        out_cnt <= out_cnt + 1'b1;
        ok      <= rotate ? '0 : ok + 1'b1;
      end
    end
  end

  // A new sample may only arrive in the last processing cycle of the previous one.
  assert property (@(posedge clk) disable iff (!rst_n)
                   x_valid |-> (!act || t == T_W'(R - 1)))
    else $error("mg: sample arrived while the previous one was still being processed");

endmodule
