// Behavioural model (not synthesizable) of the leakage power sensor (LPS).
//
// The real sensor is analog: a current mirror copies the CUT's leakage
// current I_o into I' = I_o, which flows through a fixed resistor R; an
// opamp A buffers the voltage drop V+ - V- = I' * R and drives an ADC that
// converts it once per sample. The leakage power follows as
// P_L = VDD * (V+ - V-) / R. Here the analog part is reduced to that
// arithmetic on a `real` current, and the ADC to an ideal quantiser with
// clamping.
//
// Interface and timing: `i_leak` is the CUT supply leakage current in amperes.
// A one-cycle `sample` pulse converts the current present in that cycle;
// the code appears on `code` with `valid` high in the next cycle.
// `p_leak_w` shows the power the code stands for (for observation).
// From the architecture description: mirror, resistor, opamp and ADC, and
// one conversion per test vector. The 10-bit resolution follows from the
// document's output-bandwidth figures (N samples of 10 bits). The values of
// R, VDD, full scale and gain are this model's choices, picked so that a
// leakage power around 18 uW falls in the middle of the ADC range.
module lps #(
  parameter int unsigned ADC_BITS = 10,
  parameter real         R_OHM    = 25.0e3,  // sense resistor
  parameter real         VDD      = 1.0,     // supply voltage
  parameter real         GAIN     = 1.0,     // opamp A voltage gain
  parameter real         V_FS     = 0.9      // ADC full-scale input
) (
  input  logic                clk,
  input  logic                rst_n,
  input  real                 i_leak,
  input  logic                sample,
  output logic [ADC_BITS-1:0] code,
  output logic                valid,
  output real                 p_leak_w
);

  localparam real LEVELS = real'(64'd1 << ADC_BITS);

  real i_mirror, v_drop, v_adc, q;
  always_comb begin
    i_mirror = i_leak;              // current mirror, I' = I_o
    v_drop   = i_mirror * R_OHM;    // V+ - V- = I' R
    v_adc    = v_drop * GAIN;       // opamp A
    q        = v_adc / V_FS * LEVELS;
  end

  function automatic logic [ADC_BITS-1:0] quantise(real v);
    if (v <= 0.0) return '0;
    if (v >= LEVELS - 1.0) return {ADC_BITS{1'b1}};
    return ADC_BITS'($rtoi(v));
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      code  <= '0;
      valid <= 1'b0;
    end else begin
      valid <= sample;
      if (sample) code <= quantise(q);
    end
  end

  // P_L = VDD (V+ - V-) / R, from the converted code
  assign p_leak_w = VDD * (real'(code) + 0.5) / LEVELS * V_FS / GAIN / R_OHM;

endmodule
