// Trojan-embedded circuit under test: a small encryption circuit that serves
// as the test subject of the Trojan-detection architecture.
//
// A 64-bit LFSR produces a pseudo random number whose low 16 bits are XORed
// with the 16-bit data input (the cipher); a CRC-32 is accumulated over the
// cipher words. The 48-bit result is {cipher, CRC}. When `load` is high the
// LFSR is loaded with `seed` instead of stepping.
// The Trojan watches the data input; when it sees its trigger pattern it
// replaces the seed with a modified seed and forces the load control, which
// silently re-keys the random generator and so corrupts the cipher from
// then on. With TROJAN = 0 the Trojan is removed and seed and load pass
// straight through, giving the Trojan-free reference circuit.
//
// Timing: one step per cycle in which `en` is high; result is registered.
// From the architecture description: the 64-bit seed, 1-bit load, 16-bit
// data, LFSR-based XOR cipher, CRC-32, 48-bit result, and a Trojan triggered
// by an input pattern that alters seed and load. This design's own choices:
// the LFSR taps (64,63,61,60), the CRC-32 polynomial 0x04C11DB7 processed
// MSB first from 0xFFFFFFFF without final inversion, the trigger pattern, the
// modified seed (bitwise inverse of the seed) and the reset values.
module trojan_cut
  import cs_jtag_pkg::*;
#(
  parameter bit                 TROJAN     = 1'b1,
  parameter logic [DATA_W-1:0]  TRIGGER    = 16'hA5C3,
  parameter logic [SEED_W-1:0]  RESET_SEED = 64'h0123_4567_89AB_CDEF
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                en,
  input  logic [SEED_W-1:0]   seed,
  input  logic                load,
  input  logic [DATA_W-1:0]   data,
  output logic [RESULT_W-1:0] result,
  output logic                trojan_fired  // Trojan trigger seen (observation only)
);

  localparam logic [31:0] CRC_POLY = 32'h04C1_1DB7;

  function automatic logic [31:0] crc32_step16(logic [31:0] c, logic [15:0] d);
    for (int i = 15; i >= 0; i--)
      c = (c[31] ^ d[i]) ? ((c << 1) ^ CRC_POLY) : (c << 1);
    return c;
  endfunction

  // Trojan: trigger on the data pattern, then modify seed and load.
  logic              trig;
  logic [SEED_W-1:0] seed_m;
  logic              load_m;
  assign trig   = TROJAN && (data == TRIGGER);
  assign seed_m = trig ? ~seed : seed;
  assign load_m = trig ? 1'b1  : load;

  logic [SEED_W-1:0] prng;
  logic [DATA_W-1:0] cipher;
  logic [31:0]       crc;
  logic [DATA_W-1:0] cipher_q;
  logic              fb;

  assign fb     = prng[63] ^ prng[62] ^ prng[60] ^ prng[59];
  assign cipher = data ^ prng[DATA_W-1:0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      prng         <= RESET_SEED;
      crc          <= 32'hFFFF_FFFF;
      cipher_q     <= '0;
      trojan_fired <= 1'b0;
    end else if (en) begin
      prng     <= load_m ? seed_m : {prng[62:0], fb};
      cipher_q <= cipher;
      crc      <= crc32_step16(crc, cipher);
      if (trig) trojan_fired <= 1'b1;
    end
  end

  assign result = {cipher_q, crc};

endmodule
