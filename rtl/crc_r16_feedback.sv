// crc_r16_feedback: feedback logic of the radix-16 configurable CRC engine.
//
// A bit-serial CRC shift register (MSB first) consumes one data bit per
// clock: its feedback bit is the register MSB XOR the data bit, and that bit
// is switched onto every register position whose polynomial coefficient is 1.
// To consume DIN_W bits in one clock the serial steps are unrolled. Only the
// top DIN_W register bits can reach the MSB within DIN_W steps, so the DIN_W
// feedback bits depend on nothing else than those register bits, the input
// bits and the top DIN_W-1 polynomial coefficients:
//
//   f(s) = crc_top[D-1-s] ^ din[D-1-s] ^ XOR_{t<s} ( f(t) & poly_top[D-1-s+t] )
//
// where s = 0 is the first serial step and D = DIN_W. This is the block drawn
// as "Logic" next to the last four register bits in the design's block
// diagram; its insides are derived here from the serial register.
//
// Interface: purely combinational.
//   crc_top  register bits D_N..D_(N-D+1), crc_top[D-1] is the MSB D_N
//   din      input bits, din[D-1] is the first bit in time
//   poly_top polynomial coefficients x^(N-1)..x^(N-D+1), poly_top[D-2] = x^(N-1)
//   fb       feedback bits; fb[D-1] is the one of the first serial step, so
//            fb[j] is the term that the switch network adds under poly[k-j]
// The input width of 4 follows the design (radix 16); the index order is this
// design's choice.
module crc_r16_feedback #(
  parameter int unsigned DIN_W = 4
) (
  input  logic [DIN_W-1:0] crc_top,
  input  logic [DIN_W-1:0] din,
  input  logic [DIN_W-2:0] poly_top,
  output logic [DIN_W-1:0] fb
);

  logic [DIN_W-1:0] f;  // f[s]: feedback of serial step s

  always_comb begin
    f = '0;
    for (int s = 0; s < DIN_W; s++) begin
      f[s] = crc_top[DIN_W-1-s] ^ din[DIN_W-1-s];
      for (int t = 0; t < s; t++) begin
        f[s] = f[s] ^ (f[t] & poly_top[DIN_W-1-s+t]);
      end
    end
    for (int s = 0; s < DIN_W; s++) begin
      fb[DIN_W-1-s] = f[s];
    end
  end

endmodule
