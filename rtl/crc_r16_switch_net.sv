// crc_r16_switch_net: polynomial switch network of the radix-16 CRC engine.
//
// The design's central observation is that a shift register with a switch on
// every reconnecting wire can represent any polynomial of a given degree: the
// switch at position k is closed when coefficient k of the polynomial is 1.
// With DIN_W bits consumed per clock, register bit k takes bit k-DIN_W of the
// present value (the bit DIN_W places lower, shifted up) and XORs in each of
// the DIN_W feedback bits through the switch of the matching coefficient:
//
//   crc_d[k] = crc_q[k-D] ^ XOR_{j=0..D-1} ( fb[j] & poly[k-j] )
//
// with bits of negative index taken as 0 and D = DIN_W. As in the design, the
// switches are NAND gates: each term is formed as ~(fb[j] & poly[k-j]). For an
// even number of terms per bit (DIN_W = 4) the inversions cancel in the XOR;
// for an odd DIN_W one inversion is added back.
//
// Interface: purely combinational. crc_q, poly and crc_d are MSB-aligned: the
// CRC of degree N occupies bits W-1..W-N, and poly holds x^(N-1)..x^0 of g(x)
// in the same positions (the x^N term is implicit). fb comes from
// crc_r16_feedback.
module crc_r16_switch_net #(
  parameter int unsigned W     = 32,
  parameter int unsigned DIN_W = 4
) (
  input  logic [W-1:0]     crc_q,
  input  logic [W-1:0]     poly,
  input  logic [DIN_W-1:0] fb,
  output logic [W-1:0]     crc_d
);

  // A constant 1 when DIN_W is odd restores the parity lost to the NANDs.
  localparam logic PARITY_FIX = logic'(DIN_W % 2);

  always_comb begin
    for (int k = 0; k < int'(W); k++) begin
      logic acc;
      acc = (k >= int'(DIN_W)) ? crc_q[k-int'(DIN_W)] : 1'b0;
      for (int j = 0; j < int'(DIN_W); j++) begin
        logic p;
        p   = (k - j >= 0) ? poly[k-j] : 1'b0;
        acc = acc ^ ~(fb[j] & p);   // switch: NAND of feedback and coefficient
      end
      crc_d[k] = acc ^ PARITY_FIX;
    end
  end

endmodule
