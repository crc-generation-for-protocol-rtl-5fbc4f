// crc_pkg: shared types and constants of the radix-16 configurable CRC unit.
//
// The unit computes a CRC over a stream of 4-bit nibbles for any generator
// polynomial of degree 16, 24 or 32. The register is 32 bits wide and the
// active CRC always sits in its most significant bits, so the feedback taps
// are fixed at bits 31..28; the bits below an active length are switched off
// in 8-bit segments. The three lengths and the 4-bit input width follow the
// design description; the segment size of 8 bits and the length encoding are
// this design's own choices.
package crc_pkg;

  // Widest polynomial degree the unit supports.
  localparam int unsigned CRC_MAX_W = 32;
  // Input bits consumed per clock (radix 16 = 2^4).
  localparam int unsigned CRC_DIN_W = 4;
  // Width of one shut-down segment of the CRC register.
  localparam int unsigned CRC_SEG_W = 8;
  // Number of segments in the register.
  localparam int unsigned CRC_NSEG  = CRC_MAX_W / CRC_SEG_W;

  // Configured polynomial degree N.
  typedef enum logic [1:0] {
    CRC_LEN_16 = 2'd0,
    CRC_LEN_24 = 2'd1,
    CRC_LEN_32 = 2'd2
  } crc_len_e;

  // Configuration of the unit as held in its configuration register.
  typedef struct packed {
    crc_len_e               len;   // polynomial degree N
    logic [CRC_MAX_W-1:0]   poly;  // g(x) coefficients x^(N-1)..x^0, right-justified
  } crc_cfg_t;

endpackage
