// crc_zero_check: remainder-is-zero detector of the receiving side.
//
// When a received codeword (message followed by its CRC) is run through the
// CRC generator, the remainder is zero if no error was detected. This block
// reports that condition over the active polynomial length only: bits of the
// right-justified remainder at or above N are ignored.
//
// Interface: purely combinational.
//   crc   remainder, right-justified (bit 0 is the x^0 coefficient)
//   len   configured polynomial degree N
//   zero  1 when crc[N-1:0] is all zeros
// The zero test is the design's; its restriction to the active length is this
// design's choice.
module crc_zero_check
  import crc_pkg::*;
(
  input  logic [CRC_MAX_W-1:0] crc,
  input  crc_len_e             len,
  output logic                 zero
);

  logic [CRC_MAX_W-1:0] active;

  always_comb begin
    unique case (len)
      CRC_LEN_16: active = 32'h0000_FFFF;
      CRC_LEN_24: active = 32'h00FF_FFFF;
      default:    active = 32'hFFFF_FFFF;
    endcase
    zero = ~|(crc & active);
  end

endmodule
