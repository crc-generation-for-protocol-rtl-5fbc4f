// crc_r16_shutdown: shut-down logic that sets the polynomial degree N.
//
// The CRC register is CRC_MAX_W (32) bits wide and the active CRC occupies
// its top N bits, so the feedback taps never move. For N = 24 the lowest
// 8-bit segment is unused, for N = 16 the lowest two. This block decodes the
// configured length into
//   seg_on  one bit per 8-bit register segment: 1 if the segment is in use.
//           An unused segment is never clocked (its enable stays low), so it
//           does not toggle, and its outputs are isolated to 0.
//   mask    one bit per register bit, the bitwise expansion of seg_on.
//   align   number of unused low bits (0, 8 or 16), used to move polynomial,
//           preset and result between right-justified and MSB-aligned form.
// The three lengths come from the design; doing the shut-down per 8-bit
// segment and aligning the CRC to the register MSB are this design's choices.
//
// Interface: purely combinational. The length code 2'b11 is not a valid
// length; it is decoded as N = 32 (the engine asserts it never occurs).
module crc_r16_shutdown
  import crc_pkg::*;
(
  input  crc_len_e                      len,
  output logic [CRC_NSEG-1:0]           seg_on,
  output logic [CRC_MAX_W-1:0]          mask,
  output logic [$clog2(CRC_MAX_W)-1:0]  align
);

  always_comb begin
    align = '0;
    unique case (len)
      CRC_LEN_16: begin seg_on = 4'b1100; align = 5'd16; end
      CRC_LEN_24: begin seg_on = 4'b1110; align = 5'd8;  end
      default:    begin seg_on = 4'b1111; align = 5'd0;  end
    endcase
    for (int i = 0; i < int'(CRC_MAX_W); i++) begin
      mask[i] = seg_on[i / int'(CRC_SEG_W)];
    end
  end

endmodule
