// crc_r16_engine: radix-16 configurable CRC engine.
//
// Computes the CRC of a bit stream, four bits per clock, for any generator
// polynomial g(x) of degree N = 16, 24 or 32 given at an input. It is the
// bit-serial CRC shift register with a switch on every reconnecting wire,
// unrolled four times:
//   - crc_r16_state_reg holds the 32-bit register, the CRC in its top N bits;
//   - crc_r16_feedback forms the four feedback bits from register bits
//     31..28, the input nibble and polynomial bits 31..29;
//   - crc_r16_switch_net makes bit k of the next value from bit k-4 and the
//     feedback bits switched in by the polynomial;
//   - crc_r16_shutdown switches off the unused low 8-bit segments for
//     N = 16 or 24 and gives the shift between right-justified and
//     MSB-aligned form.
// The structure (register, per-bit XOR of bit k-4, feedback logic fed by the
// last four bits, input data and polynomial, shut-down for 16/24/32) follows
// the design. Bit order within a nibble, the preset port, the right-justified
// ports and the handshake are this design's choices.
//
// Interface (synchronous to the rising edge of clk, asynchronous reset):
//   len, poly  degree N and coefficients x^(N-1)..x^0 of g(x), right-justified.
//              Both must be stable from init to the last nibble.
//   init       preset the register to init_val (right-justified) this cycle;
//              has priority over din_valid, whose nibble is then not taken.
//   din_valid  din holds a nibble; din[3] is the first bit of the stream
//              (most significant polynomial coefficient first).
//   crc        remainder after every nibble taken so far, right-justified,
//              bits at or above N read 0. It is updated at the clock edge
//              that takes a nibble, so one nibble per clock is sustained
//              and the CRC of a message is on crc the cycle after its last
//              nibble.
//   seg_on     which 8-bit register segments are in use (1) or shut down.
module crc_r16_engine
  import crc_pkg::*;
(
  input  logic                  clk,
  input  logic                  rst_n,
  input  crc_len_e              len,
  input  logic [CRC_MAX_W-1:0]  poly,
  input  logic                  init,
  input  logic [CRC_MAX_W-1:0]  init_val,
  input  logic                  din_valid,
  input  logic [CRC_DIN_W-1:0]  din,
  output logic [CRC_MAX_W-1:0]  crc,
  output logic [CRC_NSEG-1:0]   seg_on
);

  logic [CRC_MAX_W-1:0]         mask;
  logic [$clog2(CRC_MAX_W)-1:0] align;
  logic [CRC_MAX_W-1:0]         poly_a;   // MSB-aligned polynomial
  logic [CRC_MAX_W-1:0]         init_a;   // MSB-aligned preset value
  logic [CRC_MAX_W-1:0]         crc_q;    // register, unused segments read 0
  logic [CRC_MAX_W-1:0]         crc_d;    // next register value
  logic [CRC_DIN_W-1:0]         fb;

  crc_r16_shutdown u_shutdown (
    .len    (len),
    .seg_on (seg_on),
    .mask   (mask),
    .align  (align)
  );

  // Polynomial and preset moved up to the register MSB. Coefficients above
  // x^(N-1) are shifted out, so only the degree-N polynomial is used.
  assign poly_a = poly << align;
  assign init_a = init_val << align;

  crc_r16_feedback #(.DIN_W(CRC_DIN_W)) u_feedback (
    .crc_top  (crc_q[CRC_MAX_W-1 -: CRC_DIN_W]),
    .din      (din),
    .poly_top (poly_a[CRC_MAX_W-1 -: CRC_DIN_W-1]),
    .fb       (fb)
  );

  crc_r16_switch_net #(.W(CRC_MAX_W), .DIN_W(CRC_DIN_W)) u_switch (
    .crc_q (crc_q),
    .poly  (poly_a),
    .fb    (fb),
    .crc_d (crc_d)
  );

  crc_r16_state_reg #(.W(CRC_MAX_W), .SEG_W(CRC_SEG_W)) u_reg (
    .clk      (clk),
    .rst_n    (rst_n),
    .seg_on   (seg_on),
    .load     (init),
    .load_val (init_a),
    .upd      (din_valid),
    .d        (crc_d),
    .q        (crc_q)
  );

  assign crc = (crc_q & mask) >> align;

  // Only the three defined lengths may be configured.
  a_len_valid: assert property (@(posedge clk) disable iff (!rst_n)
    (init || din_valid) |-> len inside {CRC_LEN_16, CRC_LEN_24, CRC_LEN_32})
    else $error("crc_r16_engine: undefined polynomial length code %0d", len);

endmodule
