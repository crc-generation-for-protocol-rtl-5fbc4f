// crc_r16_unit: configurable CRC unit for a protocol processor (top level).
//
// A CRC functional unit that a protocol processor configures for the CRC of
// the protocol at hand, then streams frames through at four bits per clock.
// It encodes (the transmitter reads the remainder S(x) of the message U(x)
// and appends it) and decodes (the receiver runs message and appended CRC
// through the same unit; a zero remainder means no error was detected).
//
//   configuration register  polynomial and degree, written with cfg_we; it
//                           holds the setting while frames are processed
//   crc_r16_engine          the radix-16 configurable CRC engine
//   crc_zero_check          the "remainder = 0" test of the receiver
//
// The engine, its 16/24/32-bit configurability and the zero test at the
// receiver follow the design. The configuration register and its write
// strobe are this design's choices; the design only gives a polynomial input.
//
// Interface (synchronous to the rising edge of clk, asynchronous reset):
//   cfg_we, cfg_len, cfg_poly  write degree and right-justified polynomial
//                              (x^(N-1)..x^0); used from the next cycle on.
//                              Reset value: N = 32, polynomial 0x04C11DB7.
//   init, init_val             preset the CRC register (start of a frame).
//   din_valid, din             one nibble per clock, din[3] first in time.
//   crc                        remainder, right-justified, the cycle after
//                              the nibble that produced it.
//   crc_zero                   crc is zero over the configured N bits.
//   cfg_len_q, seg_on          configured degree and the register segments
//                              in use (the others are shut down).
module crc_r16_unit
  import crc_pkg::*;
(
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  cfg_we,
  input  crc_len_e              cfg_len,
  input  logic [CRC_MAX_W-1:0]  cfg_poly,
  input  logic                  init,
  input  logic [CRC_MAX_W-1:0]  init_val,
  input  logic                  din_valid,
  input  logic [CRC_DIN_W-1:0]  din,
  output logic [CRC_MAX_W-1:0]  crc,
  output logic                  crc_zero,
  output crc_len_e              cfg_len_q,
  output logic [CRC_NSEG-1:0]   seg_on
);

  crc_cfg_t cfg_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cfg_q <= '{len: CRC_LEN_32, poly: 32'h04C1_1DB7};
    end else if (cfg_we) begin
      cfg_q <= '{len: cfg_len, poly: cfg_poly};
    end
  end

  assign cfg_len_q = cfg_q.len;

  crc_r16_engine u_engine (
    .clk       (clk),
    .rst_n     (rst_n),
    .len       (cfg_q.len),
    .poly      (cfg_q.poly),
    .init      (init),
    .init_val  (init_val),
    .din_valid (din_valid),
    .din       (din),
    .crc       (crc),
    .seg_on    (seg_on)
  );

  crc_zero_check u_zero (
    .crc  (crc),
    .len  (cfg_q.len),
    .zero (crc_zero)
  );

  // Reconfiguring in the middle of a frame would mix two polynomials.
  a_no_cfg_during_data: assert property (@(posedge clk) disable iff (!rst_n)
    cfg_we |-> !din_valid)
    else $error("crc_r16_unit: configuration written together with data");

endmodule
