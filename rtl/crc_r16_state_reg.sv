// crc_r16_state_reg: the CRC state register of the radix-16 engine.
//
// W delay elements, grouped in segments of SEG_W bits. Each segment has its
// own clock enable, the AND of its seg_on bit with the register's update or
// preset request, so a segment switched off by the shut-down logic is never
// clocked and keeps its last value. The register output is isolated: bits of
// an unused segment read as 0, so the bit above them sees a 0 when it takes
// "bit k-4" in the switch network.
//
// Interface and timing (all synchronous to the rising edge of clk):
//   rst_n    asynchronous active-low reset, clears every bit
//   seg_on   segment in use (from crc_r16_shutdown), constant while a CRC runs
//   load     preset: q <= load_val in every active segment (has priority)
//   upd      advance: q <= d in every active segment
//   q        register contents, unused segments read as 0
// The register is the design's; the segmented enables, the isolation and the
// preset port are this design's way of realising its shut-down logic and its
// start value.
module crc_r16_state_reg #(
  parameter int unsigned W     = 32,
  parameter int unsigned SEG_W = 8
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [W/SEG_W-1:0] seg_on,
  input  logic               load,
  input  logic [W-1:0]       load_val,
  input  logic               upd,
  input  logic [W-1:0]       d,
  output logic [W-1:0]       q
);

  localparam int unsigned NSEG = W / SEG_W;

  logic [W-1:0] r;

  for (genvar i = 0; i < int'(NSEG); i++) begin : g_seg
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        r[i*SEG_W +: SEG_W] <= '0;
      end else if (seg_on[i] && load) begin
        r[i*SEG_W +: SEG_W] <= load_val[i*SEG_W +: SEG_W];
      end else if (seg_on[i] && upd) begin
        r[i*SEG_W +: SEG_W] <= d[i*SEG_W +: SEG_W];
      end
    end
    assign q[i*SEG_W +: SEG_W] = r[i*SEG_W +: SEG_W] & {SEG_W{seg_on[i]}};
  end

endmodule
