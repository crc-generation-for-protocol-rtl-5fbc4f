// tb_crc_r16_shutdown: checks the length decode of the shut-down logic.
//
// For N = 16, 24 and 32 the segments in use, the bit mask and the alignment
// shift are compared with values written from the register layout: the CRC
// occupies the top N of 32 bits, in 8-bit segments.
module tb_crc_r16_shutdown;
  import crc_pkg::*;

  crc_len_e    len;
  logic [3:0]  seg_on;
  logic [31:0] mask;
  logic [4:0]  align;
  int checks = 0, failures = 0;

  crc_r16_shutdown dut (.len(len), .seg_on(seg_on), .mask(mask), .align(align));

  task automatic check(crc_len_e l, int n);
    logic [31:0] exp_mask;
    len = l;
    #1;
    exp_mask = ~((32'd1 << (32 - n)) - 32'd1);
    if (n == 32) exp_mask = '1;
    checks += 3;
    if (mask !== exp_mask) begin failures++; $display("FAIL mask n=%0d %h", n, mask); end
    if (int'(align) != 32 - n) begin failures++; $display("FAIL align n=%0d %0d", n, align); end
    for (int s = 0; s < 4; s++) begin
      checks++;
      if (seg_on[s] !== (s * 8 >= 32 - n)) begin
        failures++; $display("FAIL seg_on n=%0d %b", n, seg_on);
      end
    end
  endtask

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(CRC_LEN_16, 16);
    check(CRC_LEN_24, 24);
    check(CRC_LEN_32, 32);
    check(CRC_LEN_16, 16);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
