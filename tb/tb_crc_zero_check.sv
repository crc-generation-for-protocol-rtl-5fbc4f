// tb_crc_zero_check: checks the zero-remainder detector at every length.
//
// Zero and single-bit remainders are applied for each length; a set bit
// inside the N active bits must clear the flag, one above them must not.
module tb_crc_zero_check;
  import crc_pkg::*;

  logic [31:0] crc;
  crc_len_e    len;
  logic        zero;
  int checks = 0, failures = 0;

  crc_zero_check dut (.crc(crc), .len(len), .zero(zero));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    crc_len_e lens[3] = '{CRC_LEN_16, CRC_LEN_24, CRC_LEN_32};
    int       ns[3]   = '{16, 24, 32};
    for (int l = 0; l < 3; l++) begin
      len = lens[l];
      crc = '0;
      #1; checks++;
      if (zero !== 1'b1) begin failures++; $display("FAIL zero n=%0d", ns[l]); end
      for (int b = 0; b < 32; b++) begin
        crc = 32'd1 << b;
        #1; checks++;
        if (zero !== (b >= ns[l])) begin
          failures++; $display("FAIL n=%0d bit=%0d zero=%b", ns[l], b, zero);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
