// tb_crc_r16_switch_net: random test of the polynomial switch network.
//
// The expected next register value is formed word-wise, as the register
// shifted up by four XOR the polynomial shifted by j for every feedback bit
// fb[j] that is set, which is the same algebra as the per-bit NAND network
// written in a different form.
module tb_crc_r16_switch_net;

  logic [31:0] crc_q, poly, crc_d;
  logic [3:0]  fb;
  int checks = 0, failures = 0;

  crc_r16_switch_net #(.W(32), .DIN_W(4)) dut (
    .crc_q(crc_q), .poly(poly), .fb(fb), .crc_d(crc_d)
  );

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 4000; n++) begin
      logic [31:0] exp_d;
      crc_q = $urandom;
      poly  = $urandom;
      fb    = 4'($urandom);
      if (n < 16) begin  // every fb with sparse operands first
        fb = 4'(n); poly = 32'h8000_0001; crc_q = 32'h1;
      end
      exp_d = crc_q << 4;
      for (int j = 0; j < 4; j++) if (fb[j]) exp_d ^= poly << j;
      #1;
      checks++;
      if (crc_d !== exp_d) begin
        failures++;
        if (failures < 10)
          $display("FAIL q=%h p=%h fb=%h d=%h exp=%h", crc_q, poly, fb, crc_d, exp_d);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
