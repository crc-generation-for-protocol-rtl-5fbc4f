// tb_crc_r16_feedback: exhaustive test of the radix-16 feedback logic.
//
// For all 2^11 combinations of the four top register bits, the input nibble
// and the three top polynomial bits, the expected feedback bits are taken
// from four steps of a bit-serial register (crc_ref_pkg): the feedback of a
// serial step is its register MSB XOR its data bit. The lower register and
// polynomial bits are filled at random; they must not matter.
module tb_crc_r16_feedback;
  import crc_ref_pkg::*;

  logic [3:0] crc_top, din, fb;
  logic [2:0] poly_top;
  int checks = 0, failures = 0;

  crc_r16_feedback #(.DIN_W(4)) dut (
    .crc_top(crc_top), .din(din), .poly_top(poly_top), .fb(fb)
  );

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 2048; v++) begin
      logic [31:0] c, p;
      logic [3:0]  exp_fb;
      {crc_top, din, poly_top} = 11'(v);
      c = {crc_top, 28'($urandom)};
      p = {poly_top, 29'($urandom)};
      for (int i = 3; i >= 0; i--) begin
        exp_fb[i] = c[31] ^ din[i];
        c = ref_bit(c, p, 32, din[i]);
      end
      #1;
      checks++;
      if (fb !== exp_fb) begin
        failures++;
        if (failures < 10)
          $display("FAIL top=%h din=%h ptop=%h fb=%h exp=%h", crc_top, din, poly_top, fb, exp_fb);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
