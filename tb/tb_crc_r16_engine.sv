// tb_crc_r16_engine: self-checking test of the radix-16 configurable CRC engine.
//
// 1. Published check values over the ASCII string "123456789":
//    CRC-16/CCITT-FALSE 0x29B1, CRC-24/OPENPGP 0x21CF02, CRC-32/BZIP2
//    0xFC891918 (MSB first) and the Ethernet CRC-32 0xCBF43926 (reflected:
//    each byte fed LSB first, result reflected and inverted).
// 2. Random polynomials, preset values and messages at all three lengths,
//    with random idle cycles between nibbles, against the bit-serial model
//    of crc_ref_pkg after every nibble.
// 3. Rate and latency: a message of M nibbles sent back to back takes M
//    clocks, and its CRC is on the output the cycle after the last nibble.
module tb_crc_r16_engine;
  import crc_pkg::*;
  import crc_ref_pkg::*;

  logic        clk = 0, rst_n = 0;
  crc_len_e    len;
  logic [31:0] poly, init_val, crc;
  logic        init, din_valid;
  logic [3:0]  din;
  logic [3:0]  seg_on;
  int checks = 0, failures = 0;

  crc_r16_engine dut (
    .clk(clk), .rst_n(rst_n), .len(len), .poly(poly), .init(init),
    .init_val(init_val), .din_valid(din_valid), .din(din), .crc(crc),
    .seg_on(seg_on)
  );

  always #5 clk = ~clk;

  function automatic int len_n(crc_len_e l);
    return (l == CRC_LEN_16) ? 16 : (l == CRC_LEN_24) ? 24 : 32;
  endfunction

  task automatic expect_eq(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  task automatic start(crc_len_e l, logic [31:0] p, logic [31:0] iv);
    @(negedge clk);
    len = l; poly = p; init_val = iv; init = 1; din_valid = 0;
    @(negedge clk);
    init = 0;
  endtask

  task automatic send(logic [3:0] nib);
    din = nib; din_valid = 1;
    @(negedge clk);
    din_valid = 0;
  endtask

  // "123456789", MSB-first nibbles (msb = 1) or Ethernet bit order (msb = 0).
  task automatic send_check_string(bit msb);
    for (int i = 0; i < 9; i++) begin
      logic [7:0] b;
      b = 8'h31 + 8'(i);
      if (msb) begin send(b[7:4]); send(b[3:0]); end
      else begin
        send({b[0], b[1], b[2], b[3]});
        send({b[4], b[5], b[6], b[7]});
      end
    end
  endtask

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    len = CRC_LEN_32; poly = '0; init_val = '0; init = 0; din_valid = 0; din = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;

    // 1. Check values.
    start(CRC_LEN_16, 32'h1021, 32'hFFFF);
    send_check_string(1);
    expect_eq("CRC-16/CCITT-FALSE", crc, 32'h29B1);
    expect_eq("seg_on N=16", 32'(seg_on), 32'hC);
    start(CRC_LEN_24, 32'h864CFB, 32'hB704CE);
    send_check_string(1);
    expect_eq("CRC-24/OPENPGP", crc, 32'h21CF02);
    expect_eq("seg_on N=24", 32'(seg_on), 32'hE);
    start(CRC_LEN_32, 32'h04C11DB7, 32'hFFFFFFFF);
    send_check_string(1);
    expect_eq("CRC-32/BZIP2", ~crc, 32'hFC891918);
    expect_eq("seg_on N=32", 32'(seg_on), 32'hF);
    start(CRC_LEN_32, 32'h04C11DB7, 32'hFFFFFFFF);
    send_check_string(0);
    expect_eq("CRC-32 Ethernet", ~ref_reflect(crc, 32), 32'hCBF43926);

    // 2. Random polynomials and messages, with idle cycles.
    for (int t = 0; t < 60; t++) begin
      crc_len_e    l;
      int          n, m;
      logic [31:0] p, iv, model;
      l  = crc_len_e'(t % 3);
      n  = len_n(l);
      p  = $urandom & ref_mask(n);
      p[0] = 1'b1;
      iv = $urandom;
      m  = 1 + ($urandom % 40);
      start(l, p, iv);
      model = iv & ref_mask(n);
      expect_eq("preset", crc, model);
      for (int k = 0; k < m; k++) begin
        logic [3:0] nib;
        nib = 4'($urandom);
        send(nib);
        model = ref_nibble(model, p, n, nib);
        expect_eq($sformatf("random n=%0d poly=%h nibble %0d", n, p, k), crc, model);
        repeat ($urandom % 3) @(negedge clk);   // idle: the CRC must hold
        expect_eq("hold while idle", crc, model);
      end
    end

    // 3. Rate and latency: 375 nibbles back to back.
    begin
      logic [31:0] model;
      int          t0, t1;
      start(CRC_LEN_32, 32'h04C11DB7, 32'h0);
      model = '0;
      t0 = int'($time / 10);
      for (int k = 0; k < 375; k++) begin
        logic [3:0] nib;
        nib = 4'($urandom);
        din = nib; din_valid = 1;
        model = ref_nibble(model, 32'h04C11DB7, 32, nib);
        @(negedge clk);
      end
      din_valid = 0;
      t1 = int'($time / 10);
      expect_eq("latency: CRC one cycle after the last nibble", crc, model);
      expect_eq("rate: one nibble per clock", 32'(t1 - t0), 32'd375);
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
