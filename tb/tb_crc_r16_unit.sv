// tb_crc_r16_unit: end-to-end test of the configurable CRC unit at its
// default (and only) size.
//
// The unit is used the way a protocol processor would use it: configured for
// a protocol's polynomial, it encodes a frame (the transmitter's CRC), then
// decodes the frame with its CRC appended (the receiver's check, which must
// give a zero remainder), then decodes a corrupted copy (which must not).
// Three polynomials are used in turn, so the unit switches between N = 16,
// 24 and 32 and shuts down register segments for the shorter ones:
//   CRC-16-CCITT  x^16+x^12+x^5+1
//   CRC-24        x^24+x^10+x^9+x^6+x^4+x^3+x+1 (an arbitrary degree-24 code)
//   CRC-32        the Ethernet polynomial 0x04C11DB7
// Data arrive with random idle cycles (stalls) except in the last test, one
// complete maximum-size Ethernet frame (1500 payload bytes, each byte fed LSB
// first as Ethernet transmits it) sent back to back: it must take exactly 3000
// clocks and give the FCS of the bit-serial reference model.
// Every mechanism is counted and a failure is recorded for one that never
// happened.
module tb_crc_r16_unit;
  import crc_pkg::*;
  import crc_ref_pkg::*;

  logic        clk = 0, rst_n = 0;
  logic        cfg_we, init, din_valid, crc_zero;
  crc_len_e    cfg_len, cfg_len_q;
  logic [31:0] cfg_poly, init_val, crc;
  logic [3:0]  din, seg_on;
  int checks = 0, failures = 0;
  int n_mode_switch = 0, n_shutdown_16 = 0, n_shutdown_24 = 0, n_stall = 0;
  int n_decode_ok = 0, n_error_detected = 0, n_full_rate = 0;

  crc_r16_unit dut (
    .clk(clk), .rst_n(rst_n), .cfg_we(cfg_we), .cfg_len(cfg_len),
    .cfg_poly(cfg_poly), .init(init), .init_val(init_val),
    .din_valid(din_valid), .din(din), .crc(crc), .crc_zero(crc_zero),
    .cfg_len_q(cfg_len_q), .seg_on(seg_on)
  );

  always #5 clk = ~clk;

  task automatic expect_eq(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  task automatic configure(crc_len_e l, logic [31:0] p);
    @(negedge clk);
    if (cfg_len_q != l) n_mode_switch++;
    cfg_len = l; cfg_poly = p; cfg_we = 1;
    @(negedge clk);
    cfg_we = 0;
    expect_eq("configured length", 32'(cfg_len_q), 32'(l));
    case (l)
      CRC_LEN_16: begin expect_eq("segments N=16", 32'(seg_on), 32'hC); n_shutdown_16++; end
      CRC_LEN_24: begin expect_eq("segments N=24", 32'(seg_on), 32'hE); n_shutdown_24++; end
      default:    expect_eq("segments N=32", 32'(seg_on), 32'hF);
    endcase
  endtask

  task automatic frame_start(logic [31:0] iv);
    init_val = iv; init = 1;
    @(negedge clk);
    init = 0;
  endtask

  // Feed a list of nibbles; with stalls, idle cycles are put in at random.
  task automatic feed(logic [3:0] nibs[$], bit stalls);
    foreach (nibs[i]) begin
      din = nibs[i]; din_valid = 1;
      @(negedge clk);
      din_valid = 0;
      if (stalls && ($urandom % 4) == 0) begin
        n_stall++;
        @(negedge clk);
      end
    end
  endtask

  // Encode, decode and decode-with-error for one random frame.
  task automatic run_frame(crc_len_e l, logic [31:0] p, int nbytes);
    int          n;
    logic [31:0] model, iv, fcs;
    logic [3:0]  msg[$], cw[$];
    n  = (l == CRC_LEN_16) ? 16 : (l == CRC_LEN_24) ? 24 : 32;
    iv = $urandom & ref_mask(n);
    model = iv;
    for (int i = 0; i < 2 * nbytes; i++) begin
      logic [3:0] nb;
      nb = 4'($urandom);
      msg.push_back(nb);
      model = ref_nibble(model, p, n, nb);
    end
    // Transmitter.
    frame_start(iv);
    feed(msg, 1);
    expect_eq($sformatf("encode N=%0d %0d bytes", n, nbytes), crc, model);
    fcs = crc;
    // Receiver: message followed by its CRC, most significant nibble first.
    cw = msg;
    for (int i = n / 4 - 1; i >= 0; i--) cw.push_back(fcs[4*i +: 4]);
    frame_start(iv);
    feed(cw, 1);
    checks++;
    if (crc_zero !== 1'b1) begin
      failures++; $display("FAIL decode of a good frame N=%0d: remainder %h", n, crc);
    end else n_decode_ok++;
    // Receiver with one bit flipped somewhere in the codeword.
    begin
      int pos;
      pos = int'($urandom % (4 * cw.size()));
      cw[pos / 4][pos % 4] = ~cw[pos / 4][pos % 4];
    end
    frame_start(iv);
    feed(cw, 1);
    checks++;
    if (crc_zero !== 1'b0) begin
      failures++; $display("FAIL single-bit error not detected N=%0d", n);
    end else n_error_detected++;
  endtask

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cfg_we = 0; cfg_len = CRC_LEN_32; cfg_poly = '0; init = 0; init_val = '0;
    din_valid = 0; din = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    expect_eq("reset length", 32'(cfg_len_q), 32'(CRC_LEN_32));

    for (int r = 0; r < 4; r++) begin
      configure(CRC_LEN_16, 32'h1021);
      run_frame(CRC_LEN_16, 32'h1021, 1 + int'($urandom % 64));
      configure(CRC_LEN_24, 32'h00065B);
      run_frame(CRC_LEN_24, 32'h00065B, 1 + int'($urandom % 64));
      configure(CRC_LEN_32, 32'h04C11DB7);
      run_frame(CRC_LEN_32, 32'h04C11DB7, 1 + int'($urandom % 64));
    end

    // One maximum-size Ethernet frame payload at full rate.
    begin
      logic [31:0] model;
      logic [3:0]  nibs[$];
      int          t0, t1;
      configure(CRC_LEN_32, 32'h04C11DB7);
      model = 32'hFFFF_FFFF;
      for (int i = 0; i < 1500; i++) begin
        logic [7:0] b;
        b = 8'($urandom);
        for (int k = 0; k < 8; k++) model = ref_bit(model, 32'h04C11DB7, 32, b[k]);
        nibs.push_back({b[0], b[1], b[2], b[3]});
        nibs.push_back({b[4], b[5], b[6], b[7]});
      end
      frame_start(32'hFFFF_FFFF);
      t0 = int'($time / 10);
      feed(nibs, 0);
      t1 = int'($time / 10);
      expect_eq("Ethernet 1500-byte FCS", ~ref_reflect(crc, 32), ~ref_reflect(model, 32));
      expect_eq("1500 bytes in 3000 clocks", 32'(t1 - t0), 32'd3000);
      if (t1 - t0 == 3000) n_full_rate++;
    end

    $display("mechanisms: mode_switch=%0d shutdown_16=%0d shutdown_24=%0d stall=%0d decode_ok=%0d error_detected=%0d full_rate=%0d",
             n_mode_switch, n_shutdown_16, n_shutdown_24, n_stall, n_decode_ok,
             n_error_detected, n_full_rate);
    if (n_mode_switch == 0)    begin failures++; $display("FAIL no mode switch"); end
    if (n_shutdown_16 == 0)    begin failures++; $display("FAIL no N=16 shut-down"); end
    if (n_shutdown_24 == 0)    begin failures++; $display("FAIL no N=24 shut-down"); end
    if (n_stall == 0)          begin failures++; $display("FAIL no stall"); end
    if (n_decode_ok == 0)      begin failures++; $display("FAIL no good frame decoded"); end
    if (n_error_detected == 0) begin failures++; $display("FAIL no error detected"); end
    if (n_full_rate == 0)      begin failures++; $display("FAIL no full-rate frame"); end
    checks += 7;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
