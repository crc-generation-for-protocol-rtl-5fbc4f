// tb_crc_r16_state_reg: random test of the segmented CRC register.
//
// Random preset, update and segment-enable patterns are applied and the
// output compared each cycle with a behavioural model: a segment that is
// switched off keeps its stored value and reads as 0, preset has priority
// over update, reset clears everything.
module tb_crc_r16_state_reg;

  logic        clk = 0, rst_n = 0;
  logic [3:0]  seg_on;
  logic        load, upd;
  logic [31:0] load_val, d, q;
  logic [31:0] model;
  int checks = 0, failures = 0;

  crc_r16_state_reg #(.W(32), .SEG_W(8)) dut (
    .clk(clk), .rst_n(rst_n), .seg_on(seg_on), .load(load), .load_val(load_val),
    .upd(upd), .d(d), .q(q)
  );

  always #5 clk = ~clk;

  function automatic logic [31:0] seg_mask(logic [3:0] s);
    logic [31:0] m;
    for (int i = 0; i < 32; i++) m[i] = s[i/8];
    return m;
  endfunction

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    seg_on = 4'hF; load = 0; upd = 0; load_val = '0; d = '0;
    model = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    checks++;
    if (q !== 32'h0) begin failures++; $display("FAIL after reset q=%h", q); end
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      seg_on   = (n % 50 < 25) ? 4'($urandom) : 4'hF;
      load     = ($urandom % 8) == 0;
      upd      = ($urandom % 4) != 0;
      load_val = $urandom;
      d        = $urandom;
      @(posedge clk);
      for (int s = 0; s < 4; s++) begin
        if (seg_on[s] && load)     model[s*8 +: 8] = load_val[s*8 +: 8];
        else if (seg_on[s] && upd) model[s*8 +: 8] = d[s*8 +: 8];
      end
      #1;
      checks++;
      if (q !== (model & seg_mask(seg_on))) begin
        failures++;
        if (failures < 10) $display("FAIL n=%0d q=%h exp=%h", n, q, model & seg_mask(seg_on));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
