// tb_nr4sd_mult_core: checks the combinational NR4SD multiplier of both
// schemes. The coefficient is encoded by the word encoders and the product
// compared with A*B. 8-bit: every A and every B (65536 pairs per scheme).
// 16-bit and 32-bit: the range limits of A and B, then random pairs.
module tb_nr4sd_mult_core;
  import nr4sd_pkg::*;
  import tb_nr4sd_ref_pkg::*;

  logic [7:0]  a8, b8;
  logic [8:0]  e8_m, e8_p;
  logic [15:0] p8_m, p8_p;
  logic [15:0] a16, b16;
  logic [16:0] e16_m, e16_p;
  logic [31:0] p16_m, p16_p;
  logic [31:0] a32, b32;
  logic [32:0] e32_m, e32_p;
  logic [63:0] p32_m, p32_p;
  int          checks = 0, failures = 0;

  nr4sd_minus_encoder #(.N(8))  enc8_m  (.b(b8),  .enc(e8_m));
  nr4sd_plus_encoder  #(.N(8))  enc8_p  (.b(b8),  .enc(e8_p));
  nr4sd_minus_encoder #(.N(16)) enc16_m (.b(b16), .enc(e16_m));
  nr4sd_plus_encoder  #(.N(16)) enc16_p (.b(b16), .enc(e16_p));
  nr4sd_minus_encoder #(.N(32)) enc32_m (.b(b32), .enc(e32_m));
  nr4sd_plus_encoder  #(.N(32)) enc32_p (.b(b32), .enc(e32_p));

  nr4sd_mult_core #(.N(8),  .SCHEME(NR4SD_MINUS)) dut8_m  (.a(a8),  .enc_b(e8_m),  .p(p8_m));
  nr4sd_mult_core #(.N(8),  .SCHEME(NR4SD_PLUS))  dut8_p  (.a(a8),  .enc_b(e8_p),  .p(p8_p));
  nr4sd_mult_core #(.N(16), .SCHEME(NR4SD_MINUS)) dut16_m (.a(a16), .enc_b(e16_m), .p(p16_m));
  nr4sd_mult_core #(.N(16), .SCHEME(NR4SD_PLUS))  dut16_p (.a(a16), .enc_b(e16_p), .p(p16_p));
  nr4sd_mult_core #(.N(32), .SCHEME(NR4SD_MINUS)) dut32_m (.a(a32), .enc_b(e32_m), .p(p32_m));
  nr4sd_mult_core #(.N(32), .SCHEME(NR4SD_PLUS))  dut32_p (.a(a32), .enc_b(e32_p), .p(p32_p));

  task automatic chk(string tag, logic [63:0] p, int n, longint a, longint b);
    checks++;
    if (sext(p, 2 * n) != a * b) begin
      failures++;
      if (failures < 10) $display("FAIL %s a=%0d b=%0d p=%0d", tag, a, b, sext(p, 2 * n));
    end
  endtask

  localparam logic [15:0] E16 [5] = '{16'h8000, 16'h7fff, 16'h0000, 16'hffff, 16'h0001};
  localparam logic [31:0] E32 [5] = '{32'h8000_0000, 32'h7fff_ffff, 32'h0, 32'hffff_ffff, 32'h1};

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int x = -128; x < 128; x++)
      for (int y = -128; y < 128; y++) begin
        a8 = 8'(x);
        b8 = 8'(y);
        #1;
        chk("8-", 64'(p8_m), 8, x, y);
        chk("8+", 64'(p8_p), 8, x, y);
      end
    for (int t = 0; t < 20025; t++) begin
      if (t < 25) begin
        a16 = E16[t % 5]; b16 = E16[t / 5];
        a32 = E32[t % 5]; b32 = E32[t / 5];
      end else begin
        a16 = $urandom(); b16 = $urandom();
        a32 = $urandom(); b32 = $urandom();
      end
      #1;
      chk("16-", 64'(p16_m), 16, sext(64'(a16), 16), sext(64'(b16), 16));
      chk("16+", 64'(p16_p), 16, sext(64'(a16), 16), sext(64'(b16), 16));
      chk("32-", p32_m, 32, sext(64'(a32), 32), sext(64'(b32), 32));
      chk("32+", p32_p, 32, sext(64'(a32), 32), sext(64'(b32), 32));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
