// tb_nr4sd_minus_encoder: checks the NR4SD- word encoder.
//
// 8-bit: every input is encoded and the digits read back from the word
// must equal digits found by integer division (tb_nr4sd_ref_pkg), and the
// four 8-bit example values -128, -102, +89, +127 must give the published
// digit strings. 16-bit and 32-bit: random inputs, same digit comparison.
// A zero top digit must carry sign 0, and no top digit may be both one
// and two.
module tb_nr4sd_minus_encoder;
  import tb_nr4sd_ref_pkg::*;

  localparam bit PLUS = 1'b0;

  logic [7:0]  b8;
  logic [8:0]  e8;
  logic [15:0] b16;
  logic [16:0] e16;
  logic [31:0] b32;
  logic [32:0] e32;
  int          checks = 0, failures = 0;

  nr4sd_minus_encoder #(.N(8))  dut8  (.b(b8),  .enc(e8));
  nr4sd_minus_encoder #(.N(16)) dut16 (.b(b16), .enc(e16));
  nr4sd_minus_encoder #(.N(32)) dut32 (.b(b32), .enc(e32));

  // published examples, most significant digit first
  localparam int  EX_VAL [4]    = '{-128, -102, 89, 127};
  localparam int  EX_DIG [4][4] = '{'{-2,0,0,0}, '{-1,-2,-1,-2}, '{2,-2,-2,1}, '{2,0,0,-1}};

  task automatic check_word(logic [64:0] enc, longint b, int n);
    bit bad = 0;
    for (int j = 0; j < n / 2; j++)
      if (enc_digit(enc, n, PLUS, j) != ref_digit(b, n, PLUS, j)) bad = 1;
    if (enc[n-1] && enc[n-2]) bad = 1;                // one and two both set
    if (enc[n] && !enc[n-1] && !enc[n-2]) bad = 1;    // negative zero stored
    if (enc_value(enc, n, PLUS) != b) bad = 1;
    checks++;
    if (bad) begin
      failures++;
      if (failures < 10) $display("FAIL n=%0d b=%0d enc=%b", n, b, enc);
    end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    ;
  end

  initial begin
    for (int v = -128; v < 128; v++) begin
      b8 = 8'(v);
      #1;
      check_word(65'(e8), v, 8);
    end
    for (int e = 0; e < 4; e++) begin
      b8 = 8'(EX_VAL[e]);
      #1;
      checks++;
      for (int j = 0; j < 4; j++)
        if (enc_digit(65'(e8), 8, PLUS, j) != EX_DIG[e][3-j]) begin
          failures++;
          $display("FAIL example %0d digit %0d", EX_VAL[e], j);
          break;
        end
    end
    for (int i = 0; i < 20000; i++) begin
      b16 = $urandom();
      b32 = $urandom();
      if (i < 4) begin
        b16 = (i[0]) ? 16'h8000 : 16'h7fff;
        b32 = (i[0]) ? 32'h8000_0000 : 32'h7fff_ffff;
      end
      #1;
      check_word(65'(e16), sext(64'(b16), 16), 16);
      check_word(65'(e32), sext(64'(b32), 32), 32);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
