// tb_ppg_nr4sd: checks the NR4SD partial product generators of both
// schemes. For every 8-bit A and every digit of the scheme's set, the
// (N+1)-bit partial product read as two's complement plus cin must equal
// digit * A; 16-bit generators are checked with random A.
module tb_ppg_nr4sd;
  import nr4sd_pkg::*;
  import tb_nr4sd_ref_pkg::*;

  logic [7:0]  a8;
  logic [15:0] a16;
  nr_sig_t     sig_m, sig_p;
  logic [8:0]  pp8_m, pp8_p;
  logic [16:0] pp16_m, pp16_p;
  logic        c8_m, c8_p, c16_m, c16_p;
  int          checks = 0, failures = 0;

  ppg_nr4sd #(.N(8),  .SCHEME(NR4SD_MINUS)) dut8_m  (.a(a8),  .sig(sig_m), .pp(pp8_m),  .cin(c8_m));
  ppg_nr4sd #(.N(8),  .SCHEME(NR4SD_PLUS))  dut8_p  (.a(a8),  .sig(sig_p), .pp(pp8_p),  .cin(c8_p));
  ppg_nr4sd #(.N(16), .SCHEME(NR4SD_MINUS)) dut16_m (.a(a16), .sig(sig_m), .pp(pp16_m), .cin(c16_m));
  ppg_nr4sd #(.N(16), .SCHEME(NR4SD_PLUS))  dut16_p (.a(a16), .sig(sig_p), .pp(pp16_p), .cin(c16_p));

  localparam int DM [4] = '{0, 1, -1, -2};
  localparam int DP [4] = '{0, 1, -1, 2};

  function automatic nr_sig_t sig_of(int v);
    nr_sig_t s;
    s.one_p = (v == 1);
    s.one_m = (v == -1);
    s.two   = (v == 2 || v == -2);
    return s;
  endfunction

  task automatic chk(logic [63:0] pp, logic c, int n, int dig, longint a);
    checks++;
    if (sext(pp, n + 1) + longint'(c) != longint'(dig) * a) begin
      failures++;
      if (failures < 10) $display("FAIL n=%0d digit=%0d a=%0d pp=%h cin=%b", n, dig, a, pp, c);
    end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 4; k++) begin
      sig_m = sig_of(DM[k]);
      sig_p = sig_of(DP[k]);
      for (int v = -128; v < 128; v++) begin
        a8  = 8'(v);
        a16 = (v == -128) ? 16'h8000 : (v == 127) ? 16'h7fff : 16'($urandom());
        #1;
        chk(64'(pp8_m), c8_m, 8, DM[k], v);
        chk(64'(pp8_p), c8_p, 8, DP[k], v);
        chk(64'(pp16_m), c16_m, 16, DM[k], sext(64'(a16), 16));
        chk(64'(pp16_p), c16_p, 16, DP[k], sext(64'(a16), 16));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
