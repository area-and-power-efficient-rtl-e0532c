// tb_ppg_mb: checks the partial product generator of the MB top digit.
// For every 8-bit A and every stored digit code (-2..+2, zero with sign 0),
// pp read as (N+1)-bit two's complement plus cin must equal digit * A, and
// a zero digit must give pp = 0, cin = 0. 16-bit: random A.
module tb_ppg_mb;
  import nr4sd_pkg::*;
  import tb_nr4sd_ref_pkg::*;

  logic [7:0]  a8;
  logic [15:0] a16;
  mb_sig_t     sig;
  logic [8:0]  pp8;
  logic [16:0] pp16;
  logic        c8, c16;
  int          checks = 0, failures = 0;

  ppg_mb #(.N(8))  dut8  (.a(a8),  .sig(sig), .pp(pp8),  .cin(c8));
  ppg_mb #(.N(16)) dut16 (.a(a16), .sig(sig), .pp(pp16), .cin(c16));

  localparam int DIG [5] = '{-2, -1, 0, 1, 2};

  function automatic mb_sig_t sig_of(int v);
    mb_sig_t s;
    s.s   = (v < 0);
    s.one = (v == 1 || v == -1);
    s.two = (v == 2 || v == -2);
    return s;
  endfunction

  task automatic chk(logic [63:0] pp, logic c, int n, int dig, longint a);
    checks++;
    if (sext(pp, n + 1) + longint'(c) != longint'(dig) * a
        || (dig == 0 && (pp != 0 || c))) begin
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
    for (int k = 0; k < 5; k++) begin
      sig = sig_of(DIG[k]);
      for (int v = -128; v < 128; v++) begin
        a8  = 8'(v);
        a16 = (v == -128) ? 16'h8000 : (v == 127) ? 16'h7fff : 16'($urandom());
        #1;
        chk(64'(pp8), c8, 8, DIG[k], v);
        chk(64'(pp16), c16, 16, DIG[k], sext(64'(a16), 16));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
