// tb_coef_rom: reads every entry of the NR4SD- and NR4SD+ coefficient
// ROMs (16-bit, 64 entries) and checks that the word, decoded digit by
// digit, equals round((2^15-1) * sin(2*pi*i/64)) and that its digits are
// those found by integer division. Checks the one-cycle read latency and
// that the output holds while en is low.
module tb_coef_rom;
  import nr4sd_pkg::*;
  import tb_nr4sd_ref_pkg::*;

  localparam int N = 16, DEPTH = 64;

  logic        clk = 0;
  logic        en;
  logic [5:0]  addr;
  logic [16:0] d_m, d_p;
  int          checks = 0, failures = 0, cycles = 0;

  coef_rom #(.SCHEME(NR4SD_MINUS)) dut_m (.clk(clk), .en(en), .addr(addr), .data(d_m));
  coef_rom #(.SCHEME(NR4SD_PLUS))  dut_p (.clk(clk), .en(en), .addr(addr), .data(d_p));

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  function automatic longint expected(int i);
    real x = $sin(2.0 * 3.14159265358979 * i / DEPTH) * 32767.0;
    return (x >= 0.0) ? longint'($floor(x + 0.5)) : -longint'($floor(-x + 0.5));
  endfunction

  task automatic chk_word(logic [16:0] w, bit plus, int i);
    bit bad = 0;
    longint v = expected(i);
    if (enc_value(65'(w), N, plus) != v) bad = 1;
    for (int j = 0; j < N / 2; j++)
      if (enc_digit(65'(w), N, plus, j) != ref_digit(v, N, plus, j)) bad = 1;
    checks++;
    if (bad) begin
      failures++;
      $display("FAIL %s entry %0d: decoded %0d expected %0d", plus ? "plus" : "minus", i,
               enc_value(65'(w), N, plus), v);
    end
  endtask

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    en = 0; addr = 0;
    @(negedge clk);
    for (int i = 0; i < DEPTH; i++) begin
      en = 1; addr = 6'(i);
      @(negedge clk);              // one clock later the entry is out
      chk_word(d_m, 0, i);
      chk_word(d_p, 1, i);
    end
    // hold: en low, address changes, data must stay at the last entry
    en = 0; addr = 6'd16;
    @(negedge clk);
    @(negedge clk);
    chk_word(d_m, 0, DEPTH - 1);
    chk_word(d_p, 1, DEPTH - 1);
    // latency: the new entry must not show before the clock edge
    en = 1; addr = 6'd16;
    #1;
    chk_word(d_m, 0, DEPTH - 1);
    @(negedge clk);
    chk_word(d_m, 0, 16);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
