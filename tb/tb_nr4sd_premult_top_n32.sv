// tb_nr4sd_premult_top_n32: end-to-end test of the two pre-encoded NR4SD
// multipliers with 32-bit operands and coefficients (64-entry
// sine coefficient table).
//
// Every coefficient is multiplied by the operand limits -2^31, 2^31-1, -1,
// 0 and +1, then a long random stream follows with random idle cycles.
// Both products are compared with A*B, where B = round((2^31-1) *
// sin(2*pi*i/64)) is computed here, and out_valid must follow in_valid by
// exactly two clocks. The test also counts, from digits of B found by
// integer division, how often each digit value of each scheme, each
// top-digit value and the zero top digit of a negative coefficient (whose
// stored sign is suppressed) was exercised, plus negative operands,
// back-to-back operations and idle gaps; any that never happened counts as
// a failure.
module tb_nr4sd_premult_top_n32;
  import tb_nr4sd_ref_pkg::*;

  localparam int N = 32, DEPTH = 64, AW = 6, RANDOM_OPS = 5000;

  logic           clk = 0, rst_n;
  logic           in_valid;
  logic [N-1:0]   a;
  logic [AW-1:0]  coef_addr;
  logic           out_valid;
  logic [2*N-1:0] p_minus, p_plus;

  nr4sd_premult_top #(.N(N)) dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .a(a), .coef_addr(coef_addr),
    .out_valid(out_valid), .p_minus(p_minus), .p_plus(p_plus)
  );

  always #5 clk = ~clk;

  int     checks = 0, failures = 0;
  longint exp_q [$];
  logic   v_d1 = 0, v_d2 = 0;  // expected out_valid pipeline

  // mechanism counters
  int n_dig_m [-2:2];   // NR4SD- lower digit values
  int n_dig_p [-2:2];   // NR4SD+ lower digit values
  int n_msd   [-2:2];   // top digit values (either scheme)
  int n_msd_zero_neg;   // zero top digit of a negative coefficient
  int n_neg_a, n_b2b, n_gap;

  function automatic longint coef(int i);
    real x = $sin(2.0 * 3.14159265358979 * i / DEPTH) * (2.0 ** (N - 1) - 1.0);
    return (x >= 0.0) ? longint'($floor(x + 0.5)) : -longint'($floor(-x + 0.5));
  endfunction

  task automatic count(longint b, longint av);
    for (int j = 0; j < N / 2 - 1; j++) begin
      n_dig_m[ref_digit(b, N, 0, j)]++;
      n_dig_p[ref_digit(b, N, 1, j)]++;
    end
    n_msd[ref_digit(b, N, 0, N / 2 - 1)]++;
    n_msd[ref_digit(b, N, 1, N / 2 - 1)]++;
    if (b < 0 && (ref_digit(b, N, 0, N / 2 - 1) == 0 || ref_digit(b, N, 1, N / 2 - 1) == 0))
      n_msd_zero_neg++;
    if (av < 0) n_neg_a++;
  endtask

  // drive one cycle; op = 1 issues an operation
  task automatic step(bit op, longint av, int idx);
    @(negedge clk);
    in_valid = op;
    if (op) begin
      a         = N'(av);
      coef_addr = AW'(idx);
      exp_q.push_back(av * coef(idx));
      count(coef(idx), av);
    end else begin
      a         = N'($urandom());
      coef_addr = AW'($urandom());
    end
  endtask

  always @(posedge clk) begin
    v_d1 <= rst_n & in_valid;
    v_d2 <= rst_n & v_d1;
    if (rst_n) begin
      if (in_valid && v_d1) n_b2b++;
      if (!in_valid && v_d1) n_gap++;
    end
    if (out_valid !== v_d2) begin
      failures++;
      $display("FAIL out_valid=%b expected %b at %0t", out_valid, v_d2, $time);
    end
    if (out_valid && v_d2) begin
      longint e;
      e = exp_q.pop_front();
      checks++;
      if (sext(64'(p_minus), 2 * N) != e || sext(64'(p_plus), 2 * N) != e) begin
        failures++;
        if (failures < 10)
          $display("FAIL p_minus=%0d p_plus=%0d expected %0d", sext(64'(p_minus), 2 * N),
                   sext(64'(p_plus), 2 * N), e);
      end
    end
  end

  initial begin
    repeat (50 * RANDOM_OPS + 10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint lim [5];
    lim = '{-(64'sd1 <<< (N - 1)), (64'sd1 <<< (N - 1)) - 1, -1, 0, 1};
    rst_n = 0; in_valid = 0; a = '0; coef_addr = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < DEPTH; i++)
      for (int k = 0; k < 5; k++) step(1, lim[k], i);
    for (int t = 0; t < RANDOM_OPS; t++) begin
      if ($urandom_range(3) == 0) step(0, 0, 0);
      step(1, sext(64'($urandom()), N), $urandom_range(DEPTH - 1));
    end
    step(0, 0, 0);
    repeat (4) @(negedge clk);
    checks++;
    if (exp_q.size() != 0) begin
      failures++;
      $display("FAIL %0d results never came out", exp_q.size());
    end
    for (int v = -2; v <= 1; v++) begin
      checks++;
      if (n_dig_m[v] == 0) begin failures++; $display("FAIL NR4SD- digit %0d never used", v); end
    end
    for (int v = -1; v <= 2; v++) begin
      checks++;
      if (n_dig_p[v] == 0) begin failures++; $display("FAIL NR4SD+ digit %0d never used", v); end
    end
    for (int v = -2; v <= 2; v++) begin
      checks++;
      if (n_msd[v] == 0) begin failures++; $display("FAIL top digit %0d never used", v); end
    end
    checks += 4;
    if (n_msd_zero_neg == 0) begin failures++; $display("FAIL no zero top digit with suppressed sign"); end
    if (n_neg_a == 0) begin failures++; $display("FAIL no negative operand"); end
    if (n_b2b == 0) begin failures++; $display("FAIL no back-to-back operations"); end
    if (n_gap == 0) begin failures++; $display("FAIL no idle gap"); end
    $display("NR4SD- digits -2:%0d -1:%0d 0:%0d +1:%0d", n_dig_m[-2], n_dig_m[-1], n_dig_m[0], n_dig_m[1]);
    $display("NR4SD+ digits -1:%0d 0:%0d +1:%0d +2:%0d", n_dig_p[-1], n_dig_p[0], n_dig_p[1], n_dig_p[2]);
    $display("top digits -2:%0d -1:%0d 0:%0d +1:%0d +2:%0d (zero of negative B: %0d)",
             n_msd[-2], n_msd[-1], n_msd[0], n_msd[1], n_msd[2], n_msd_zero_neg);
    $display("negative A:%0d back-to-back:%0d gaps:%0d", n_neg_a, n_b2b, n_gap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
