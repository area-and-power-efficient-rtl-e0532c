// tb_nr4sd_premult: checks one pre-encoded multiplier of each scheme
// (16-bit, 64-entry table) with a random stream of operations and idle
// cycles, after a reset in the middle of traffic. Each product must equal
// A*B with B = round((2^15-1) * sin(2*pi*i/64)), arrive exactly two clocks
// after its request, and nothing may come out for requests made while
// rst_n was low.
module tb_nr4sd_premult;
  import nr4sd_pkg::*;
  import tb_nr4sd_ref_pkg::*;

  localparam int N = 16, DEPTH = 64;

  logic        clk = 0, rst_n;
  logic        in_valid;
  logic [15:0] a;
  logic [5:0]  addr;
  logic        ov_m, ov_p;
  logic [31:0] p_m, p_p;
  int          checks = 0, failures = 0;

  nr4sd_premult #(.SCHEME(NR4SD_MINUS)) dut_m (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .a(a), .coef_addr(addr),
    .out_valid(ov_m), .p(p_m));
  nr4sd_premult #(.SCHEME(NR4SD_PLUS)) dut_p (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .a(a), .coef_addr(addr),
    .out_valid(ov_p), .p(p_p));

  always #5 clk = ~clk;

  function automatic longint coef(int i);
    real x = $sin(2.0 * 3.14159265358979 * i / DEPTH) * 32767.0;
    return (x >= 0.0) ? longint'($floor(x + 0.5)) : -longint'($floor(-x + 0.5));
  endfunction

  // expected result, indexed by the clock edge after which it must be on
  // the outputs: a request taken at edge c is registered twice, at c and
  // c+1, so it is visible from c+1 and sampled by the receiver at c+2.
  longint exp_p [int];
  int     cyc = 0;

  always @(posedge clk) begin
    cyc++;
    if (rst_n && in_valid) exp_p[cyc + 1] = sext(64'(a), 16) * coef(int'(addr));
    #1;
    checks++;
    if (ov_m !== exp_p.exists(cyc) || ov_p !== exp_p.exists(cyc)) begin
      failures++;
      $display("FAIL valid m=%b p=%b expected %b at cycle %0d", ov_m, ov_p, exp_p.exists(cyc), cyc);
    end else if (exp_p.exists(cyc)) begin
      if (sext(64'(p_m), 32) != exp_p[cyc] || sext(64'(p_p), 32) != exp_p[cyc]) begin
        failures++;
        if (failures < 10) $display("FAIL p_m=%0d p_p=%0d expected %0d", sext(64'(p_m), 32),
                                    sext(64'(p_p), 32), exp_p[cyc]);
      end
      exp_p.delete(cyc);
    end
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 0; in_valid = 0; a = 0; addr = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 6000; t++) begin
      @(negedge clk);
      in_valid = ($urandom_range(3) != 0);
      a        = 16'($urandom());
      addr     = 6'($urandom());
      if (t == 3000) rst_n = 0;
      if (t == 3003) rst_n = 1;
    end
    @(negedge clk);
    in_valid = 0;
    repeat (4) @(negedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
