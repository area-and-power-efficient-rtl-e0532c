// tb_csa_tree: checks that sum + carry equals the total of all rows modulo
// 2^W, for the default tree (10 rows of 32 bits, the 16-bit multiplier),
// the 18-row 64-bit tree of the 32-bit multiplier and a 3-row tree, with
// random rows, all-ones rows and all-zero rows.
module tb_csa_tree;

  logic [31:0] r10 [10];
  logic [63:0] r18 [18];
  logic [7:0]  r3  [3];
  logic [31:0] s10, c10;
  logic [63:0] s18, c18;
  logic [7:0]  s3, c3;
  int          checks = 0, failures = 0;

  csa_tree                    dut10 (.rows(r10), .sum(s10), .carry(c10));
  csa_tree #(.ROWS(18), .W(64)) dut18 (.rows(r18), .sum(s18), .carry(c18));
  csa_tree #(.ROWS(3),  .W(8))  dut3  (.rows(r3),  .sum(s3),  .carry(c3));

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 5000; t++) begin
      logic [31:0] e10;
      logic [63:0] e18;
      logic [7:0]  e3;
      e10 = '0; e18 = '0; e3 = '0;
      for (int i = 0; i < 10; i++) begin
        r10[i] = (t == 0) ? '1 : (t == 1) ? '0 : $urandom();
        e10 += r10[i];
      end
      for (int i = 0; i < 18; i++) begin
        r18[i] = (t == 0) ? '1 : (t == 1) ? '0 : {$urandom(), $urandom()};
        e18 += r18[i];
      end
      for (int i = 0; i < 3; i++) begin
        r3[i] = (t == 0) ? '1 : 8'($urandom());
        e3 += r3[i];
      end
      #1;
      checks += 3;
      if (s10 + c10 != e10) begin failures++; $display("FAIL 10 rows t=%0d", t); end
      if (s18 + c18 != e18) begin failures++; $display("FAIL 18 rows t=%0d", t); end
      if (s3 + c3 != e3)    begin failures++; $display("FAIL 3 rows t=%0d", t); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
