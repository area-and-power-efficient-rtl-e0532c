// tb_cla_adder: checks s = x + y mod 2^W for the 32-bit default adder and
// a 64-bit and a 7-bit instance, with random and carry-chain-long operands
// (x all ones, y = 1).
module tb_cla_adder;

  logic [31:0] x32, y32, s32;
  logic [63:0] x64, y64, s64;
  logic [6:0]  x7, y7, s7;
  int          checks = 0, failures = 0;

  cla_adder               dut32 (.x(x32), .y(y32), .s(s32));
  cla_adder #(.W(64))     dut64 (.x(x64), .y(y64), .s(s64));
  cla_adder #(.W(7))      dut7  (.x(x7),  .y(y7),  .s(s7));

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 20000; t++) begin
      if (t == 0) begin
        x32 = '1; y32 = 1; x64 = '1; y64 = 1; x7 = '1; y7 = 1;
      end else if (t == 1) begin
        x32 = 32'h5555_5555; y32 = 32'haaaa_aaab; x64 = {2{32'h5555_5555}}; y64 = {32'haaaa_aaaa, 32'haaaa_aaab};
        x7 = 7'h2a; y7 = 7'h56;
      end else begin
        x32 = $urandom(); y32 = $urandom();
        x64 = {$urandom(), $urandom()}; y64 = {$urandom(), $urandom()};
        x7 = 7'($urandom()); y7 = 7'($urandom());
      end
      #1;
      checks += 3;
      if (s32 != 32'(x32 + y32)) begin failures++; $display("FAIL 32 %h+%h=%h", x32, y32, s32); end
      if (s64 != 64'(x64 + y64)) begin failures++; $display("FAIL 64 %h+%h=%h", x64, y64, s64); end
      if (s7  != 7'(x7 + y7))    begin failures++; $display("FAIL 7 %h+%h=%h", x7, y7, s7); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
