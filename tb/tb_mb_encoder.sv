// tb_mb_encoder: exhaustive check of the single-digit Modified Booth
// encoder against the MB truth table, with the zero digit of input 111
// carrying sign 0.
module tb_mb_encoder;
  import nr4sd_pkg::*;

  logic    b_hi, b_mid, b_lo;
  mb_sig_t sig;
  int      checks = 0, failures = 0;

  mb_encoder dut (.b_hi(b_hi), .b_mid(b_mid), .b_lo(b_lo), .sig(sig));

  // expected {s, one, two} for inputs 000 .. 111
  localparam logic [2:0] EXP [8] = '{3'b000, 3'b010, 3'b010, 3'b001,
                                     3'b101, 3'b110, 3'b110, 3'b000};

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 8; i++) begin
      {b_hi, b_mid, b_lo} = 3'(i);
      #1;
      checks++;
      if (sig !== EXP[i]) begin
        failures++;
        $display("FAIL in=%03b sig=%03b exp=%03b", 3'(i), sig, EXP[i]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
