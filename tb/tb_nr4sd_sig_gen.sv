// tb_nr4sd_sig_gen: checks the digit decoder of both schemes for all four
// stored bit pairs: exactly the right one of one_p / one_m / two is set
// for each non-zero digit and none for the zero digit.
module tb_nr4sd_sig_gen;
  import nr4sd_pkg::*;

  logic [1:0] d;
  nr_sig_t    sig_m, sig_p;
  int         checks = 0, failures = 0;

  nr4sd_sig_gen #(.SCHEME(NR4SD_MINUS)) dut_m (.d(d), .sig(sig_m));
  nr4sd_sig_gen #(.SCHEME(NR4SD_PLUS))  dut_p (.d(d), .sig(sig_p));

  // digit values of stored pairs 00, 01, 10, 11
  localparam int DM [4] = '{0, 1, -2, -1};
  localparam int DP [4] = '{0, -1, 2, 1};

  function automatic logic [2:0] onehot(int v);
    case (v)
      1:       return 3'b100;  // one_p
      -1:      return 3'b010;  // one_m
      2, -2:   return 3'b001;  // two
      default: return 3'b000;
    endcase
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4; i++) begin
      d = 2'(i);
      #1;
      checks += 2;
      if (sig_m !== onehot(DM[i])) begin
        failures++;
        $display("FAIL minus d=%b sig=%b", d, sig_m);
      end
      if (sig_p !== onehot(DP[i])) begin
        failures++;
        $display("FAIL plus d=%b sig=%b", d, sig_p);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
