// nr4sd_sig_gen: digit decoder placed between the coefficient ROM and a
// partial product generator.
//
// The ROM keeps only two bits per NR4SD digit, d = {n_2j+1, n_2j}. This
// block expands them into one-hot selection signals for the partial
// product generator:
//   NR4SD- (digit = -2*d[1] + d[0]):  one_p = ~d[1] & d[0]  (+1)
//                                     one_m =  d[1] & d[0]  (-1)
//                                     two   =  d[1] & ~d[0] (-2)
//   NR4SD+ (digit =  2*d[1] - d[0]):  one_p =  d[1] & d[0]  (+1)
//                                     one_m = ~d[1] & d[0]  (-1)
//                                     two   =  d[1] & ~d[0] (+2)
// The NR4SD- equations are the scheme's own; the NR4SD+ ones follow from
// its digit table. Purely combinational, two gates deep.
module nr4sd_sig_gen
  import nr4sd_pkg::*;
#(
  parameter scheme_e SCHEME = NR4SD_MINUS
) (
  input  logic [1:0] d,
  output nr_sig_t    sig
);

  always_comb begin
    sig.two = d[1] & ~d[0];
    if (SCHEME == NR4SD_MINUS) begin
      sig.one_p = ~d[1] & d[0];
      sig.one_m =  d[1] & d[0];
    end else begin
      sig.one_p =  d[1] & d[0];
      sig.one_m = ~d[1] & d[0];
    end
  end

endmodule
