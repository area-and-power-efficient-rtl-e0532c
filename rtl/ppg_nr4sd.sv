// ppg_nr4sd: partial product generator for one NR4SD digit.
//
// The multiplicand A (N bits, two's complement) is selected as A (one_p or
// one_m) or 2A (two), giving an (N+1)-bit magnitude term; a negative digit
// complements every bit, and the +1 that completes the two's complement
// negation leaves as the input carry cin, which the CSA tree adds in at the
// digit's weight. A digit is negative for one_m or two in the NR4SD- form
// (cin = two- | one-) and for one_m only in the NR4SD+ form (cin = one-).
// So pp + cin = digit * A, with pp read as an (N+1)-bit two's complement
// number. Purely combinational.
module ppg_nr4sd
  import nr4sd_pkg::*;
#(
  parameter int      N      = 16,
  parameter scheme_e SCHEME = NR4SD_MINUS
) (
  input  logic [N-1:0] a,
  input  nr_sig_t      sig,
  output logic [N:0]   pp,
  output logic         cin
);

  logic [N:0] a1, a2;  // A sign-extended and 2A
  logic       neg;

  always_comb begin
    a1  = {a[N-1], a};
    a2  = {a, 1'b0};
    neg = (SCHEME == NR4SD_MINUS) ? (sig.one_m | sig.two) : sig.one_m;
    pp  = (({(N+1){sig.one_p | sig.one_m}} & a1) | ({(N+1){sig.two}} & a2))
          ^ {(N+1){neg}};
    cin = neg;
  end

endmodule
