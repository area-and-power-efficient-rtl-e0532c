// ppg_mb: partial product generator for the Modified Booth encoded most
// significant digit of an NR4SD coefficient.
//
// Selects A (one) or 2A (two) as an (N+1)-bit term and complements it when
// s is set; cin = s completes the negation. Because the stored sign of a
// zero digit is 0 (see mb_encoder), a zero digit yields pp = 0, cin = 0.
// pp + cin = (-1)^s * (one + 2*two) * A. Purely combinational.
module ppg_mb
  import nr4sd_pkg::*;
#(
  parameter int N = 16
) (
  input  logic [N-1:0] a,
  input  mb_sig_t      sig,
  output logic [N:0]   pp,
  output logic         cin
);

  logic [N:0] a1, a2;

  always_comb begin
    a1  = {a[N-1], a};
    a2  = {a, 1'b0};
    pp  = (({(N+1){sig.one}} & a1) | ({(N+1){sig.two}} & a2)) ^ {(N+1){sig.s}};
    cin = sig.s;
  end

endmodule
