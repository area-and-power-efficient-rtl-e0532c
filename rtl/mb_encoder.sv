// mb_encoder: Modified Booth (radix-4) encoding of one digit.
//
// From three consecutive bits (b_hi, b_mid, b_lo) = (b_2j+1, b_2j, b_2j-1)
// the digit -2*b_hi + b_mid + b_lo is produced as {s, one, two}:
//   one = b_mid ^ b_lo,   two = (b_hi ^ b_mid) & ~one,
//   s   = b_hi & ~(b_hi & b_mid & b_lo).
// The last term is the pre-encoded scheme's change to the plain MB sign:
// the digit of 111 is zero, and its sign is stored as 0 rather than 1 so a
// zero digit never complements the multiplicand or adds an input carry.
// In the NR4SD multipliers this encodes the most significant digit, with
// b_lo being the carry of the NR4SD encoding chain rather than a bit of B.
// Purely combinational; used offline when the coefficient ROM is built.
module mb_encoder
  import nr4sd_pkg::*;
(
  input  logic    b_hi,
  input  logic    b_mid,
  input  logic    b_lo,
  output mb_sig_t sig
);

  always_comb begin
    sig.one = b_mid ^ b_lo;
    sig.two = (b_hi ^ b_mid) & ~sig.one;
    sig.s   = b_hi & ~(b_hi & b_mid & b_lo);
  end

endmodule
