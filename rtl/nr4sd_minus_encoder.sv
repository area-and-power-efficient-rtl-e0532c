// nr4sd_minus_encoder: word-level NR4SD- encoder of an N-bit two's
// complement number.
//
// Digit j (j < k-1, k = N/2) is formed by two cells in a carry chain that
// starts with c_0 = 0:
//   half adder  (b_2j, c_2j):     c_2j+1 = b_2j & c_2j,  n+_2j = b_2j ^ c_2j
//   half adder* (b_2j+1, c_2j+1): 2*c_2j+2 - n-_2j+1 = b_2j+1 + c_2j+1,
//                                 i.e. c_2j+2 = b_2j+1 | c_2j+1,
//                                      n-_2j+1 = b_2j+1 ^ c_2j+1,
// giving the digit -2*n-_2j+1 + n+_2j in {-2,-1,0,+1}. The last digit is
// MB encoded from (b_N-1, b_N-2, c_N-2) so the full two's complement range
// is covered. Output layout as in nr4sd_pkg: {s,one,two} at [N:N-2], digit
// j at [2j+1:2j] = {n-_2j+1, n+_2j}. The encoding algorithm follows the
// scheme exactly; only the word layout is this design's choice.
// Combinational; in the multiplier it runs offline on constant coefficients.
module nr4sd_minus_encoder
  import nr4sd_pkg::*;
#(
  parameter int N = 16  // coefficient width, even
) (
  input  logic [N-1:0] b,
  output logic [N:0]   enc
);

  localparam int K = N / 2;

  logic       c_msd;  // carry c_N-2 into the most significant digit
  logic [N-3:0] lo;   // bits of the k-1 lower digits
  mb_sig_t msd;    // MB signals of the most significant digit

  always_comb begin
    logic c, c_odd;
    c   = 1'b0;
    lo  = '0;
    for (int j = 0; j < K - 1; j++) begin
      lo[2*j]    = b[2*j] ^ c;            // n+_2j
      c_odd      = b[2*j] & c;            // c_2j+1
      lo[2*j+1]  = b[2*j+1] ^ c_odd;      // n-_2j+1
      c          = b[2*j+1] | c_odd;      // c_2j+2
    end
    c_msd = c;
  end

  mb_encoder u_msd (
    .b_hi (b[N-1]),
    .b_mid(b[N-2]),
    .b_lo (c_msd),
    .sig  (msd)
  );

  assign enc = {msd, lo};

  initial assert (N >= 4 && N % 2 == 0) else $error("N must be even and >= 4");

endmodule
