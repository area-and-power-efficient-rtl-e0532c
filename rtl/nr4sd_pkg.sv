// nr4sd_pkg: types and constants shared by the pre-encoded NR4SD multipliers.
//
// A coefficient B of n = 2k bits is stored as an (n+1)-bit word. Digits
// j = 0 .. k-2 take two bits each, at [2j+1:2j] = {n_2j+1, n_2j}; in the
// NR4SD- form n_2j+1 is negatively and n_2j positively weighted (digit =
// -2*n_2j+1 + n_2j, values -2..+1), in the NR4SD+ form the signs swap
// (digit = 2*n_2j+1 - n_2j, values -1..+2). The most significant digit is
// Modified Booth (MB) encoded in three bits {s, one, two} at [n:n-2], so the
// word covers the whole two's complement range. The bit order inside the
// word is this design's choice; the digit sets and bit counts follow the
// encoding scheme.
//
// coef_value() is the fixed coefficient set held in the ROM: one period of a
// sine, as an FFT twiddle table would use, scaled to the full positive range.
// The choice of a sine table is this design's own.
package nr4sd_pkg;

  // Which of the two non-redundant digit sets a multiplier uses.
  typedef enum logic {
    NR4SD_MINUS = 1'b0,  // digits {-2,-1,0,+1}
    NR4SD_PLUS  = 1'b1   // digits {-1,0,+1,+2}
  } scheme_e;

  // MB encoding signals of one digit: value = (-1)^s * (one + 2*two).
  typedef struct packed {
    logic s;
    logic one;
    logic two;
  } mb_sig_t;

  // One-hot selection signals of one NR4SD digit. For NR4SD- "two" means
  // the digit is -2, for NR4SD+ it means +2.
  typedef struct packed {
    logic one_p;
    logic one_m;
    logic two;
  } nr_sig_t;

  // Coefficient i of a DEPTH-entry table for n-bit coefficients:
  // round((2^(n-1)-1) * sin(2*pi*i/DEPTH)).
  function automatic longint coef_value(int i, int depth, int n);
    real x;
    x = $sin(2.0 * 3.14159265358979323846 * real'(i) / real'(depth))
        * (real'(64'd1 << (n - 1)) - 1.0);
    return longint'(x);  // real-to-integer cast rounds to nearest
  endfunction

endpackage
