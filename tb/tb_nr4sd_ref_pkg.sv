// tb_nr4sd_ref_pkg: reference arithmetic for the NR4SD testbenches.
//
// Works out radix-4 digits by plain integer division, independently of the
// carry-chain encoders in the RTL: for NR4SD- each lower digit is the
// residue of the remaining value modulo 4 taken in {-2,-1,0,+1}, for
// NR4SD+ in {-1,0,+1,+2}; what is left after k-1 digits is the top digit.
// Also decodes an (N+1)-bit encoded word back into digits and a value
// using the word layout {s,one,two | d_k-2 .. d_0}.
package tb_nr4sd_ref_pkg;

  // Digit j of value b (n bits) in the given scheme; plus = 0 for NR4SD-.
  function automatic int ref_digit(longint b, int n, bit plus, int j);
    longint r = b;
    int     d = 0;
    for (int i = 0; i <= j; i++) begin
      if (i == n / 2 - 1) return int'(r);
      case (r & 3)
        0: d = 0;
        1: d = 1;
        2: d = plus ? 2 : -2;
        default: d = -1;
      endcase
      r = (r - longint'(d)) / 4;
    end
    return d;
  endfunction

  // Digit j of an encoded word.
  function automatic int enc_digit(logic [64:0] enc, int n, bit plus, int j);
    logic hi, lo, s, one, two;
    if (j < n / 2 - 1) begin
      hi = enc[2*j+1];
      lo = enc[2*j];
      return plus ? (2 * int'(hi) - int'(lo)) : (-2 * int'(hi) + int'(lo));
    end
    s   = enc[n];
    one = enc[n-1];
    two = enc[n-2];
    return (s ? -1 : 1) * (int'(one) + 2 * int'(two));
  endfunction

  function automatic longint enc_value(logic [64:0] enc, int n, bit plus);
    longint v = 0;
    for (int j = n / 2 - 1; j >= 0; j--) v = v * 4 + longint'(enc_digit(enc, n, plus, j));
    return v;
  endfunction

  // Sign-extend the low n bits of x.
  function automatic longint sext(logic [63:0] x, int n);
    return longint'(x << (64 - n)) >>> (64 - n);
  endfunction

endpackage
