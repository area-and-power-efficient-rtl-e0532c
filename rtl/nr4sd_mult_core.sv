// nr4sd_mult_core: combinational multiplier of a two's complement
// multiplicand A by a coefficient B that arrives already NR4SD encoded.
//
// enc_b holds k = N/2 radix-4 digits (layout in nr4sd_pkg). Each of the
// k-1 lower digits passes through an nr4sd_sig_gen decoder and a ppg_nr4sd
// generator; the MB-encoded top digit feeds ppg_mb directly. That gives k
// partial products pp_j (N+1 bits) and k input carries cin_j, with
// pp_j + cin_j = digit_j * A. They are summed with weights 4^j:
//   row j     : pp_j with its sign bit inverted, shifted left 2j
//   row k     : the input carries, cin_j at bit 2j
//   row k+1   : the correction term COR = -2^N * sum_j 4^j (mod 2^2N)
// Inverting a sign bit adds 2^N to the row's value; COR takes those
// additions back, which replaces sign extension of every row. The k+2 rows
// go through a csa_tree and a cla_adder; p = A*B modulo 2^2N, which is the
// exact product since |A*B| <= 2^(2N-2). The structure (decoders, PPGs,
// CSA tree with COR, fast adder) follows the pre-encoded NR4SD scheme; the
// COR formulation and the tree and adder types are this design's choices.
module nr4sd_mult_core
  import nr4sd_pkg::*;
#(
  parameter int      N      = 16,
  parameter scheme_e SCHEME = NR4SD_MINUS
) (
  input  logic [N-1:0]  a,
  input  logic [N:0]    enc_b,
  output logic [2*N-1:0] p
);

  localparam int K    = N / 2;
  localparam int W    = 2 * N;
  localparam int ROWS = K + 2;

  // COR = -(2^N * (4^K - 1) / 3) mod 2^W
  function automatic logic [W-1:0] cor_term();
    logic [W-1:0] acc = '0;
    for (int j = 0; j < K; j++) acc += W'(1) << (N + 2 * j);
    return -acc;
  endfunction

  logic [N:0]   pp   [K];
  logic [K-1:0] cin;
  logic [W-1:0] rows [ROWS];

  for (genvar j = 0; j < K - 1; j++) begin : g_digit
    nr_sig_t sig;
    nr4sd_sig_gen #(.SCHEME(SCHEME)) u_sig (
      .d  (enc_b[2*j+1:2*j]),
      .sig(sig)
    );
    ppg_nr4sd #(.N(N), .SCHEME(SCHEME)) u_ppg (
      .a  (a),
      .sig(sig),
      .pp (pp[j]),
      .cin(cin[j])
    );
  end

  ppg_mb #(.N(N)) u_ppg_msd (
    .a  (a),
    .sig(mb_sig_t'(enc_b[N:N-2])),
    .pp (pp[K-1]),
    .cin(cin[K-1])
  );

  always_comb begin
    for (int j = 0; j < K; j++)
      rows[j] = W'({~pp[j][N], pp[j][N-1:0]}) << (2 * j);
    rows[K] = '0;
    for (int j = 0; j < K; j++) rows[K][2*j] = cin[j];
    rows[K+1] = cor_term();
  end

  logic [W-1:0] cs_sum, cs_carry;

  csa_tree #(.ROWS(ROWS), .W(W)) u_tree (
    .rows (rows),
    .sum  (cs_sum),
    .carry(cs_carry)
  );

  cla_adder #(.W(W)) u_cla (
    .x(cs_sum),
    .y(cs_carry),
    .s(p)
  );

  initial assert (N >= 4 && N % 2 == 0) else $error("N must be even and >= 4");

endmodule
