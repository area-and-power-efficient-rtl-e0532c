// nr4sd_premult_top: the two pre-encoded NR4SD multipliers side by side.
//
// One nr4sd_premult uses the NR4SD- digit set {-2,-1,0,+1}, the other the
// NR4SD+ set {-1,0,+1,+2}; each has its own coefficient ROM holding the
// same N-bit coefficient table in its own encoding. Both receive the same
// operand A and coefficient index, so p_minus and p_plus must agree; the
// pair lets the two encodings be compared on equal terms. Putting both in
// one top is this design's choice, since the two are alternative forms of
// the same multiplier.
//
// Timing: one operation per clock; out_valid and both products are
// registered at the rising edge after the one that takes the request, so
// a receiver on the same clock sees them two clocks after it raised
// in_valid (see nr4sd_premult). rst_n is active low and
// synchronous and clears only the valid pipeline.
module nr4sd_premult_top
  import nr4sd_pkg::*;
#(
  parameter int N     = 16,
  parameter int DEPTH = 64,
  parameter int AW    = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           in_valid,
  input  logic [N-1:0]   a,
  input  logic [AW-1:0]  coef_addr,
  output logic           out_valid,
  output logic [2*N-1:0] p_minus,
  output logic [2*N-1:0] p_plus
);

  logic v_minus, v_plus;

  nr4sd_premult #(.SCHEME(NR4SD_MINUS), .N(N), .DEPTH(DEPTH), .AW(AW)) u_minus (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (in_valid),
    .a        (a),
    .coef_addr(coef_addr),
    .out_valid(v_minus),
    .p        (p_minus)
  );

  nr4sd_premult #(.SCHEME(NR4SD_PLUS), .N(N), .DEPTH(DEPTH), .AW(AW)) u_plus (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (in_valid),
    .a        (a),
    .coef_addr(coef_addr),
    .out_valid(v_plus),
    .p        (p_plus)
  );

  assign out_valid = v_minus & v_plus;

endmodule
