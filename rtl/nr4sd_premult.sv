// nr4sd_premult: pre-encoded NR4SD multiplier for fixed coefficients.
//
// Multiplies an N-bit two's complement operand A by coefficient number
// coef_addr of a built-in table. The coefficients sit in coef_rom already
// NR4SD encoded (N+1 bits each), so no encoder is needed on the datapath:
// only the small per-digit decoders of nr4sd_mult_core, its partial product
// generators, CSA tree and fast adder. SCHEME picks the digit set,
// NR4SD- {-2,-1,0,+1} or NR4SD+ {-1,0,+1,+2}.
//
// Timing (this design's choice): two register stages, one operation per
// clock. The rising edge that takes a request (in_valid high) registers A
// and reads the ROM; during the next cycle the combinational multiplier
// works and the following edge registers p with out_valid. So p and
// out_valid are on the outputs from the second edge on, and a receiver
// clocked with the same edges samples them two clocks after it drove
// in_valid. rst_n (active low, synchronous) clears only the valid bits.
module nr4sd_premult
  import nr4sd_pkg::*;
#(
  parameter scheme_e SCHEME = NR4SD_MINUS,
  parameter int      N      = 16,
  parameter int      DEPTH  = 64,
  parameter int      AW     = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           in_valid,
  input  logic [N-1:0]   a,
  input  logic [AW-1:0]  coef_addr,
  output logic           out_valid,
  output logic [2*N-1:0] p
);

  logic [N:0]     enc_q;
  logic [N-1:0]   a_q;
  logic           v_q;
  logic [2*N-1:0] p_d;

  coef_rom #(.SCHEME(SCHEME), .N(N), .DEPTH(DEPTH), .AW(AW)) u_rom (
    .clk (clk),
    .en  (in_valid),
    .addr(coef_addr),
    .data(enc_q)
  );

  always_ff @(posedge clk) begin
    if (in_valid) a_q <= a;
  end

  nr4sd_mult_core #(.N(N), .SCHEME(SCHEME)) u_core (
    .a    (a_q),
    .enc_b(enc_q),
    .p    (p_d)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      v_q       <= 1'b0;
      out_valid <= 1'b0;
    end else begin
      v_q       <= in_valid;
      out_valid <= v_q;
    end
    if (v_q) p <= p_d;
  end

endmodule
