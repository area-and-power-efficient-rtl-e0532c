// coef_rom: read-only memory of fixed coefficients stored in NR4SD form.
//
// Entry i holds coefficient B_i = nr4sd_pkg::coef_value(i, DEPTH, N) (one
// sine period), encoded offline into the (N+1)-bit NR4SD word: 2 bits per
// digit for the k-1 lower digits and 3 MB bits for the top digit, against
// 3N/2 bits for a Modified Booth pre-encoded word. The encoding is done at
// elaboration by an encoder instance per entry working on a constant, so
// only the encoded bits remain after synthesis. Storing the encoded form,
// and its N+1 bit width, follows the pre-encoded NR4SD scheme; the table
// contents, depth and synchronous read are this design's choices.
//
// Timing: synchronous read; data shows the entry at addr one clock after
// a cycle with en high, and holds its value while en is low.
module coef_rom
  import nr4sd_pkg::*;
#(
  parameter scheme_e SCHEME = NR4SD_MINUS,
  parameter int      N      = 16,
  parameter int      DEPTH  = 64,
  parameter int      AW     = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic          clk,
  input  logic          en,
  input  logic [AW-1:0] addr,
  output logic [N:0]    data
);

  logic [N:0] rom [DEPTH];

  for (genvar i = 0; i < DEPTH; i++) begin : g_entry
    localparam logic [N-1:0] COEF = N'(coef_value(i, DEPTH, N));
    if (SCHEME == NR4SD_MINUS) begin : g_minus
      nr4sd_minus_encoder #(.N(N)) u_enc (.b(COEF), .enc(rom[i]));
    end else begin : g_plus
      nr4sd_plus_encoder #(.N(N)) u_enc (.b(COEF), .enc(rom[i]));
    end
  end

  always_ff @(posedge clk) begin
    if (en) data <= (int'(addr) < DEPTH) ? rom[addr] : '0;
  end

endmodule
