// cla_adder: fast carry-lookahead adder that merges the carry-save pair.
//
// s = x + y modulo 2^W. Bit generate g = x & y and propagate p = x ^ y are
// combined in a parallel-prefix network of ceil(log2 W) levels (Kogge-Stone
// form): at level l each bit merges the (G, P) pair of the bit 2^l places
// below it, G = G_hi | P_hi & G_lo, P = P_hi & P_lo. After the last level
// G[i] is the carry out of bit i, so every carry is known after log2 W
// gate levels instead of rippling. The prefix structure is this design's
// choice of "fast CLA". Purely combinational.
module cla_adder #(
  parameter int W = 32
) (
  input  logic [W-1:0] x,
  input  logic [W-1:0] y,
  output logic [W-1:0] s
);

  localparam int LV = (W > 1) ? $clog2(W) : 1;

  logic [W-1:0] gen [LV+1];
  logic [W-1:0] prp [LV+1];

  assign gen[0] = x & y;
  assign prp[0] = x ^ y;

  for (genvar l = 0; l < LV; l++) begin : g_level
    localparam int D = 1 << l;
    for (genvar i = 0; i < W; i++) begin : g_bit
      if (i >= D) begin : g_merge
        assign gen[l+1][i] = gen[l][i] | (prp[l][i] & gen[l][i-D]);
        assign prp[l+1][i] = prp[l][i] & prp[l][i-D];
      end else begin : g_keep
        assign gen[l+1][i] = gen[l][i];
        assign prp[l+1][i] = prp[l][i];
      end
    end
  end

  if (W > 1) begin : g_sum
    assign s = prp[0] ^ {gen[LV][W-2:0], 1'b0};
  end else begin : g_sum1
    assign s = prp[0];
  end

endmodule
