// csa_tree: carry-save adder tree.
//
// Reduces ROWS operands of W bits to a sum/carry pair whose total equals
// the total of the operands modulo 2^W. Each level groups the rows three
// at a time into word-wide 3:2 carry-save adders (sum = x^y^z, carry =
// majority shifted left by one) and passes the one or two rows left over
// straight to the next level, Wallace style, until two rows remain. Levels
// and row counts are worked out at elaboration; the number of levels grows
// as log1.5(ROWS). Bits that are constant zero in the operands (partial
// products are shifted) are removed by synthesis. Purely combinational.
// The tree shape is this design's choice; the scheme asks only for a CSA
// tree followed by a fast adder.
module csa_tree #(
  parameter int ROWS = 10,
  parameter int W    = 32
) (
  input  logic [W-1:0] rows [ROWS],
  output logic [W-1:0] sum,
  output logic [W-1:0] carry
);

  // Rows present after l levels.
  function automatic int rows_at(int l);
    int r = ROWS;
    for (int i = 0; i < l; i++) r = (r / 3) * 2 + (r % 3);
    return r;
  endfunction

  function automatic int num_levels();
    int l = 0;
    while (rows_at(l) > 2) l++;
    return l;
  endfunction

  localparam int LEVELS = num_levels();
  localparam int RLAST  = rows_at(LEVELS);

  for (genvar l = 0; l < LEVELS; l++) begin : g_lvl
    localparam int R  = rows_at(l);
    localparam int G  = R / 3;
    localparam int RN = rows_at(l + 1);

    logic [W-1:0] cur [R];   // rows entering this level
    logic [W-1:0] nxt [RN];  // rows leaving it

    for (genvar r = 0; r < R; r++) begin : g_cur
      if (l == 0) begin : g_first
        assign cur[r] = rows[r];
      end else begin : g_chain
        assign cur[r] = g_lvl[l-1].nxt[r];
      end
    end

    for (genvar g = 0; g < G; g++) begin : g_csa
      assign nxt[2*g]   = cur[3*g] ^ cur[3*g+1] ^ cur[3*g+2];
      assign nxt[2*g+1] = ((cur[3*g] & cur[3*g+1]) | (cur[3*g] & cur[3*g+2])
                           | (cur[3*g+1] & cur[3*g+2])) << 1;
    end
    for (genvar r = 3 * G; r < R; r++) begin : g_pass
      assign nxt[2*G + r - 3*G] = cur[r];
    end
  end

  if (LEVELS == 0) begin : g_out_direct
    assign sum   = rows[0];
    assign carry = (ROWS > 1) ? rows[ROWS-1] : '0;
  end else begin : g_out
    assign sum   = g_lvl[LEVELS-1].nxt[0];
    assign carry = g_lvl[LEVELS-1].nxt[RLAST-1];
  end

endmodule
