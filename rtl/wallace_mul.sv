// wallace_mul: unsigned WA x WB multiplier core built as a Wallace tree.
//
// Combinational. Row i of the partial-product array is a AND b[i], shifted
// left by i. Levels of 3:2 carry-save adders (full adders working on whole
// rows) reduce every group of three rows to a sum row and a carry row, rows
// left over pass to the next level, until two rows remain. The two rows
// are returned unadded: product = sum + carry (mod 2^(WA+WB)). The final
// carry-propagate addition is left to the next pipeline stage, as in the
// three-stage multiplier, divider and square root units of the FPU.
module wallace_mul #(
  parameter int unsigned WA = 24,
  parameter int unsigned WB = 24
) (
  input  logic [WA-1:0]    a,
  input  logic [WB-1:0]    b,
  output logic [WA+WB-1:0] sum,
  output logic [WA+WB-1:0] carry
);

  localparam int unsigned W = WA + WB;

  // Number of rows left after one 3:2 level.
  function automatic int next_rows(int n);
    return (n <= 2) ? n : 2 * (n / 3) + n % 3;
  endfunction

  function automatic int rows_at(int level);
    int n = int'(WB);
    for (int i = 0; i < level; i++) n = next_rows(n);
    return n;
  endfunction

  function automatic int num_levels();
    int n = int'(WB);
    int l = 0;
    while (n > 2) begin
      n = next_rows(n);
      l++;
    end
    return l;
  endfunction

  localparam int LEVELS = num_levels();

  logic [W-1:0] pp [WB];

  for (genvar i = 0; i < int'(WB); i++) begin : g_pp
    assign pp[i] = b[i] ? (W'(a) << i) : '0;
  end

  // One block per level; nxt holds the rows this level produces.
  for (genvar l = 0; l < LEVELS; l++) begin : g_level
    localparam int NIN = rows_at(l);
    localparam int NG  = NIN / 3;
    localparam int NR  = NIN % 3;
    logic [W-1:0] cur [WB];
    logic [W-1:0] nxt [WB];
    if (l == 0) begin : g_first
      assign cur = pp;
    end else begin : g_next
      assign cur = g_level[l-1].nxt;
    end
    for (genvar g = 0; g < NG; g++) begin : g_csa
      assign nxt[2*g]   = cur[3*g] ^ cur[3*g+1] ^ cur[3*g+2];
      assign nxt[2*g+1] = ((cur[3*g] & cur[3*g+1]) | (cur[3*g] & cur[3*g+2]) |
                           (cur[3*g+1] & cur[3*g+2])) << 1;
    end
    for (genvar r = 0; r < NR; r++) begin : g_pass
      assign nxt[2*NG+r] = cur[3*NG+r];
    end
    for (genvar r = 2*NG + NR; r < int'(WB); r++) begin : g_unused
      assign nxt[r] = '0;
    end
  end

  if (LEVELS == 0) begin : g_flat
    assign sum   = pp[0];
    assign carry = (WB > 1) ? pp[WB > 1 ? 1 : 0] : '0;
  end else begin : g_tree
    assign sum   = g_level[LEVELS-1].nxt[0];
    assign carry = g_level[LEVELS-1].nxt[1];
  end

endmodule
