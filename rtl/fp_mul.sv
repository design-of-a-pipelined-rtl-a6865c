// fp_mul: three-stage IEEE 754 single-precision multiplier (FMUL).
//
//   E1  unpack, add exponents, reduce the 24 x 24 partial products to a sum
//       row and a carry row with a Wallace tree (wallace_mul)
//   E2  carry-propagate addition of the two rows: 48-bit product
//   E3  normalise by at most one position, round to nearest even, pack;
//       y is combinational from the E3 register
// Inputs are taken at a clock edge, y holds the result two edges later, one
// new operation per cycle. Denormal inputs count as zero, denormal results
// are flushed to zero, overflow gives infinity, inf x 0 and NaN inputs give
// the quiet NaN 0x7fc00000. The Wallace tree follows the document; the
// stage split of the tree and the adder is this design's.
module fp_mul (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [31:0] a,
  input  logic [31:0] b,
  output logic [31:0] y
);

  localparam logic [31:0] QNAN = 32'h7fc0_0000;

  typedef struct packed {
    logic              sign;
    logic signed [9:0] exp;   // ea + eb - 127
    logic              zero;
    logic              nan;
    logic              inf;
  } flags_t;

  logic [23:0] ma, mb;
  logic [47:0] ps, pc;
  flags_t      f1, f2_q, f3_q;
  logic [47:0] s2_q, c2_q, p3_q;

  always_comb begin
    logic a_nan, b_nan, a_inf, b_inf, a_zero, b_zero;
    a_zero = a[30:23] == 8'd0;
    b_zero = b[30:23] == 8'd0;
    a_nan  = (a[30:23] == 8'hff) && (a[22:0] != 0);
    b_nan  = (b[30:23] == 8'hff) && (b[22:0] != 0);
    a_inf  = (a[30:23] == 8'hff) && (a[22:0] == 0);
    b_inf  = (b[30:23] == 8'hff) && (b[22:0] == 0);
    ma = a_zero ? 24'd0 : {1'b1, a[22:0]};
    mb = b_zero ? 24'd0 : {1'b1, b[22:0]};
    f1.sign = a[31] ^ b[31];
    f1.exp  = $signed({2'b00, a[30:23]}) + $signed({2'b00, b[30:23]}) - 10'sd127;
    f1.zero = a_zero | b_zero;
    f1.nan  = a_nan | b_nan | (a_inf & b_zero) | (b_inf & a_zero);
    f1.inf  = a_inf | b_inf;
  end

  wallace_mul #(.WA(24), .WB(24)) u_tree (.a(ma), .b(mb), .sum(ps), .carry(pc));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      f2_q <= '0; f3_q <= '0;
      s2_q <= '0; c2_q <= '0; p3_q <= '0;
    end else begin
      f2_q <= f1;
      s2_q <= ps;
      c2_q <= pc;
      f3_q <= f2_q;
      p3_q <= s2_q + c2_q;
    end
  end

  always_comb begin
    logic [23:0]       m;
    logic              g, st, up;
    logic [24:0]       mr;
    logic signed [9:0] e;
    if (p3_q[47]) begin
      m  = p3_q[47:24];
      g  = p3_q[23];
      st = |p3_q[22:0];
      e  = f3_q.exp + 10'sd1;
    end else begin
      m  = p3_q[46:23];
      g  = p3_q[22];
      st = |p3_q[21:0];
      e  = f3_q.exp;
    end
    up = g & (st | m[0]);
    mr = {1'b0, m} + 25'(up);
    e  = e + $signed({9'd0, mr[24]});
    if (f3_q.nan)
      y = QNAN;
    else if (f3_q.inf)
      y = {f3_q.sign, 8'hff, 23'd0};
    else if (f3_q.zero || e <= 10'sd0)
      y = {f3_q.sign, 31'd0};
    else if (e >= 10'sd255)
      y = {f3_q.sign, 8'hff, 23'd0};
    else
      y = {f3_q.sign, e[7:0], mr[24] ? mr[23:1] : mr[22:0]};
  end

endmodule
