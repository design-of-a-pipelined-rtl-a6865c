// fp_div: three-stage quotient unit of fdivs (FDIV), a / b = a x (1/b).
//
// r is the reciprocal of b's significand produced by nr_iter in the ID
// stage (31 fraction bits, in (0.5, 1]).
//   E1  unpack, exponent ea - eb + 127, Wallace-tree reduction of the
//       24 x 32 product of a's significand and r
//   E2  carry-propagate addition: quotient significand with 54 fraction bits
//   E3  normalise, round to nearest, pack; y is combinational from E3
// Same timing as fp_mul: operands at one edge, result two edges later, one
// operation per cycle. The quotient is as exact as the reciprocal (about 30
// bits), so the result can differ from the correctly rounded one by one unit
// in the last place. x/0 gives infinity, 0/0, inf/inf and NaN inputs the
// quiet NaN, 0/x and x/inf zero; denormals are treated as zero.
module fp_div (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [31:0] a,
  input  logic [31:0] b,
  input  logic [31:0] r,
  output logic [31:0] y
);

  localparam logic [31:0] QNAN = 32'h7fc0_0000;

  typedef struct packed {
    logic              sign;
    logic signed [9:0] exp;
    logic              zero;
    logic              nan;
    logic              inf;
  } flags_t;

  logic [23:0] ma;
  logic [55:0] ps, pc;
  flags_t      f1, f2_q, f3_q;
  logic [55:0] s2_q, c2_q, q3_q;

  always_comb begin
    logic a_nan, b_nan, a_inf, b_inf, a_zero, b_zero;
    a_zero = a[30:23] == 8'd0;
    b_zero = b[30:23] == 8'd0;
    a_nan  = (a[30:23] == 8'hff) && (a[22:0] != 0);
    b_nan  = (b[30:23] == 8'hff) && (b[22:0] != 0);
    a_inf  = (a[30:23] == 8'hff) && (a[22:0] == 0);
    b_inf  = (b[30:23] == 8'hff) && (b[22:0] == 0);
    ma = a_zero ? 24'd0 : {1'b1, a[22:0]};
    f1.sign = a[31] ^ b[31];
    f1.exp  = $signed({2'b00, a[30:23]}) - $signed({2'b00, b[30:23]}) + 10'sd127;
    f1.nan  = a_nan | b_nan | (a_inf & b_inf) | (a_zero & b_zero);
    f1.inf  = ~f1.nan & (a_inf | b_zero);
    f1.zero = ~f1.nan & (a_zero | b_inf);
  end

  wallace_mul #(.WA(24), .WB(32)) u_tree (.a(ma), .b(r), .sum(ps), .carry(pc));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      f2_q <= '0; f3_q <= '0;
      s2_q <= '0; c2_q <= '0; q3_q <= '0;
    end else begin
      f2_q <= f1;
      s2_q <= ps;
      c2_q <= pc;
      f3_q <= f2_q;
      q3_q <= s2_q + c2_q;
    end
  end

  // Quotient q3_q has 54 fraction bits and lies in about (0.5, 2).
  always_comb begin
    logic [23:0]       m;
    logic              g, st, up;
    logic [24:0]       mr;
    logic signed [9:0] e;
    if (q3_q[55]) begin
      m  = q3_q[55:32]; g = q3_q[31]; st = |q3_q[30:0]; e = f3_q.exp + 10'sd1;
    end else if (q3_q[54]) begin
      m  = q3_q[54:31]; g = q3_q[30]; st = |q3_q[29:0]; e = f3_q.exp;
    end else begin
      m  = q3_q[53:30]; g = q3_q[29]; st = |q3_q[28:0]; e = f3_q.exp - 10'sd1;
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
