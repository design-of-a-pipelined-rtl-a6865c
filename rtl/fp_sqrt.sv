// fp_sqrt: three-stage square-root unit of fsqrts (FSQRT),
// sqrt(x) = m' x (1/sqrt(m')) x 2^(e/2).
//
// r is 1/sqrt(m') from nr_iter (31 fraction bits), where m' = 1.f when the
// unbiased exponent e of x is even and 2 x 1.f (with e - 1) when it is odd.
//   E1  halve the exponent, Wallace-tree reduction of m' (25 bits) x r
//   E2  carry-propagate addition: root significand with 54 fraction bits
//   E3  normalise, round to nearest, pack; y is combinational from E3
// Same timing as fp_mul. Accuracy is that of r: the result may be one unit
// in the last place from the correctly rounded root. sqrt(+-0) = +-0,
// sqrt(+inf) = +inf, a negative operand or NaN gives the quiet NaN
// 0x7fc00000; denormals are treated as zero.
module fp_sqrt (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [31:0] x,
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

  logic [24:0] m;
  logic [56:0] ps, pc;
  flags_t      f1, f2_q, f3_q;
  logic [56:0] s2_q, c2_q, q3_q;

  always_comb begin
    logic              x_zero, x_nan, x_inf, odd;
    logic signed [9:0] eu;
    x_zero = x[30:23] == 8'd0;
    x_nan  = (x[30:23] == 8'hff) && (x[22:0] != 0);
    x_inf  = (x[30:23] == 8'hff) && (x[22:0] == 0);
    odd    = ~x[23];
    m      = odd ? {1'b1, x[22:0], 1'b0} : {2'b01, x[22:0]};
    eu     = $signed({2'b00, x[30:23]}) - 10'sd127 - (odd ? 10'sd1 : 10'sd0);
    f1.sign = x[31];
    f1.exp  = (eu >>> 1) + 10'sd127;
    f1.zero = x_zero;
    f1.nan  = x_nan | (x[31] & ~x_zero);
    f1.inf  = x_inf & ~x[31];
  end

  wallace_mul #(.WA(25), .WB(32)) u_tree (.a(m), .b(r), .sum(ps), .carry(pc));

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

  // Root significand q3_q has 54 fraction bits and lies in about [1, 2).
  always_comb begin
    logic [23:0]       mm;
    logic              g, st, up;
    logic [24:0]       mr;
    logic signed [9:0] e;
    if (q3_q[55]) begin
      mm = q3_q[55:32]; g = q3_q[31]; st = |q3_q[30:0]; e = f3_q.exp + 10'sd1;
    end else if (q3_q[54]) begin
      mm = q3_q[54:31]; g = q3_q[30]; st = |q3_q[29:0]; e = f3_q.exp;
    end else begin
      mm = q3_q[53:30]; g = q3_q[29]; st = |q3_q[28:0]; e = f3_q.exp - 10'sd1;
    end
    up = g & (st | mm[0]);
    mr = {1'b0, mm} + 25'(up);
    e  = e + $signed({9'd0, mr[24]});
    if (f3_q.nan)
      y = QNAN;
    else if (f3_q.zero)
      y = {f3_q.sign, 31'd0};
    else if (f3_q.inf)
      y = {1'b0, 8'hff, 23'd0};
    else
      y = {1'b0, e[7:0], mr[24] ? mr[23:1] : mr[22:0]};
  end

endmodule
