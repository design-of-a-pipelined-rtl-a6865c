// fp_addsub: three-stage IEEE 754 single-precision adder/subtractor
// (FADDER). sub = 1 selects a - b (the FPU's sel[0]).
//
//   E1  unpack, order the operands by magnitude, align the smaller
//       significand by the exponent difference keeping guard, round and
//       sticky bits
//   E2  add or subtract the aligned significands
//   E3  normalise (leading-zero shift or one-bit right shift), round to
//       nearest even, pack; y is combinational from the E3 register
// Inputs are taken at a clock edge and y shows the result two edges later;
// the unit accepts a new operation every cycle. Denormal inputs are read as
// zero and results that would be denormal are flushed to zero; infinities
// and NaNs (quiet NaN 0x7fc00000) are handled. The stage split follows the
// document's E1/E2/E3 model; the flush-to-zero choice is this design's.
module fp_addsub (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        sub,
  input  logic [31:0] a,
  input  logic [31:0] b,
  output logic [31:0] y
);

  localparam logic [31:0] QNAN = 32'h7fc0_0000;

  typedef struct packed {
    logic        sign;
    logic [7:0]  exp;
    logic [26:0] ml;     // larger significand with 3 extra bits
    logic [26:0] ms;     // aligned smaller significand, sticky in bit 0
    logic        eff_sub;
    logic        nan;
    logic        inf;
    logic        inf_sign;
  } s2_t;

  typedef struct packed {
    logic        sign;
    logic [7:0]  exp;
    logic [27:0] sum;
    logic        eff_sub;
    logic        nan;
    logic        inf;
    logic        inf_sign;
  } s3_t;

  s2_t e1, e2_q;
  s3_t e2, e3_q;

  // ---------------- E1: unpack and align
  always_comb begin
    logic        sa, sb, a_big;
    logic [7:0]  ea, eb, d;
    logic [22:0] fa, fb;
    logic [23:0] ma, mb, mlg, msm;
    logic [26:0] msx;
    logic        a_nan, b_nan, a_inf, b_inf;
    sa = a[31]; ea = a[30:23]; fa = a[22:0];
    sb = b[31] ^ sub; eb = b[30:23]; fb = b[22:0];
    ma = (ea == 8'd0) ? 24'd0 : {1'b1, fa};
    mb = (eb == 8'd0) ? 24'd0 : {1'b1, fb};
    a_nan = (ea == 8'hff) && (fa != 0);
    b_nan = (eb == 8'hff) && (fb != 0);
    a_inf = (ea == 8'hff) && (fa == 0);
    b_inf = (eb == 8'hff) && (fb == 0);
    a_big = {ea, ma} >= {eb, mb};
    e1.sign    = a_big ? sa : sb;
    e1.exp     = a_big ? ea : eb;
    mlg        = a_big ? ma : mb;
    msm        = a_big ? mb : ma;
    d          = a_big ? ea - eb : eb - ea;
    msx        = {msm, 3'b000};
    e1.ml      = {mlg, 3'b000};
    e1.ms      = (msx >> d) | 27'(|(msx & ((27'd1 << d) - 27'd1)));
    e1.eff_sub = sa ^ sb;
    e1.nan     = a_nan | b_nan | (a_inf & b_inf & (sa ^ sb));
    e1.inf     = a_inf | b_inf;
    e1.inf_sign = a_inf ? sa : sb;
  end

  // ---------------- E2: significand add/subtract
  always_comb begin
    e2.sign     = e2_q.sign;
    e2.exp      = e2_q.exp;
    e2.sum      = e2_q.eff_sub ? {1'b0, e2_q.ml} - {1'b0, e2_q.ms}
                               : {1'b0, e2_q.ml} + {1'b0, e2_q.ms};
    e2.eff_sub  = e2_q.eff_sub;
    e2.nan      = e2_q.nan;
    e2.inf      = e2_q.inf;
    e2.inf_sign = e2_q.inf_sign;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      e2_q <= '0;
      e3_q <= '0;
    end else begin
      e2_q <= e1;
      e3_q <= e2;
    end
  end

  // ---------------- E3: normalise, round, pack
  always_comb begin
    logic [26:0] m;
    logic [9:0]  e;
    logic [4:0]  lz;
    logic        up, zero;
    logic [24:0] mr;
    zero = 1'b0;
    lz   = 5'd0;
    for (int i = 0; i <= 26; i++)
      if (e3_q.sum[i]) lz = 5'(26 - i);
    if (e3_q.sum[27]) begin
      m = e3_q.sum[27:1] | 27'(e3_q.sum[0]);
      e = {2'b00, e3_q.exp} + 10'd1;
    end else if (e3_q.sum == 28'd0 || {5'd0, lz} >= {2'b00, e3_q.exp}) begin
      m = '0;
      e = '0;
      zero = 1'b1;
    end else begin
      m = e3_q.sum[26:0] << lz;
      e = {2'b00, e3_q.exp} - {5'd0, lz};
    end
    up = m[2] & (m[1] | m[0] | m[3]);
    mr = {1'b0, m[26:3]} + 25'(up);
    e  = e + 10'(mr[24]);
    if (e3_q.nan)
      y = QNAN;
    else if (e3_q.inf)
      y = {e3_q.inf_sign, 8'hff, 23'd0};
    else if (zero)
      y = {e3_q.eff_sub ? 1'b0 : e3_q.sign, 31'd0};
    else if (e >= 10'd255)
      y = {e3_q.sign, 8'hff, 23'd0};
    else
      y = {e3_q.sign, e[7:0], mr[24] ? mr[23:1] : mr[22:0]};
  end

endmodule
