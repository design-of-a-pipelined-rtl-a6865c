// nr_iter: Newton-Raphson iteration unit of one FPU lane (the "ITE" step of
// fdivs/fsqrts that runs while the instruction waits in ID).
//
// mode = 0: approximates 1/m for the significand m = 1.f of operand x,
//           x(k+1) = x(k) * (2 - m * x(k)).
// mode = 1: approximates 1/sqrt(m') where m' = 1.f if the unbiased exponent
//           of x is even and 2 * 1.f if it is odd,
//           y(k+1) = y(k) * (3 - m' * y(k)^2) / 2.
// Both start from a 64-entry seed table indexed by the leading fraction bits
// (for 1/sqrt also the exponent parity); the table holds the reciprocal (or
// reciprocal root) of each interval's midpoint and is computed at
// elaboration. result is unsigned fixed point with 31 fraction bits, in
// (0.5, 1.0]. Timing: start is sampled at a clock edge (seed loaded), then
// ITER edges perform one iteration each; done rises after ITER+1 edges and
// stays high, holding result, until ack. busy = start | running. The CPU
// asserts stall_div_sqrt for exactly these cycles.
// The method follows the document; seed size, iteration count, fixed-point
// widths and the use of plain multipliers inside the iteration are this
// design's choices.
module nr_iter #(
  parameter int unsigned ITER = 3
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic        mode,
  input  logic [31:0] x,        // only exponent bit 0 and fraction are used
  input  logic        ack,
  output logic        busy,
  output logic        done,
  output logic [31:0] result
);

  typedef enum logic [1:0] {S_IDLE, S_RUN, S_DONE} state_e;

  localparam logic [32:0] ONE = 33'h0_8000_0000;  // 1.0 with 31 fraction bits

  // Seed of 1/(1 + (i + 0.5)/64), 31 fraction bits.
  function automatic logic [31:0] recip_seed(int i);
    longint num = 64'sd1 << 38;
    return 32'(num / longint'(128 + 2 * i + 1));
  endfunction

  function automatic longint isqrt(longint v);
    longint root = 0;
    for (int b = 31; b >= 0; b--)
      if ((root + (64'sd1 <<< b)) * (root + (64'sd1 <<< b)) <= v) root = root + (64'sd1 <<< b);
    return root;
  endfunction

  // Seed of 1/sqrt(m'), m' = s * (1 + (j + 0.5)/32), s = 1 (even) or 2 (odd),
  // computed with 15 fraction bits and widened to 31.
  function automatic logic [31:0] rsqrt_seed(int idx);
    int     j   = idx % 32;
    longint num = (idx >= 32) ? (64'sd1 <<< 35) : (64'sd1 <<< 36);
    return 32'(isqrt(num / longint'(64 + 2 * j + 1))) << 16;
  endfunction

  logic [31:0] seed_rcp [64];
  logic [31:0] seed_rsq [64];
  for (genvar i = 0; i < 64; i++) begin : g_seed
    assign seed_rcp[i] = recip_seed(i);
    assign seed_rsq[i] = rsqrt_seed(i);
  end

  state_e                    state;
  logic [$clog2(ITER+1)-1:0] cnt;
  logic                      mode_q;
  logic [24:0]               m_q;     // 2 integer + 23 fraction bits
  logic [31:0]               r_q;

  // Significand as read by each mode, 2 integer + 23 fraction bits.
  logic        odd_exp;
  logic [24:0] m_in;
  assign odd_exp = ~x[23];                 // unbiased exponent odd <=> biased even
  assign m_in    = (mode && odd_exp) ? {1'b1, x[22:0], 1'b0} : {2'b01, x[22:0]};

  // One iteration step; 2 - m*x and 3 - m*y^2 carry 30 fraction bits.
  logic [63:0] rc_t, rc_p, rs_y2, rs_t, rs_p;
  logic [31:0] rc_k, rs_k;
  logic [31:0] r_next;
  always_comb begin
    rc_t  = 64'(m_q) * 64'(r_q);                   // m*x, 54 fraction bits
    rc_k  = 32'(64'd2 << 30) - 32'(rc_t >> 24);
    rc_p  = 64'(r_q) * 64'(rc_k) >> 30;            // 31 fraction bits
    rs_y2 = 64'(r_q) * 64'(r_q) >> 31;             // y^2, 31 fraction bits
    rs_t  = 64'(m_q) * rs_y2 >> 24;                // m*y^2, 30 fraction bits
    rs_k  = 32'(64'd3 << 30) - 32'(rs_t);
    rs_p  = 64'(r_q) * 64'(rs_k) >> 31;            // includes the halving
    if (!mode_q) r_next = (rc_p > 64'(ONE)) ? ONE[31:0] : rc_p[31:0];
    else         r_next = (rs_p > 64'(ONE)) ? ONE[31:0] : rs_p[31:0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= S_IDLE;
      cnt    <= '0;
      mode_q <= 1'b0;
      m_q    <= '0;
      r_q    <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (start) begin
          state  <= (ITER == 0) ? S_DONE : S_RUN;
          cnt    <= ($clog2(ITER+1))'(ITER);
          mode_q <= mode;
          m_q    <= m_in;
          r_q    <= mode ? seed_rsq[{odd_exp, x[22:18]}] : seed_rcp[x[22:17]];
        end
        S_RUN: begin
          r_q <= r_next;
          cnt <= cnt - 1'b1;
          if (cnt == 1) state <= S_DONE;
        end
        default: if (ack) state <= S_IDLE;
      endcase
    end
  end

  assign busy   = start | (state == S_RUN);
  assign done   = (state == S_DONE);
  assign result = r_q;

endmodule
