// fp_cvt: integer <-> single-precision converter of one FPU lane (I2F/F2I).
//
// Combinational; i_f selects the direction as in the document's FPU
// (1: fi2fs, signed 32-bit integer to float rounded to nearest even;
// 0: ff2is, float to signed integer truncated toward zero). Out-of-range
// and infinite values saturate to 0x7fffffff / 0x80000000, NaN gives
// 0x80000000, denormals convert to 0. The FPU registers the result once,
// so a conversion is finished after two stages, as the document states;
// the rounding and saturation rules are this design's.
module fp_cvt (
  input  logic        i_f,
  input  logic [31:0] a,
  output logic [31:0] y
);

  // int -> float
  logic [31:0] i2f;
  always_comb begin
    logic [31:0] mag, norm;
    logic [4:0]  lz;
    logic [7:0]  e;
    logic [23:0] mr;
    logic        up;
    mag = a[31] ? -a : a;
    lz  = 5'd0;
    for (int i = 0; i < 32; i++)
      if (mag[i]) lz = 5'(31 - i);
    norm = mag << lz;
    up   = norm[7] & ((|norm[6:0]) | norm[8]);
    mr   = {1'b0, norm[30:8]} + 24'(up);
    e    = 8'd158 - {3'd0, lz} + {7'd0, mr[23]};
    i2f  = (a == 32'd0) ? 32'd0 : {a[31], e, mr[22:0]};
  end

  // float -> int
  logic [31:0] f2i;
  always_comb begin
    logic [7:0]  ea;
    logic [31:0] mag;
    ea  = a[30:23];
    mag = '0;
    if (ea == 8'hff && a[22:0] != 0)
      f2i = 32'h8000_0000;
    else if (ea >= 8'd158)                       // |a| >= 2^31
      f2i = a[31] ? 32'h8000_0000 : 32'h7fff_ffff;
    else if (ea < 8'd127)                        // |a| < 1
      f2i = 32'd0;
    else begin
      if (ea >= 8'd150) mag = {8'd0, 1'b1, a[22:0]} << (ea - 8'd150);
      else              mag = {8'd0, 1'b1, a[22:0]} >> (8'd150 - ea);
      f2i = a[31] ? -mag : mag;
    end
  end

  assign y = i_f ? i2f : f2i;

endmodule
