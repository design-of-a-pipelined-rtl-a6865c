// tb_fp_cvt: int -> float against double rounded to single, float -> int
// against truncation of the double value, including saturation and NaN.
module tb_fp_cvt;
  import tb_fp_pkg::*;
  logic        clk = 1'b0;
  logic        i_f;
  logic [31:0] a, y, e;
  int          checks = 0, failures = 0;

  fp_cvt dut (.i_f, .a, .y);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 1000; i++) begin
      i_f = i[0];
      if (i_f) begin
        case (i % 10)
          1: a = 32'h80000000;
          3: a = 32'($urandom % 2000) - 32'd1000;
          5: a = 32'h0;
          default: a = $urandom >> ($urandom % 31);
        endcase
        if (i % 4 == 3) a = -a;
        e = r2f(real'($signed(a)));
      end else begin
        case (i % 10)
          0: a = rand_f(158, 200);          // out of range
          2: a = rand_f(100, 126);          // |a| < 1
          4: a = 32'h7fc00000;
          6: a = 32'hcf000000;              // -2^31 exactly
          default: a = rand_f(127, 157);
        endcase
        if (a[30:23] == 8'hff) e = 32'h80000000;
        else if (a[30:23] >= 8'd158) e = a[31] ? 32'h80000000 : 32'h7fffffff;
        else e = 32'($rtoi(f2r(a)));
      end
      @(posedge clk);
      checks++;
      if (y !== e) begin
        failures++;
        if (failures < 10) $display("i_f=%b a=%h y=%h expected %h", i_f, a, y, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
