// tb_fp_sqrt: streams one square root per cycle through the three-stage
// root unit with 1/sqrt(m') supplied by the testbench and checks each
// result two cycles later: within one unit in the last place of the
// correctly rounded root, exact for zero, +infinity and negative operands.
module tb_fp_sqrt;
  import tb_fp_pkg::*;
  logic        clk = 1'b0, rst_n = 1'b0;
  logic [31:0] x, r, y;
  logic [31:0] expq [$];
  logic        exactq [$];
  int          checks = 0, failures = 0;

  fp_sqrt dut (.clk, .rst_n, .x, .r, .y);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    x = 0; r = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 2000; i++) begin
      logic [31:0] e;
      logic        ex;
      real         m;
      @(negedge clk);
      if (expq.size() == 2) begin
        e  = expq.pop_front();
        ex = exactq.pop_front();
        checks++;
        if (ex ? (y !== e) : (ulp_diff(y, e) > 1)) begin
          failures++;
          if (failures < 10) $display("result %h expected %h", y, e);
        end
      end
      case (i % 6)
        0: x = 32'h40800000;                     // 4.0
        1: x = rand_f(100, 150, 1) | 32'h80000000;
        2: x = 32'h0;
        3: x = 32'h7f800000;
        default: x = rand_f(1, 254, 1);
      endcase
      m = 1.0 + real'(x[22:0]) / 8388608.0;
      if (!x[23]) m = 2.0 * m;
      r = 32'($floor(2147483648.0 / $sqrt(m)));
      ex = 1'b1;
      if (i % 6 == 1) e = 32'h7fc00000;
      else if (i % 6 == 2) e = 32'h0;
      else if (i % 6 == 3) e = 32'h7f800000;
      else begin
        e  = r2f($sqrt(f2r(x)));
        ex = 1'b0;
      end
      expq.push_back(e);
      exactq.push_back(ex);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
