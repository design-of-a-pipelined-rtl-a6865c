// tb_fp_div: streams one division per cycle through the three-stage
// quotient unit with the reciprocal supplied by the testbench
// (floor(2^31 / significand of b)) and checks each result two cycles later:
// within one unit in the last place of the correctly rounded quotient, and
// exact for zero, infinity and NaN cases.
module tb_fp_div;
  import tb_fp_pkg::*;
  logic        clk = 1'b0, rst_n = 1'b0;
  logic [31:0] a, b, r, y;
  logic [31:0] expq [$];
  logic        exactq [$];
  int          checks = 0, failures = 0;

  fp_div dut (.clk, .rst_n, .a, .b, .r, .y);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a = 0; b = 0; r = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 2000; i++) begin
      logic [31:0] e;
      logic        ex;
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
        0: begin a = 32'h41000000; b = 32'h40800000; end     // 8 / 4
        1: begin a = rand_f(100, 150); b = 32'h0; end
        2: begin a = 32'h0; b = rand_f(100, 150); end
        3: begin a = 32'h7f800000; b = 32'h7f800000; end
        default: begin a = rand_f(100, 150); b = rand_f(100, 150); end
      endcase
      r = 32'($floor(2147483648.0 / (1.0 + real'(b[22:0]) / 8388608.0)));
      ex = 1'b1;
      if (i % 6 == 1) e = {a[31] ^ b[31], 8'hff, 23'd0};
      else if (i % 6 == 2) e = {a[31] ^ b[31], 31'd0};
      else if (i % 6 == 3) e = 32'h7fc00000;
      else begin
        e  = r2f(f2r(a) / f2r(b));
        ex = 1'b0;
      end
      expq.push_back(e);
      exactq.push_back(ex);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
