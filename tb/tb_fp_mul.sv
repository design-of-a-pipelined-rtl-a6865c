// tb_fp_mul: streams one operation per cycle through the three-stage
// multiplier and checks each result two cycles later (the E1->E3 latency)
// against the exact double product rounded to single. Includes overflow,
// underflow to zero, zeros, infinities, inf x 0 and NaN.
module tb_fp_mul;
  import tb_fp_pkg::*;
  logic        clk = 1'b0, rst_n = 1'b0;
  logic [31:0] a, b, y;
  logic [31:0] expq [$];
  int          checks = 0, failures = 0;

  fp_mul dut (.clk, .rst_n, .a, .b, .y);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] ref_y(logic [31:0] x, logic [31:0] z);
    logic xn, zn, xi, zi, x0, z0;
    xn = x[30:23] == 8'hff && x[22:0] != 0;
    zn = z[30:23] == 8'hff && z[22:0] != 0;
    xi = x[30:23] == 8'hff && x[22:0] == 0;
    zi = z[30:23] == 8'hff && z[22:0] == 0;
    x0 = x[30:23] == 8'd0;
    z0 = z[30:23] == 8'd0;
    if (xn || zn || (xi && z0) || (zi && x0)) return 32'h7fc0_0000;
    if (xi || zi) return {x[31] ^ z[31], 8'hff, 23'd0};
    if (x0 || z0) return {x[31] ^ z[31], 31'd0};
    return r2f(f2r(x) * f2r(z));
  endfunction

  initial begin
    a = 0; b = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      if (expq.size() == 2) begin
        logic [31:0] e;
        e = expq.pop_front();
        checks++;
        if (y !== e) begin
          failures++;
          if (failures < 10) $display("result %h expected %h", y, e);
        end
      end
      case (i % 8)
        0: begin a = rand_f(20, 60); b = rand_f(20, 60); end                          // underflow
        1: begin a = rand_f(60, 100); b = rand_f(120, 180); end
        2: begin a = 32'h0; b = rand_f(1, 254); end
        3: begin a = 32'h7f800000; b = (i % 16 == 3) ? 32'h00000000 : rand_f(1, 254); end
        4: begin a = 32'h7fc00000; b = rand_f(1, 254); end
        5: begin a = rand_f(250, 254); b = rand_f(250, 254); end                       // overflow
        6: begin a = 32'h41000000; b = 32'h40800000; end                              // 8 and 4
        default: begin a = rand_f(110, 140); b = rand_f(110, 140); end
      endcase
      expq.push_back(ref_y(a, b));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
