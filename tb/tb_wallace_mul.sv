// tb_wallace_mul: the two rows of the Wallace tree must add up to the
// product, for the 24 x 24 (FMUL) and 24 x 32 (FDIV) shapes.
module tb_wallace_mul;
  logic        clk = 1'b0;
  logic [23:0] a;
  logic [23:0] b;
  logic [31:0] b32;
  logic [47:0] s, c;
  logic [55:0] s2, c2;
  int          checks = 0, failures = 0;

  wallace_mul #(.WA(24), .WB(24)) dut  (.a(a), .b(b),   .sum(s),  .carry(c));
  wallace_mul #(.WA(24), .WB(32)) dut2 (.a(a), .b(b32), .sum(s2), .carry(c2));

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 500; i++) begin
      a   = (i == 0) ? 24'hffffff : 24'($urandom);
      b   = (i == 0) ? 24'hffffff : 24'($urandom);
      b32 = (i == 1) ? 32'hffffffff : $urandom;
      @(posedge clk);
      checks += 2;
      if (s + c !== 48'(a) * 48'(b)) begin
        failures++;
        $display("24x24 %h * %h: %h", a, b, s + c);
      end
      if (s2 + c2 !== 56'(a) * 56'(b32)) begin
        failures++;
        $display("24x32 %h * %h: %h", a, b32, s2 + c2);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
