// tb_int_alu: random operands for every ALU operation, compared with
// SystemVerilog arithmetic.
module tb_int_alu;
  import simd_pkg::*;
  logic        clk = 1'b0;
  alu_op_e     op;
  logic [31:0] a, b, y, exp_y;
  int          checks = 0, failures = 0;

  int_alu dut (.op(op), .a(a), .b(b), .y(y));

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 600; i++) begin
      op = alu_op_e'(i % 6);
      a  = $urandom;
      b  = (i % 7 == 0) ? a : $urandom;
      @(posedge clk);
      case (i % 6)
        0: exp_y = a + b;
        1: exp_y = a - b;
        2: exp_y = a & b;
        3: exp_y = a | b;
        4: exp_y = a ^ b;
        default: exp_y = b;
      endcase
      checks++;
      if (y !== exp_y) begin
        failures++;
        $display("ALU op %0d a=%h b=%h y=%h expected %h", i % 6, a, b, y, exp_y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
