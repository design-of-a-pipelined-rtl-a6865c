// tb_fpu: drives one FPU lane through every operation the way the CPU does:
// division and square root first run the Newton-Raphson iteration (checking
// that it takes NR_ITER+1 cycles), then the operands enter E1. Results are
// checked at E3 (two cycles after E1), and conversions also at E2.
// Arithmetic results must be correctly rounded (add, sub, mul, conversions)
// or within one unit in the last place (div, sqrt).
module tb_fpu;
  import simd_pkg::*;
  import tb_fp_pkg::*;
  localparam int NR_ITER = 3;
  logic        clk = 1'b0, rst_n = 1'b0;
  logic        ds_start = 1'b0, ds_mode = 1'b0, ds_ack = 1'b0;
  logic [31:0] ds_x = '0, ds_r;
  logic        ds_busy, ds_done;
  fop_e        op = FOP_ADD;
  logic [31:0] a = '0, b = '0, r = '0, cvt_e2, y;
  int          checks = 0, failures = 0;

  fpu #(.NR_ITER(NR_ITER)) dut (
    .clk, .rst_n, .ds_start, .ds_mode, .ds_x, .ds_ack, .ds_busy, .ds_done, .ds_r,
    .op, .a, .b, .r, .cvt_e2, .y
  );

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input logic [31:0] got, input logic [31:0] want,
                       input int tol);
    checks++;
    if (ulp_diff(got, want) > tol) begin
      failures++;
      if (failures < 12) $display("%s: got %h expected %h", what, got, want);
    end
  endtask

  initial begin
    fop_e        ops [7] = '{FOP_ADD, FOP_SUB, FOP_MUL, FOP_DIV, FOP_SQRT, FOP_F2I, FOP_I2F};
    logic [31:0] want;
    int          tol, cyc;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 700; i++) begin
      fop_e o;
      o = ops[i % 7];
      a = rand_f(110, 140, o == FOP_SQRT);
      b = rand_f(110, 140);
      if (i < 7) begin a = 32'h41000000; b = 32'h40800000; end   // 8.0, 4.0
      if (o == FOP_I2F) a = $urandom;
      if (o == FOP_F2I) a = rand_f(120, 150);
      tol = 0;
      unique case (o)
        FOP_ADD:  want = r2f(f2r(a) + f2r(b));
        FOP_SUB:  want = r2f(f2r(a) - f2r(b));
        FOP_MUL:  want = r2f(f2r(a) * f2r(b));
        FOP_DIV:  begin want = r2f(f2r(a) / f2r(b)); tol = 1; end
        FOP_SQRT: begin want = r2f($sqrt(f2r(a))); tol = 1; end
        FOP_I2F:  want = r2f(real'($signed(a)));
        default:  want = 32'($rtoi(f2r(a)));
      endcase
      // ITE step in ID
      if (o == FOP_DIV || o == FOP_SQRT) begin
        ds_start = 1'b1;
        ds_mode  = (o == FOP_SQRT);
        ds_x     = (o == FOP_SQRT) ? a : b;
        @(negedge clk);
        ds_start = 1'b0;
        cyc = 1;
        while (!ds_done && cyc < 40) begin
          @(negedge clk);
          cyc++;
        end
        checks++;
        if (cyc != NR_ITER + 1) begin
          failures++;
          $display("iteration took %0d cycles", cyc);
        end
        r = ds_r;
        ds_ack = 1'b1;
      end
      // E1
      op = o;
      @(negedge clk);
      ds_ack = 1'b0;
      op = FOP_ADD;
      a = '0;
      b = '0;
      // E2
      if (o == FOP_I2F || o == FOP_F2I) check("cvt at E2", cvt_e2, want, 0);
      @(negedge clk);
      // E3
      check($sformatf("op %0d at E3", o), y, want, tol);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
