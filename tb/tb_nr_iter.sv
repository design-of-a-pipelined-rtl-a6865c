// tb_nr_iter: starts the Newton-Raphson unit on random operands in both
// modes, checks that done rises exactly ITER+1 cycles after start and that
// the result is within 2^-27 (relative) of 1/m or 1/sqrt(m'), computed in
// double precision.
module tb_nr_iter;
  import tb_fp_pkg::*;
  localparam int ITER = 3;
  logic        clk = 1'b0, rst_n = 1'b0;
  logic        start = 1'b0, mode = 1'b0, ack = 1'b0;
  logic [31:0] x = '0, result;
  logic        busy, done;
  int          checks = 0, failures = 0;

  nr_iter #(.ITER(ITER)) dut (.clk, .rst_n, .start, .mode, .x, .ack, .busy, .done, .result);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real m, want, got;
    int  cyc;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 400; i++) begin
      @(negedge clk);
      mode  = i[0];
      x     = (i < 4) ? {1'b0, 8'(126 + i), 23'd0} : rand_f(1, 254, 1);
      if (i == 6) x = 32'h3fffffff;
      start = 1'b1;
      cyc   = 0;
      @(negedge clk);
      start = 1'b0;
      cyc   = 1;
      while (!done && cyc < 50) begin
        checks++;
        if (!busy) begin failures++; $display("busy low while iterating"); end
        @(negedge clk);
        cyc++;
      end
      checks++;
      if (cyc != ITER + 1) begin
        failures++;
        $display("done after %0d cycles, expected %0d", cyc, ITER + 1);
      end
      m = 1.0 + real'(x[22:0]) / 8388608.0;
      if (mode && !x[23]) m = 2.0 * m;
      want = mode ? 1.0 / $sqrt(m) : 1.0 / m;
      got  = real'(result) / 2147483648.0;
      checks++;
      if ((got - want) / want > 7.5e-9 || (want - got) / want > 7.5e-9) begin
        failures++;
        $display("mode %0d m=%f got %.12f want %.12f", mode, m, got, want);
      end
      // result must hold until ack
      @(negedge clk);
      checks++;
      if (!done || real'(result) / 2147483648.0 != got) begin
        failures++;
        $display("result not held");
      end
      ack = 1'b1;
      @(negedge clk);
      ack = 1'b0;
      checks++;
      if (done) begin failures++; $display("done not cleared by ack"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
