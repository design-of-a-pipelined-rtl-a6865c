// tb_inst_mem: loads random words through the write port and reads them back
// through the fetch port, including the address wrap and the cleared
// initial contents.
module tb_inst_mem;
  localparam int WORDS = 64;
  logic        clk = 1'b0, we = 1'b0;
  logic [31:0] pc = '0, inst, waddr = '0, wdata = '0;
  logic [31:0] model [WORDS];
  int          checks = 0, failures = 0;

  inst_mem #(.WORDS(WORDS)) dut (.clk, .pc, .inst, .we, .waddr, .wdata);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < WORDS; i++) begin
      pc = 32'(4 * i);
      #1;
      checks++;
      if (inst !== 32'd0) begin failures++; $display("word %0d not cleared", i); end
    end
    for (int i = 0; i < WORDS; i++) begin
      @(negedge clk);
      we = 1'b1; waddr = 32'(4 * i); wdata = $urandom; model[i] = wdata;
    end
    @(negedge clk);
    we = 1'b0;
    for (int i = 0; i < 3 * WORDS; i++) begin
      pc = 32'(4 * i);
      #1;
      checks++;
      if (inst !== model[i % WORDS]) begin
        failures++;
        $display("pc %h: %h expected %h", pc, inst, model[i % WORDS]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
