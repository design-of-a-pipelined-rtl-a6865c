// tb_decoder: decodes the integer instructions of the published assembler
// listing (adds2 r0,r2,r4 = 0x04022000 ... xors r24,r25,r26 = 0x2b19d000),
// the lws2/movs words of the published test program, and one instruction of
// every other kind, and compares the control fields with hand-derived values.
module tb_decoder;
  import simd_pkg::*;
  logic        clk = 1'b0;
  logic [31:0] inst;
  ctrl_t       c;
  int          checks = 0, failures = 0;

  decoder dut (.inst, .ctrl(c));

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(input string what, input logic [31:0] got, input logic [31:0] want);
    checks++;
    if (got !== want) begin
      failures++;
      $display("%h %s: got %0h expected %0h", inst, what, got, want);
    end
  endtask

  // R-format check: word, alu op, dual, rd, rs, rt
  task automatic r_int(input logic [31:0] w, input alu_op_e op, input logic dual,
                       input int rd, input int rs, input int rt);
    inst = w;
    @(posedge clk);
    expect_eq("alu_op", 32'(c.alu_op), 32'(op));
    expect_eq("dual", 32'(c.dual), 32'(dual));
    expect_eq("int_wr", 32'(c.int_wr), 1);
    expect_eq("fp_op", 32'(c.fp_op), 0);
    expect_eq("dst", 32'(c.dst), rd);
    expect_eq("src_a", 32'(c.src_a), rs);
    expect_eq("src_b", 32'(c.src_b), rt);
    expect_eq("use_a/b", {c.use_a, c.use_b, c.use_imm}, 3'b110);
  endtask

  initial begin
    r_int(32'h04022000, ALU_ADD, 1,  0,  2,  4);
    r_int(32'h08443800, ALU_ADD, 0,  2,  4,  7);
    r_int(32'h0cc85000, ALU_SUB, 1,  6,  8, 10);
    r_int(32'h11095000, ALU_SUB, 0,  8,  9, 10);
    r_int(32'h158e8000, ALU_AND, 1, 12, 14, 16);
    r_int(32'h1bbef800, ALU_AND, 0, 29, 30, 31);
    r_int(32'h1e54b000, ALU_OR,  1, 18, 20, 22);
    r_int(32'h237ce800, ALU_OR,  0, 27, 28, 29);
    r_int(32'h271ae000, ALU_XOR, 1, 24, 26, 28);
    r_int(32'h2b19d000, ALU_XOR, 0, 24, 25, 26);
    // lws2 r8, r2
    inst = 32'h38480000; @(posedge clk);
    expect_eq("lws2", {c.ld, c.dual, c.int_wr, c.fp_wr, c.use_a, c.use_imm}, 6'b111011);
    expect_eq("lws2 base", 32'(c.src_a), 2);
    expect_eq("lws2 dst", 32'(c.dst), 8);
    // movs r1, 4
    inst = 32'ha8010004; @(posedge clk);
    expect_eq("movs", {c.int_wr, c.use_imm, c.use_a}, 3'b110);
    expect_eq("movs alu", 32'(c.alu_op), 32'(ALU_PASSB));
    expect_eq("movs dst/imm", {27'(c.dst), 16'(c.imm)}, {27'd1, 16'd4});
    // sws2 r4, r2 (op 24): memory[r2] = r4
    inst = {6'd24, 5'd2, 5'd4, 16'd0}; @(posedge clk);
    expect_eq("sws2", {c.st, c.dual, c.st_fp, c.use_a, c.use_b, c.int_wr}, 6'b110110);
    expect_eq("sws2 regs", {27'(c.src_a), 5'(c.src_b)}, {27'd2, 5'd4});
    // fsws2 f6, r2
    inst = {6'd35, 5'd2, 5'd6, 16'd8}; @(posedge clk);
    expect_eq("fsws2", {c.st, c.dual, c.st_fp, c.use_a, c.use_fb, c.use_b}, 6'b111110);
    // flws f6, r2
    inst = {6'd32, 5'd2, 5'd6, 16'd8}; @(posedge clk);
    expect_eq("flws", {c.ld, c.dual, c.fp_wr, c.int_wr}, 4'b1010);
    // beqs / gts / jals / jrs
    inst = {6'd25, 5'd3, 5'd4, 16'hfffe}; @(posedge clk);
    expect_eq("beqs", {c.beq, c.bgt, c.jal, c.jr, c.int_wr}, 5'b10000);
    inst = {6'd26, 5'd3, 5'd4, 16'h0003}; @(posedge clk);
    expect_eq("gts", {c.beq, c.bgt, c.jal, c.jr}, 4'b0100);
    inst = {6'd27, 26'h40}; @(posedge clk);
    expect_eq("jals", {c.jal, c.int_wr, 5'(c.dst)}, {2'b11, 5'd31});
    expect_eq("jals target", 32'(c.target), 32'h40);
    inst = {6'd28, 5'd31, 21'd0}; @(posedge clk);
    expect_eq("jrs", {c.jr, c.use_a, 5'(c.src_a)}, {2'b11, 5'd31});
    // FP arithmetic
    for (int k = 48; k <= 61; k++) begin
      inst = {6'(k), 5'd6, 5'd2, 5'd4, 11'd0}; @(posedge clk);
      expect_eq("fp", {c.fp_op, c.fp_wr, c.int_wr, c.dual, c.use_fa}, {3'b110, 1'(k % 2), 1'b1});
      expect_eq("fp regs", {5'(c.dst), 5'(c.src_a), 5'(c.src_b)}, {5'd6, 5'd2, 5'd4});
      expect_eq("fp op", 32'(c.fop),
                (k < 50) ? 32'(FOP_ADD) : (k < 52) ? 32'(FOP_SUB) : (k < 54) ? 32'(FOP_MUL) :
                (k < 56) ? 32'(FOP_DIV) : (k < 58) ? 32'(FOP_SQRT) : (k < 60) ? 32'(FOP_I2F) :
                32'(FOP_F2I));
      expect_eq("divsqrt", 32'(c.is_divsqrt), (k >= 54 && k < 58) ? 1 : 0);
      expect_eq("use_fb", 32'(c.use_fb), (k < 56) ? 1 : 0);
    end
    // nop
    inst = 32'h0; @(posedge clk);
    expect_eq("nop", {c.valid, c.int_wr, c.fp_wr, c.st}, 4'b0000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
