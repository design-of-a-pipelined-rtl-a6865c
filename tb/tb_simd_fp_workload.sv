// tb_simd_fp_workload: the floating-point SIMD test case. Two operand pairs,
// (8.0, 4.0) in lane 0 and (1.5, 1.5) in lane 1, go through fadds2, fsubs2,
// fmuls2, fdivs2 and fsqrts2; a pair of integers goes through fi2fs2 and a
// pair of sums through ff2is2. Every lane result is read back from the FP
// registers and compared with double-precision arithmetic rounded to single
// (one unit in the last place allowed for division and square root). The
// test also checks that the seven double-data FP instructions produce their
// fourteen results with seven FP write-backs, and that the run ends within a
// cycle budget worked out from the pipeline: 12 instructions, 5 pipeline
// fill cycles, 2 x (NR_ITER + 1) cycles of Newton-Raphson stalls and at
// most 6 dependence stalls.
module tb_simd_fp_workload;
  import tb_fp_pkg::*;

  localparam int NR_ITER = 3;

  logic        clk = 1'b0, rst_n = 1'b0;
  logic        imem_we = 1'b0, host_dmem_we = 1'b0;
  logic [31:0] imem_addr = '0, imem_wdata = '0;
  logic [31:0] host_dmem_addr = '0, host_dmem_wdata = '0;
  logic [31:0] dbg_dmem_addr = '0, dbg_dmem_rdata;
  logic [4:0]  dbg_ireg_addr = '0, dbg_freg_addr = '0;
  logic [31:0] dbg_ireg_rdata, dbg_freg_rdata, pc;
  logic        stall_lw, stall_flw, stall_fpu, stall_fsw, stall_div_sqrt;
  logic        fwd_exe, fwd_mem, fwd_fp, branch_taken, retire_int, retire_fp;
  int          checks = 0, failures = 0;

  simd_cpu dut (
    .clk, .rst_n,
    .imem_we, .imem_addr, .imem_wdata,
    .host_dmem_we, .host_dmem_addr, .host_dmem_wdata,
    .dbg_dmem_addr, .dbg_dmem_rdata, .dbg_ireg_addr, .dbg_ireg_rdata,
    .dbg_freg_addr, .dbg_freg_rdata,
    .pc, .stall_lw, .stall_flw, .stall_fpu, .stall_fsw, .stall_div_sqrt,
    .fwd_exe, .fwd_mem, .fwd_fp, .branch_taken, .retire_int, .retire_fp
  );

  always #5 clk = ~clk;

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] R(int op, int rd, int rs, int rt);
    return {6'(op), 5'(rd), 5'(rs), 5'(rt), 11'd0};
  endfunction
  function automatic logic [31:0] I(int op, int rs, int rt, int imm);
    return {6'(op), 5'(rs), 5'(rt), 16'(imm)};
  endfunction

  localparam int BEQS = 25, FLWS2 = 33, MOVS = 42, FADDS2 = 49, FSUBS2 = 51, FMULS2 = 53,
                 FDIVS2 = 55, FSQRTS2 = 57, FI2FS2 = 59, FF2IS2 = 61;

  task automatic expect_freg(input int r, input logic [31:0] want, input int tol);
    dbg_freg_addr = 5'(r);
    #1;
    checks++;
    if (ulp_diff(dbg_freg_rdata, want) > tol) begin
      failures++;
      $display("f%0d = %h expected %h", r, dbg_freg_rdata, want);
    end else $display("f%0d = %h", r, dbg_freg_rdata);
  endtask

  int n_rfp = 0, last_wb = 0, cyc = 0;
  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (retire_fp) begin
      n_rfp++;
      last_wb = cyc;
    end
  end

  initial begin
    logic [31:0] prog [16];
    logic [31:0] data [6];
    prog = '{I(MOVS, 0, 2, 64), I(MOVS, 0, 3, 72),
             I(FLWS2, 2, 0, 0),           // f0 = 8.0, f1 = 1.5
             I(FLWS2, 2, 2, 4),           // f2 = 4.0, f3 = 1.5
             R(FADDS2, 4, 0, 2),
             R(FSUBS2, 6, 0, 2),
             R(FMULS2, 8, 0, 2),
             R(FDIVS2, 10, 0, 2),
             R(FSQRTS2, 12, 0, 0),
             I(FLWS2, 2, 14, 16),         // f14, f15 = integers
             R(FI2FS2, 16, 14, 0),
             R(FF2IS2, 18, 4, 0),
             I(BEQS, 0, 0, -1), 32'd0, 32'd0, 32'd0};
    // words 16..20 and 22: 8.0, 4.0, 1.5, 1.5, -2^31, 12345
    data = '{32'h41000000, 32'h40800000, 32'h3fc00000, 32'h3fc00000, 32'h80000000, 32'd12345};
    for (int i = 0; i < 16; i++) begin
      @(negedge clk);
      imem_we = 1'b1; imem_addr = 32'(4 * i); imem_wdata = prog[i];
    end
    @(negedge clk);
    imem_we = 1'b0;
    // lane 0 reads through r2 = 64, lane 1 through r3 = 72: words 16, 18 / 17, 19 / 20, 22
    for (int i = 0; i < 6; i++) begin
      int word;
      word = (i < 5) ? 16 + i : 22;
      @(negedge clk);
      host_dmem_we = 1'b1; host_dmem_addr = 32'(4 * word); host_dmem_wdata = data[i];
    end
    @(negedge clk);
    host_dmem_we = 1'b0;
    rst_n = 1'b1;
    repeat (120) @(negedge clk);

    expect_freg(4,  r2f(12.0), 0);       // fadds2
    expect_freg(5,  r2f(3.0), 0);
    expect_freg(6,  r2f(4.0), 0);        // fsubs2
    expect_freg(7,  r2f(0.0), 0);
    expect_freg(8,  r2f(32.0), 0);       // fmuls2
    expect_freg(9,  r2f(2.25), 0);
    expect_freg(10, r2f(2.0), 1);        // fdivs2
    expect_freg(11, r2f(1.0), 1);
    expect_freg(12, r2f($sqrt(8.0)), 1); // fsqrts2
    expect_freg(13, r2f($sqrt(1.5)), 1);
    expect_freg(16, 32'hcf000000, 0);    // fi2fs2: -2^31
    expect_freg(17, r2f(12345.0), 0);
    expect_freg(18, 32'd12, 0);          // ff2is2
    expect_freg(19, 32'd3, 0);

    checks++;
    if (n_rfp != 7) begin
      failures++;
      $display("%0d FP write-backs, expected 7", n_rfp);
    end
    $display("last FP write-back in cycle %0d", last_wb);
    checks++;
    if (last_wb > 12 + 5 + 2 * (NR_ITER + 1) + 6) begin
      failures++;
      $display("took longer than the pipeline allows");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
